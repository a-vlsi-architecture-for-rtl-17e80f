// byte_fifo: the byte-wide first-in first-out buffer used for the encode
// input (256 bytes), encode output (128), decode input (128) and decode
// output (256) FIFOs of the engine.
//
// The FIFO keeps its own read and write pointers, so its users only
// handshake: a writer may assert WR while WR_RDY (not full) is high, a
// reader may assert RD while RD_RDY (not empty) is high. The read side is
// show-ahead: rd_data already shows the oldest byte while RD_RDY is high,
// and RD removes it at the clock edge. almost_empty (the EI_EMPTY-style
// "empty or almost empty" warning) is high when at most ALMOST_EMPTY bytes
// are stored; almost_full (the EO_FULL-style "full or almost full"
// warning) when at most ALMOST_FULL free places remain. The warning
// thresholds and the synchronous single-clock implementation are this
// design's choices. A write to a full FIFO and a read from an empty one
// are ignored (and flagged by assertions).
module byte_fifo #(
  parameter int unsigned DEPTH        = 256,
  parameter int unsigned ALMOST_EMPTY = 0,
  parameter int unsigned ALMOST_FULL  = 0,
  localparam int unsigned PW = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic [7:0]  wr_data,
  output logic        wr_rdy,
  input  logic        rd,
  output logic [7:0]  rd_data,
  output logic        rd_rdy,
  output logic        almost_empty,
  output logic        almost_full,
  output logic [PW:0] count
);

  logic [7:0]    mem [DEPTH];
  logic [PW-1:0] wptr, rptr;
  logic          do_wr, do_rd;

  assign wr_rdy  = (count != (PW+1)'(DEPTH));
  assign rd_rdy  = (count != '0);
  assign do_wr   = wr & wr_rdy;
  assign do_rd   = rd & rd_rdy;
  assign rd_data = mem[rptr];
  assign almost_empty = (count <= (PW+1)'(ALMOST_EMPTY));
  assign almost_full  = (count >= (PW+1)'(DEPTH - ALMOST_FULL));

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == PW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == PW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (PW+1)'(do_wr) - (PW+1)'(do_rd);
    end
  end

  a_no_overflow  : assert property (@(posedge clk) disable iff (!rst_n) wr |-> wr_rdy)
    else $error("byte_fifo: write while full");
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n) rd |-> rd_rdy)
    else $error("byte_fifo: read while empty");

endmodule
