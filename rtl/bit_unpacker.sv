// bit_unpacker: serial unpacker of a byte stream into 14-bit codewords.
//
// The reverse of the bit packer. Bytes read from the decode input FIFO are
// loaded into an 8-bit shift register and shifted, least significant bit
// first, into a 14-bit codeword shift register. A countdown counter preset
// to 14 tracks the bits still needed (MORE* when it reaches zero); a
// count-to-8 counter tracks the bits taken from the current byte (CONT*
// every eight shifts, which triggers the next byte read). The unpacker
// always keeps the next codeword ready: after reset it prefetches until
// the codeword register is full, and as soon as a codeword is handed out it
// refills the register. A byte is read (RD, one cycle) only while the FIFO
// offers one (RD_RDY); otherwise the controller waits.
//
// Controller states (S2 S1 S0): 000 codeword ready (BUP_RDY), 001 output
// (OE), 011 shift, 010 read a byte, 110 wait for RD_RDY, 100 reset
// (clear counters, then prefetch). BUP_RESET sends the controller to 100
// from any state. The state codes 000/001/011/110/100 and their roles follow
// the design description; the separate read state 010 is this design's
// choice for the sixth state.
//
// Timing: one clock. BUP is sampled while BUP_RDY is high; the codeword is
// on unpacked_data, with oe high, in the next cycle, and reads 0 otherwise
// (tri-state output modelled as a zero drive). A refill takes 14 shift
// cycles plus one cycle per byte read. rd_data must be valid whenever
// rd_rdy is high (show-ahead FIFO); the byte is taken in the RD cycle.
module bit_unpacker
  import dce_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bup_reset,
  input  logic              bup,
  input  logic              rd_rdy,
  input  logic [7:0]        rd_data,
  output logic [CODE_W-1:0] unpacked_data,
  output logic              bup_rdy,
  output logic              oe,
  output logic              rd
);

  typedef enum logic [2:0] {
    BU_READY = 3'b000,
    BU_OUT   = 3'b001,
    BU_SHIFT = 3'b011,
    BU_READ  = 3'b010,
    BU_WAIT  = 3'b110,
    BU_RESET = 3'b100
  } bu_state_e;

  bu_state_e         state;
  logic [CODE_W-1:0] cw_sr;      // 14-bit static shift register
  logic [7:0]        byte_sr;    // 8-bit static shift register
  logic [3:0]        countdown;  // codeword bits still to shift in
  logic [3:0]        cnt8;       // bits taken from the current byte

  assign bup_rdy       = (state == BU_READY);
  assign oe            = (state == BU_OUT);
  assign rd            = (state == BU_READ) & rd_rdy;
  assign unpacked_data = oe ? cw_sr : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= BU_RESET;
      cw_sr     <= '0;
      byte_sr   <= '0;
      countdown <= '0;
      cnt8      <= '0;
    end else if (bup_reset) begin
      state <= BU_RESET;
    end else begin
      unique case (state)
        BU_RESET: begin
          cnt8      <= '0;
          countdown <= 4'(CODE_W);
          state     <= BU_READ;
        end
        BU_READ: begin
          if (rd_rdy) begin
            byte_sr <= rd_data;         // RD is the load enable
            cnt8    <= '0;
            state   <= BU_SHIFT;
          end else begin
            state <= BU_WAIT;
          end
        end
        BU_WAIT: begin
          if (rd_rdy) state <= BU_READ;
        end
        BU_SHIFT: begin
          cw_sr     <= {byte_sr[0], cw_sr[CODE_W-1:1]};
          byte_sr   <= byte_sr >> 1;
          countdown <= countdown - 4'd1;
          cnt8      <= cnt8 + 4'd1;
          if (countdown == 4'd1) state <= BU_READY;
          else if (cnt8 == 4'd7) state <= BU_READ;
        end
        BU_READY: begin
          if (bup) state <= BU_OUT;
        end
        BU_OUT: begin
          countdown <= 4'(CODE_W);
          state     <= (cnt8 == 4'd8) ? BU_READ : BU_SHIFT;
        end
        default: state <= BU_RESET;
      endcase
    end
  end

endmodule
