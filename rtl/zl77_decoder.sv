// zl77_decoder: finite-state-machine controlled ZL77 decoder.
//
// Compressed bytes written into the Decode Input FIFO are turned back into
// 14-bit codewords by the bit unpacker. For a codeword {Index, Length} with
// Length > 0 the Subtractor forms the start address Index - Length + 1 (the
// Index names the LAST character of the match), which is loaded into the
// Address Counter; the Length presets the Length Counter. The decoder then
// reads Length characters from its 1024-character history RAM, writing each
// one to the Decode Output FIFO and saving it in the Character Buffer. When
// the Length Counter reaches zero the Address Counter is loaded from the
// History Pointer and the buffered characters are written into the history
// one per cycle; the final address goes back into the History Pointer. For
// Length = 0 the low 8 bits of the Index (held in the Tri-state Register)
// are the character itself: it is output and written into the history
// without a history read. Reading the whole match before appending it keeps
// the history identical to the encoder's, whose matcher compares a string
// against an unmodified buffer.
//
// Packets: de_start (one cycle, while de_rdy is high) resets the unpacker
// and gives the packet's length in bytes and the number of valid bits in
// its last byte (0 = all 8), as a Packet Description Table carries them.
// The decoder takes codewords while at least 14 valid bits remain, so the
// padding of the last byte is ignored; de_done pulses when the packet is
// finished. A codeword costs 2n+3 cycles for n characters (4 for a raw
// character) when the FIFOs and the unpacker do not stall. (The original
// estimate of about 2n+2 assumes a matcher that reports the address after
// the match, which removes the plus one; this design keeps the plus one and
// its cycle.) The unpacker runs
// on the decoder clock in this design and usually needs more, so the
// controller waits for BUP_RDY.
//
// de_reset clears the controller and the History Pointer but keeps the
// history contents; rst_n (power-on) also clears the history RAM, to the
// same all-zero contents the encoder's matcher starts with.
module zl77_decoder
  import dce_pkg::*;
#(
  parameter int unsigned HIST     = 1024,
  parameter int unsigned DI_DEPTH = 128,
  parameter int unsigned DO_DEPTH = 256,
  localparam int unsigned AW = $clog2(HIST)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        de_reset,
  // Decode Input FIFO, write side
  input  logic        di_wr,
  input  logic [7:0]  di_data,
  output logic        di_wr_rdy,
  output logic        di_full,
  // Decode Output FIFO, read side
  input  logic        do_rd,
  output logic [7:0]  do_data,
  output logic        do_rd_rdy,
  output logic        do_empty,
  // packet control
  input  logic        de_start,
  input  logic [15:0] de_len_bytes,
  input  logic [2:0]  de_valid_bits,
  output logic        de_rdy,
  output logic        de_done
);

  typedef enum logic [2:0] {
    D_IDLE, D_REQ, D_GET, D_SUB, D_READ, D_RAW, D_WB, D_DONE
  } dec_state_e;

  dec_state_e state;

  // ---------------- Decode Input FIFO and Bit Unpacker ----------------
  logic       di_rd, di_rd_rdy;
  logic [7:0] di_q;
  logic       bup, bup_rdy, bup_oe, bup_reset;
  codeword_t  cw;

  byte_fifo #(.DEPTH(DI_DEPTH), .ALMOST_EMPTY(0), .ALMOST_FULL(0)) u_di_fifo (
    .clk, .rst_n,
    .wr (di_wr), .wr_data (di_data), .wr_rdy (di_wr_rdy),
    .rd (di_rd), .rd_data (di_q), .rd_rdy (di_rd_rdy),
    .almost_empty (), .almost_full (di_full), .count ()
  );

  bit_unpacker u_bup (
    .clk, .rst_n,
    .bup_reset (bup_reset), .bup (bup), .rd_rdy (di_rd_rdy), .rd_data (di_q),
    .unpacked_data (cw), .bup_rdy (bup_rdy), .oe (bup_oe), .rd (di_rd)
  );

  // ---------------- Decode Output FIFO ----------------
  logic       do_wr, do_wr_rdy;
  logic [7:0] do_wdata;

  byte_fifo #(.DEPTH(DO_DEPTH), .ALMOST_EMPTY(0), .ALMOST_FULL(0)) u_do_fifo (
    .clk, .rst_n,
    .wr (do_wr), .wr_data (do_wdata), .wr_rdy (do_wr_rdy),
    .rd (do_rd), .rd_data (do_data), .rd_rdy (do_rd_rdy),
    .almost_empty (do_empty), .almost_full (), .count ()
  );

  // ---------------- datapath ----------------
  logic [7:0]       hist [HIST];     // history buffer RAM
  logic [AW-1:0]    addr_cnt;        // Address Counter
  logic [AW-1:0]    hist_ptr;        // History Pointer
  logic [AW-1:0]    idx_q;           // Index field of the current codeword
  logic [LEN_W-1:0] len_cnt;         // Length Counter
  logic [7:0]       tsr;             // Tri-state Register (low Index bits)
  logic [7:0]       char_buf [16];   // Character Buffer
  logic [3:0]       buf_cnt;         // Buffer Counter (characters stored)
  logic [3:0]       wb_cnt;          // characters written back so far
  logic [18:0]      bits_left;       // valid bits of the packet not yet unpacked

  logic [7:0] hist_q;
  assign hist_q = hist[addr_cnt];

  assign bup       = (state == D_REQ) && (bits_left >= 19'(CODE_W)) && bup_rdy;
  assign bup_reset = (state == D_IDLE) && de_start;
  assign do_wr     = ((state == D_READ) || (state == D_RAW)) && do_wr_rdy;
  assign do_wdata  = (state == D_RAW) ? tsr : hist_q;
  assign de_rdy    = (state == D_IDLE);
  assign de_done   = (state == D_DONE);

  // History RAM: cleared at power-on, written in the write-back cycles.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HIST; i++) hist[i] <= '0;
    end else if (state == D_WB) begin
      hist[addr_cnt] <= char_buf[wb_cnt];
    end
  end

  // Character Buffer: every character sent to the output FIFO is saved.
  always_ff @(posedge clk) begin
    if (do_wr) char_buf[buf_cnt] <= do_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      addr_cnt  <= '0;
      hist_ptr  <= '0;
      idx_q     <= '0;
      len_cnt   <= '0;
      tsr       <= '0;
      buf_cnt   <= '0;
      wb_cnt    <= '0;
      bits_left <= '0;
    end else if (de_reset) begin
      state    <= D_IDLE;
      hist_ptr <= '0;
    end else begin
      unique case (state)
        D_IDLE: begin
          if (de_start) begin
            bits_left <= {de_len_bytes, 3'b000}
                         - ((de_valid_bits == 3'd0) ? 19'd0 : 19'(4'd8 - {1'b0, de_valid_bits}));
            state <= D_REQ;
          end
        end
        D_REQ: begin
          if (bits_left < 19'(CODE_W)) state <= D_DONE;
          else if (bup_rdy)            state <= D_GET;
        end
        D_GET: begin                   // codeword on the unpacker output (OE)
          idx_q     <= AW'(cw.index);
          len_cnt   <= cw.length;
          tsr       <= cw.index[7:0];
          bits_left <= bits_left - 19'(CODE_W);
          buf_cnt   <= '0;
          state     <= (cw.length == '0) ? D_RAW : D_SUB;
        end
        D_SUB: begin                   // Subtractor: start = Index - Length + 1
          addr_cnt <= idx_q - AW'(len_cnt) + 1'b1;
          state    <= D_READ;
        end
        D_READ: begin
          if (do_wr_rdy) begin
            addr_cnt <= addr_cnt + 1'b1;
            buf_cnt  <= buf_cnt + 1'b1;
            len_cnt  <= len_cnt - 1'b1;
            if (len_cnt == LEN_W'(1)) begin
              addr_cnt <= hist_ptr;
              wb_cnt   <= '0;
              state    <= D_WB;
            end
          end
        end
        D_RAW: begin
          if (do_wr_rdy) begin
            buf_cnt  <= buf_cnt + 1'b1;
            addr_cnt <= hist_ptr;
            wb_cnt   <= '0;
            state    <= D_WB;
          end
        end
        D_WB: begin
          addr_cnt <= addr_cnt + 1'b1;
          wb_cnt   <= wb_cnt + 1'b1;
          if (wb_cnt + 1'b1 == buf_cnt) begin
            hist_ptr <= addr_cnt + 1'b1;
            state    <= D_REQ;
          end
        end
        D_DONE: state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

  a_get_has_codeword : assert property (@(posedge clk) disable iff (!rst_n)
    (state == D_GET) |-> bup_oe) else $error("zl77_decoder: no codeword from the unpacker");

endmodule
