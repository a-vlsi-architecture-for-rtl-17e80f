// zl77_encoder: finite-state-machine controlled ZL77 encoder.
//
// Source bytes written into the Encode Input FIFO are parsed into strings
// whose longest earlier occurrence in a 1024-character history buffer is
// found by the string matcher (vlsm). Each string becomes one fixed 14-bit
// codeword {Index, Length}: Index is the history address of the LAST
// character of the match, Length its length (1..15). A character with no
// match at all becomes {2'b00, character, Length 0}. The codewords are
// serialised into bytes by the bit packer and written into the Encode
// Output FIFO.
//
// Per string the controller issues INIT, then one COMPARE per character
// until CAM_HIT drops (or 15 characters hit), then OUTPUT to read the Index
// (skipped for a raw character, whose codeword comes from the Tri-state
// Register), then one UPDATE per encoded character to append it to the
// history at the Address Counter, which wraps at 1023. Each compared
// character is latched into the Tri-state Register and saved in the
// 16-entry Character Buffer at the Buffer Counter; the UPDATEs read the
// buffer back while the Length Counter counts down to END*. The character
// that ended a match with a miss is not encoded yet: it stays in the
// Tri-state Register and starts the next string instead of a FIFO read.
// A string of match length n thus takes max(2n+3, 4) cycles when no FIFO or
// packer stall occurs (2n+2 when it stops at the maximum length 15).
//
// End of packet: en_stop (from the controller that moves data into the
// input FIFO) says no more bytes will come for this packet. When the FIFO
// is empty and en_stop is high, a pending match is output at once (OUTPUT
// right after a COMPARE that hit), the bit packer is flushed so the last
// partial byte reaches the output FIFO, and en_done rises until en_stop is
// released. en_cw_count and en_valid_bits (valid bits in the last byte, 0
// meaning all 8) describe the packet while en_done is high; they are
// cleared when the next packet starts.
//
// This design runs the bit packer on the encoder clock; the packer needs
// 15 or more cycles per codeword, so the controller waits for BP_RDY before
// each OUTPUT. en_reset (CLR) clears the counters and the controller but
// keeps the history contents. Single clock, rst_n is the power-on reset.
module zl77_encoder
  import dce_pkg::*;
#(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 16,
  parameter int unsigned EI_DEPTH = 256,
  parameter int unsigned EO_DEPTH = 128,
  localparam int unsigned AW = $clog2(ROWS * COLS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_reset,
  // Encode Input FIFO, write side
  input  logic        ei_wr,
  input  logic [7:0]  ei_data,
  output logic        ei_wr_rdy,
  output logic        ei_empty,
  // Encode Output FIFO, read side
  input  logic        eo_rd,
  output logic [7:0]  eo_data,
  output logic        eo_rd_rdy,
  output logic        eo_full,
  // packet control
  input  logic        en_stop,
  output logic        en_done,
  output logic [15:0] en_cw_count,
  output logic [2:0]  en_valid_bits
);

  typedef enum logic [2:0] {
    E_INIT, E_CMP, E_OUT, E_UPD, E_FLUSH, E_FWAIT, E_DONE
  } enc_state_e;

  enc_state_e state;

  // ---------------- Encode Input FIFO ----------------
  logic       ei_rd, ei_rd_rdy;
  logic [7:0] ei_q;

  byte_fifo #(.DEPTH(EI_DEPTH), .ALMOST_EMPTY(0), .ALMOST_FULL(0)) u_ei_fifo (
    .clk, .rst_n,
    .wr (ei_wr), .wr_data (ei_data), .wr_rdy (ei_wr_rdy),
    .rd (ei_rd), .rd_data (ei_q), .rd_rdy (ei_rd_rdy),
    .almost_empty (ei_empty), .almost_full (), .count ()
  );

  // ---------------- datapath registers ----------------
  logic [7:0]       tsr;          // Tri-state Register
  logic             pending;      // tsr holds the first character of the next string
  logic [LEN_W-1:0] len_cnt;      // Length Counter
  logic [3:0]       buf_cnt;      // Buffer Counter
  logic [7:0]       char_buf [16];
  logic [AW-1:0]    addr_cnt;     // Address Counter (history pointer)
  logic             raw;          // current codeword is a raw character

  // ---------------- VLSM ----------------
  logic          v_en, v_s1, v_s0, cam_hit;
  logic [7:0]    v_data;
  logic [AW-1:0] v_index;

  vlsm #(.ROWS(ROWS), .COLS(COLS)) u_vlsm (
    .clk, .rst_n,
    .enable (v_en), .s1 (v_s1), .s0 (v_s0),
    .data (v_data), .address (addr_cnt),
    .index (v_index), .cam_hit (cam_hit)
  );

  // ---------------- Bit Packer and Encode Output FIFO ----------------
  logic              bp, bp_flush, bp_rdy, bp_wr, eo_wr_rdy;
  logic [7:0]        bp_data;
  codeword_t         cw;

  bit_packer u_bp (
    .clk, .rst_n,
    .bp_reset (en_reset), .bp (bp), .flush (bp_flush), .wr_rdy (eo_wr_rdy),
    .codeword (cw), .packed_data (bp_data), .bp_rdy (bp_rdy), .wr (bp_wr)
  );

  byte_fifo #(.DEPTH(EO_DEPTH), .ALMOST_EMPTY(0), .ALMOST_FULL(0)) u_eo_fifo (
    .clk, .rst_n,
    .wr (bp_wr), .wr_data (bp_data), .wr_rdy (eo_wr_rdy),
    .rd (eo_rd), .rd_data (eo_data), .rd_rdy (eo_rd_rdy),
    .almost_empty (), .almost_full (eo_full), .count ()
  );

  // ---------------- controller outputs ----------------
  logic have_char;       // a character can be compared this cycle
  logic [7:0] cmp_char;  // the character presented to the VLSM

  assign have_char = pending | ei_rd_rdy;
  assign cmp_char  = pending ? tsr : ei_q;

  always_comb begin
    v_en = 1'b0; {v_s1, v_s0} = VLSM_INIT;
    v_data = '0;
    ei_rd = 1'b0;
    bp = 1'b0; bp_flush = 1'b0;
    cw.index  = INDEX_W'(v_index);
    cw.length = len_cnt;
    unique case (state)
      E_INIT: begin
        v_en = 1'b1; {v_s1, v_s0} = VLSM_INIT;
      end
      E_CMP: if (have_char) begin
        v_en = 1'b1; {v_s1, v_s0} = VLSM_COMPARE;
        v_data = cmp_char;
        ei_rd  = ~pending;
      end
      E_OUT: if (bp_rdy) begin
        bp = 1'b1;
        if (raw) begin
          cw.index  = INDEX_W'(tsr);     // raw character in the Index field
          cw.length = '0;
        end else begin
          v_en = 1'b1; {v_s1, v_s0} = VLSM_OUTPUT;
        end
      end
      E_UPD: begin
        v_en = 1'b1; {v_s1, v_s0} = VLSM_UPDATE;
        v_data = char_buf[buf_cnt];
      end
      E_FLUSH: bp_flush = bp_rdy;
      default: ;
    endcase
  end

  assign en_done = (state == E_DONE);

  // Character Buffer: every compared character is saved at the Buffer Counter.
  always_ff @(posedge clk) begin
    if (state == E_CMP && have_char) char_buf[buf_cnt] <= cmp_char;
  end

  // ---------------- controller ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= E_INIT;
      tsr           <= '0;
      pending       <= 1'b0;
      len_cnt       <= '0;
      buf_cnt       <= '0;
      addr_cnt      <= '0;
      raw           <= 1'b0;
      en_cw_count   <= '0;
      en_valid_bits <= '0;
    end else if (en_reset) begin
      state         <= E_INIT;
      pending       <= 1'b0;
      len_cnt       <= '0;
      buf_cnt       <= '0;
      addr_cnt      <= '0;
      raw           <= 1'b0;
      en_cw_count   <= '0;
      en_valid_bits <= '0;
    end else begin
      unique case (state)
        E_INIT: begin
          len_cnt <= '0;
          buf_cnt <= '0;
          raw     <= 1'b0;
          state   <= E_CMP;
        end
        E_CMP: begin
          if (have_char) begin
            tsr     <= cmp_char;
            pending <= 1'b0;
            if (cam_hit) begin
              len_cnt <= len_cnt + 1'b1;
              buf_cnt <= buf_cnt + 1'b1;
              if (len_cnt == LEN_W'(MAX_MATCH - 1)) state <= E_OUT;
            end else begin
              if (len_cnt == '0) raw <= 1'b1;    // no match: encode the raw character
              else pending <= 1'b1;              // miss: character starts the next string
              state <= E_OUT;
            end
          end else if (en_stop) begin
            // end of packet: output a pending match, else finish
            state <= (len_cnt != '0) ? E_OUT : E_FLUSH;
          end
        end
        E_OUT: begin
          if (bp_rdy) begin
            buf_cnt       <= '0;
            en_cw_count   <= en_cw_count + 1'b1;
            en_valid_bits <= en_valid_bits + 3'(CODE_W % 8);
            state         <= E_UPD;
          end
        end
        E_UPD: begin
          addr_cnt <= addr_cnt + 1'b1;           // wraps at the buffer size
          buf_cnt  <= buf_cnt + 1'b1;
          len_cnt  <= len_cnt - 1'b1;            // DEC
          if (len_cnt <= LEN_W'(1)) state <= E_INIT;   // END*
        end
        E_FLUSH: begin
          if (bp_rdy) state <= E_FWAIT;
        end
        E_FWAIT: begin
          if (bp_rdy) state <= E_DONE;
        end
        E_DONE: begin
          if (!en_stop) begin
            en_cw_count   <= '0;
            en_valid_bits <= '0;
            state         <= E_INIT;
          end
        end
        default: state <= E_INIT;
      endcase
    end
  end

endmodule
