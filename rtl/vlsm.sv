// vlsm: Variable Length String Matcher, the longest-match search engine of
// the ZL77 encoder.
//
// The history buffer lives in a ROWS x COLS array of byte-associative CAM
// word cells (cam_word_cell), word n = row*COLS + col. A search presents the
// input string one character per COMPARE cycle on DATA; a word hits when it
// holds the character and its left-hand neighbour hit in the previous
// COMPARE (the last word's neighbour is word N-1 -> word 0, so the buffer is
// circular). INIT first forces every delayed hit to 1. While any word hits,
// CAM_HIT is high and the string goes on; the first COMPARE that misses ends
// the search, and the length of the match equals the number of COMPAREs that
// hit. The Index produced is the address of the lowest-numbered word that
// hit in the last COMPARE that hit, i.e. the address of the LAST character
// of the longest match (start = Index - Length + 1, modulo N).
//
// Function modes (ENABLE, S1, S0): 0xx NOP, 100 INIT, 101 COMPARE, 110
// OUTPUT (drive INDEX), 111 UPDATE (write DATA into word ADDRESS).
// ADDRESS[9:4] feeds the row decoder and ADDRESS[3:0] the column decoder.
//
// Address encoding is pipelined over two cycles as the design intends:
// in a COMPARE cycle the row priority encoder resolves the H_MATCH lines of
// the current hits (and gives CAM_HIT), while the column priority encoder
// resolves the V_MATCH lines of the PREVIOUS compare's hits (the cells'
// delayed hits) in the row latched one cycle earlier (ENCODE lines from the
// row decoder). Two row-address registers and one column-address register
// therefore hold the address of the hit one COMPARE back. When the search
// ends on a miss, OUTPUT reads {row two back, column one back}. When the
// controller stops after a COMPARE that hit (maximum length or end of
// packet), there was no trailing miss; this design then lets OUTPUT resolve
// the column of the last row directly, using the same column encoder.
//
// Timing: single clock, all modes take one cycle; CAM_HIT and INDEX are
// valid combinationally within the COMPARE / OUTPUT cycle and are sampled by
// the controller at the end of it. INDEX reads 0 outside OUTPUT (the
// tri-state output is modelled as a zero drive).
module vlsm
  import dce_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 16,
  localparam int unsigned N  = ROWS * COLS,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned CW = $clog2(COLS),
  localparam int unsigned AW = RW + CW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          s1,
  input  logic          s0,
  input  logic [7:0]    data,
  input  logic [AW-1:0] address,
  output logic [AW-1:0] index,
  output logic          cam_hit
);

  // ---------------- function mode decoder ----------------
  logic init_c, comp_c, write_c, rdaddr_c;
  always_comb begin
    init_c   = 1'b0;
    comp_c   = 1'b0;
    write_c  = 1'b0;
    rdaddr_c = 1'b0;
    if (enable) begin
      unique case (vlsm_mode_e'({s1, s0}))
        VLSM_INIT:    init_c   = 1'b1;
        VLSM_COMPARE: comp_c   = 1'b1;
        VLSM_OUTPUT:  rdaddr_c = 1'b1;
        VLSM_UPDATE:  write_c  = 1'b1;
      endcase
    end
  end

  // ---------------- address pipeline registers ----------------
  logic [RW-1:0] row_q1, row_q2;   // two layers of row-address flip-flops
  logic [CW-1:0] col_q;            // one layer of column-address flip-flops
  logic          last_hit;         // CAM_HIT of the most recent COMPARE
  logic          prev_hit;         // CAM_HIT of the COMPARE before it

  // ---------------- row / column decoders ----------------
  logic [RW-1:0]   row_dec_in;
  logic [ROWS-1:0] row_dec;
  logic [COLS-1:0] col_dec;
  logic [ROWS-1:0] encode_ln;      // ENCODE lines
  logic [ROWS-1:0] select_ln;      // SELECT lines (row write enables)

  // During UPDATE the row decoder takes ADDRESS[9:4]; otherwise it decodes
  // the latched row-encoder output to drive the ENCODE lines.
  assign row_dec_in = write_c ? address[AW-1:CW] : row_q1;

  always_comb begin
    row_dec = '0;
    row_dec[row_dec_in] = 1'b1;
    col_dec = '0;
    col_dec[address[CW-1:0]] = 1'b1;
  end

  assign select_ln = write_c ? row_dec : '0;
  assign encode_ln = (comp_c | rdaddr_c) ? row_dec : '0;

  // ---------------- CAM word array ----------------
  logic [N-1:0] hit, hit_dly, vmatch;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned W    = r * COLS + c;
      localparam int unsigned LEFT = (W == 0) ? N - 1 : W - 1;
      cam_word_cell u_word (
        .clk     (clk),
        .rst_n   (rst_n),
        .data    (data),
        .select  (select_ln[r] & col_dec[c]),
        .init    (init_c),
        .compare (comp_c),
        .hit_in  (hit_dly[LEFT]),
        .encode  (encode_ln[r]),
        .hit     (hit[W]),
        .hit_dly (hit_dly[W]),
        .vmatch  (vmatch[W])
      );
    end
  end

  // H_MATCH: wired-OR of the hits in a row. V_MATCH: wired-OR of the
  // ENCODE-gated delayed hits in a column.
  logic [ROWS-1:0] h_match;
  logic [COLS-1:0] v_match;
  always_comb begin
    v_match = '0;
    for (int unsigned r = 0; r < ROWS; r++) begin
      h_match[r] = |hit[r*COLS +: COLS];
      v_match    = v_match | vmatch[r*COLS +: COLS];
    end
  end

  // ---------------- row and column priority encoders ----------------
  logic [RW-1:0] row_addr;
  logic [CW-1:0] col_addr;
  logic          any_row;
  logic          any_col_unused;

  addr_prio_enc #(.N(ROWS)) u_row_enc (
    .match (h_match),
    .addr  (row_addr),
    .hit   (any_row)
  );

  addr_prio_enc #(.N(COLS)) u_col_enc (
    .match (v_match),
    .addr  (col_addr),
    .hit   (any_col_unused)
  );

  assign cam_hit = comp_c & any_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_q1   <= '0;
      row_q2   <= '0;
      col_q    <= '0;
      last_hit <= 1'b0;
      prev_hit <= 1'b0;
    end else if (init_c) begin
      last_hit <= 1'b0;
      prev_hit <= 1'b0;
    end else if (comp_c) begin
      row_q1   <= row_addr;
      row_q2   <= row_q1;
      col_q    <= col_addr;
      last_hit <= any_row;
      prev_hit <= last_hit;
    end
  end

  // ---------------- INDEX output ----------------
  always_comb begin
    index = '0;
    if (rdaddr_c) begin
      if (last_hit) index = {row_q1, col_addr};
      else          index = {row_q2, col_q};
    end
  end

  // An OUTPUT is only meaningful when one of the last two COMPAREs hit.
  a_output_after_hit : assert property (@(posedge clk) disable iff (!rst_n)
    rdaddr_c |-> (last_hit || prev_hit))
    else $error("vlsm: OUTPUT issued without a preceding hit");

endmodule
