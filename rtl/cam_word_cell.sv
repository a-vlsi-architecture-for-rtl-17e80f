// cam_word_cell: one byte-associative CAM word of the string matcher.
//
// Holds one history-buffer character. Its 8-bit match cell compares the
// stored byte with the global DATA bus (M = all eight bit cells agree). The
// cell hits in a COMPARE cycle only if M is true AND its left-hand neighbour
// hit in the previous COMPARE cycle: hit = M & hit_in, where hit_in is the
// neighbour's delayed hit. The Delay block is a flip-flop that keeps this
// cell's hit from the last COMPARE for its right-hand neighbour (hit_dly);
// INIT forces that flip-flop to 1 so that every cell may start a match on
// the first character of a new string. The delayed hit also drives the
// V_MATCH pull-down of the column encoder (gated by this row's ENCODE line),
// which lets row and column encoding run one cycle apart.
//
// Timing: one clock. The transistor-level cell precharges M and the match
// lines in phase 1 and evaluates in phase 2; here a rising clock edge ends
// each cycle, and hit / vmatch are combinational within the cycle. The
// delay flip-flop loads only in COMPARE and INIT cycles, so OUTPUT, UPDATE
// and idle cycles keep the match state. The stored byte is written when
// select (row SELECT AND column decode during UPDATE) is high. Reset clears
// the byte and the delay flip-flop.
module cam_word_cell (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,     // global DATA bus
  input  logic       select,   // write enable for this word (UPDATE)
  input  logic       init,     // INIT: force the delayed hit to 1
  input  logic       compare,  // COMPARE cycle
  input  logic       hit_in,   // left neighbour's delayed hit, HIT(n-1,t-1)
  input  logic       encode,   // ENCODE line of this word's row
  output logic       hit,      // HIT(n,t): pulls this row's H_MATCH
  output logic       hit_dly,  // HIT(n,t-1): to the right-hand neighbour
  output logic       vmatch    // pulls this column's V_MATCH
);

  logic [7:0] word_q;
  logic       m;

  assign m      = (word_q == data);
  assign hit    = compare & m & hit_in;
  assign vmatch = encode & hit_dly;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q  <= '0;
      hit_dly <= 1'b0;
    end else begin
      if (select)       word_q  <= data;
      if (init)         hit_dly <= 1'b1;
      else if (compare) hit_dly <= hit;
    end
  end

endmodule
