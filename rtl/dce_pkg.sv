// dce_pkg: types and constants shared by the ZL77 data compression engine.
//
// The engine encodes a byte stream into fixed 14-bit codewords made of a
// 10-bit Index into a 1024-character history buffer and a 4-bit match Length
// (1..15; 0 means "no match, the raw character sits in the low 8 bits of the
// Index field"). These sizes are the ones the design is built around. The
// placement of the two fields inside the 14-bit word (Index high, Length low)
// and the least-significant-bit-first serial order used by the bit packer
// and unpacker are choices of this implementation.
package dce_pkg;

  // History buffer size and codeword fields.
  localparam int unsigned HIST_SIZE  = 1024;
  localparam int unsigned INDEX_W    = 10;   // log2(HIST_SIZE)
  localparam int unsigned LEN_W      = 4;    // Length field, max match 15
  localparam int unsigned CODE_W     = INDEX_W + LEN_W;  // 14
  localparam int unsigned CHAR_W     = 8;
  localparam int unsigned MAX_MATCH  = (1 << LEN_W) - 1;  // 15

  // VLSM function modes, selected by {S1,S0} while ENABLE is high.
  typedef enum logic [1:0] {
    VLSM_INIT    = 2'b00,
    VLSM_COMPARE = 2'b01,
    VLSM_OUTPUT  = 2'b10,
    VLSM_UPDATE  = 2'b11
  } vlsm_mode_e;

  // A ZL77 codeword as carried on the 14-bit bus into the bit packer and
  // out of the bit unpacker.
  typedef struct packed {
    logic [INDEX_W-1:0] index;   // index of the LAST matched character, or {2'b00, raw char}
    logic [LEN_W-1:0]   length;  // match length, 0 = raw character
  } codeword_t;

endpackage
