// dc_engine: full-duplex ZL77 data compression engine.
//
// Two independent datapaths share the chip: the encoder (byte source ->
// Encode Input FIFO -> string matcher -> bit packer -> Encode Output FIFO)
// and the decoder (Decode Input FIFO -> bit unpacker -> history RAM ->
// Decode Output FIFO). Both keep a 1024-character history buffer and use
// 14-bit codewords {10-bit Index of the last matched character, 4-bit
// Length}, so a byte stream compressed by one engine's encoder is restored
// by another engine's decoder, provided both histories started alike (both
// are all zero after power-on) and see the same packets in the same order.
//
// The on-chip controllers that move packets between a shared memory and
// the four FIFOs (DMA controller) and that talk to the host processor and
// walk the packet descriptor queue (interface manager) are not part of this
// RTL: their connections are the ports below. Per packet, the mover writes
// the source bytes into ei_*, raises en_stop once the last byte is in, and
// collects eo_* bytes until en_done, when en_cw_count and en_valid_bits
// (valid bits of the last byte, 0 = 8) describe the result. For decoding,
// it pulses de_start with the packet's byte length and valid-bit count,
// writes the bytes into di_* and reads the restored bytes from do_* until
// de_done.
//
// The split into an encoder and a decoder half, the four FIFO sizes, the
// 1024-character history and the codeword format follow the original
// architecture. The per-packet control signals, the single clock (the
// original uses two-phase clocks and a faster packer clock) and the
// all-zero starting history are this design's own choices.
//
// One clock for everything; rst_n is the power-on reset, en_reset and
// de_reset restart the two controllers without clearing their histories.
module dc_engine #(
  parameter int unsigned ROWS     = 64,    // CAM rows    (history = ROWS*COLS)
  parameter int unsigned COLS     = 16,    // CAM columns
  parameter int unsigned EI_DEPTH = 256,
  parameter int unsigned EO_DEPTH = 128,
  parameter int unsigned DI_DEPTH = 128,
  parameter int unsigned DO_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- encoder ----
  input  logic        en_reset,
  input  logic        ei_wr,
  input  logic [7:0]  ei_data,
  output logic        ei_wr_rdy,
  output logic        ei_empty,
  input  logic        eo_rd,
  output logic [7:0]  eo_data,
  output logic        eo_rd_rdy,
  output logic        eo_full,
  input  logic        en_stop,
  output logic        en_done,
  output logic [15:0] en_cw_count,
  output logic [2:0]  en_valid_bits,
  // ---- decoder ----
  input  logic        de_reset,
  input  logic        di_wr,
  input  logic [7:0]  di_data,
  output logic        di_wr_rdy,
  output logic        di_full,
  input  logic        do_rd,
  output logic [7:0]  do_data,
  output logic        do_rd_rdy,
  output logic        do_empty,
  input  logic        de_start,
  input  logic [15:0] de_len_bytes,
  input  logic [2:0]  de_valid_bits,
  output logic        de_rdy,
  output logic        de_done
);

  zl77_encoder #(
    .ROWS (ROWS), .COLS (COLS), .EI_DEPTH (EI_DEPTH), .EO_DEPTH (EO_DEPTH)
  ) u_encoder (
    .clk, .rst_n, .en_reset,
    .ei_wr, .ei_data, .ei_wr_rdy, .ei_empty,
    .eo_rd, .eo_data, .eo_rd_rdy, .eo_full,
    .en_stop, .en_done, .en_cw_count, .en_valid_bits
  );

  zl77_decoder #(
    .HIST (ROWS * COLS), .DI_DEPTH (DI_DEPTH), .DO_DEPTH (DO_DEPTH)
  ) u_decoder (
    .clk, .rst_n, .de_reset,
    .di_wr, .di_data, .di_wr_rdy, .di_full,
    .do_rd, .do_data, .do_rd_rdy, .do_empty,
    .de_start, .de_len_bytes, .de_valid_bits, .de_rdy, .de_done
  );

endmodule
