// tb_dc_engine: end-to-end testbench of the compression engine at its
// default (full) size: 1024-character history, 256/128-byte encoder FIFOs,
// 128/256-byte decoder FIFOs.
//
// The engine's encoder output is looped back into its own decoder, as if a
// second engine at the far end of a link received the packets. Two threads
// run at the same time, so both halves are busy together:
//  - the encoder thread writes each source packet into the Encode Input
//    FIFO with random gaps, raises en_stop, and when en_done comes records
//    the codeword count and last-byte valid bits;
//  - the decoder thread starts packet k once its sizes are known, feeds it
//    the compressed bytes as they leave the Encode Output FIFO, and checks
//    the restored bytes against the source.
// The compressed bytes and counts are also compared with a reference
// encoder of the same history size. Per-string encoder cycles and
// per-codeword decoder cycles, stalls excluded, are checked against the
// cost formulas (encoder max(2n+3,4), 2n+2 when the string stops at 15
// characters or at the packet end; decoder 2n+3, 4 for a raw character).
// Every mechanism the design relies on is counted, and the test fails if
// any of them never happened: raw and matched codewords, maximum-length
// matches, matches through the history wrap, history address wrap in both
// halves, zero padding on flush, and each kind of stall (input empty,
// packer busy, output FIFO full, unpacker empty, decoder output full,
// decoder input full).
module tb_dc_engine;
  import zl77_ref_pkg::*;
  localparam int N = 1024;
  localparam logic [2:0] E_INIT = 3'd0, E_CMP = 3'd1, E_OUT = 3'd2, E_UPD = 3'd3;
  localparam logic [2:0] D_REQ = 3'd1, D_GET = 3'd2, D_SUB = 3'd3, D_READ = 3'd4, D_RAW = 3'd5, D_WB = 3'd6;
  localparam int PACKETS = 14;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en_reset = 0, de_reset = 0;
  logic ei_wr = 0, ei_wr_rdy, ei_empty;
  logic [7:0] ei_data = '0;
  logic eo_rd, eo_rd_rdy, eo_full;
  logic [7:0] eo_data;
  logic en_stop = 0, en_done;
  logic [15:0] en_cw_count;
  logic [2:0] en_valid_bits;
  logic di_wr = 0, di_wr_rdy, di_full;
  logic [7:0] di_data = '0;
  logic do_rd, do_rd_rdy, do_empty;
  logic [7:0] do_data;
  logic de_start = 0, de_rdy, de_done;
  logic [15:0] de_len_bytes = '0;
  logic [2:0] de_valid_bits = '0;

  dc_engine dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- shared packet records ----------------
  typedef logic [7:0] bq_t[$];
  bq_t src_pkts[PACKETS];
  int  cw_count[PACKETS];
  int  vbits[PACKETS];
  int  nbytes[PACKETS];
  bit  enc_done_pkt[PACKETS];
  logic [7:0] link_q[$];       // bytes read from the Encode Output FIFO
  logic [7:0] dec_q[$];        // bytes read from the Decode Output FIFO
  int eo_pct = 100, do_pct = 100, ei_pct = 100, di_pct = 100;

  // ---------------- mechanism counters ----------------
  int n_raw = 0, n_match = 0, n_max = 0, n_wrap = 0, n_pad = 0;
  int n_ewrap = 0, n_dwrap = 0;
  int n_in_wait = 0, n_bp_wait = 0, n_eo_full = 0;
  int n_bup_wait = 0, n_do_full = 0, n_di_full = 0;
  int e_timed = 0, e_bad = 0, d_timed = 0, d_bad = 0;

  // random-rate readers of both output FIFOs
  bit eo_en, do_en;
  always @(negedge clk) begin
    eo_en <= ($urandom_range(0, 99) < eo_pct);
    do_en <= ($urandom_range(0, 99) < do_pct);
  end
  assign eo_rd = eo_rd_rdy && eo_en;
  assign do_rd = do_rd_rdy && do_en;
  always @(posedge clk) begin
    if (eo_rd) link_q.push_back(eo_data);
    if (do_rd) dec_q.push_back(do_data);
  end

  // ---------------- encoder stall and cycle accounting ----------------
  int e_busy, e_n; bit e_early;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_encoder.state == E_CMP && !dut.u_encoder.have_char) n_in_wait++;
    if (dut.u_encoder.state == E_OUT && !dut.u_encoder.bp_rdy) n_bp_wait++;
    if (!dut.u_encoder.eo_wr_rdy) n_eo_full++;
    if (dut.u_encoder.state == E_UPD && dut.u_encoder.addr_cnt == 10'(N - 1)) n_ewrap++;
    if (dut.u_encoder.state == E_OUT && dut.u_encoder.bp_rdy) begin
      e_n = dut.u_encoder.raw ? 0 : int'(dut.u_encoder.len_cnt);
      e_early = !dut.u_encoder.raw && !dut.u_encoder.pending;
    end
    if (dut.u_encoder.state == E_INIT) e_busy = 1;
    else if ((dut.u_encoder.state == E_CMP && !dut.u_encoder.have_char) ||
             (dut.u_encoder.state == E_OUT && !dut.u_encoder.bp_rdy)) begin
      // stall cycles are not part of the string's own cost
    end else if (dut.u_encoder.state inside {E_CMP, E_OUT, E_UPD}) begin
      e_busy++;
      if (dut.u_encoder.state == E_UPD && dut.u_encoder.len_cnt <= 1) begin
        e_timed++;
        if (e_busy != ((e_n == 0) ? 4 : (e_early ? 2 * e_n + 2 : 2 * e_n + 3))) e_bad++;
      end
    end
  end

  // ---------------- decoder stall and cycle accounting ----------------
  int d_busy, d_n;
  bit di_waiting = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_decoder.state == D_REQ && !dut.u_decoder.bup_rdy) n_bup_wait++;
    if ((dut.u_decoder.state == D_READ || dut.u_decoder.state == D_RAW) && !dut.u_decoder.do_wr_rdy) n_do_full++;
    if (di_waiting && !di_wr_rdy) n_di_full++;
    if (dut.u_decoder.state == D_WB && dut.u_decoder.hist_ptr == 10'(N - 1)) n_dwrap++;
    if (dut.u_decoder.state == D_REQ && dut.u_decoder.bup_rdy) d_busy = 1;
    else if (dut.u_decoder.state == D_GET) begin
      d_busy++;
      d_n = int'(dut.u_decoder.cw.length);
    end else if (dut.u_decoder.state == D_SUB || dut.u_decoder.state == D_WB ||
                 ((dut.u_decoder.state == D_READ || dut.u_decoder.state == D_RAW) && dut.u_decoder.do_wr_rdy)) begin
      d_busy++;
      if (dut.u_decoder.state == D_WB && dut.u_decoder.wb_cnt + 1 == dut.u_decoder.buf_cnt) begin
        d_timed++;
        if (d_busy != ((d_n == 0) ? 4 : 2 * d_n + 3)) d_bad++;
      end
    end
  end

  // ---------------- encoder thread ----------------
  task automatic encode_all(zl77_model m);
    for (int p = 0; p < PACKETS; p++) begin
      logic [7:0] data[$], exp_bytes[$], got[$];
      cw_t cws[$];
      int base, len;
      // a mix of short, long, fast and slow packets
      len = (p == 2) ? 1 : (p == 3) ? 2500 : (p == 4) ? 1500 : $urandom_range(20, 700);
      ei_pct = (p < 2) ? 100 : $urandom_range(5, 100);
      eo_pct = (p == 4) ? 1 : (p < 2) ? 100 : $urandom_range(20, 100);
      make_packet(len, data);
      src_pkts[p] = data;
      m.encode(data, cws);
      n_raw += m.n_raw; n_match += m.n_match; n_max += m.n_max; n_wrap += m.n_wrap;
      pack(cws, exp_bytes);
      base = link_q.size();
      foreach (data[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 99) >= ei_pct) @(negedge clk);
        while (!ei_wr_rdy) @(negedge clk);
        ei_wr = 1; ei_data = data[i];
        @(negedge clk); ei_wr = 0;
      end
      en_stop = 1;
      while (!en_done) @(negedge clk);
      cw_count[p] = int'(en_cw_count);
      vbits[p] = int'(en_valid_bits);
      if (en_valid_bits != 0) n_pad++;
      check(cw_count[p] == cws.size(), $sformatf("packet %0d: %0d codewords, expected %0d", p, cw_count[p], cws.size()));
      check(vbits[p] == (14 * cws.size()) % 8, $sformatf("packet %0d: valid bits of last byte", p));
      eo_pct = 100;
      while (eo_rd_rdy) @(negedge clk);
      @(negedge clk);
      nbytes[p] = link_q.size() - base;
      check(nbytes[p] == exp_bytes.size(), $sformatf("packet %0d: %0d compressed bytes, expected %0d", p, nbytes[p], exp_bytes.size()));
      for (int i = 0; i < exp_bytes.size() && base + i < link_q.size(); i++)
        check(link_q[base + i] == exp_bytes[i], $sformatf("packet %0d: compressed byte %0d", p, i));
      enc_done_pkt[p] = 1;
      en_stop = 0;
      @(negedge clk);
    end
  endtask

  // ---------------- decoder thread ----------------
  task automatic decode_all();
    int pos = 0;
    for (int p = 0; p < PACKETS; p++) begin
      int base;
      while (!enc_done_pkt[p]) @(negedge clk);
      di_pct = (p < 2) ? 100 : $urandom_range(30, 100);
      do_pct = (p == 5) ? 1 : (p < 2) ? 100 : $urandom_range(20, 100);
      base = dec_q.size();
      while (!de_rdy) @(negedge clk);
      de_start = 1; de_len_bytes = 16'(nbytes[p]); de_valid_bits = 3'(vbits[p]);
      @(negedge clk); de_start = 0;
      for (int i = 0; i < nbytes[p]; i++) begin
        while ($urandom_range(0, 99) >= di_pct) @(negedge clk);
        // a byte is waiting; count the cycles the full FIFO refuses it
        di_waiting = 1;
        while (!di_wr_rdy) @(negedge clk);
        di_waiting = 0;
        di_wr = 1; di_data = link_q[pos + i];
        @(negedge clk); di_wr = 0;
      end
      pos += nbytes[p];
      while (!de_done) @(negedge clk);
      do_pct = 100;
      repeat (5) @(negedge clk);
      while (do_rd_rdy) @(negedge clk);
      @(negedge clk);
      check(dec_q.size() - base == src_pkts[p].size(),
            $sformatf("packet %0d: %0d bytes restored, expected %0d", p, dec_q.size() - base, src_pkts[p].size()));
      foreach (src_pkts[p][i]) if (base + i < dec_q.size())
        check(dec_q[base + i] == src_pkts[p][i], $sformatf("packet %0d: restored byte %0d", p, i));
    end
  endtask

  initial begin
    zl77_model m;
    m = new(N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      encode_all(m);
      decode_all();
    join
    $display("encoder strings timed=%0d wrong=%0d; decoder codewords timed=%0d wrong=%0d",
             e_timed, e_bad, d_timed, d_bad);
    $display("raw=%0d match=%0d max=%0d wrap_match=%0d enc_wrap=%0d dec_wrap=%0d padded=%0d",
             n_raw, n_match, n_max, n_wrap, n_ewrap, n_dwrap, n_pad);
    $display("stalls: in_empty=%0d packer=%0d eo_full=%0d unpacker=%0d do_full=%0d di_full=%0d",
             n_in_wait, n_bp_wait, n_eo_full, n_bup_wait, n_do_full, n_di_full);
    check(e_timed > 0 && e_bad == 0, "encoder cycles per string");
    check(d_timed > 0 && d_bad == 0, "decoder cycles per codeword");
    check(n_raw > 0, "raw codewords");
    check(n_match > 0, "matched codewords");
    check(n_max > 0, "maximum-length matches");
    check(n_wrap > 0, "matches through the history wrap");
    check(n_ewrap > 0 && n_dwrap > 0, "history address wrap in encoder and decoder");
    check(n_pad > 0, "zero-padded final byte");
    check(n_in_wait > 0 && n_bp_wait > 0 && n_eo_full > 0, "encoder stalls");
    check(n_bup_wait > 0 && n_do_full > 0 && n_di_full > 0, "decoder stalls");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
