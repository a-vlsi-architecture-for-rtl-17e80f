// tb_zl77_encoder: self-checking testbench of the ZL77 encoder.
//
// Runs a series of packets through the encoder with a 128-character history
// (16 x 8 CAM) so that the history wraps many times. Each packet mixes
// repeated words, long runs (which reach the 15-character maximum) and
// random bytes (raw characters). Bytes are written into the input FIFO with
// random gaps (so the encoder sometimes waits for data) and the output FIFO
// is drained at a random rate (so it sometimes fills up). Checked against
// the reference model: every output byte, the codeword count and valid-bit
// count of each packet, and that the reference decoder gives back the
// source. With the FIFOs and packer never stalling the controller, each
// string must take max(2n+3, 4) cycles (2n+2 when it stops at 15 characters
// or at the end of the packet); the testbench counts the controller's busy
// cycles per codeword to check this.
module tb_zl77_encoder;
  import zl77_ref_pkg::*;
  localparam int ROWS = 16, COLS = 8, N = ROWS * COLS;
  // encoder controller state codes
  localparam logic [2:0] S_INIT = 3'd0, S_CMP = 3'd1, S_OUT = 3'd2, S_UPD = 3'd3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en_reset = 0;
  logic ei_wr = 0, ei_wr_rdy, ei_empty;
  logic [7:0] ei_data = '0;
  logic eo_rd, eo_rd_rdy, eo_full;
  logic [7:0] eo_data;
  logic en_stop = 0, en_done;
  logic [15:0] en_cw_count;
  logic [2:0] en_valid_bits;

  zl77_encoder #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_raw = 0, n_match = 0, n_max = 0, n_wrap = 0, n_in_wait = 0, n_out_full = 0, n_bp_wait = 0;
  int bad_timing = 0, timed_strings = 0;
  logic [7:0] got_q[$];
  int rd_pct = 100;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // output FIFO reader
  assign eo_rd = eo_rd_rdy && rd_en;
  bit rd_en;
  always @(negedge clk) rd_en <= ($urandom_range(0, 99) < rd_pct);
  always @(posedge clk) if (eo_rd) got_q.push_back(eo_data);

  // cycle accounting per string: busy cycles between INITs
  int busy;
  always @(posedge clk) if (rst_n) begin
    if (dut.state == S_CMP && !dut.have_char) n_in_wait++;
    if (dut.state == S_OUT && !dut.bp_rdy) n_bp_wait++;
    if (!dut.eo_wr_rdy) n_out_full++;
    if (dut.state == S_INIT) begin
      busy = 1;
    end else if ((dut.state == S_CMP && !dut.have_char) || (dut.state == S_OUT && !dut.bp_rdy)) begin
      // stall cycles are not part of the string's own cycle budget
    end else if (dut.state == S_CMP || dut.state == S_OUT || dut.state == S_UPD) begin
      busy++;
      if (dut.state == S_UPD && dut.len_cnt <= 1) begin
        // last UPDATE of this string: compare with the expected cycle count
        int n, exp;
        n = busy_n;
        exp = (n == 0) ? 4 : (stop_early ? 2 * n + 2 : 2 * n + 3);
        timed_strings++;
        if (busy != exp) bad_timing++;
      end
    end
  end
  // match length and early stop of the string, captured at its OUTPUT
  int busy_n; bit stop_early;
  always @(posedge clk) if (dut.state == S_OUT && dut.bp_rdy) begin
    busy_n = dut.raw ? 0 : int'(dut.len_cnt);
    stop_early = !dut.raw && !dut.pending;
  end

  task automatic run_packet(input int len, input int wr_pct, zl77_model m);
    logic [7:0] data[$], exp_bytes[$], back[$];
    cw_t cws[$];
    make_packet(len, data);
    m.encode(data, cws);
    n_raw += m.n_raw; n_match += m.n_match; n_max += m.n_max; n_wrap += m.n_wrap;
    pack(cws, exp_bytes);
    m.decode(cws, back);
    check(back == data, "reference round trip");
    got_q.delete();
    foreach (data[i]) begin
      @(negedge clk);
      while ($urandom_range(0, 99) >= wr_pct) @(negedge clk);
      while (!ei_wr_rdy) @(negedge clk);
      ei_wr = 1; ei_data = data[i];
      @(negedge clk); ei_wr = 0;
    end
    en_stop = 1;
    while (!en_done) @(negedge clk);
    check(en_cw_count == 16'(cws.size()), $sformatf("codeword count %0d, expected %0d", en_cw_count, cws.size()));
    check(en_valid_bits == 3'((14 * cws.size()) % 8), "valid bits of the last byte");
    rd_pct = 100;
    repeat (300) @(negedge clk);
    en_stop = 0;
    check(got_q.size() == exp_bytes.size(), $sformatf("%0d bytes, expected %0d", got_q.size(), exp_bytes.size()));
    foreach (exp_bytes[i]) if (i < got_q.size())
      check(got_q[i] == exp_bytes[i], $sformatf("byte %0d = %h, expected %h", i, got_q[i], exp_bytes[i]));
  endtask

  initial begin
    zl77_model m;
    m = new(N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fast producer, fast consumer: timing-checked packets
    for (int p = 0; p < 3; p++) run_packet(200, 100, m);
    check(timed_strings > 0, "strings timed");
    // slow producer, slow consumer
    for (int p = 0; p < 6; p++) begin
      rd_pct = 1;
      run_packet((p == 0) ? 700 : $urandom_range(1, 300), $urandom_range(10, 90), m);
    end
    check(n_raw > 0 && n_match > 0 && n_max > 0 && n_wrap > 0, "raw, match, max-length and wrapped matches");
    check(n_in_wait > 0 && n_bp_wait > 0 && n_out_full > 0, "input-empty, packer and output-full stalls");
    $display("strings timed=%0d wrong=%0d raw=%0d match=%0d max=%0d wrap=%0d in_wait=%0d bp_wait=%0d out_full=%0d",
             timed_strings, bad_timing, n_raw, n_match, n_max, n_wrap, n_in_wait, n_bp_wait, n_out_full);
    check(bad_timing == 0, "per-string cycle counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
