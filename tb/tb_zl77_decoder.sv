// tb_zl77_decoder: self-checking testbench of the ZL77 decoder.
//
// Packets are generated and encoded here by the reference model (history
// of 128 characters, so it wraps often), packed into bytes, and written
// into the decoder's input FIFO with random gaps; the packet length and the
// valid-bit count of its last byte are given with de_start. The output FIFO
// is read at a random rate, sometimes slowly enough for it to fill. Every
// decoded byte must equal the source, and de_done must come after the last
// codeword. The controller's own cycles per codeword, stalls excluded, must
// be 2n+3 for a match of n characters and 4 for a raw character.
module tb_zl77_decoder;
  import zl77_ref_pkg::*;
  localparam int N = 128;
  localparam logic [2:0] S_REQ = 3'd1, S_GET = 3'd2, S_SUB = 3'd3, S_READ = 3'd4, S_RAW = 3'd5, S_WB = 3'd6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic de_reset = 0;
  logic di_wr = 0, di_wr_rdy, di_full;
  logic [7:0] di_data = '0;
  logic do_rd, do_rd_rdy, do_empty;
  logic [7:0] do_data;
  logic de_start = 0, de_rdy, de_done;
  logic [15:0] de_len_bytes = '0;
  logic [2:0] de_valid_bits = '0;

  zl77_decoder #(.HIST(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_raw = 0, n_match = 0, n_unpack_wait = 0, n_out_full = 0, timed = 0, bad_timing = 0;
  logic [7:0] got_q[$];
  int rd_pct = 100;
  bit rd_en;
  always @(negedge clk) rd_en <= ($urandom_range(0, 99) < rd_pct);
  assign do_rd = do_rd_rdy && rd_en;
  always @(posedge clk) if (do_rd) got_q.push_back(do_data);

  int busy, n_len;
  always @(posedge clk) if (rst_n) begin
    if (dut.state == S_REQ && !dut.bup_rdy) n_unpack_wait++;
    if ((dut.state == S_READ || dut.state == S_RAW) && !dut.do_wr_rdy) n_out_full++;
    if (dut.state == S_REQ && dut.bup_rdy) busy = 1;
    else if (dut.state == S_GET) begin
      busy++;
      n_len = dut.cw.length;
      if (n_len == 0) n_raw++; else n_match++;
    end
    else if (dut.state == S_SUB || dut.state == S_WB ||
             ((dut.state == S_READ || dut.state == S_RAW) && dut.do_wr_rdy)) begin
      busy++;
      if (dut.state == S_WB && dut.wb_cnt + 1 == dut.buf_cnt) begin
        timed++;
        if (busy != ((n_len == 0) ? 4 : 2 * n_len + 3)) bad_timing++;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_packet(input int len, input int wr_pct, zl77_model m);
    logic [7:0] data[$], bytes[$];
    cw_t cws[$];
    make_packet(len, data);
    m.encode(data, cws);
    pack(cws, bytes);
    got_q.delete();
    @(negedge clk);
    while (!de_rdy) @(negedge clk);
    de_start = 1; de_len_bytes = 16'(bytes.size()); de_valid_bits = 3'((14 * cws.size()) % 8);
    @(negedge clk); de_start = 0;
    fork
      foreach (bytes[i]) begin
        @(negedge clk);
        while ($urandom_range(0, 99) >= wr_pct) @(negedge clk);
        while (!di_wr_rdy) @(negedge clk);
        di_wr = 1; di_data = bytes[i];
        @(negedge clk); di_wr = 0;
      end
      begin
        while (!de_done) @(negedge clk);
      end
    join
    rd_pct = 100;
    repeat (20) @(negedge clk);
    while (do_rd_rdy) @(negedge clk);
    check(got_q.size() == data.size(), $sformatf("%0d bytes decoded, expected %0d", got_q.size(), data.size()));
    foreach (data[i]) if (i < got_q.size())
      check(got_q[i] == data[i], $sformatf("byte %0d = %h, expected %h", i, got_q[i], data[i]));
  endtask

  initial begin
    zl77_model m;
    m = new(N);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) run_packet(200, 100, m);
    for (int p = 0; p < 6; p++) begin
      rd_pct = 2;
      run_packet((p == 0) ? 600 : $urandom_range(1, 300), $urandom_range(10, 90), m);
    end
    $display("codewords timed=%0d wrong=%0d raw=%0d match=%0d unpack_wait=%0d out_full=%0d",
             timed, bad_timing, n_raw, n_match, n_unpack_wait, n_out_full);
    check(timed > 0 && bad_timing == 0, "per-codeword cycle counts");
    check(n_raw > 0 && n_match > 0 && n_unpack_wait > 0 && n_out_full > 0, "raw, match, unpacker and output-full stalls");
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
