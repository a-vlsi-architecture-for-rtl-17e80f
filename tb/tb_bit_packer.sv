// tb_bit_packer: self-checking testbench of the 14-to-8 bit packer.
//
// Feeds packets of random codewords with the BP / BP_RDY handshake, ends
// each packet with FLUSH, and collects every byte written. The expected
// byte stream is built here independently: the codewords' bits, least
// significant first, then zero padding to a whole byte, grouped eight at a
// time. WR_RDY is held high in the first packet, which also checks the
// cycle budget (14 shift cycles plus one cycle per byte written for each
// codeword, i.e. 15 when one byte boundary is crossed), and is randomly
// withdrawn in later packets to exercise the wait state. A BP_RESET in the
// middle of a packet must clear the partial byte.
module tb_bit_packer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bp_reset = 0, bp = 0, flush = 0, wr_rdy = 1;
  logic [13:0] codeword = '0;
  logic [7:0] packed_data;
  logic bp_rdy, wr;

  bit_packer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_wait = 0, n_flush_pad = 0;
  logic [7:0] got_q[$];
  bit random_stall = 0;

  always @(posedge clk) if (rst_n) begin
    if (wr) got_q.push_back(packed_data);
    if (dut.state == 3'b010) n_wait++;
  end
  always @(negedge clk) wr_rdy <= random_stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sends a packet and checks the bytes it produced.
  task automatic packet(input int ncw, input bit timed);
    bit bits[$];
    logic [7:0] exp_q[$];
    int start, cyc_used, bytes_before;
    got_q.delete();
    for (int i = 0; i < ncw; i++) begin
      logic [13:0] cw;
      cw = 14'($urandom);
      for (int b = 0; b < 14; b++) bits.push_back(cw[b]);
      @(negedge clk);
      while (!bp_rdy) @(negedge clk);
      codeword = cw; bp = 1;
      start = $time / 10;
      bytes_before = got_q.size();
      @(negedge clk); bp = 0;
      while (!bp_rdy) @(negedge clk);
      cyc_used = $time / 10 - start - 1;
      if (timed)
        check(cyc_used == 14 + (got_q.size() - bytes_before),
              $sformatf("codeword %0d took %0d cycles", i, cyc_used));
    end
    if (bits.size() % 8 != 0) n_flush_pad++;
    while (bits.size() % 8 != 0) bits.push_back(1'b0);
    for (int i = 0; i < bits.size(); i += 8) begin
      logic [7:0] by;
      for (int b = 0; b < 8; b++) by[b] = bits[i + b];
      exp_q.push_back(by);
    end
    @(negedge clk); flush = 1;
    @(negedge clk); flush = 0;
    repeat (40) @(negedge clk);
    check(got_q.size() == exp_q.size(), $sformatf("%0d bytes, expected %0d", got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
      check(got_q[i] == exp_q[i], $sformatf("byte %0d = %h, expected %h", i, got_q[i], exp_q[i]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    packet(9, 1);
    packet(4, 1);
    random_stall = 1;
    for (int p = 0; p < 20; p++) packet($urandom_range(1, 12), 0);
    // BP_RESET in the middle of a codeword discards the partial byte
    @(negedge clk); codeword = 14'h3fff; bp = 1;
    @(negedge clk); bp = 0;
    repeat (3) @(negedge clk);
    bp_reset = 1; @(negedge clk); bp_reset = 0;
    repeat (3) @(negedge clk);
    check(bp_rdy && dut.cnt8 == 0, "BP_RESET returns to idle with an empty template");
    random_stall = 0;
    packet(3, 1);
    check(n_wait > 0 && n_flush_pad > 0, "wait state and padded flush exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
