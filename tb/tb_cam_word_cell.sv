// tb_cam_word_cell: self-checking testbench of one CAM word cell.
//
// Checks the write through SELECT, the match against DATA, the hit rule
// hit = COMPARE & (word == DATA) & hit_in, the delay flip-flop (loaded with
// the hit in COMPARE cycles, forced to 1 by INIT, held otherwise) and the
// V_MATCH output (ENCODE AND the delayed hit), over random stimulus checked
// against a small model kept here.
module tb_cam_word_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] data = '0;
  logic select = 0, init = 0, compare = 0, hit_in = 0, encode = 0;
  logic hit, hit_dly, vmatch;

  cam_word_cell dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_hits = 0;
  logic [7:0] m_word = '0;
  logic m_dly = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      logic e_hit;
      @(negedge clk);
      data    = (t % 3 == 0) ? m_word : 8'($urandom_range(0, 3));
      select  = ($urandom_range(0, 9) == 0);
      init    = !select && ($urandom_range(0, 9) == 0);
      compare = !select && !init && ($urandom_range(0, 2) != 0);
      hit_in  = $urandom_range(0, 1);
      encode  = $urandom_range(0, 1);
      #1;
      e_hit = compare && (m_word == data) && hit_in;
      check(hit == e_hit, "hit");
      check(hit_dly == m_dly, "delayed hit");
      check(vmatch == (encode && m_dly), "vmatch");
      if (e_hit) n_hits++;
      @(posedge clk);
      if (select) m_word = data;
      if (init) m_dly = 1;
      else if (compare) m_dly = e_hit;
    end
    check(n_hits > 100, "hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
