// tb_vlsm: self-checking testbench of the string matcher at its full
// 64 x 16 (1024-word) size.
//
// Fills the whole history with random characters from a four-letter
// alphabet (so long matches are common), then runs searches: INIT, one
// COMPARE per string character until CAM_HIT drops or 15 characters hit,
// then OUTPUT. Each search is checked against a reference computed here by
// brute force over every start position: the match length, the Index of
// the last matched character (lowest such word), the number of COMPAREs
// (length + 1 when the search ends on a miss) and that CAM_HIT is high for
// exactly the hitting COMPAREs. After every search the matched characters
// are written back with UPDATE at a moving pointer, as the encoder does, so
// the reference buffer and the CAM are compared under writes as well.
module tb_vlsm;
  localparam int unsigned ROWS = 64, COLS = 16, N = ROWS * COLS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable, s1, s0;
  logic [7:0] data;
  logic [9:0] address, index;
  logic cam_hit;

  vlsm #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_long = 0, n_wrap = 0, n_maxlen = 0, n_nomatch = 0;
  logic [7:0] ref_mem [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One VLSM cycle: drive at the falling edge, sample outputs, wait for the rise.
  logic hit_s;
  logic [9:0] idx_s;
  task automatic cyc(input logic en, input logic [1:0] m, input logic [7:0] d, input logic [9:0] a);
    @(negedge clk);
    enable = en; {s1, s0} = m; data = d; address = a;
    #1;
    hit_s = cam_hit;
    idx_s = index;
    @(posedge clk);
  endtask

  initial begin
    automatic int ptr = 0;
    enable = 0; s1 = 0; s0 = 0; data = 0; address = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Fill the history buffer.
    for (int i = 0; i < N; i++) begin
      ref_mem[i] = 8'h61 + 8'($urandom_range(0, 3));
      cyc(1, 2'b11, ref_mem[i], 10'(i));
    end
    for (int t = 0; t < 400; t++) begin
      logic [7:0] s[20];
      int ls, lmax, exp_idx, exp_cmp, got_len, ncmp;
      bit first;
      ls = $urandom_range(1, 18);
      if (t % 3 == 0) begin
        // copy a string out of the buffer (possibly across the wrap)
        automatic int p = (t % 9 == 0) ? N - $urandom_range(1, 6) : $urandom_range(0, N - 1);
        for (int k = 0; k < ls; k++) s[k] = ref_mem[(p + k) % N];
        if (ls > 1) s[ls-1] = 8'h61 + 8'($urandom_range(0, 4));
      end else begin
        for (int k = 0; k < ls; k++) s[k] = 8'h61 + 8'($urandom_range(0, 4));
      end
      // reference
      lmax = 0;
      for (int p = 0; p < N; p++) begin
        int l;
        l = 0;
        while (l < ls && l < 15 && ref_mem[(p + l) % N] == s[l]) l++;
        if (l > lmax) lmax = l;
      end
      exp_idx = N;
      first = 1;
      if (lmax > 0)
        for (int p = 0; p < N; p++) begin
          int l;
          l = 0;
          while (l < lmax && ref_mem[(p + l) % N] == s[l]) l++;
          if (l == lmax && ((p + lmax - 1) % N) < exp_idx) exp_idx = (p + lmax - 1) % N;
          if (l == lmax && p + lmax - 1 >= N) n_wrap++;
        end
      exp_cmp = (lmax < ls && lmax < 15) ? lmax + 1 : lmax;
      // run the search
      cyc(1, 2'b00, 8'h00, 10'h0);
      got_len = 0; ncmp = 0;
      for (int k = 0; k < ls; k++) begin
        cyc(1, 2'b01, s[k], 10'h0);
        ncmp++;
        if (hit_s) got_len++;
        if (!hit_s || got_len == 15) break;
      end
      check(got_len == lmax, $sformatf("search %0d: length %0d, expected %0d", t, got_len, lmax));
      check(ncmp == exp_cmp, $sformatf("search %0d: %0d COMPAREs, expected %0d", t, ncmp, exp_cmp));
      if (lmax > 0) begin
        cyc(1, 2'b10, 8'h00, 10'h0);
        check(idx_s == 10'(exp_idx), $sformatf("search %0d: index %0d, expected %0d", t, idx_s, exp_idx));
        if (lmax >= 4) n_long++;
        if (lmax == 15) n_maxlen++;
      end else n_nomatch++;
      // update the matched characters (one for no match)
      for (int k = 0; k < ((lmax > 0) ? lmax : 1); k++) begin
        cyc(1, 2'b11, s[k], 10'(ptr));
        ref_mem[ptr] = s[k];
        ptr = (ptr + 1) % N;
      end
      // a NOP must not disturb anything
      cyc(0, 2'b01, 8'h61, 10'h0);
      check(hit_s == 0 && idx_s == 0, "NOP drives CAM_HIT/INDEX");
    end
    $display("searches: long=%0d max-length=%0d no-match=%0d wrap=%0d", n_long, n_maxlen, n_nomatch, n_wrap);
    check(n_long > 0 && n_maxlen > 0 && n_nomatch > 0 && n_wrap > 0, "all search kinds exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
