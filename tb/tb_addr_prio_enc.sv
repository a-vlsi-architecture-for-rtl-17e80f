// tb_addr_prio_enc: self-checking testbench of the lowest-address priority
// encoder, at the row-encoder size (64 lines) and the column-encoder size
// (16 lines). Every single active line, then random patterns of several
// active lines (sparse and dense), are compared with the lowest active
// index found by a simple scan; HIT must equal "any line active".
module tb_addr_prio_enc;
  logic [63:0] m64;
  logic [5:0]  a64;
  logic        h64;
  logic [15:0] m16;
  logic [3:0]  a16;
  logic        h16;

  addr_prio_enc #(.N(64)) dut64 (.match(m64), .addr(a64), .hit(h64));
  addr_prio_enc #(.N(16)) dut16 (.match(m16), .addr(a16), .hit(h16));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int lowest(input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) if (v[i]) return i;
    return 0;
  endfunction

  initial begin
    m64 = '0; m16 = '0;
    #1 check(!h64 && !h16 && a64 == 0 && a16 == 0, "no active line");
    for (int i = 0; i < 64; i++) begin
      m64 = 64'b1 << i; m16 = 16'b1 << (i % 16);
      #1 check(h64 && a64 == 6'(i), $sformatf("single line %0d -> %0d", i, a64));
      check(h16 && a16 == 4'(i % 16), $sformatf("single line %0d -> %0d", i % 16, a16));
    end
    for (int t = 0; t < 3000; t++) begin
      m64 = {$urandom, $urandom};
      if (t % 2 == 0) m64 = m64 & {$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom};
      m16 = m64[15:0] & 16'($urandom);
      #1;
      check(h64 == (m64 != 0) && a64 == 6'(lowest(m64, 64)), $sformatf("64-line %h -> %0d", m64, a64));
      check(h16 == (m16 != 0) && a16 == 4'(lowest({48'b0, m16}, 16)), $sformatf("16-line %h -> %0d", m16, a16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
