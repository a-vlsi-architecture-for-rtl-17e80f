// tb_byte_fifo: self-checking testbench of the byte FIFO at its 256-byte
// default depth.
//
// Random writes and reads, each only when the FIFO offers it, compared with
// a queue model: data order, the count, RD_RDY/WR_RDY and the almost-empty
// and almost-full warnings (thresholds set to 4 here). Phases with heavy
// writing fill the FIFO completely and phases with heavy reading empty it,
// so both ends and the pointer wrap are reached.
module tb_byte_fifo;
  localparam int DEPTH = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr = 0, rd = 0;
  logic [7:0] wr_data = '0, rd_data;
  logic wr_rdy, rd_rdy, almost_empty, almost_full;
  logic [8:0] count;

  byte_fifo #(.DEPTH(DEPTH), .ALMOST_EMPTY(4), .ALMOST_FULL(4)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [7:0] model[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      int wp;
      wp = ((t / 700) % 2 == 0) ? 80 : 20;
      @(negedge clk);
      check(count == 9'(model.size()), "count");
      check(rd_rdy == (model.size() > 0) && wr_rdy == (model.size() < DEPTH), "ready flags");
      check(almost_empty == (model.size() <= 4) && almost_full == (model.size() >= DEPTH - 4), "warnings");
      if (model.size() == DEPTH) n_full++;
      if (model.size() == 0) n_empty++;
      wr = wr_rdy && ($urandom_range(0, 99) < wp);
      rd = rd_rdy && ($urandom_range(0, 99) < 100 - wp);
      wr_data = 8'($urandom);
      if (rd) check(rd_data == model[0], $sformatf("data %h, expected %h", rd_data, model[0]));
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(wr_data);
    end
    check(n_full > 0 && n_empty > 0, "full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
