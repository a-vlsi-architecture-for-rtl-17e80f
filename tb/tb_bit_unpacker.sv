// tb_bit_unpacker: self-checking testbench of the 8-to-14 bit unpacker.
//
// Builds a byte stream here from random codewords (least significant bit
// first, as the packer writes it), serves it from a behavioural FIFO whose
// RD_RDY is randomly withdrawn, and requests codewords with BUP at random
// moments. Every codeword handed out must equal the next one of the
// reference list. With the FIFO always ready and BUP asserted as soon as
// BUP_RDY rises, a codeword must come out every 16 cycles plus one per byte
// read during the refill. A BUP_RESET in the middle of a stream restarts
// the unpacker at a byte boundary.
module tb_bit_unpacker;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bup_reset = 0, bup = 0, rd_rdy;
  logic [7:0] rd_data;
  logic [13:0] unpacked_data;
  logic bup_rdy, oe, rd;

  bit_unpacker dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_wait = 0;
  logic [7:0] fifo_q[$];
  bit stall = 0;
  bit rdy_rand;
  always @(negedge clk) rdy_rand <= stall ? ($urandom_range(0, 2) != 0) : 1'b1;
  assign rd_rdy  = rdy_rand && fifo_q.size() > 0;
  assign rd_data = (fifo_q.size() > 0) ? fifo_q[0] : 8'h00;
  always @(posedge clk) begin
    if (rd) void'(fifo_q.pop_front());
    if (dut.state == 3'b110) n_wait++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Load ncw random codewords into the FIFO, return them in cws.
  task automatic load(input int ncw, output logic [13:0] cws[$]);
    bit bits[$];
    cws = {};
    for (int i = 0; i < ncw; i++) begin
      logic [13:0] cw;
      cw = 14'($urandom);
      cws.push_back(cw);
      for (int b = 0; b < 14; b++) bits.push_back(cw[b]);
    end
    while (bits.size() % 8 != 0) bits.push_back(1'b0);
    for (int i = 0; i < bits.size(); i += 8) begin
      logic [7:0] by;
      for (int b = 0; b < 8; b++) by[b] = bits[i + b];
      fifo_q.push_back(by);
    end
  endtask

  task automatic drain(input logic [13:0] cws[$], input bit timed, input bit random_bup);
    int last_oe, reads;
    last_oe = -1;
    foreach (cws[i]) begin
      @(negedge clk);
      while (!bup_rdy) @(negedge clk);
      if (random_bup) repeat ($urandom_range(0, 3)) @(negedge clk);
      bup = 1;
      @(negedge clk); bup = 0;
      check(oe && unpacked_data == cws[i],
            $sformatf("codeword %0d = %h, expected %h", i, unpacked_data, cws[i]));
      if (timed && last_oe >= 0)
        check(($time / 10 - last_oe) == 16 + reads,
              $sformatf("codeword %0d after %0d cycles (%0d reads)", i, $time / 10 - last_oe, reads));
      last_oe = $time / 10;
      reads = 0;
      fork
        begin
          @(posedge clk);
          while (!bup_rdy) begin
            if (rd) reads++;
            @(posedge clk);
          end
        end
      join_none
    end
    disable fork;
  endtask

  initial begin
    logic [13:0] cws[$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(12, cws);
    drain(cws, 1, 0);
    // stream restart: reset the unpacker, drop the rest of the old packet
    bup_reset = 1; fifo_q.delete(); @(negedge clk); bup_reset = 0;
    stall = 1;
    for (int p = 0; p < 15; p++) begin
      load($urandom_range(1, 20), cws);
      drain(cws, 0, 1);
      @(negedge clk);
      bup_reset = 1; fifo_q.delete(); @(negedge clk); bup_reset = 0;
    end
    check(n_wait > 0, "wait state exercised");
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
