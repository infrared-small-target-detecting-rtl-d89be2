// tb_sync_fifo: self-checking test of the FIFO.
//
// A 5-deep FIFO (not a power of two) gets 4000 cycles of random pushes and
// pops, compared against a queue model: data order, empty, full and count
// every cycle, and the overflow / underflow flags when a push meets a full
// FIFO or a pop an empty one. Such requests are provoked on purpose, so the
// FIFO's assertions are switched off (CHECK_FLOW = 0) and the flags checked.
module tb_sync_fifo;
  localparam int D = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic push = 0, pop = 0;
  logic [7:0] wdata = 0, rdata;
  logic empty, full, overflow, underflow;
  logic [$clog2(D+1)-1:0] count;

  sync_fifo #(.WIDTH(8), .DEPTH(D), .CHECK_FLOW(1'b0)) dut (
    .clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count, .overflow, .underflow);

  int checks = 0, failures = 0, n_ovf = 0, n_unf = 0;
  logic [7:0] q [$];
  bit exp_ovf, exp_unf;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    $display("watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0) && full == (q.size() == D) && int'(count) == q.size(), "flags and count");
      if (q.size() > 0) check(rdata == q[0], "head data");
      if (i > 0) begin
        check(overflow == exp_ovf && underflow == exp_unf, "overflow/underflow flags");
        n_ovf += int'(exp_ovf);
        n_unf += int'(exp_unf);
      end
      push = ($urandom % 100) < ((i / 500) % 2 ? 70 : 35);
      pop = ($urandom % 100) < 50;
      wdata = 8'($urandom);
      exp_ovf = push && q.size() == D;
      exp_unf = pop && q.size() == 0;
      // model update at the coming edge
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !exp_ovf) q.push_back(wdata);
    end
    check(n_ovf > 0 && n_unf > 0, "both error cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
