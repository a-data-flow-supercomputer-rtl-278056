// tb_routing_network: checks an (N,N) omega network of two-by-two routers.
// Every input sends random packets to random outputs while the outputs take
// them at random moments.  Each packet carries its source, a per-source
// sequence number and its destination; every packet must arrive exactly once,
// at its own destination, and packets from one source to one destination
// must keep their order.  A lone packet in an idle network must need
// log2(N) cycles, and contention must have occurred.  Run at N = 8 (RN2) and
// N = 32 (RN3).
module tb_routing_network;

  localparam int N1 = 8;
  localparam int N2 = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic done1, done2;
  net_tester #(.N(N1)) t1 (.clk, .rst_n, .done(done1));
  net_tester #(.N(N2)) t2 (.clk, .rst_n, .done(done2));

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done1 && done2);
    checks   += t1.checks + t2.checks;
    failures += t1.failures + t2.failures;
    check(t1.conflicts > 0 && t2.conflicts > 0, "no contention seen");
    $display("conflicts N=%0d: %0d, N=%0d: %0d", N1, t1.conflicts, N2, t2.conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
