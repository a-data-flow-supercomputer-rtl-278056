// tb_router2x2: directed and random checks of the two-by-two router.
// Straight and crossed routing, one cycle through the router, a conflict
// resolved alternately in favour of each input, a blocked output holding its
// packet, and random traffic checked against a per-output reference queue.
module tb_router2x2;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] in_valid, in_ready, in_sel, out_valid, out_ready, conflict;
  logic [W-1:0] in_data [2];
  logic [W-1:0] out_data [2];
  int checks = 0, failures = 0;

  router2x2 #(.W(W)) dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  logic [W-1:0] q [2][$];
  int got = 0;

  initial begin
    logic [1:0] acc;
    logic [W-1:0] w0, w1;
    in_valid = '0; in_sel = '0; out_ready = '0; in_data[0] = '0; in_data[1] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // crossed: input 0 -> output 1, input 1 -> output 0, both in one cycle
    in_valid = 2'b11; in_sel = 2'b01; in_data[0] = 8'hA0; in_data[1] = 8'hB1;
    out_ready = 2'b11;
    #1 check(in_ready == 2'b11, "both accepted when not in conflict");
    @(posedge clk); #1 in_valid = '0;
    check(out_valid == 2'b11 && out_data[1] == 8'hA0 && out_data[0] == 8'hB1,
          "crossed routing after one cycle");
    @(posedge clk); #1;
    // conflict: both want output 0; winners must alternate
    in_valid = 2'b11; in_sel = 2'b00; in_data[0] = 8'h10; in_data[1] = 8'h11;
    #1 check(conflict[0] && $onehot(in_ready), "conflict grants one input");
    w0 = in_ready[0] ? 8'h10 : 8'h11;
    acc = in_ready;
    @(posedge clk); #1;
    in_valid = in_valid & ~acc;
    check(out_data[0] == w0, "winner passes");
    // next time both conflict the other one must win
    in_valid = 2'b11; in_data[0] = 8'h20; in_data[1] = 8'h21;
    #1 check(in_ready == ~acc, "round robin alternates");
    @(posedge clk); #1 in_valid = '0;
    repeat (3) @(posedge clk); #1;
    // blocked output holds its packet
    out_ready = 2'b00;
    in_valid = 2'b01; in_sel = 2'b10; in_data[0] = 8'h55;
    @(posedge clk); #1 in_valid = '0;
    repeat (3) begin
      @(posedge clk); #1 check(out_valid[0] && out_data[0] == 8'h55, "packet held");
    end
    in_valid = 2'b01; in_data[0] = 8'h66;
    #1 check(in_ready == 2'b00, "blocked output refuses input");
    in_valid = '0;
    out_ready = 2'b11;
    @(posedge clk); #1;
    @(posedge clk); #1;
    // random traffic against a reference
    for (int k = 0; k < 4000; k++) begin
      for (int i = 0; i < 2; i++)
        if (!in_valid[i] && $urandom % 2 == 0) begin
          in_valid[i] = 1'b1; in_sel[i] = 1'($urandom); in_data[i] = W'($urandom);
        end
      out_ready = 2'($urandom);
      #1;
      acc = in_valid & in_ready;
      for (int o = 0; o < 2; o++)
        if (out_valid[o] && out_ready[o]) begin
          check(q[o].size() > 0 && q[o][0] == out_data[o], "random traffic order/content");
          if (q[o].size() > 0) void'(q[o].pop_front());
          got++;
        end
      for (int i = 0; i < 2; i++) if (acc[i]) q[in_sel[i]].push_back(in_data[i]);
      @(posedge clk); #1 in_valid = in_valid & ~acc;
    end
    check(got > 2000, "random traffic flowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
