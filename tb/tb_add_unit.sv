// tb_add_unit: checks the ADD unit.  Random ADD, SUB and ID operation packets
// with random destination lists go in; every valid destination must come out
// as one packet, in destination order, carrying the reference result, and the
// first packet must leave one cycle after the operation packet is taken.
// Special cases (x + -x, zero operands, infinity, overflow) are included.
module tb_add_unit;
  import dfs_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  op_pkt_t in_pkt;
  res_pkt_t out_pkt;
  int checks = 0, failures = 0;

  add_unit dut (.*);

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  function automatic dest_t rdest(int i);
    dest_t d;
    d.valid = 1'($urandom);
    d.gate  = G_ALWAYS;
    d.host  = 1'($urandom);
    d.pe    = PE_W'($urandom);
    d.cid   = CELL_W'($urandom);
    d.port  = 2'(i);
    return d;
  endfunction

  task automatic run_op(opcode_e op, logic [31:0] a, logic [31:0] b, logic [31:0] expect_v);
    int n;
    in_pkt.op   = op;
    in_pkt.a    = a;
    in_pkt.b    = b;
    in_pkt.unit = '0;
    in_pkt.am   = '0;
    for (int i = 0; i < NDEST; i++) in_pkt.dest[i] = rdest(i);
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 in_valid = 1'b0;
    check(out_valid == (in_pkt.dest[0].valid | in_pkt.dest[1].valid | in_pkt.dest[2].valid |
                        in_pkt.dest[3].valid | in_pkt.dest[4].valid | in_pkt.dest[5].valid),
          "first packet not offered one cycle after acceptance");
    n = 0;
    for (int i = 0; i < NDEST; i++) begin
      if (!in_pkt.dest[i].valid) continue;
      out_ready = 1'($urandom);
      while (!(out_valid && out_ready)) begin
        @(posedge clk);
        #1 out_ready = 1'($urandom);
      end
      check(out_pkt.value == expect_v && out_pkt.pe == in_pkt.dest[i].pe &&
            out_pkt.cid == in_pkt.dest[i].cid && out_pkt.port == in_pkt.dest[i].port &&
            out_pkt.host == in_pkt.dest[i].host,
            $sformatf("op %s a=%h b=%h got %h exp %h", op.name(), a, b, out_pkt.value, expect_v));
      n++;
      @(posedge clk);
      #1 out_ready = 1'b0;
    end
    #1 check(!out_valid, "extra packet");
  endtask

  initial begin
    logic [31:0] a, b;
    in_valid = 1'b0; out_ready = 1'b0; in_pkt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // the first packet is visible in the cycle after acceptance
    for (int k = 0; k < 3000; k++) begin
      a = rand_single(115, 135);
      b = rand_single(115, 135);
      case (k % 3)
        0: run_op(OP_ADD, a, b, to_single(to_real(a) + to_real(b)));
        1: run_op(OP_SUB, a, b, to_single(to_real(a) - to_real(b)));
        default: run_op(OP_ID, a, b, a);
      endcase
    end
    a = rand_single(100, 150);
    run_op(OP_SUB, a, a, 32'd0);                       // x - x = +0
    run_op(OP_ADD, a, 32'd0, a);                       // x + 0
    run_op(OP_ADD, 32'd0, a, a);                       // 0 + x
    run_op(OP_ADD, 32'h7f7fffff, 32'h7f7fffff, 32'h7f800000);  // overflow
    run_op(OP_ADD, 32'h7f800000, 32'h3f800000, 32'h7f800000);  // inf + 1
    run_op(OP_SUB, 32'h3f800000, 32'h3f800001, 32'hb4000000);  // 1 - (1+ulp)
    run_op(OP_ADD, 32'h3f800000, 32'h33800000, 32'h3f800000);  // tie to even
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
