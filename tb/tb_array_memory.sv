// tb_array_memory: checks an array memory module.  WRITE stores a value and
// returns it; READ returns what the last WRITE to that address stored (a
// reference array tracks it); INDEX returns pointer + index.  Every valid
// destination gets one packet.  An operation is taken in one cycle and its
// first result packet is offered two cycles later.
module tb_array_memory;
  import dfs_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  op_pkt_t in_pkt;
  res_pkt_t out_pkt;
  int checks = 0, failures = 0;
  logic [31:0] ref_mem [int];

  array_memory dut (.*);

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

  task automatic run_op(opcode_e op, logic [31:0] a, logic [31:0] b, logic [31:0] expect_v);
    logic any;
    in_pkt = '0;
    in_pkt.op = op; in_pkt.a = a; in_pkt.b = b; in_pkt.am = a[AMA_W +: AM_W];
    any = 1'b0;
    for (int i = 0; i < NDEST; i++) begin
      in_pkt.dest[i].valid = 1'($urandom);
      in_pkt.dest[i].pe    = PE_W'($urandom);
      in_pkt.dest[i].cid   = CELL_W'($urandom);
      in_pkt.dest[i].port  = 2'($urandom);
      any |= in_pkt.dest[i].valid;
    end
    in_valid = 1'b1;
    #1;
    while (!in_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 in_valid = 1'b0;
    check(!out_valid, "result too early");
    @(posedge clk); #1;
    check(out_valid == any, "result not offered two cycles after acceptance");
    for (int i = 0; i < NDEST; i++) begin
      if (!in_pkt.dest[i].valid) continue;
      out_ready = 1'b1;
      #1 check(out_valid && out_pkt.value == expect_v && out_pkt.cid == in_pkt.dest[i].cid &&
               out_pkt.pe == in_pkt.dest[i].pe && out_pkt.port == in_pkt.dest[i].port,
               $sformatf("%s a=%h got %h exp %h", op.name(), a, out_pkt.value, expect_v));
      @(posedge clk); #1 out_ready = 1'b0;
    end
    check(!out_valid, "extra packet");
  endtask

  initial begin
    logic [31:0] a, v;
    int addr;
    in_valid = 1'b0; out_ready = 1'b0; in_pkt = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 3000; k++) begin
      addr = int'($urandom % 64) * 997 % AM_WORDS;
      a = {11'd0, 5'd3, 16'(addr)};
      case ($urandom % 3)
        0: begin
          v = $urandom;
          ref_mem[addr] = v;
          run_op(OP_WRITE, a, v, v);
        end
        1: if (ref_mem.exists(addr)) run_op(OP_READ, a, 32'd0, ref_mem[addr]);
        default: begin
          v = $urandom % 4096;
          run_op(OP_INDEX, a, v, a + v);
        end
      endcase
    end
    // highest and lowest word
    run_op(OP_WRITE, 32'h0000_ffff, 32'hdead_beef, 32'hdead_beef);
    run_op(OP_WRITE, 32'h0000_0000, 32'h1234_5678, 32'h1234_5678);
    run_op(OP_READ,  32'h0000_ffff, 32'd0, 32'hdead_beef);
    run_op(OP_READ,  32'h0000_0000, 32'd0, 32'h1234_5678);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
