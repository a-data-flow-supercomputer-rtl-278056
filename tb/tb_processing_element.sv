// tb_processing_element: checks the firing rules of one processing element
// (PE number 5) with a small hand-loaded program; the testbench plays the
// part of the networks and the functional units.
//  - ADD cell: fires when both operands are present, sends an operation
//    packet two cycles after the enabling packet, then waits for its signal
//    before firing again; ADD units are chosen round-robin.
//  - gated ID cell feeding a local ID cell: T arc served through the
//    loop-back path, F arc sent as an ID packet; the local cell signals back
//    through the loop-back path; T and F signal reset values are used.
//  - MERGE: waits for control plus the selected operand, T/F tagged signal arcs.
//  - MUL with a constant operand; MUL units chosen round-robin.
//  - READ: sent to the RN3 port with the module number from the address.
//  - a packet marked for the host passes to the host port.
module tb_processing_element;
  import dfs_pkg::*;

  localparam logic [PE_W-1:0] ME = 8'd5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_valid;
  logic [CELL_W-1:0] load_cell;
  instr_t load_instr;
  logic [WORD_W-1:0] load_op1, load_op2;
  logic net_valid, net_ready, host_in_valid, host_in_ready;
  res_pkt_t net_pkt, host_in_pkt, host_out_pkt;
  logic op_valid, op_ready, host_out_valid, host_out_ready;
  op_pkt_t op_pkt;
  logic ev_fire_fu, ev_fire_local, ev_gated, ev_merge, ev_signal;
  int checks = 0, failures = 0;
  int n_signal = 0, n_local = 0;

  processing_element #(.NCELLS(64)) dut (.*, .pe_id(ME));

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
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // collect operation packets and host packets
  op_pkt_t  ops [$];
  res_pkt_t hq  [$];
  int cyc = 0, op_cyc [$];
  always @(posedge clk) begin
    cyc++;
    if (op_valid && op_ready) begin ops.push_back(op_pkt); op_cyc.push_back(cyc); end
    if (host_out_valid && host_out_ready) hq.push_back(host_out_pkt);
    if (rst_n && ev_signal) n_signal++;
    if (rst_n && ev_fire_local) n_local++;
  end

  function automatic dest_t dst(gate_e g, logic host, int pe, int cid, logic [1:0] port);
    dest_t d;
    d.valid = 1'b1; d.gate = g; d.host = host;
    d.pe = PE_W'(pe); d.cid = CELL_W'(cid); d.port = port;
    return d;
  endfunction

  task automatic load(int cid, opcode_e op, logic gated, logic [1:0] konst,
                      int rt, int rf, dest_t d [NDEST], logic [31:0] k1 = 0, logic [31:0] k2 = 0);
    @(posedge clk); #1;
    load_valid = 1'b1; load_cell = CELL_W'(cid);
    load_instr.op = op; load_instr.gated = gated; load_instr.konst = konst;
    load_instr.reset_t = 4'(rt); load_instr.reset_f = 4'(rf);
    for (int i = 0; i < NDEST; i++) load_instr.dest[i] = d[i];
    load_op1 = k1; load_op2 = k2;
    @(posedge clk); #1 load_valid = 1'b0;
  endtask

  int inj_cyc;
  task automatic inject(int cid, logic [1:0] port, logic [31:0] v);
    #1;
    host_in_pkt = '0;
    host_in_pkt.pe = ME; host_in_pkt.cid = CELL_W'(cid); host_in_pkt.port = port;
    host_in_pkt.value = v;
    host_in_valid = 1'b1;
    #1 while (!host_in_ready) begin @(posedge clk); #1; end
    @(posedge clk);
    #1 host_in_valid = 1'b0;
    inj_cyc = cyc;
  endtask

  task automatic expect_op(string what, opcode_e op, logic [31:0] a, logic [31:0] b,
                           int unit, logic [NDEST-1:0] dmask, dest_t d [NDEST]);
    op_pkt_t p;
    int t = 0;
    while (ops.size() == 0 && t < 50) begin @(posedge clk); t++; end
    check(ops.size() > 0, {what, ": no operation packet"});
    if (ops.size() == 0) return;
    p = ops.pop_front();
    void'(op_cyc.pop_front());
    check(p.op == op && p.a == a && (op == OP_ID || p.b == b) && int'(p.unit) == unit,
          $sformatf("%s: op %s a=%h b=%h unit %0d", what, p.op.name(), p.a, p.b, p.unit));
    for (int i = 0; i < NDEST; i++) begin
      check(p.dest[i].valid == dmask[i], $sformatf("%s: destination %0d valid=%0d", what, i, p.dest[i].valid));
      if (dmask[i])
        check(p.dest[i].pe == d[i].pe && p.dest[i].cid == d[i].cid && p.dest[i].port == d[i].port &&
              p.dest[i].host == d[i].host, $sformatf("%s: destination %0d fields", what, i));
    end
  endtask

  task automatic expect_none(string what, int n);
    repeat (n) @(posedge clk);
    check(ops.size() == 0, {what, ": unexpected operation packet"});
  endtask

  dest_t none [NDEST];
  dest_t d0 [NDEST], d1 [NDEST], d2 [NDEST], d3 [NDEST], d4 [NDEST], d5 [NDEST];

  initial begin
    load_valid = 0; load_cell = 0; load_instr = '0; load_op1 = 0; load_op2 = 0;
    net_valid = 0; net_pkt = '0; host_in_valid = 0; host_in_pkt = '0;
    op_ready = 1; host_out_ready = 1;
    for (int i = 0; i < NDEST; i++) begin
      none[i] = '0; d0[i] = '0; d1[i] = '0; d2[i] = '0; d3[i] = '0; d4[i] = '0; d5[i] = '0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // cell 0: ADD, result to PE 6 cell 3, signal to host
    d0[0] = dst(G_ALWAYS, 0, 6, 3, PORT_OP1);
    d0[1] = dst(G_ALWAYS, 1, 5, 0, PORT_SIG);
    load(0, OP_ADD, 0, 2'b00, 1, 1, d0);
    // cell 1: gated ID; T -> local cell 2, F -> host cell 9
    d1[0] = dst(G_T, 0, 5, 2, PORT_OP1);
    d1[1] = dst(G_F, 1, 5, 9, PORT_OP1);
    load(1, OP_ID, 1, 2'b00, 1, 0, d1);
    // cell 2: ID, result to host cell 10, signal to local cell 1
    d2[0] = dst(G_ALWAYS, 1, 5, 10, PORT_OP1);
    d2[1] = dst(G_ALWAYS, 0, 5, 1, PORT_SIG);
    load(2, OP_ID, 0, 2'b00, 0, 0, d2);
    // cell 3: MERGE, result to host cell 11, T/F signals to PE 6
    d3[0] = dst(G_ALWAYS, 1, 5, 11, PORT_OP1);
    d3[1] = dst(G_T, 0, 6, 20, PORT_SIG);
    d3[2] = dst(G_F, 0, 6, 21, PORT_SIG);
    load(3, OP_MERGE, 0, 2'b00, 0, 0, d3);
    // cell 4: MUL by the constant 0.25
    d4[0] = dst(G_ALWAYS, 0, 7, 1, PORT_OP2);
    load(4, OP_MUL, 0, 2'b10, 0, 0, d4, 0, 32'h3e80_0000);
    // cell 5: READ
    d5[0] = dst(G_ALWAYS, 0, 0, 2, PORT_OP1);
    load(5, OP_READ, 0, 2'b00, 0, 0, d5);

    // ---- ADD firing, timing, and the signal rule
    inject(0, PORT_OP1, 32'h3f80_0000);
    expect_none("ADD with one operand", 5);
    inject(0, PORT_OP2, 32'h4000_0000);
    begin
      int t = 0;
      while (ops.size() == 0 && t < 20) begin @(posedge clk); t++; end
      check(ops.size() > 0 && op_cyc[0] - inj_cyc == 2,
            $sformatf("operation packet %0d cycles after enabling packet, expected 2",
                      ops.size() > 0 ? op_cyc[0] - inj_cyc : -1));
    end
    expect_op("ADD first", OP_ADD, 32'h3f80_0000, 32'h4000_0000, 0, 6'b000011, d0);
    inject(0, PORT_OP1, 32'h4040_0000);
    inject(0, PORT_OP2, 32'h4080_0000);
    expect_none("ADD before its signal", 10);
    inject(0, PORT_SIG, 32'd0);
    expect_op("ADD after signal", OP_ADD, 32'h4040_0000, 32'h4080_0000, 1, 6'b000011, d0);

    // ---- gated ID, loop-back, local signal
    inject(1, PORT_OP1, 32'd7);
    expect_none("gated ID without control", 5);
    inject(1, PORT_CTL, 32'd1);
    // T arc goes to local cell 2 via loop-back; cell 2 forwards to the host
    expect_op("local cell fed by loop-back", OP_ID, 32'd7, 32'd0, 2, 6'b000001, d2);
    repeat (5) @(posedge clk);
    check(n_signal == 2, $sformatf("signals seen %0d, expected 2", n_signal));
    // cell 1 got its signal back: it can fire with control false
    inject(1, PORT_OP1, 32'd8);
    inject(1, PORT_CTL, 32'd0);
    expect_op("gated ID, false arm", OP_ID, 32'd8, 32'd0, 3, 6'b000010, d1);
    // reset_f = 0: fires again at once with the next operands
    inject(1, PORT_OP1, 32'd9);
    inject(1, PORT_CTL, 32'd0);
    expect_op("gated ID, reset_f = 0", OP_ID, 32'd9, 32'd0, 0, 6'b000010, d1);

    // ---- MERGE
    inject(3, PORT_OP2, 32'd55);
    expect_none("MERGE without control", 5);
    inject(3, PORT_OP1, 32'd44);
    inject(3, PORT_CTL, 32'd0);
    expect_op("MERGE false", OP_ID, 32'd55, 32'd0, 1, 6'b000101, d3);
    inject(3, PORT_CTL, 32'd1);
    expect_op("MERGE true keeps first operand", OP_ID, 32'd44, 32'd0, 2, 6'b000011, d3);
    inject(3, PORT_CTL, 32'd1);
    expect_none("MERGE true without first operand", 5);
    inject(3, PORT_OP1, 32'd66);
    expect_op("MERGE true", OP_ID, 32'd66, 32'd0, 3, 6'b000011, d3);

    // ---- MUL with constant, round-robin over the MUL units
    inject(4, PORT_OP1, 32'h4100_0000);
    expect_op("MUL 1", OP_MUL, 32'h4100_0000, 32'h3e80_0000, 4, 6'b000001, d4);
    inject(4, PORT_OP1, 32'h4110_0000);
    expect_op("MUL 2", OP_MUL, 32'h4110_0000, 32'h3e80_0000, 5, 6'b000001, d4);
    inject(4, PORT_OP1, 32'h4120_0000);
    expect_op("MUL 3", OP_MUL, 32'h4120_0000, 32'h3e80_0000, 6, 6'b000001, d4);
    inject(4, PORT_OP1, 32'h4130_0000);
    expect_op("MUL 4", OP_MUL, 32'h4130_0000, 32'h3e80_0000, 4, 6'b000001, d4);

    // ---- READ to the RN3 port
    inject(5, PORT_OP1, {11'd0, 5'd9, 16'h0123});
    expect_op("READ", OP_READ, {11'd0, 5'd9, 16'h0123}, 32'd0, AM_PORT, 6'b000001, d5);
    check(ops.size() == 0, "stray packets");

    // ---- host packet through the network port
    #1 net_pkt = '0; net_pkt.host = 1; net_pkt.pe = ME; net_pkt.cid = 10'd77; net_pkt.value = 32'hCAFE;
    net_valid = 1'b1;
    @(posedge clk); #1 net_valid = 1'b0;
    repeat (2) @(posedge clk);
    check(hq.size() == 1 && hq[0].cid == 10'd77 && hq[0].value == 32'hCAFE, "host packet passed");
    check(n_local == 7, $sformatf("local firings %0d, expected 7", n_local));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
