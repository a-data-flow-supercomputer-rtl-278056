// tb_dfs_top: end-to-end test of the data flow machine at reduced size (16 PEs, 2 clusters).
//
// The testbench is the host: it loads three small programs into the
// instruction cells, feeds their input streams as result packets, and obeys
// the signal protocol itself: an input value is injected only after the cell
// that consumed the previous one has signalled back, and every result the
// host receives is acknowledged with a signal packet to the cell that sent it.
//  1. AVE = 0.25 * ((A + B) + (C + D)), pipelined over PEs 0, 9, 3 and 12
//     (two ADD cells feeding a third, then a MUL by a constant).
//  2. r = (i == 0) ? x : 0.5 * y in PE 4 with the multiply in PE 13: an
//     integer test drives the control operand of two gated ID cells and a
//     MERGE, so both arms and local as well as remote delivery are used.
//  3. An array memory buffer: INDEX from a constant block pointer, WRITE of a
//     stream of values, then READ of all of them back, in array memory module 1.
// Results are compared with values computed here; the counts of FU firings,
// local firings, gated firings, merges, signals, network contention, merges
// of each arm and array memory operations must all be non-zero.
module tb_dfs_top;
  import dfs_pkg::*;
  import fp_ref_pkg::*;

  localparam int NP = 16;
  localparam int K  = 40;          // items per input stream

  logic clk = 1'b0, rst_n = 1'b0;
  logic load_valid;
  logic [PE_W-1:0] load_pe;
  logic [CELL_W-1:0] load_cell;
  instr_t load_instr;
  logic [WORD_W-1:0] load_op1, load_op2;
  logic host_in_valid, host_in_ready;
  res_pkt_t host_in_pkt;
  logic [NP-1:0] host_out_valid, host_out_ready;
  res_pkt_t host_out_pkt [NP];
  logic [31:0] n_fire_fu, n_fire_local, n_gated, n_merge, n_signal, n_conflict;
  int checks = 0, failures = 0;

  dfs_top #(.NPES(16), .NCELLS(64), .AM_SIZE(1024)) dut (.*);

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
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  function automatic dest_t dst(gate_e g, logic host, int pe, int cid, logic [1:0] port);
    dest_t d;
    d.valid = 1'b1; d.gate = g; d.host = host;
    d.pe = PE_W'(pe); d.cid = CELL_W'(cid); d.port = port;
    return d;
  endfunction

  dest_t dl [NDEST];

  task automatic clear_dl();
    for (int i = 0; i < NDEST; i++) dl[i] = '0;
  endtask

  task automatic load(int pe, int cid, opcode_e op, logic gated, logic [1:0] konst,
                      int rt, int rf, logic [31:0] k1 = 0, logic [31:0] k2 = 0);
    @(posedge clk); #1;
    load_valid = 1'b1; load_pe = PE_W'(pe); load_cell = CELL_W'(cid);
    load_instr.op = op; load_instr.gated = gated; load_instr.konst = konst;
    load_instr.reset_t = 4'(rt); load_instr.reset_f = 4'(rf);
    for (int i = 0; i < NDEST; i++) load_instr.dest[i] = dl[i];
    load_op1 = k1; load_op2 = k2;
    @(posedge clk); #1 load_valid = 1'b0;
    clear_dl();
  endtask

  // host signal numbers: a signal packet to host cell S returns a credit to source S
  localparam int NSRC = 10;
  int          src_pe   [NSRC];
  int          src_cid  [NSRC];
  logic [1:0]  src_port [NSRC];
  int          credit   [NSRC];
  logic [31:0] vq       [NSRC][$];
  res_pkt_t    sigq [$];
  logic [31:0] exp_ave [$], exp_sel [$], exp_rd [$];
  int n_ave = 0, n_sel = 0, n_wr = 0, n_rd = 0, n_true = 0, n_false = 0;
  logic reads_started = 1'b0;
  int rr = 0;
  longint c_fu = 0, c_loc = 0, c_gat = 0, c_mrg = 0, c_sig = 0, c_conf = 0;
  int cycles = 0;

  task automatic def_src(int s, int pe, int cid, logic [1:0] port);
    src_pe[s] = pe; src_cid[s] = cid; src_port[s] = port; credit[s] = 1;
  endtask

  function automatic res_pkt_t sig_to(int pe, int cid);
    res_pkt_t p;
    p = '0; p.pe = PE_W'(pe); p.cid = CELL_W'(cid); p.port = PORT_SIG;
    return p;
  endfunction

  // host input driver and output monitor
  logic running = 1'b0;
  always @(posedge clk) begin
    if (running) begin
      cycles++;
      c_fu  += n_fire_fu;  c_loc += n_fire_local; c_gat += n_gated;
      c_mrg += n_merge;    c_sig += n_signal;     c_conf += n_conflict;
      // retire the injected packet
      if (host_in_valid && host_in_ready) begin
        if (host_in_pkt.port == PORT_SIG && sigq.size() > 0 && host_in_pkt == sigq[0])
          void'(sigq.pop_front());
        else
          for (int s = 0; s < NSRC; s++)
            if (src_pe[s] == int'(host_in_pkt.pe) && src_cid[s] == int'(host_in_pkt.cid) &&
                src_port[s] == host_in_pkt.port && vq[s].size() > 0) begin
              void'(vq[s].pop_front());
              credit[s]--;
              break;
            end
      end
      // results and signals for the host
      for (int p = 0; p < NP; p++) begin
        if (host_out_valid[p]) begin
          res_pkt_t r;
          r = host_out_pkt[p];
          if (r.port == PORT_SIG) begin
            check(int'(r.cid) < NSRC, "signal to an unknown host source");
            if (int'(r.cid) < NSRC) credit[r.cid]++;
          end else begin
            case (int'(r.cid))
              200: begin
                check(exp_ave.size() > 0 && r.value == exp_ave[0],
                      $sformatf("AVE %0d: got %h exp %h", n_ave, r.value, exp_ave[0]));
                void'(exp_ave.pop_front()); n_ave++;
                sigq.push_back(sig_to(12, 0));
              end
              210: begin
                check(exp_sel.size() > 0 && r.value == exp_sel[0],
                      $sformatf("select %0d: got %h exp %h", n_sel, r.value, exp_sel[0]));
                void'(exp_sel.pop_front()); n_sel++;
                sigq.push_back(sig_to(4, 3));
              end
              220: begin n_wr++; sigq.push_back(sig_to(6, 1)); end
              230: begin
                check(exp_rd.size() > 0 && r.value == exp_rd[0],
                      $sformatf("read %0d: got %h exp %h", n_rd, r.value, exp_rd[0]));
                void'(exp_rd.pop_front()); n_rd++;
                sigq.push_back(sig_to(6, 2));
              end
              default: check(1'b0, $sformatf("unexpected host packet cell %0d", r.cid));
            endcase
          end
        end
      end
      // choose the next packet to inject
      host_in_valid <= 1'b0;
      if (sigq.size() > 0 && !(host_in_valid && host_in_ready && sigq.size() == 1 &&
                               host_in_pkt.port == PORT_SIG)) begin
        host_in_valid <= 1'b1;
        host_in_pkt   <= (host_in_valid && host_in_ready && host_in_pkt.port == PORT_SIG)
                         ? sigq[1] : sigq[0];
        if (host_in_valid && host_in_ready && host_in_pkt.port == PORT_SIG && sigq.size() < 2)
          host_in_valid <= 1'b0;
      end else begin
        for (int k = 0; k < NSRC; k++) begin
          int s;
          s = (rr + k) % NSRC;
          if (credit[s] > 0 && vq[s].size() > 0 && (s != 9 || reads_started)) begin
            res_pkt_t p;
            p = '0; p.pe = PE_W'(src_pe[s]); p.cid = CELL_W'(src_cid[s]);
            p.port = src_port[s]; p.value = vq[s][0];
            host_in_valid <= 1'b1;
            host_in_pkt   <= p;
            rr = s + 1;
            break;
          end
        end
      end
    end
  end

  initial begin
    logic [31:0] a, b, c, d, x, y, v;
    int iv;
    load_valid = 0; load_pe = 0; load_cell = 0; load_instr = '0; load_op1 = 0; load_op2 = 0;
    host_in_valid = 0; host_in_pkt = '0; host_out_ready = '1;
    clear_dl();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- program 1: AVE = 0.25 * ((A + B) + (C + D))
    dl[0] = dst(G_ALWAYS, 0, 3, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 1, 0, 0, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 1, 0, 1, PORT_SIG);
    load(0, 0, OP_ADD, 0, 2'b00, 1, 1);
    dl[0] = dst(G_ALWAYS, 0, 3, 0, PORT_OP2);
    dl[1] = dst(G_ALWAYS, 1, 0, 2, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 1, 0, 3, PORT_SIG);
    load(9, 0, OP_ADD, 0, 2'b00, 1, 1);
    dl[0] = dst(G_ALWAYS, 0, 12, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 0, 0, 0, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 0, 9, 0, PORT_SIG);
    load(3, 0, OP_ADD, 0, 2'b00, 1, 1);
    dl[0] = dst(G_ALWAYS, 1, 0, 200, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 0, 3, 0, PORT_SIG);
    load(12, 0, OP_MUL, 0, 2'b10, 1, 1, 0, 32'h3e80_0000);
    def_src(0, 0, 0, PORT_OP1);
    def_src(1, 0, 0, PORT_OP2);
    def_src(2, 9, 0, PORT_OP1);
    def_src(3, 9, 0, PORT_OP2);

    // ---- program 2: r = (i == 0) ? x : 0.5 * y
    dl[0] = dst(G_ALWAYS, 0, 4, 1, PORT_CTL);
    dl[1] = dst(G_ALWAYS, 0, 4, 2, PORT_CTL);
    dl[2] = dst(G_ALWAYS, 0, 4, 3, PORT_CTL);
    dl[3] = dst(G_ALWAYS, 1, 0, 4, PORT_SIG);
    load(4, 0, OP_IEQ, 0, 2'b10, 3, 3, 0, 32'd0);
    dl[0] = dst(G_T, 0, 4, 3, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 1, 0, 5, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 0, 4, 0, PORT_SIG);
    load(4, 1, OP_ID, 1, 2'b00, 1, 0);
    dl[0] = dst(G_F, 0, 13, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 1, 0, 6, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 0, 4, 0, PORT_SIG);
    load(4, 2, OP_ID, 1, 2'b00, 0, 1);
    dl[0] = dst(G_ALWAYS, 0, 4, 3, PORT_OP2);
    dl[1] = dst(G_ALWAYS, 0, 4, 2, PORT_SIG);
    load(13, 0, OP_MUL, 0, 2'b10, 1, 1, 0, 32'h3f00_0000);
    dl[0] = dst(G_ALWAYS, 1, 0, 210, PORT_OP1);
    dl[1] = dst(G_T, 0, 4, 1, PORT_SIG);
    dl[2] = dst(G_F, 0, 13, 0, PORT_SIG);
    dl[3] = dst(G_ALWAYS, 0, 4, 0, PORT_SIG);
    load(4, 3, OP_MERGE, 0, 2'b00, 1, 1);
    def_src(4, 4, 0, PORT_OP1);
    def_src(5, 4, 1, PORT_OP1);
    def_src(6, 4, 2, PORT_OP1);

    // ---- program 3: array memory buffer in module 1
    dl[0] = dst(G_ALWAYS, 0, 6, 1, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 1, 0, 7, PORT_SIG);
    load(6, 0, OP_INDEX, 0, 2'b01, 1, 1, {11'd0, 5'd1, 16'h0040}, 0);
    dl[0] = dst(G_ALWAYS, 1, 0, 220, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 0, 6, 0, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 1, 0, 8, PORT_SIG);
    load(6, 1, OP_WRITE, 0, 2'b00, 1, 1);
    dl[0] = dst(G_ALWAYS, 1, 0, 230, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 1, 0, 9, PORT_SIG);
    load(6, 2, OP_READ, 0, 2'b00, 1, 1);
    def_src(7, 6, 0, PORT_OP2);
    def_src(8, 6, 1, PORT_OP2);
    def_src(9, 6, 2, PORT_OP1);

    // ---- input streams and expected results
    for (int k = 0; k < K; k++) begin
      a = rand_single(120, 130); b = rand_single(120, 130);
      c = rand_single(120, 130); d = rand_single(120, 130);
      vq[0].push_back(a); vq[1].push_back(b); vq[2].push_back(c); vq[3].push_back(d);
      exp_ave.push_back(to_single(to_real(to_single(to_real(to_single(to_real(a) + to_real(b))) +
                                                    to_real(to_single(to_real(c) + to_real(d))))) * 0.25));
      iv = k % 4;
      x = rand_single(100, 150); y = rand_single(100, 150);
      vq[4].push_back(32'(iv)); vq[5].push_back(x); vq[6].push_back(y);
      exp_sel.push_back(iv == 0 ? x : to_single(to_real(y) * 0.5));
      if (iv == 0) n_true++; else n_false++;
      v = $urandom;
      vq[7].push_back(32'(k)); vq[8].push_back(v);
      vq[9].push_back({11'd0, 5'd1, 16'h0040 + 16'(k)});
      exp_rd.push_back(v);
    end
    @(posedge clk);
    running = 1'b1;
    wait (n_wr == K);
    reads_started = 1'b1;
    wait (n_ave == K && n_sel == K && n_rd == K);
    repeat (20) @(posedge clk);
    check(sigq.size() == 0 && exp_ave.size() == 0 && exp_sel.size() == 0 && exp_rd.size() == 0,
          "all results seen");
    for (int s = 0; s < NSRC; s++)
      check(credit[s] == 1, $sformatf("source %0d ended with %0d credits", s, credit[s]));
    // every mechanism must have happened
    check(c_fu  > 0, "no functional unit firing");
    check(c_loc > 0, "no local firing");
    check(c_gat > 0, "no gated firing");
    check(c_mrg == longint'(K), $sformatf("merges %0d, expected %0d", c_mrg, K));
    check(c_sig > 0, "no signal packets");
    check(c_conf > 0, "no network contention");
    check(n_true > 0 && n_false > 0, "both arms of the conditional");
    check(n_wr == K && n_rd == K, "array memory writes and reads");
    // firings per item: program 1 four FU cells; program 2 four local cells
    // and its MUL only on the false arm; program 3 three array memory cells
    check(c_fu == longint'(7 * K + n_false),
          $sformatf("FU firings %0d, expected %0d", c_fu, 7 * K + n_false));
    check(c_loc == longint'(4 * K), $sformatf("local firings %0d, expected %0d", c_loc, 4 * K));
    $display("items %0d cycles %0d: FU firings %0d, local %0d, gated %0d, merges %0d, signals %0d, contention %0d",
             K, cycles, c_fu, c_loc, c_gat, c_mrg, c_sig, c_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
