// tb_dfs_laplace: runs the body of the LaPlace relaxation on the machine at
// 16 PEs.  Each pass turns a data array X of R rows by A columns into Y, where
// boundary elements are copied and each interior element is
//     Y[i][j] = 0.25 * ((X[i-1][j] + X[i+1][j]) + (X[i][j+1] + X[i][j-1])).
// The array arrives as one stream, row after row, into a single ID cell with
// four destinations.  The outer level picks rows i-1, i and i+1 with gated ID
// cells.  Their control streams are C4 = T^(m*A) F^(2A), C5 = F^A T^(m*A) F^A
// and C6 = F^(2A) T^(m*A), with m = R-2 interior rows.  Row FIFOs built from
// 4A and 2A cascaded ID cells line the three rows up.  The kernel does the
// same within a row, using C1 = FFT..T, C2 = FT..TF and C3 = T..TFF, with
// short ID cascades.  It then applies two ADD levels, a MUL by the constant
// 0.25 and a MERGE.  A final MERGE steered by C5 puts the boundary rows back
// into the stream.  The host plays the control generator: it feeds the
// control streams.  It also plays the iteration loop: each Y element it
// receives becomes the next pass's X.  The cells are placed round-robin over
// all PEs, so nearly every arc crosses RN2/RN1.  The signal arcs and reset
// counts of every cell are derived from its data arcs.  Every element of
// every pass is checked against a reference.
module tb_dfs_laplace;
  import dfs_pkg::*;
  import fp_ref_pkg::*;

  localparam int NP   = 16;
  localparam int R    = 5;          // rows, m = R-2 interior rows
  localparam int A    = 6;          // columns
  localparam int NIT  = 3;          // passes
  localparam int MAXC = 128;
  localparam int MAXE = 256;
  localparam int NSRC = 12;

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

  dfs_top #(.NPES(NP), .NCELLS(64), .AM_SIZE(1024)) dut (.*);

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
      if (failures < 30) $display("FAIL %s", what);
    end
  endtask

  // ---------------- program graph ----------------
  opcode_e     c_op    [MAXC];
  logic        c_gated [MAXC];
  logic [1:0]  c_konst [MAXC];
  logic [31:0] c_k2    [MAXC];
  int ncell = 0;
  // arcs: src >= 0 is a cell, src < 0 is host source -1-src; dst < 0 is the host sink
  int         e_src  [MAXE];
  int         e_dst  [MAXE];
  logic [1:0] e_port [MAXE];
  gate_e      e_gate [MAXE];
  int nedge = 0;

  function automatic int pe_of(int c);  return c % NP;  endfunction
  function automatic int cid_of(int c); return c / NP;  endfunction

  function automatic int newcell(opcode_e op, logic gated = 1'b0, logic [1:0] konst = 2'b00,
                              logic [31:0] k2 = 0);
    c_op[ncell] = op; c_gated[ncell] = gated; c_konst[ncell] = konst; c_k2[ncell] = k2;
    ncell++;
    return ncell - 1;
  endfunction

  function automatic void arc(int src, int dst, logic [1:0] port, gate_e g = G_ALWAYS);
    e_src[nedge] = src; e_dst[nedge] = dst; e_port[nedge] = port; e_gate[nedge] = g;
    nedge++;
  endfunction

  // cascade of n ID cells fed from src (gate g on the first arc); returns the last cell
  function automatic int chain(int src, int n, gate_e g = G_ALWAYS);
    int prev, c;
    prev = src;
    for (int k = 0; k < n; k++) begin
      c = newcell(OP_ID);
      arc(prev, c, PORT_OP1, (k == 0) ? g : G_ALWAYS);
      prev = c;
    end
    return prev;
  endfunction

  function automatic dest_t mkdest(gate_e g, logic host, int pe, int cid, logic [1:0] port);
    dest_t d;
    d.valid = 1'b1; d.gate = g; d.host = host;
    d.pe = PE_W'(pe); d.cid = CELL_W'(cid); d.port = port;
    return d;
  endfunction

  task automatic load_graph();
    for (int c = 0; c < ncell; c++) begin
      int nd, rt, rf;
      nd = 0; rt = 0; rf = 0;
      load_instr = '0;
      for (int e = 0; e < nedge; e++)
        if (e_src[e] == c) begin
          load_instr.dest[nd++] = (e_dst[e] < 0) ? mkdest(e_gate[e], 1, pe_of(c), 300, e_port[e])
                                                 : mkdest(e_gate[e], 0, pe_of(e_dst[e]), cid_of(e_dst[e]), e_port[e]);
          if (e_gate[e] != G_F) rt++;
          if (e_gate[e] != G_T) rf++;
        end
      for (int e = 0; e < nedge; e++)
        if (e_dst[e] == c) begin
          gate_e g;
          g = G_ALWAYS;
          if (c_op[c] == OP_MERGE && e_port[e] == PORT_OP1) g = G_T;
          if (c_op[c] == OP_MERGE && e_port[e] == PORT_OP2) g = G_F;
          load_instr.dest[nd++] = (e_src[e] < 0) ? mkdest(g, 1, 0, -1 - e_src[e], PORT_SIG)
                                                 : mkdest(g, 0, pe_of(e_src[e]), cid_of(e_src[e]), PORT_SIG);
        end
      if (nd > NDEST) $fatal(1, "cell %0d has %0d destinations", c, nd);
      if (!c_gated[c]) rf = rt;
      load_instr.op = c_op[c]; load_instr.gated = c_gated[c]; load_instr.konst = c_konst[c];
      load_instr.reset_t = 4'(rt); load_instr.reset_f = 4'(rf);
      @(posedge clk); #1;
      load_valid = 1'b1; load_pe = PE_W'(pe_of(c)); load_cell = CELL_W'(cid_of(c));
      load_op1 = 0; load_op2 = c_k2[c];
      @(posedge clk); #1 load_valid = 1'b0;
    end
  endtask

  // ---------------- host ----------------
  int          src_pe   [NSRC];
  int          src_cid  [NSRC];
  logic [1:0]  src_port [NSRC];
  int          credit   [NSRC];
  logic [31:0] vq       [NSRC][$];
  res_pkt_t    sigq [$];
  logic [31:0] exp_y [$];
  int n_y = 0, cycles = 0, rr = 0, sink_pe = 0, sink_cid = 0;
  longint c_gat = 0, c_mrg = 0, c_conf = 0, c_fu = 0, c_loc = 0;
  logic running = 1'b0;

  function automatic void src(int s, int dst, logic [1:0] port);
    src_pe[s] = pe_of(dst); src_cid[s] = cid_of(dst); src_port[s] = port; credit[s] = 1;
    arc(-1 - s, dst, port);
  endfunction

  always @(posedge clk) begin
    if (running) begin
      cycles++;
      c_gat += n_gated; c_mrg += n_merge; c_conf += n_conflict;
      c_fu += n_fire_fu; c_loc += n_fire_local;
      if (host_in_valid && host_in_ready) begin
        if (host_in_pkt.port == PORT_SIG) void'(sigq.pop_front());
        else
          for (int s = 0; s < NSRC; s++)
            if (src_pe[s] == int'(host_in_pkt.pe) && src_cid[s] == int'(host_in_pkt.cid) &&
                src_port[s] == host_in_pkt.port) begin
              void'(vq[s].pop_front());
              credit[s]--;
              break;
            end
      end
      for (int p = 0; p < NP; p++)
        if (host_out_valid[p]) begin
          if (host_out_pkt[p].port == PORT_SIG) begin
            credit[int'(host_out_pkt[p].cid)]++;
          end else begin
            check(exp_y.size() > 0 && host_out_pkt[p].value == exp_y[0],
                  $sformatf("pass %0d element %0d: got %h exp %h", n_y / (R * A), n_y % (R * A),
                            host_out_pkt[p].value, exp_y[0]));
            void'(exp_y.pop_front());
            if (n_y < (NIT - 1) * R * A) vq[0].push_back(host_out_pkt[p].value);
            n_y++;
            sigq.push_back(host_out_pkt[p]);
            sigq[$].pe = PE_W'(sink_pe); sigq[$].cid = CELL_W'(sink_cid);
            sigq[$].port = PORT_SIG; sigq[$].host = 1'b0;
          end
        end
      host_in_valid <= 1'b0;
      if (sigq.size() > ((host_in_valid && host_in_ready && host_in_pkt.port == PORT_SIG) ? 1 : 0)) begin
        host_in_valid <= 1'b1;
        host_in_pkt   <= (host_in_valid && host_in_ready && host_in_pkt.port == PORT_SIG) ? sigq[1] : sigq[0];
      end else begin
        for (int k = 0; k < NSRC; k++) begin
          int s;
          s = (rr + k) % NSRC;
          if (credit[s] > 0 && vq[s].size() > 0) begin
            res_pkt_t pk;
            pk = '0; pk.pe = PE_W'(src_pe[s]); pk.cid = CELL_W'(src_cid[s]);
            pk.port = src_port[s]; pk.value = vq[s][0];
            host_in_valid <= 1'b1;
            host_in_pkt   <= pk;
            rr = s + 1;
            break;
          end
        end
      end
    end
  end

  initial begin
    logic [31:0] x [R][A];
    logic [31:0] y [R][A];
    int xs, g4, g5, g6, g5f, q4, q5, q5f, omrg;
    int k1, k2, k3, kc2f, kt, ki, kb, a1, a2, a3, mu, kmrg, t1, t3, tf;
    load_valid = 0; load_pe = 0; load_cell = 0; load_instr = '0; load_op1 = 0; load_op2 = 0;
    host_in_valid = 0; host_in_pkt = '0; host_out_ready = '1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // outer level (body)
    xs  = newcell(OP_ID);                         // the X stream, four destinations
    g4  = newcell(OP_ID, 1);  arc(xs, g4, PORT_OP1);
    g5  = newcell(OP_ID, 1);  arc(xs, g5, PORT_OP1);
    g6  = newcell(OP_ID, 1);  arc(xs, g6, PORT_OP1);
    g5f = newcell(OP_ID, 1);  arc(xs, g5f, PORT_OP1);
    q4  = chain(g4, 4 * A, G_T);               // row i-1
    q5  = chain(g5, 2 * A, G_T);               // row i
    q5f = chain(g5f, 2 * A, G_F);              // boundary rows
    // kernel
    k1 = newcell(OP_ID, 1);  arc(q4, k1, PORT_OP1);            // X[i-1][j], C2
    k3 = newcell(OP_ID, 1);  arc(g6, k3, PORT_OP1, G_T);       // X[i+1][j], C2
    ki = newcell(OP_ID, 1);  arc(q5, ki, PORT_OP1);            // X[i][j+1], C1
    kt = newcell(OP_ID, 1);  arc(q5, kt, PORT_OP1);            // X[i][j-1], C3
    kb = newcell(OP_ID, 1);  arc(q5, kb, PORT_OP1);            // boundary columns, C2 on false
    t1 = chain(k1, 2, G_T);
    t3 = chain(k3, 2, G_T);
    kc2f = chain(kt, 4, G_T);
    tf = chain(kb, 2, G_F);
    a1 = newcell(OP_ADD);  arc(t1, a1, PORT_OP1);  arc(t3, a1, PORT_OP2);
    a2 = newcell(OP_ADD);  arc(ki, a2, PORT_OP1, G_T);  arc(kc2f, a2, PORT_OP2);
    a3 = newcell(OP_ADD);  arc(a1, a3, PORT_OP1);  arc(a2, a3, PORT_OP2);
    mu = newcell(OP_MUL, 0, 2'b10, 32'h3e80_0000);  arc(a3, mu, PORT_OP1);
    kmrg = newcell(OP_MERGE);  arc(mu, kmrg, PORT_OP1);  arc(tf, kmrg, PORT_OP2);
    omrg = newcell(OP_MERGE);  arc(kmrg, omrg, PORT_OP1);  arc(q5f, omrg, PORT_OP2);
    arc(omrg, -1, PORT_OP1);
    sink_pe = pe_of(omrg); sink_cid = cid_of(omrg);

    src(0, xs, PORT_OP1);
    src(1, g4, PORT_CTL);   src(2, g5, PORT_CTL);   src(3, g6, PORT_CTL);
    src(4, g5f, PORT_CTL);  src(5, omrg, PORT_CTL);
    src(6, k1, PORT_CTL);   src(7, k3, PORT_CTL);   src(8, ki, PORT_CTL);
    src(9, kt, PORT_CTL);   src(10, kb, PORT_CTL);  src(11, kmrg, PORT_CTL);
    load_graph();
    $display("%0d cells, %0d arcs", ncell, nedge);

    for (int i = 0; i < R; i++)
      for (int j = 0; j < A; j++) begin
        x[i][j] = rand_single(120, 130);
        vq[0].push_back(x[i][j]);
      end
    for (int it = 0; it < NIT; it++) begin
      for (int i = 0; i < R; i++)
        for (int j = 0; j < A; j++) begin
          logic c4, c5, c6;
          c4 = (i < R - 2);  c5 = (i >= 1 && i < R - 1);  c6 = (i >= 2);
          vq[1].push_back(32'(c4)); vq[2].push_back(32'(c5)); vq[3].push_back(32'(c6));
          vq[4].push_back(32'(c5)); vq[5].push_back(32'(c5));
          if (c5) begin
            vq[6].push_back(32'(j >= 1 && j < A - 1));    // C2
            vq[7].push_back(32'(j >= 1 && j < A - 1));    // C2
            vq[8].push_back(32'(j >= 2));                 // C1
            vq[9].push_back(32'(j < A - 2));              // C3
            vq[10].push_back(32'(j >= 1 && j < A - 1));   // C2
            vq[11].push_back(32'(j >= 1 && j < A - 1));   // C2
          end
          if (!c5 || j == 0 || j == A - 1) y[i][j] = x[i][j];
          else y[i][j] = to_single(0.25 * to_real(to_single(
                           to_real(to_single(to_real(x[i-1][j]) + to_real(x[i+1][j]))) +
                           to_real(to_single(to_real(x[i][j+1]) + to_real(x[i][j-1]))))));
          exp_y.push_back(y[i][j]);
        end
      x = y;
    end

    @(posedge clk);
    running = 1'b1;
    wait (n_y == NIT * R * A);
    repeat (40) @(posedge clk);
    check(exp_y.size() == 0 && sigq.size() == 0, "all elements delivered");
    for (int s = 0; s < NSRC; s++)
      check(credit[s] == 1, $sformatf("source %0d ended with %0d credits", s, credit[s]));
    check(c_mrg == longint'(NIT * (R * A + (R - 2) * A)), $sformatf("merges %0d", c_mrg));
    check(c_fu == longint'(NIT * 4 * (R - 2) * (A - 2)), $sformatf("FU firings %0d", c_fu));
    $display("%0d passes over a %0dx%0d array in %0d cycles; %0d local firings, %0d gated, contention %0d",
             NIT, R, A, cycles, c_loc, c_gat, c_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
