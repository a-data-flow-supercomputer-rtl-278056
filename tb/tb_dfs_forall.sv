// tb_dfs_forall: runs the pipelined array construction
//     X[i] = A[i]                          for i = 0 and i = m+1
//     X[i] = 0.5 * (A[i-1] + A[i+1])       for 1 <= i <= m
// on the machine at 16 PEs.  The array A arrives as a stream of m+2 values.
// Three gated ID cells pick the elements for each arm, driven by the control
// streams T..TFF (A[i-1]), FFT..T (A[i+1]) and FT..TF (boundary values, taken
// on false).  Cascades of 4 and 2 ID cells act as FIFO buffers that equalise
// the path lengths.  An ADD, a MUL by the constant 0.5 and a MERGE steered by
// FT..TF put X out in order.  The cells are spread over many PEs, so every
// arc crosses the networks.  The host feeds A and the control streams under
// the signal protocol and acknowledges each X.  Several arrays are streamed
// back to back; every element is checked, and the steady-state rate is
// reported.
module tb_dfs_forall;
  import dfs_pkg::*;
  import fp_ref_pkg::*;

  localparam int NP = 16;
  localparam int M  = 14;          // interior points per array
  localparam int NA = 6;           // arrays streamed

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
                      int rt, int rf, logic [31:0] k2 = 0);
    @(posedge clk); #1;
    load_valid = 1'b1; load_pe = PE_W'(pe); load_cell = CELL_W'(cid);
    load_instr.op = op; load_instr.gated = gated; load_instr.konst = konst;
    load_instr.reset_t = 4'(rt); load_instr.reset_f = 4'(rf);
    for (int i = 0; i < NDEST; i++) load_instr.dest[i] = dl[i];
    load_op1 = 0; load_op2 = k2;
    @(posedge clk); #1 load_valid = 1'b0;
    clear_dl();
  endtask

  // host sources: signal packets to host cell s return a credit to source s
  localparam int NSRC = 7;
  int          src_pe   [NSRC];
  int          src_cid  [NSRC];
  logic [1:0]  src_port [NSRC];
  int          credit   [NSRC];
  logic [31:0] vq       [NSRC][$];
  res_pkt_t    sigq [$];
  logic [31:0] exp_x [$];
  int n_x = 0, cycles = 0, first_x = 0, last_x = 0, rr = 0;
  longint c_gat = 0, c_mrg = 0, c_conf = 0;
  logic running = 1'b0;

  task automatic def_src(int s, int pe, int cid, logic [1:0] port);
    src_pe[s] = pe; src_cid[s] = cid; src_port[s] = port; credit[s] = 1;
  endtask

  always @(posedge clk) begin
    if (running) begin
      cycles++;
      c_gat += n_gated; c_mrg += n_merge; c_conf += n_conflict;
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
            check(exp_x.size() > 0 && host_out_pkt[p].value == exp_x[0],
                  $sformatf("X element %0d: got %h exp %h", n_x, host_out_pkt[p].value, exp_x[0]));
            void'(exp_x.pop_front());
            if (n_x == M + 2) first_x = cycles;
            n_x++;
            last_x = cycles;
            sigq.push_back(host_out_pkt[p]);
            sigq[$].pe = 8'd10; sigq[$].cid = '0; sigq[$].port = PORT_SIG; sigq[$].host = 1'b0;
          end
        end
      // next packet: pending signals first (one per cycle), then sources round-robin
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
    logic [31:0] a [M+2];
    load_valid = 0; load_pe = 0; load_cell = 0; load_instr = '0; load_op1 = 0; load_op2 = 0;
    host_in_valid = 0; host_in_pkt = '0; host_out_ready = '1;
    clear_dl();
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // upper selector (T..TFF) -> 4 ID cells (PEs 5..8) -> ADD first operand
    dl[0] = dst(G_T, 0, 5, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 1, 0, 0, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 1, 0, 3, PORT_SIG);
    load(1, 0, OP_ID, 1, 2'b00, 1, 0);
    for (int k = 0; k < 4; k++) begin
      dl[0] = (k == 3) ? dst(G_ALWAYS, 0, 9, 0, PORT_OP1) : dst(G_ALWAYS, 0, 6 + k, 0, PORT_OP1);
      dl[1] = (k == 0) ? dst(G_ALWAYS, 0, 1, 0, PORT_SIG) : dst(G_ALWAYS, 0, 4 + k, 0, PORT_SIG);
      load(5 + k, 0, OP_ID, 0, 2'b00, 1, 1);
    end
    // middle selector (FFT..T) -> ADD second operand
    dl[0] = dst(G_T, 0, 9, 0, PORT_OP2);
    dl[1] = dst(G_ALWAYS, 1, 0, 1, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 1, 0, 4, PORT_SIG);
    load(2, 0, OP_ID, 1, 2'b00, 1, 0);
    // ADD -> MUL by 0.5 -> MERGE first operand
    dl[0] = dst(G_ALWAYS, 0, 11, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 0, 8, 0, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 0, 2, 0, PORT_SIG);
    load(9, 0, OP_ADD, 0, 2'b00, 1, 1);
    dl[0] = dst(G_ALWAYS, 0, 10, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 0, 9, 0, PORT_SIG);
    load(11, 0, OP_MUL, 0, 2'b10, 1, 1, 32'h3f00_0000);
    // lower selector (FT..TF, passes on false) -> 2 ID cells -> MERGE second operand
    dl[0] = dst(G_F, 0, 12, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 1, 0, 2, PORT_SIG);
    dl[2] = dst(G_ALWAYS, 1, 0, 5, PORT_SIG);
    load(3, 0, OP_ID, 1, 2'b00, 0, 1);
    dl[0] = dst(G_ALWAYS, 0, 13, 0, PORT_OP1);
    dl[1] = dst(G_ALWAYS, 0, 3, 0, PORT_SIG);
    load(12, 0, OP_ID, 0, 2'b00, 1, 1);
    dl[0] = dst(G_ALWAYS, 0, 10, 0, PORT_OP2);
    dl[1] = dst(G_ALWAYS, 0, 12, 0, PORT_SIG);
    load(13, 0, OP_ID, 0, 2'b00, 1, 1);
    // MERGE (FT..TF) -> host
    dl[0] = dst(G_ALWAYS, 1, 0, 300, PORT_OP1);
    dl[1] = dst(G_T, 0, 11, 0, PORT_SIG);
    dl[2] = dst(G_F, 0, 13, 0, PORT_SIG);
    dl[3] = dst(G_ALWAYS, 1, 0, 6, PORT_SIG);
    load(10, 0, OP_MERGE, 0, 2'b00, 1, 1);

    def_src(0, 1, 0, PORT_OP1);  def_src(3, 1, 0, PORT_CTL);
    def_src(1, 2, 0, PORT_OP1);  def_src(4, 2, 0, PORT_CTL);
    def_src(2, 3, 0, PORT_OP1);  def_src(5, 3, 0, PORT_CTL);
    def_src(6, 10, 0, PORT_CTL);

    for (int n = 0; n < NA; n++) begin
      for (int i = 0; i < M + 2; i++) a[i] = rand_single(120, 130);
      for (int i = 0; i < M + 2; i++) begin
        vq[0].push_back(a[i]); vq[1].push_back(a[i]); vq[2].push_back(a[i]);
        vq[3].push_back(32'(i < M));                     // T..TFF
        vq[4].push_back(32'(i >= 2));                    // FFT..T
        vq[5].push_back(32'(i >= 1 && i <= M));          // FT..TF
        vq[6].push_back(32'(i >= 1 && i <= M));          // FT..TF
        if (i == 0 || i == M + 1) exp_x.push_back(a[i]);
        else exp_x.push_back(to_single(to_real(to_single(to_real(a[i-1]) + to_real(a[i+1]))) * 0.5));
      end
    end
    @(posedge clk);
    running = 1'b1;
    wait (n_x == NA * (M + 2));
    repeat (30) @(posedge clk);
    check(exp_x.size() == 0 && sigq.size() == 0, "all elements delivered");
    for (int s = 0; s < NSRC; s++)
      check(credit[s] == 1, $sformatf("source %0d ended with %0d credits", s, credit[s]));
    check(c_mrg == longint'(NA * (M + 2)), $sformatf("merges %0d", c_mrg));
    check(c_gat == longint'(3 * NA * (M + 2)), $sformatf("gated firings %0d", c_gat));
    $display("%0d arrays of %0d elements in %0d cycles; steady state %0d cycles per element; contention %0d",
             NA, M + 2, cycles, (last_x - first_x) / ((NA - 1) * (M + 2) - 1), c_conf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
