// dfs_top: the static data flow supercomputer.
//
// NPES processing elements are grouped in clusters of eight.  Each cluster has
// an (8,8) RN2 network whose eight outputs lead to four ADD units, three MUL
// units and one input of the (NCLUSTERS,NCLUSTERS) RN3 network; RN3 reaches
// one array memory module per cluster.  The outputs of all ADD, MUL and array
// memory units (8 per cluster, so NPES in all) are the inputs of the
// (NPES,NPES) RN1 network, whose outputs return result and signal packets to
// the PEs.  With the default NPES = 256 this is 256 PEs, 32 RN2 of 12 routers,
// 128 ADD and 96 MUL units, an RN3 of 80 routers, 32 array memory modules of
// 64K words and an RN1 of 1024 routers.  RN1 input 8c+u is unit u of cluster
// c (u = 0..3 ADD, 4..6 MUL, 7 array memory).
//
// The host loads instruction cells through the load port (one cell per
// cycle, broadcast, PE picked by load_pe), starts a computation by injecting
// result packets (host_in, delivered to the PE named in the packet), and
// collects results addressed to it on the per-PE host_out ports.  The unit
// counts and the network shapes follow the description; the host interface
// is this implementation's choice.
module dfs_top
  import dfs_pkg::*;
#(
  parameter int NPES     = NPE,
  parameter int NCELLS   = NCELL,
  parameter int AM_SIZE  = AM_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  // program loader
  input  logic              load_valid,
  input  logic [PE_W-1:0]   load_pe,
  input  logic [CELL_W-1:0] load_cell,
  input  instr_t            load_instr,
  input  logic [WORD_W-1:0] load_op1,
  input  logic [WORD_W-1:0] load_op2,
  // host injection of result packets
  input  logic              host_in_valid,
  input  res_pkt_t          host_in_pkt,
  output logic              host_in_ready,
  // result packets addressed to the host, one port per PE
  output logic [NPES-1:0]   host_out_valid,
  output res_pkt_t          host_out_pkt [NPES],
  input  logic [NPES-1:0]   host_out_ready,
  // activity counts for this cycle
  output logic [31:0]       n_fire_fu,
  output logic [31:0]       n_fire_local,
  output logic [31:0]       n_gated,
  output logic [31:0]       n_merge,
  output logic [31:0]       n_signal,
  output logic [31:0]       n_conflict
);

  localparam int NCL = NPES / CLUSTER;

  // PE side
  logic [NPES-1:0] pe_net_valid, pe_net_ready, pe_hin_ready, pe_op_valid, pe_op_ready;
  res_pkt_t        pe_net_pkt [NPES];
  op_pkt_t         pe_op_pkt  [NPES];
  logic [NPES-1:0] ev_fu, ev_loc, ev_gat, ev_mrg, ev_sig;

  // unit side (RN1 inputs)
  logic [NPES-1:0] u_out_valid, u_out_ready;
  res_pkt_t        u_out_pkt [NPES];

  // RN3
  logic [NCL-1:0]  rn3_in_valid, rn3_in_ready, rn3_out_valid, rn3_out_ready;
  op_pkt_t         rn3_in_pkt  [NCL];
  op_pkt_t         rn3_out_pkt [NCL];
  logic [31:0]     rn1_conf, rn3_conf;
  logic [31:0]     rn2_conf [NCL];

  for (genvar p = 0; p < NPES; p++) begin : g_pe
    processing_element #(.NCELLS(NCELLS)) u_pe (
      .clk, .rst_n,
      .pe_id(PE_W'(p)),
      .load_valid(load_valid && load_pe == PE_W'(p)),
      .load_cell, .load_instr, .load_op1, .load_op2,
      .net_valid(pe_net_valid[p]), .net_pkt(pe_net_pkt[p]), .net_ready(pe_net_ready[p]),
      .host_in_valid(host_in_valid && host_in_pkt.pe == PE_W'(p)),
      .host_in_pkt, .host_in_ready(pe_hin_ready[p]),
      .op_valid(pe_op_valid[p]), .op_pkt(pe_op_pkt[p]), .op_ready(pe_op_ready[p]),
      .host_out_valid(host_out_valid[p]), .host_out_pkt(host_out_pkt[p]),
      .host_out_ready(host_out_ready[p]),
      .ev_fire_fu(ev_fu[p]), .ev_fire_local(ev_loc[p]), .ev_gated(ev_gat[p]),
      .ev_merge(ev_mrg[p]), .ev_signal(ev_sig[p])
    );
  end

  assign host_in_ready = pe_hin_ready[host_in_pkt.pe % PE_W'(NPES)];

  for (genvar c = 0; c < NCL; c++) begin : g_cluster
    logic [CLUSTER-1:0] r2_in_valid, r2_in_ready, r2_out_valid, r2_out_ready;
    logic [OP_W-1:0]    r2_in_data  [CLUSTER];
    logic [OP_W-1:0]    r2_out_data [CLUSTER];

    for (genvar i = 0; i < CLUSTER; i++) begin : g_in
      assign r2_in_valid[i]          = pe_op_valid[c*CLUSTER + i];
      assign r2_in_data[i]           = pe_op_pkt[c*CLUSTER + i];
      assign pe_op_ready[c*CLUSTER + i] = r2_in_ready[i];
    end

    routing_network #(.N(CLUSTER), .W(OP_W), .DEST_LSB(OP_UNIT_LSB)) u_rn2 (
      .clk, .rst_n,
      .in_valid(r2_in_valid), .in_data(r2_in_data), .in_ready(r2_in_ready),
      .out_valid(r2_out_valid), .out_data(r2_out_data), .out_ready(r2_out_ready),
      .conflicts(rn2_conf[c])
    );

    for (genvar u = 0; u < NADD_PER; u++) begin : g_add
      add_unit u_add (
        .clk, .rst_n,
        .in_valid(r2_out_valid[u]), .in_pkt(op_pkt_t'(r2_out_data[u])), .in_ready(r2_out_ready[u]),
        .out_valid(u_out_valid[c*CLUSTER + u]), .out_pkt(u_out_pkt[c*CLUSTER + u]),
        .out_ready(u_out_ready[c*CLUSTER + u])
      );
    end
    for (genvar u = NADD_PER; u < NADD_PER + NMUL_PER; u++) begin : g_mul
      mul_unit u_mul (
        .clk, .rst_n,
        .in_valid(r2_out_valid[u]), .in_pkt(op_pkt_t'(r2_out_data[u])), .in_ready(r2_out_ready[u]),
        .out_valid(u_out_valid[c*CLUSTER + u]), .out_pkt(u_out_pkt[c*CLUSTER + u]),
        .out_ready(u_out_ready[c*CLUSTER + u])
      );
    end

    assign rn3_in_valid[c]        = r2_out_valid[AM_PORT];
    assign rn3_in_pkt[c]          = op_pkt_t'(r2_out_data[AM_PORT]);
    assign r2_out_ready[AM_PORT]  = rn3_in_ready[c];

    array_memory #(.WORDS(AM_SIZE)) u_am (
      .clk, .rst_n,
      .in_valid(rn3_out_valid[c]), .in_pkt(rn3_out_pkt[c]), .in_ready(rn3_out_ready[c]),
      .out_valid(u_out_valid[c*CLUSTER + AM_PORT]), .out_pkt(u_out_pkt[c*CLUSTER + AM_PORT]),
      .out_ready(u_out_ready[c*CLUSTER + AM_PORT])
    );
  end

  // RN3: operation packets for array memories, routed by module number
  logic [OP_W-1:0] rn3_in_data [NCL];
  logic [OP_W-1:0] rn3_out_data [NCL];
  for (genvar c = 0; c < NCL; c++) begin : g_rn3_io
    assign rn3_in_data[c] = rn3_in_pkt[c];
    assign rn3_out_pkt[c] = op_pkt_t'(rn3_out_data[c]);
  end

  routing_network #(.N(NCL), .W(OP_W), .DEST_LSB(OP_AM_LSB)) u_rn3 (
    .clk, .rst_n,
    .in_valid(rn3_in_valid), .in_data(rn3_in_data), .in_ready(rn3_in_ready),
    .out_valid(rn3_out_valid), .out_data(rn3_out_data), .out_ready(rn3_out_ready),
    .conflicts(rn3_conf)
  );

  // RN1: result and signal packets back to the PEs, routed by PE number
  logic [RES_W-1:0] rn1_in_data [NPES];
  logic [RES_W-1:0] rn1_out_data [NPES];
  for (genvar p = 0; p < NPES; p++) begin : g_rn1_io
    assign rn1_in_data[p] = u_out_pkt[p];
    assign pe_net_pkt[p]  = res_pkt_t'(rn1_out_data[p]);
  end

  routing_network #(.N(NPES), .W(RES_W), .DEST_LSB(RES_PE_LSB)) u_rn1 (
    .clk, .rst_n,
    .in_valid(u_out_valid), .in_data(rn1_in_data), .in_ready(u_out_ready),
    .out_valid(pe_net_valid), .out_data(rn1_out_data), .out_ready(pe_net_ready),
    .conflicts(rn1_conf)
  );

  always_comb begin
    n_fire_fu = '0; n_fire_local = '0; n_gated = '0; n_merge = '0; n_signal = '0;
    n_conflict = rn1_conf + rn3_conf;
    for (int p = 0; p < NPES; p++) begin
      n_fire_fu    += 32'(ev_fu[p]);
      n_fire_local += 32'(ev_loc[p]);
      n_gated      += 32'(ev_gat[p]);
      n_merge      += 32'(ev_mrg[p]);
      n_signal     += 32'(ev_sig[p]);
    end
    for (int c = 0; c < NCL; c++) n_conflict += rn2_conf[c];
  end

  initial begin
    assert (NPES % CLUSTER == 0 && NPES >= 2 * CLUSTER)
      else $error("NPES must be a multiple of %0d, at least %0d", CLUSTER, 2 * CLUSTER);
  end

endmodule
