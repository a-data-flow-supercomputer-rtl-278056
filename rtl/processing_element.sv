// processing_element: holds instruction cells of the static data flow program,
// applies arriving result and signal packets, finds enabled cells and fires
// them.
//
// Each cell has a static part (opcode, constant-operand flags, a gating flag,
// signal reset values for control true and false, NDEST destinations) written
// by the loader, and a dynamic part: two operand values, a Boolean control
// operand, a presence bit for each, the "signals needed" count, and a
// "queued" bit.
//
// Input stage: one packet per cycle from the loop-back path (results of
// cells of this PE sent to cells of this PE), from RN1, or from the host, in
// that order of priority.  A result packet fills its operand field; a signal
// packet lowers signals needed by one.  A cell is enabled when signals needed
// is zero and every operand it uses is present (constants always are, the
// control operand only for gated cells).  MERGE is enabled by the control
// operand plus the data operand it selects.  An enabled cell is put on the
// ready queue once.  Packets marked for the host pass to the host port.
//
// Fire stage: takes the cell at the head of the ready queue, clears the
// operands it consumed, and reloads signals needed with the reset value for
// its control value.  Destinations tagged T or F are kept only if the tag
// matches the control value.  Floating point and array instructions leave as
// one operation packet for RN2 (ADD/SUB to one of the cluster's ADD units,
// MUL to one of its MUL units, chosen round-robin; INDEX/READ/WRITE to the
// RN3 port, with the array module number taken from the address).  Identity,
// MERGE, integer, compare and Boolean instructions are executed here: their
// destinations in this PE are served through the loop-back fan-out, and the
// others go as one ID operation packet to an ADD unit that forwards them.
// A cell fires in the cycle it reaches the queue head if both outputs are
// free.  The firing rules follow the description; the queue, the field
// layout, the loader and the forwarding of remote results are this
// implementation's choices.
module processing_element
  import dfs_pkg::*;
#(
  parameter int NCELLS = NCELL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [PE_W-1:0]   pe_id,
  // program loader: writes a cell and clears its dynamic state
  input  logic              load_valid,
  input  logic [CELL_W-1:0] load_cell,
  input  instr_t            load_instr,
  input  logic [WORD_W-1:0] load_op1,
  input  logic [WORD_W-1:0] load_op2,
  // result and signal packets from RN1
  input  logic              net_valid,
  input  res_pkt_t          net_pkt,
  output logic              net_ready,
  // packets injected by the host
  input  logic              host_in_valid,
  input  res_pkt_t          host_in_pkt,
  output logic              host_in_ready,
  // operation packets to RN2
  output logic              op_valid,
  output op_pkt_t           op_pkt,
  input  logic              op_ready,
  // result packets addressed to the host
  output logic              host_out_valid,
  output res_pkt_t          host_out_pkt,
  input  logic              host_out_ready,
  // activity, one pulse per event
  output logic              ev_fire_fu,
  output logic              ev_fire_local,
  output logic              ev_gated,
  output logic              ev_merge,
  output logic              ev_signal
);

  localparam int CW = $clog2(NCELLS);

  // ---------------------------------------------------------------- state
  instr_t            instr  [NCELLS];
  logic [WORD_W-1:0] opnd1  [NCELLS];
  logic [WORD_W-1:0] opnd2  [NCELLS];
  logic              ctl    [NCELLS];
  logic              p1     [NCELLS];
  logic              p2     [NCELLS];
  logic              pc     [NCELLS];
  logic              queued [NCELLS];
  logic [3:0]        needed [NCELLS];

  // ---------------------------------------------------------------- input
  logic     lb_valid, lb_ready;
  res_pkt_t lb_pkt;
  logic     in_valid, in_take;
  res_pkt_t in_pkt;
  logic [CW-1:0] ic;

  always_comb begin
    in_valid = 1'b1;
    in_pkt   = lb_pkt;
    if (lb_valid)           in_pkt = lb_pkt;
    else if (net_valid)     in_pkt = net_pkt;
    else if (host_in_valid) in_pkt = host_in_pkt;
    else                    in_valid = 1'b0;
  end

  // A packet for the host waits for the host port; all others are taken at once.
  assign in_take        = in_valid && (!in_pkt.host || host_out_ready);
  assign lb_ready       = in_take;
  assign net_ready      = in_take && !lb_valid;
  assign host_in_ready  = in_take && !lb_valid && !net_valid;
  assign host_out_valid = in_valid && in_pkt.host;
  assign host_out_pkt   = in_pkt;

  assign ic = in_pkt.cid[CW-1:0];

  function automatic logic cell_ready(instr_t ins, logic h1, logic h2, logic hc,
                                      logic cv, logic [3:0] nd);
    logic have1, have2;
    have1 = ins.konst[0] || h1;
    have2 = ins.konst[1] || h2;
    if (ins.op == OP_NOP) return 1'b0;
    if (nd != 4'd0)       return 1'b0;
    if (ins.op == OP_MERGE) return hc && (cv ? have1 : have2);
    return have1 && (!needs_b(ins.op) || have2) && (!ins.gated || hc);
  endfunction

  logic       n_p1, n_p2, n_pc, n_ctl, in_rdy, in_use;
  logic [3:0] n_needed;

  always_comb begin
    n_p1 = p1[ic]; n_p2 = p2[ic]; n_pc = pc[ic]; n_ctl = ctl[ic];
    n_needed = needed[ic];
    unique case (in_pkt.port)
      PORT_OP1: n_p1 = 1'b1;
      PORT_OP2: n_p2 = 1'b1;
      PORT_CTL: begin n_pc = 1'b1; n_ctl = (in_pkt.value != '0); end
      default:  n_needed = needed[ic] - 4'd1;
    endcase
    in_use = in_take && !in_pkt.host;
    in_rdy = cell_ready(instr[ic], n_p1, n_p2, n_pc, n_ctl, n_needed);
  end

  // ---------------------------------------------------------------- fire
  logic          q_push, q_full, q_pop, q_valid;
  logic [CW-1:0] q_head, fc;
  logic          fire;
  logic          opq_valid;
  op_pkt_t       opq_pkt;
  logic          fo_in_valid, fo_in_ready;
  logic [WORD_W-1:0] fo_value;
  dest_t [NDEST-1:0] fo_dest;

  assign fc = q_head;
  assign q_push = in_use && in_rdy && !queued[ic] && !(fire && fc == ic);

  sync_fifo #(.W(CW), .DEPTH(NCELLS)) u_ready_q (
    .clk, .rst_n,
    .push(q_push), .wr_data(ic), .full(q_full),
    .pop(q_pop), .rd_valid(q_valid), .rd_data(q_head)
  );

  instr_t            f_ins;
  logic [WORD_W-1:0] f_a, f_b, f_val;
  logic              f_c, f_gate_used, f_lt;
  dest_t [NDEST-1:0] f_keep, f_local, f_remote;
  logic              f_any_local, f_any_remote;
  logic [1:0]        add_rr;
  logic [1:0]        mul_rr;
  op_pkt_t           f_op;

  always_comb begin
    f_ins = instr[fc];
    f_a   = opnd1[fc];
    f_b   = opnd2[fc];
    f_c   = ctl[fc];
    f_gate_used = f_ins.gated || f_ins.op == OP_MERGE;
    // floating point a < b on sign-magnitude words (+0 and -0 are equal)
    if (f_a[31] != f_b[31])  f_lt = f_a[31] && ((f_a[30:0] | f_b[30:0]) != '0);
    else if (f_a[31])        f_lt = f_a[30:0] > f_b[30:0];
    else                     f_lt = f_a[30:0] < f_b[30:0];
    unique case (f_ins.op)
      OP_ID:    f_val = f_a;
      OP_MERGE: f_val = f_c ? f_a : f_b;
      OP_IADD:  f_val = f_a + f_b;
      OP_ISUB:  f_val = f_a - f_b;
      OP_IEQ:   f_val = WORD_W'(f_a == f_b);
      OP_ILT:   f_val = WORD_W'($signed(f_a) < $signed(f_b));
      OP_FLT:   f_val = WORD_W'(f_lt);
      OP_AND:   f_val = WORD_W'((f_a != '0) && (f_b != '0));
      OP_OR:    f_val = WORD_W'((f_a != '0) || (f_b != '0));
      OP_NOT:   f_val = WORD_W'(f_a == '0);
      default:  f_val = f_a;
    endcase
    for (int i = 0; i < NDEST; i++) begin
      f_keep[i] = f_ins.dest[i];
      if (f_gate_used && f_ins.dest[i].gate != G_ALWAYS)
        f_keep[i].valid = f_ins.dest[i].valid && ((f_ins.dest[i].gate == G_T) == f_c);
      f_local[i]  = f_keep[i];
      f_remote[i] = f_keep[i];
      f_local[i].valid  = f_keep[i].valid && !f_keep[i].host && f_keep[i].pe == pe_id;
      f_remote[i].valid = f_keep[i].valid && !f_local[i].valid;
    end
    f_any_local  = 1'b0;
    f_any_remote = 1'b0;
    for (int i = 0; i < NDEST; i++) begin
      f_any_local  |= f_local[i].valid;
      f_any_remote |= f_remote[i].valid;
    end
    f_op.op   = f_ins.op;
    f_op.a    = f_a;
    f_op.b    = f_b;
    f_op.am   = f_a[AMA_W +: AM_W];
    f_op.dest = f_keep;
    unique case (f_ins.op)
      OP_MUL:                     f_op.unit = UNIT_W'(NADD_PER) + UNIT_W'(mul_rr);
      OP_INDEX, OP_READ, OP_WRITE: f_op.unit = UNIT_W'(AM_PORT);
      default:                    f_op.unit = UNIT_W'(add_rr);
    endcase
    if (!is_fu_op(f_ins.op)) begin
      f_op.op   = OP_ID;
      f_op.a    = f_val;
      f_op.dest = f_remote;
    end
  end

  assign fire  = q_valid && !opq_valid && fo_in_ready;
  assign q_pop = fire;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      opq_valid <= 1'b0;
      add_rr    <= '0;
      mul_rr    <= '0;
    end else begin
      if (op_valid && op_ready) opq_valid <= 1'b0;
      if (fire && (is_fu_op(f_ins.op) || f_any_remote)) begin
        opq_valid <= 1'b1;
        if (f_op.op == OP_MUL)
          mul_rr <= (mul_rr == 2'(NMUL_PER - 1)) ? '0 : mul_rr + 2'd1;
        else if (f_op.unit != UNIT_W'(AM_PORT))
          add_rr <= (add_rr == 2'(NADD_PER - 1)) ? '0 : add_rr + 2'd1;
      end
    end
  end

  always_ff @(posedge clk)
    if (fire) opq_pkt <= f_op;

  assign op_valid = opq_valid;
  assign op_pkt   = opq_pkt;

  assign fo_in_valid = fire && !is_fu_op(f_ins.op) && f_any_local;
  assign fo_value    = f_val;
  assign fo_dest     = f_local;

  dest_fanout u_loopback (
    .clk, .rst_n,
    .in_valid(fo_in_valid), .in_ready(fo_in_ready), .in_value(fo_value), .in_dest(fo_dest),
    .out_valid(lb_valid), .out_pkt(lb_pkt), .out_ready(lb_ready)
  );

  // ---------------------------------------------------------------- state update
  always_ff @(posedge clk) begin
    // firing consumes operands and reloads the signal count
    if (fire) begin
      queued[fc] <= 1'b0;
      needed[fc] <= (f_gate_used && !f_c) ? f_ins.reset_f : f_ins.reset_t;
      pc[fc]     <= 1'b0;
      if (f_ins.op == OP_MERGE) begin
        if (f_c) p1[fc] <= 1'b0;
        else     p2[fc] <= 1'b0;
      end else begin
        p1[fc] <= 1'b0;
        p2[fc] <= 1'b0;
      end
    end
    // an arriving packet updates one field of its cell
    if (in_use) begin
      unique case (in_pkt.port)
        PORT_OP1: begin p1[ic] <= 1'b1; opnd1[ic] <= in_pkt.value; end
        PORT_OP2: begin p2[ic] <= 1'b1; opnd2[ic] <= in_pkt.value; end
        PORT_CTL: begin pc[ic] <= 1'b1; ctl[ic] <= n_ctl; end
        default:  needed[ic] <= n_needed;
      endcase
      if (q_push) queued[ic] <= 1'b1;
    end
    // the loader writes a cell and clears its dynamic state
    if (load_valid) begin
      instr [load_cell[CW-1:0]] <= load_instr;
      opnd1 [load_cell[CW-1:0]] <= load_op1;
      opnd2 [load_cell[CW-1:0]] <= load_op2;
      ctl   [load_cell[CW-1:0]] <= 1'b0;
      p1    [load_cell[CW-1:0]] <= 1'b0;
      p2    [load_cell[CW-1:0]] <= 1'b0;
      pc    [load_cell[CW-1:0]] <= 1'b0;
      queued[load_cell[CW-1:0]] <= 1'b0;
      needed[load_cell[CW-1:0]] <= 4'd0;
    end
  end

  assign ev_fire_fu    = fire && is_fu_op(f_ins.op);
  assign ev_fire_local = fire && !is_fu_op(f_ins.op);
  assign ev_gated      = fire && f_ins.gated;
  assign ev_merge      = fire && f_ins.op == OP_MERGE;
  assign ev_signal     = in_use && in_pkt.port == PORT_SIG;

  a_queue_room: assert property (@(posedge clk) disable iff (!rst_n) q_push |-> !q_full);
  a_signal_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_use && in_pkt.port == PORT_SIG |-> needed[ic] != 4'd0);

endmodule
