// mul_unit: floating point MUL functional unit.
//
// It receives MUL operation packets from an RN2 output, multiplies the two
// operands, and sends one result or signal packet per listed destination into
// RN1.  Timing is the same as the ADD unit: product registered with the
// destination list, first packet one cycle after the operation packet is
// taken, then one per cycle.  The unit's role follows the description; the
// timing is this implementation's choice.
module mul_unit
  import dfs_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  op_pkt_t  in_pkt,
  output logic     in_ready,
  output logic     out_valid,
  output res_pkt_t out_pkt,
  input  logic     out_ready
);

  logic [WORD_W-1:0] prod;

  fp_mul u_fp_mul (.a(in_pkt.a), .b(in_pkt.b), .y(prod));

  dest_fanout u_fanout (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_value(prod), .in_dest(in_pkt.dest),
    .out_valid, .out_pkt, .out_ready
  );

  a_op: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_pkt.op == OP_MUL);

endmodule
