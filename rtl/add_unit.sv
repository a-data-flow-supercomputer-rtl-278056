// add_unit: floating point ADD functional unit.
//
// It receives operation packets from an RN2 output, performs ADD (a + b),
// SUB (a - b) or ID (pass a on unchanged; this is how a processing element
// forwards the result of an instruction it executed itself to cells held by
// other processing elements), and sends one result or signal packet per
// listed destination into RN1.  The sum is registered with the destination
// list, so the first result packet leaves one cycle after the operation
// packet is taken; one packet leaves per cycle after that.  The next
// operation packet is taken once the last packet of the previous one left.
// The unit's role follows the description; the ID forwarding role and the
// timing are this implementation's choices.
module add_unit
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

  logic [WORD_W-1:0] sum, value;

  fp_add u_fp_add (.a(in_pkt.a), .b(in_pkt.b), .sub(in_pkt.op == OP_SUB), .y(sum));

  assign value = (in_pkt.op == OP_ID) ? in_pkt.a : sum;

  dest_fanout u_fanout (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_value(value), .in_dest(in_pkt.dest),
    .out_valid, .out_pkt, .out_ready
  );

  a_op: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_pkt.op inside {OP_ADD, OP_SUB, OP_ID});

endmodule
