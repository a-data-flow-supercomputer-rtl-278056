// router2x2: the two-by-two router unit from which every routing network of
// the machine is built.
//
// Each input carries a packet and one routing bit: bit 0 sends it to output 0,
// bit 1 to output 1.  Each output has a one-packet register, so a packet spends
// one cycle per router.  When both inputs want the same output in the same
// cycle, a per-output round-robin pointer picks one and the other waits; its
// ready stays low.  All links use valid/ready flow control: a packet moves
// when valid and ready are both high, and a held packet must stay stable.
// The description names the unit and its two-by-two shape only; the buffering
// and the arbitration are choices of this implementation.
module router2x2 #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [1:0]   in_valid,
  input  logic [W-1:0] in_data [2],
  input  logic [1:0]   in_sel,      // requested output of each input
  output logic [1:0]   in_ready,
  output logic [1:0]   out_valid,
  output logic [W-1:0] out_data [2],
  input  logic [1:0]   out_ready,
  output logic [1:0]   conflict     // both inputs asked for output o this cycle
);

  logic [1:0] prio;          // per output: which input wins a tie
  logic [1:0] free;          // output register can take a packet this cycle
  logic [1:0] grant_in;      // per output: input granted
  logic [1:0] grant_ok;      // per output: a grant was given
  logic [1:0] req [2];       // req[o][i]

  always_comb begin
    for (int o = 0; o < 2; o++) begin
      free[o] = !out_valid[o] || out_ready[o];
      for (int i = 0; i < 2; i++)
        req[o][i] = in_valid[i] && (in_sel[i] == 1'(o));
      conflict[o] = req[o][0] && req[o][1];
      grant_ok[o] = (req[o] != 2'b00) && free[o];
      if (conflict[o])      grant_in[o] = prio[o];
      else if (req[o][1])   grant_in[o] = 1'b1;
      else                  grant_in[o] = 1'b0;
    end
    for (int i = 0; i < 2; i++)
      in_ready[i] = grant_ok[in_sel[i]] && (grant_in[in_sel[i]] == 1'(i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      prio      <= '0;
    end else begin
      for (int o = 0; o < 2; o++) begin
        if (free[o]) out_valid[o] <= grant_ok[o];
        if (grant_ok[o] && conflict[o]) prio[o] <= !grant_in[o];
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int o = 0; o < 2; o++)
      if (grant_ok[o]) out_data[o] <= in_data[grant_in[o]];
  end

  // A packet that is offered must be held until it is taken.
  property p_out_hold(int o);
    @(posedge clk) disable iff (!rst_n)
      out_valid[o] && !out_ready[o] |=> out_valid[o] && $stable(out_data[o]);
  endproperty
  a_hold0: assert property (p_out_hold(0));
  a_hold1: assert property (p_out_hold(1));

endmodule
