// dest_fanout: turns one computed value and the destination list of the
// instruction that produced it into a sequence of result and signal packets.
//
// It takes a value and up to NDEST destinations in one handshake, then offers
// one packet per cycle, lowest-numbered destination first, each carrying the
// value and one destination (a destination whose operand number is PORT_SIG
// is a signal packet; its value is ignored by the receiver).  A new value is
// taken only when every packet of the previous one has left.  The packet
// format follows the description (a value plus the target cell and operand);
// serial issue, one destination per cycle, is this implementation's choice.
module dest_fanout
  import dfs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [WORD_W-1:0] in_value,
  input  dest_t [NDEST-1:0] in_dest,
  output logic              out_valid,
  output res_pkt_t          out_pkt,
  input  logic              out_ready
);

  logic [NDEST-1:0]  pend;
  logic [WORD_W-1:0] value;
  dest_t [NDEST-1:0] dest;
  logic [$clog2(NDEST)-1:0] sel;

  assign in_ready  = (pend == '0);
  assign out_valid = (pend != '0);

  always_comb begin
    sel = '0;
    for (int i = NDEST - 1; i >= 0; i--)
      if (pend[i]) sel = ($clog2(NDEST))'(i);
    out_pkt.host  = dest[sel].host;
    out_pkt.pe    = dest[sel].pe;
    out_pkt.cid   = dest[sel].cid;
    out_pkt.port  = dest[sel].port;
    out_pkt.value = value;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
    end else if (in_valid && in_ready) begin
      for (int i = 0; i < NDEST; i++) pend[i] <= in_dest[i].valid;
    end else if (out_valid && out_ready) begin
      pend[sel] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      value <= in_value;
      dest  <= in_dest;
    end
  end

endmodule
