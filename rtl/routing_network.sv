// routing_network: an (N,N) packet routing network of log2(N) stages, each of
// N/2 two-by-two routers, as used for RN1 (256,256), RN2 (8,8) and RN3 (32,32).
//
// The stages are wired as an omega network: ahead of every stage the lines are
// perfectly shuffled (line j moves to the position of j rotated left by one
// bit), and stage s steers each packet by bit (log2(N)-1-s) of its destination
// number, most significant bit first.  After the last stage a packet is on the
// output line equal to its destination number, whatever input it came from.
// The destination number is the field pkt[DEST_LSB +: log2(N)].
// Timing: one cycle per stage when the path is free, so log2(N) cycles from
// input to output; contention at a router holds the losing packet back.
// Stage and router counts follow the description; the omega wiring is this
// implementation's choice of a log2(N)-stage network.
module routing_network #(
  parameter int N        = 8,
  parameter int W        = 16,
  parameter int DEST_LSB = 0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in_valid,
  input  logic [W-1:0] in_data [N],
  output logic [N-1:0] in_ready,
  output logic [N-1:0] out_valid,
  output logic [W-1:0] out_data [N],
  input  logic [N-1:0] out_ready,
  output logic [31:0]  conflicts    // router output conflicts in this cycle
);

  localparam int S = (N > 1) ? $clog2(N) : 1;

  // Lines between stages: index 0 is the network input, index S the output.
  logic [N-1:0] v [S+1];
  logic [N-1:0] r [S+1];
  logic [W-1:0] d [S+1][N];
  logic [1:0]   conf [S][N/2];

  assign v[0]      = in_valid;
  assign in_ready  = r[0];
  assign out_valid = v[S];
  assign r[S]      = out_ready;
  for (genvar j = 0; j < N; j++) begin : g_io
    assign d[0][j]   = in_data[j];
    assign out_data[j] = d[S][j];
  end

  function automatic int rotr(int p);
    // position p after the shuffle holds line rotr(p) of the previous stage
    return ((p >> 1) | ((p & 1) << (S - 1))) % N;
  endfunction

  for (genvar s = 0; s < S; s++) begin : g_stage
    for (genvar k = 0; k < N/2; k++) begin : g_router
      localparam int J0 = rotr(2*k);
      localparam int J1 = rotr(2*k + 1);
      logic [1:0]   iv, ir, isel, ov, ordy;
      logic [W-1:0] id [2];
      logic [W-1:0] od [2];
      assign iv    = {v[s][J1], v[s][J0]};
      assign id[0] = d[s][J0];
      assign id[1] = d[s][J1];
      assign isel  = {d[s][J1][DEST_LSB + S - 1 - s], d[s][J0][DEST_LSB + S - 1 - s]};
      assign r[s][J0] = ir[0];
      assign r[s][J1] = ir[1];
      assign ordy  = {r[s+1][2*k+1], r[s+1][2*k]};
      assign v[s+1][2*k]   = ov[0];
      assign v[s+1][2*k+1] = ov[1];
      assign d[s+1][2*k]   = od[0];
      assign d[s+1][2*k+1] = od[1];
      router2x2 #(.W(W)) u_router (
        .clk, .rst_n,
        .in_valid(iv), .in_data(id), .in_sel(isel), .in_ready(ir),
        .out_valid(ov), .out_data(od), .out_ready(ordy),
        .conflict(conf[s][k])
      );
    end
  end

  always_comb begin
    conflicts = '0;
    for (int s = 0; s < S; s++)
      for (int k = 0; k < N/2; k++)
        conflicts += 32'(conf[s][k][0]) + 32'(conf[s][k][1]);
  end

endmodule
