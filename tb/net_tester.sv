// net_tester: traffic source and checker for one routing_network instance,
// used by tb_routing_network.  Packet layout: {source, sequence, destination}.
module net_tester #(
  parameter int N = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic done
);
  localparam int S  = $clog2(N);
  localparam int SQ = 12;
  localparam int W  = S + SQ + S;
  localparam int PER_SRC = 300;

  logic [N-1:0] in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data [N];
  logic [W-1:0] out_data [N];
  logic [31:0]  conf;
  int checks = 0, failures = 0, conflicts = 0, received = 0;
  int sent [N];
  int next_seq [N][N];     // [src][dst] expected sequence
  int seq_of   [N][N];     // [src][dst] next sequence to send

  routing_network #(.N(N), .W(W), .DEST_LSB(0)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .out_ready,
    .conflicts(conf));

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %s", N, what);
    end
  endtask

  initial begin
    int lat, d;
    logic [N-1:0] acc;
    done = 1'b0;
    in_valid = '0; out_ready = '0;
    for (int i = 0; i < N; i++) begin
      in_data[i] = '0; sent[i] = 0;
      for (int j = 0; j < N; j++) begin next_seq[i][j] = 0; seq_of[i][j] = 0; end
    end
    wait (rst_n);
    @(posedge clk);
    // latency of a lone packet from input 1 to output N-2
    #1 in_data[1] = {S'(1), SQ'(0), S'(N - 2)};
    seq_of[1][N-2] = 1;
    in_valid[1] = 1'b1; out_ready = '1;
    @(posedge clk); #1 in_valid[1] = 1'b0;
    lat = 1;
    while (!out_valid[N-2] && lat < 100) begin @(posedge clk); #1 lat++; end
    check(lat == S, $sformatf("lone packet latency %0d, expected %0d", lat, S));
    received = 1;
    next_seq[1][N-2] = 1;
    @(posedge clk); #1;
    // random traffic
    while (received < N * PER_SRC + 1) begin
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] && sent[i] < PER_SRC && ($urandom % 4) != 0) begin
          d = int'($urandom % N);
          if (i < 2) d = N - 1;        // make two sources fight for one output
          in_data[i]  = {S'(i), SQ'(seq_of[i][d]), S'(d)};
          seq_of[i][d]++;
          in_valid[i] = 1'b1;
          sent[i]++;
        end
      end
      for (int j = 0; j < N; j++) out_ready[j] = ($urandom % 3) != 0;
      #1;
      // handshakes are sampled just before the clock edge
      acc = in_valid & in_ready;
      for (int j = 0; j < N; j++) begin
        if (out_valid[j] && out_ready[j]) begin
          int src, sq, dst;
          dst = int'(out_data[j][S-1:0]);
          sq  = int'(out_data[j][S +: SQ]);
          src = int'(out_data[j][W-1 -: S]);
          check(dst == j, $sformatf("packet for %0d left at %0d", dst, j));
          check(sq == next_seq[src][dst], $sformatf("order %0d->%0d got %0d exp %0d",
                                                    src, dst, sq, next_seq[src][dst]));
          next_seq[src][dst] = sq + 1;
          received++;
        end
      end
      conflicts += int'(conf);
      @(posedge clk);
      #1 in_valid = in_valid & ~acc;
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        check(next_seq[i][j] == seq_of[i][j], $sformatf("lost packets %0d->%0d", i, j));
    done = 1'b1;
  end
endmodule
