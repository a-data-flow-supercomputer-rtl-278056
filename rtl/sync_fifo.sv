// sync_fifo: first-in first-out queue with a show-ahead output.
//
// DEPTH entries of W bits held in an array with read and write pointers and
// an occupancy count.  The oldest entry is visible on rd_data whenever
// rd_valid is high; a push and a pop may happen in the same cycle.  Used as
// the queue of enabled instruction cells inside a processing element.
module sync_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wr_data,
  output logic         full,
  input  logic         pop,
  output logic         rd_valid,
  output logic [W-1:0] rd_data
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;

  assign full     = (count == (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push && !full)   wptr <= inc(wptr);
      if (pop && rd_valid) rptr <= inc(rptr);
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && rd_valid);
    end
  end

  always_ff @(posedge clk)
    if (push && !full) mem[wptr] <= wr_data;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);

endmodule
