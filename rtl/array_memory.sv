// array_memory: one array memory module, holding WORDS 32-bit words of the
// machine's structured data.
//
// It executes the three array instructions on operation packets arriving from
// RN3 and sends the result to the listed destinations through RN1:
//   INDEX  a = pointer to a block, b = index in the block: result a + b, the
//          absolute array memory address of the element;
//   READ   a = address: result is the word stored there;
//   WRITE  a = address, b = value: the value is stored, and also sent on as
//          the result so that later instructions can wait for the write.
// An address is {module number, word number}: bits [AMA_W +: AM_W] pick the
// module (RN3 routes on them), the low AMA_W bits the word.  The memory is
// read synchronously: an operation is taken in one cycle, its result enters
// the fan-out stage in the next, and its first packet leaves in the one after.
// The instruction set and the module size follow the description; the
// address split, the result of WRITE and the timing are this
// implementation's choices.
module array_memory
  import dfs_pkg::*;
#(
  parameter int WORDS = AM_WORDS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  input  op_pkt_t  in_pkt,
  output logic     in_ready,
  output logic     out_valid,
  output res_pkt_t out_pkt,
  input  logic     out_ready
);

  localparam int AW = $clog2(WORDS);

  logic [WORD_W-1:0] mem [WORDS];
  logic              s1_valid;
  op_pkt_t           s1_pkt;
  logic [WORD_W-1:0] s1_rdata;
  logic [WORD_W-1:0] s1_value;
  logic              fo_ready;
  logic [AW-1:0]     addr;

  assign addr     = in_pkt.a[AW-1:0];
  assign in_ready = !s1_valid;

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      if (in_pkt.op == OP_WRITE) mem[addr] <= in_pkt.b;
      s1_rdata <= mem[addr];
      s1_pkt   <= in_pkt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      s1_valid <= 1'b0;
    else if (in_valid && in_ready)   s1_valid <= 1'b1;
    else if (s1_valid && fo_ready)   s1_valid <= 1'b0;
  end

  always_comb begin
    unique case (s1_pkt.op)
      OP_INDEX: s1_value = s1_pkt.a + s1_pkt.b;
      OP_READ:  s1_value = s1_rdata;
      default:  s1_value = s1_pkt.b;     // WRITE
    endcase
  end

  dest_fanout u_fanout (
    .clk, .rst_n,
    .in_valid(s1_valid), .in_ready(fo_ready), .in_value(s1_value), .in_dest(s1_pkt.dest),
    .out_valid, .out_pkt, .out_ready
  );

  a_op: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> in_pkt.op inside {OP_INDEX, OP_READ, OP_WRITE});

endmodule
