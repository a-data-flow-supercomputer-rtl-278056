// fp_mul: combinational floating point multiplier of the MUL unit.
//
// IEEE-754 binary32, round to nearest, ties to even.  The 24x24-bit product
// of the significands is normalised (it has its leading one at bit 47 or 46),
// the top 24 bits are kept and the rest decide the rounding.  Subnormal inputs
// and results are flushed to zero, overflow gives infinity, NaN and 0*inf give
// a quiet NaN.  The number format is this implementation's choice; the
// description asks only for floating point multiplication on 32-bit words.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  always_comb begin
    logic        sy;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st, rup;
    logic [24:0] mr;
    logic [9:0]  e;
    logic        za, zb, ia, ib, na, nb;

    sy = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hff) && (a[22:0] == 0);
    ib = (eb == 8'hff) && (b[22:0] == 0);
    na = (ea == 8'hff) && (a[22:0] != 0);
    nb = (eb == 8'hff) && (b[22:0] != 0);
    p  = '0; m = '0; g = 1'b0; st = 1'b0; rup = 1'b0; mr = '0; e = '0;
    y  = '0;
    if (na || nb || (ia && zb) || (ib && za)) begin
      y = QNAN;
    end else if (ia || ib) begin
      y = {sy, 8'hff, 23'd0};
    end else if (za || zb) begin
      y = {sy, 31'd0};
    end else begin
      p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
      e = 10'(ea) + 10'(eb) - 10'd127;
      if (p[47]) begin
        m  = p[47:24];
        g  = p[23];
        st = (p[22:0] != 0);
        e  = e + 10'd1;
      end else begin
        m  = p[46:23];
        g  = p[22];
        st = (p[21:0] != 0);
      end
      rup = g && (st || m[0]);
      mr  = {1'b0, m} + 25'(rup);
      if (mr[24]) begin
        mr = mr >> 1;
        e  = e + 10'd1;
      end
      if ($signed(e) <= 0)       y = {sy, 31'd0};
      else if (e >= 10'd255)     y = {sy, 8'hff, 23'd0};
      else                       y = {sy, e[7:0], mr[22:0]};
    end
  end

endmodule
