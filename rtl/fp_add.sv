// fp_add: combinational floating point adder/subtractor of the ADD unit.
//
// Format: IEEE-754 binary32 (sign, 8-bit exponent with bias 127, 23-bit
// fraction), rounded to nearest, ties to even.  The smaller operand is
// aligned with three extra bits (guard, round, sticky), the magnitudes are
// added or subtracted, the sum is renormalised and rounded.  Subnormal inputs
// and results are flushed to zero; overflow gives infinity; inf - inf and
// NaN inputs give a quiet NaN.  The description asks only for floating point
// addition on 32-bit words; the number format and rounding are this
// implementation's choice.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,     // 1: a - b
  output logic [31:0] y
);

  localparam logic [31:0] QNAN = 32'h7fc0_0000;

  always_comb begin
    logic        sa, sb, sx, sy, swap;
    logic [7:0]  ea, eb, ex, ey;
    logic [23:0] ma, mb;
    logic [26:0] mx, my, mys;
    logic [27:0] s;
    logic [9:0]  e;
    logic [7:0]  d;
    logic [4:0]  lz;
    logic        st;
    logic [24:0] mr;
    logic        rup;

    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    if (ea == 8'd0) ea = 8'd0;
    if (eb == 8'd0) eb = 8'd0;
    y = '0;
    s = '0; e = '0; lz = '0; mr = '0; rup = 1'b0; st = 1'b0;
    swap = 1'b0; sx = 1'b0; sy = 1'b0; ex = '0; ey = '0; mx = '0; my = '0; d = '0; mys = '0;

    if (ea == 8'hff || eb == 8'hff) begin
      if ((ea == 8'hff && a[22:0] != 0) || (eb == 8'hff && b[22:0] != 0))
        y = QNAN;
      else if (ea == 8'hff && eb == 8'hff && sa != sb)
        y = QNAN;
      else if (ea == 8'hff)
        y = {sa, 8'hff, 23'd0};
      else
        y = {sb, 8'hff, 23'd0};
    end else begin
      // order so that |x| >= |y|
      swap = {eb, mb} > {ea, ma};
      sx = swap ? sb : sa;   sy = swap ? sa : sb;
      ex = swap ? eb : ea;   ey = swap ? ea : eb;
      mx = {swap ? mb : ma, 3'b000};
      my = {swap ? ma : mb, 3'b000};
      d  = ex - ey;
      if (d >= 8'd27) begin
        mys = {26'd0, (my != 0)};
      end else begin
        mys = my >> d;
        st  = 1'b0;
        for (int i = 0; i < 27; i++)
          if (i < int'(d) && my[i]) st = 1'b1;
        mys[0] = mys[0] | st;
      end
      e = {2'b00, ex};
      if (sx == sy) s = {1'b0, mx} + {1'b0, mys};
      else          s = {1'b0, mx} - {1'b0, mys};

      if (mx == 0) begin
        y = {sx & sy, 31'd0};           // both operands zero
      end else if (s == 0) begin
        y = 32'd0;                      // exact cancellation gives +0
      end else begin
        if (s[27]) begin
          s = {1'b0, s[27:2], s[1] | s[0]};
          e = e + 10'd1;
        end else begin
          lz = 5'd0;
          for (int i = 26; i >= 0; i--)
            if (s[i]) begin lz = 5'(26 - i); break; end
          s = s << lz;
          e = e - 10'(lz);
        end
        // round to nearest even on s[26:3], guard s[2], round s[1], sticky s[0]
        rup = s[2] && (s[1] || s[0] || s[3]);
        mr  = {1'b0, s[26:3]} + 25'(rup);
        if (mr[24]) begin
          mr = mr >> 1;
          e  = e + 10'd1;
        end
        if ($signed(e) <= 0)          y = {sx, 31'd0};
        else if (e >= 10'd255)        y = {sx, 8'hff, 23'd0};
        else                          y = {sx, e[7:0], mr[22:0]};
      end
    end
  end

endmodule
