// fp_ref_pkg: reference IEEE-754 binary32 arithmetic for the testbenches,
// computed through the simulator's double precision real type and rounded to
// single precision (nearest, ties to even) here, independently of the RTL.
// Operands are chosen so that the exact sum or product fits a double.
package fp_ref_pkg;

  function automatic real to_real(logic [31:0] b);
    logic [10:0] e;
    if (b[30:23] == 8'd0) return 0.0;
    e = 11'(int'(b[30:23]) - 127 + 1023);
    return $bitstoreal({b[31], e, b[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] to_single(real x);
    logic [63:0] r;
    logic [24:0] m;
    int          e;
    logic        g, st;
    if (x == 0.0) return 32'd0;
    r  = $realtobits(x);
    e  = int'(r[62:52]) - 1023 + 127;
    m  = {2'b01, r[51:29]};
    g  = r[28];
    st = (r[27:0] != 0);
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e <= 0) return {r[63], 31'd0};
    if (e >= 255) return {r[63], 8'hff, 23'd0};
    return {r[63], 8'(e), m[22:0]};
  endfunction

  // random normal number with exponent field in [elo, ehi]
  function automatic logic [31:0] rand_single(int elo, int ehi);
    logic [31:0] b;
    b[31]    = 1'($urandom);
    b[30:23] = 8'(elo + int'($urandom % 32'(ehi - elo + 1)));
    b[22:0]  = 23'($urandom);
    return b;
  endfunction

endpackage
