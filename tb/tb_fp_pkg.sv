// tb_fp_pkg: reference arithmetic for the floating point testbenches.
//
// Expected results are computed in double precision and then rounded to single precision
// here, independently of the design's datapath. For +, -, *, / and sqrt double precision
// (53 bits) is wide enough that rounding twice gives the correctly rounded single result.
// The reference follows the design's conventions: subnormal inputs read as zero, results
// below the smallest normal flushed to zero, every NaN compared as "some NaN".
package tb_fp_pkg;

  function automatic real fp_to_real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) return $bitstoreal({x[31], 63'd0});
    if (x[30:23] == 8'hFF) begin
      d = {x[31], 11'h7FF, x[22:0], 29'd0};
      return $bitstoreal(d);
    end
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // Round a double to single precision, nearest-even, flush-to-zero below 2^-126.
  function automatic logic [31:0] real_to_fp(real r);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (d[62:52] == 11'h000) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0)   return {s, 31'd0};
    return {s, e[7:0], m[22:0]};
  endfunction

  function automatic logic is_nan(logic [31:0] x);
    return x[30:23] == 8'hFF && x[22:0] != 0;
  endfunction

  // Same value, or both NaN.
  function automatic logic fp_same(logic [31:0] got, logic [31:0] exp);
    if (is_nan(exp)) return is_nan(got);
    return got == exp;
  endfunction

  // A random normal number with a biased exponent in [elo, ehi].
  function automatic logic [31:0] rand_fp(int elo, int ehi);
    int unsigned e;
    e = elo + ($urandom % (ehi - elo + 1));
    return {1'($urandom), e[7:0], 23'($urandom)};
  endfunction

endpackage
