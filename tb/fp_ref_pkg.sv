// fp_ref_pkg: reference conversions for the testbenches.
//
// f2r widens a binary32 pattern to a real exactly; r2f rounds a real (binary64) to
// binary32, to nearest-even, with subnormal results flushed to zero. Real arithmetic
// on widened operands followed by r2f gives the correctly rounded binary32 result of
// +, -, * and /, which is what the hardware units must produce. d2r and r2d do the
// same for binary64, where real arithmetic is already correctly rounded and only
// subnormal results need flushing. to_real/from_real pick the format by a flag.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], {3'd0, f[30:23]} + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic signed [12:0] e;
    logic [52:0] m;     // hidden bit + 52 fraction bits
    logic [24:0] k;
    logic [28:0] rest;
    logic up;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = $signed({2'd0, d[62:52]}) - 13'sd896;
    m = {1'b1, d[51:0]};
    k = {1'b0, m[52:29]};
    rest = m[28:0];
    up = rest[28] & ((rest[27:0] != 0) | k[0]);
    k = k + {24'd0, up};
    if (k[24]) begin k = k >> 1; e = e + 13'sd1; end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], e[7:0], k[22:0]};
  endfunction

  function automatic real d2r(input logic [63:0] f);
    if (f[62:52] == 11'd0) return 0.0;
    return $bitstoreal(f);
  endfunction

  function automatic logic [63:0] r2d(input real r);
    logic [63:0] d;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 63'd0};
    return d;
  endfunction

  function automatic real to_real(input logic [63:0] f, input bit dbl);
    return dbl ? d2r(f) : f2r(f[31:0]);
  endfunction

  function automatic logic [63:0] from_real(input real r, input bit dbl);
    return dbl ? r2d(r) : {32'd0, r2f(r)};
  endfunction

  // Random finite binary64 value with a biased exponent between lo and hi.
  function automatic logic [63:0] rand_d(input int lo, input int hi);
    logic [10:0] e;
    e = 11'(lo + ($urandom % (hi - lo + 1)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  // Random finite binary32 value with a magnitude between 2^(lo-127) and 2^(hi-127).
  function automatic logic [31:0] rand_f(input int lo, input int hi);
    logic [7:0] e;
    e = 8'(lo + ($urandom % (hi - lo + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
