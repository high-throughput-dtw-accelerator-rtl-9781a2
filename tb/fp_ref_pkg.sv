// fp_ref_pkg: reference conversions between double precision `real` and
// single-precision bit patterns, written independently of the RTL so the
// testbenches can check it. real_to_fp32 rounds to nearest, ties to even, and
// flushes results below the normal range to zero, as the RTL does.
package fp_ref_pkg;

  function automatic logic [31:0] real_to_fp32(input real v);
    logic [63:0] d;
    logic        sgn;
    int          e;
    logic [52:0] m;      // hidden one + 52 fraction bits
    logic [23:0] m24;
    logic [28:0] rest;
    logic [24:0] mr;
    d   = $realtobits(v);
    sgn = d[63];
    if (d[62:52] == 11'h7FF) return {sgn, 8'hFF, (d[51:0] != 0) ? 23'h400000 : 23'd0};
    if (d[62:52] == 11'd0) return {sgn, 31'd0};
    e    = int'(d[62:52]) - 1023 + 127;
    m    = {1'b1, d[51:0]};
    m24  = m[52:29];
    rest = m[28:0];
    mr   = {1'b0, m24};
    if (rest[28] && ((rest[27:0] != 0) || m24[0])) mr = mr + 25'd1;
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {sgn, 8'hFF, 23'd0};
    if (e <= 0) return {sgn, 31'd0};
    return {sgn, 8'(e), mr[22:0]};
  endfunction

  function automatic real fp32_to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'hFF)
      d = {f[31], 11'h7FF, f[22:0] != 0 ? 52'h8000000000000 : 52'd0};
    else if (f[30:23] == 8'd0)
      d = {f[31], 63'd0};
    else
      d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // A random normal single-precision number with exponent in [emin, emax].
  function automatic logic [31:0] rand_fp32(input int emin, input int emax);
    logic [31:0] r;
    int          e;
    r = $urandom;
    e = emin + int'($urandom % 32'(emax - emin + 1));
    return {r[31], 8'(e), r[22:0]};
  endfunction

endpackage
