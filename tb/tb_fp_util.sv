// tb_fp_util: reference floating-point helpers for the testbenches.
//
// The simulator's `real` is IEEE double. A single-precision reference
// result is formed by computing in double (exact for one product of two
// singles, and correctly rounded for one sum, difference, quotient or square
// root) and rounding once to single precision, nearest-even, with the same
// flush-to-zero rule as the design.
package tb_fp_util;
  function automatic logic [31:0] to_f32(real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [23:0] keep;
    logic [28:0] rest;
    logic [24:0] rounded;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    keep = m[52:29];
    rest = m[28:0];
    rounded = {1'b0, keep};
    if (rest[28] && (rest[27:0] != 0 || keep[0])) rounded = rounded + 1;
    if (rounded[24]) begin rounded = rounded >> 1; e++; end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), rounded[22:0]};
  endfunction

  function automatic real from_f32(logic [31:0] f);
    if (f[30:23] == 0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] add_f32(logic [31:0] a, logic [31:0] b);
    return to_f32(from_f32(a) + from_f32(b));
  endfunction

  function automatic logic [31:0] mul_f32(logic [31:0] a, logic [31:0] b);
    return to_f32(from_f32(a) * from_f32(b));
  endfunction

  function automatic logic [31:0] sub_f32(logic [31:0] a, logic [31:0] b);
    return to_f32(from_f32(a) - from_f32(b));
  endfunction

  function automatic logic [31:0] div_f32(logic [31:0] a, logic [31:0] b);
    return to_f32(from_f32(a) / from_f32(b));
  endfunction

  function automatic logic [31:0] sqrt_f32(logic [31:0] a);
    return to_f32($sqrt(from_f32(a)));
  endfunction

  // a random single-precision value of moderate range
  function automatic logic [31:0] rnd_f32();
    return to_f32((real'($urandom_range(0, 2000000)) - 1000000.0) / 1024.0);
  endfunction
endpackage
