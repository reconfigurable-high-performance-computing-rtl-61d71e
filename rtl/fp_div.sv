// fp_div: combinational IEEE-754 style floating-point divider.
//
// y = a / b for EW-bit exponent, MW-bit fraction operands. The significand
// quotient is formed by integer division of the dividend significand,
// shifted left by MW+2 places, by the divisor significand; the remainder
// feeds the sticky bit, and the result is rounded to nearest, ties to even.
//
// Simplifications (this design's own choice): subnormals read as zero,
// results below the normal range flush to zero, overflow and division by
// zero give infinity, NaN is not handled specially.
//
// Interface: a, b in, y out. Timing: purely combinational.
module fp_div #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int unsigned W    = EW + MW + 1;
  localparam int signed   BIAS = (1 << (EW - 1)) - 1;

  logic              sa, sb, sy;
  logic [EW-1:0]     ea, eb;
  logic [MW-1:0]     fa, fb;
  logic [2*MW+2:0]   num, q, rem;
  logic [MW:0]       mant;
  logic              g, st, rnd;
  logic [MW+1:0]     mant_r;
  logic signed [EW+2:0] e;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy  = sa ^ sb;
    num = {1'b1, fa, {(MW+2){1'b0}}};
    q   = num / {{(MW+2){1'b0}}, 1'b1, fb};
    rem = num % {{(MW+2){1'b0}}, 1'b1, fb};
    e   = $signed({3'b000, ea}) - $signed({3'b000, eb}) + (EW+3)'(BIAS);
    if (q[MW+2]) begin
      mant = q[MW+2:2];
      g    = q[1];
      st   = q[0] | (rem != '0);
    end else begin
      mant = q[MW+1:1];
      g    = q[0];
      st   = (rem != '0);
      e    = e - 1;
    end
    rnd    = g & (st | mant[0]);
    mant_r = {1'b0, mant} + (MW+2)'(rnd);
    if (mant_r[MW+1]) begin
      mant_r = mant_r >> 1;
      e      = e + 1;
    end
    if (ea == '0)
      y = {sy, {(W-1){1'b0}}};
    else if (eb == '0 || e >= (EW+3)'((1 << EW) - 1))
      y = {sy, {EW{1'b1}}, {MW{1'b0}}};
    else if (e <= 0)
      y = {sy, {(W-1){1'b0}}};
    else
      y = {sy, e[EW-1:0], mant_r[MW-1:0]};
  end
endmodule
