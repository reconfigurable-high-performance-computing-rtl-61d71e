// fp_mul: combinational IEEE-754 style floating-point multiplier.
//
// Multiplies two binary floating-point numbers with EW exponent bits and MW
// fraction bits. The (MW+1)x(MW+1) significand product is normalised by at
// most one place and rounded to nearest, ties to even.
//
// Simplifications (this design's own choice): subnormals are read as zero
// and results below the normal range flush to zero, overflow gives
// infinity, NaN is not handled specially.
//
// Interface: a, b in, y out. Timing: purely combinational.
module fp_mul #(
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
  logic [2*MW+1:0]   prod;
  logic [MW:0]       mant;
  logic              g, st, rnd;
  logic [MW+1:0]     mant_r;
  logic signed [EW+2:0] e;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy   = sa ^ sb;
    prod = {1'b1, fa} * {1'b1, fb};
    e    = $signed({3'b000, ea}) + $signed({3'b000, eb}) - (EW+3)'(BIAS);
    if (prod[2*MW+1]) begin
      mant = prod[2*MW+1:MW+1];
      g    = prod[MW];
      st   = |prod[MW-1:0];
      e    = e + 1;
    end else begin
      mant = prod[2*MW:MW];
      g    = prod[MW-1];
      st   = |prod[MW-2:0];
    end
    rnd    = g & (st | mant[0]);
    mant_r = {1'b0, mant} + (MW+2)'(rnd);
    if (mant_r[MW+1]) begin
      mant_r = mant_r >> 1;
      e      = e + 1;
    end
    if (ea == '0 || eb == '0 || e <= 0)
      y = {sy, {(W-1){1'b0}}};
    else if (e >= (EW+3)'((1 << EW) - 1))
      y = {sy, {EW{1'b1}}, {MW{1'b0}}};
    else
      y = {sy, e[EW-1:0], mant_r[MW-1:0]};
  end
endmodule
