// fp_sqrt: combinational IEEE-754 style floating-point square root.
//
// The significand (with its exponent made even) is scaled to an integer X
// and its integer square root is found bit by bit, most significant first
// (a trial bit is kept when the trial root squared does not exceed X). The
// root has MW+3 bits, the last one and the remainder form the round and
// sticky bits, and rounding is to nearest, ties to even.
//
// Simplifications (this design's own choice): zero and subnormal inputs give
// zero, negative inputs give a quiet NaN.
//
// Interface: a in, y out. Timing: purely combinational.
module fp_sqrt #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [EW+MW:0] a,
  output logic [EW+MW:0] y
);
  localparam int unsigned XW   = 2 * MW + 6;
  localparam int unsigned RW   = MW + 3;
  localparam int signed   BIAS = (1 << (EW - 1)) - 1;

  logic              sa;
  logic [EW-1:0]     ea;
  logic [MW-1:0]     fa;
  logic [XW-1:0]     x, trial_sq;
  logic [RW-1:0]     r, trial;
  logic [MW:0]       mant;
  logic              g, st, rnd;
  logic [MW+1:0]     mant_r;
  logic signed [EW+2:0] eu, er;

  always_comb begin
    {sa, ea, fa} = a;
    eu = $signed({3'b000, ea}) - (EW+3)'(BIAS);
    if (eu[0]) begin
      x  = XW'({1'b1, fa}) << (MW + 5);
      er = (eu - 1) >>> 1;
    end else begin
      x  = XW'({1'b1, fa}) << (MW + 4);
      er = eu >>> 1;
    end
    r = '0;
    for (int i = RW - 1; i >= 0; i--) begin
      trial    = r | (RW'(1) << i);
      trial_sq = XW'(trial) * XW'(trial);
      if (trial_sq <= x) r = trial;
    end
    trial_sq = XW'(r) * XW'(r);
    mant   = r[RW-1:2];
    g      = r[1];
    st     = r[0] | (trial_sq != x);
    rnd    = g & (st | mant[0]);
    mant_r = {1'b0, mant} + (MW+2)'(rnd);
    er     = er + (EW+3)'(BIAS);
    if (mant_r[MW+1]) begin
      mant_r = mant_r >> 1;
      er     = er + 1;
    end
    if (ea == '0)
      y = '0;
    else if (sa)
      y = {1'b0, {EW{1'b1}}, 1'b1, {(MW-1){1'b0}}};
    else
      y = {1'b0, er[EW-1:0], mant_r[MW-1:0]};
  end
endmodule
