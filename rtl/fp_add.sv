// fp_add: combinational IEEE-754 style floating-point adder.
//
// Adds two binary floating-point numbers with EW exponent bits and MW
// fraction bits (EW=8/MW=23 is single precision, EW=11/MW=52 is double).
// The smaller operand is aligned to the larger one with guard, round and
// sticky bits, the sum or difference is normalised with a leading-zero
// count and rounded to nearest, ties to even.
//
// Simplifications (this design's own choice, to keep the datapath small):
// subnormal inputs are read as zero and subnormal results flush to zero,
// an exponent overflow gives infinity, and NaN is not generated or
// propagated specially.
//
// Interface: a, b in, y out. Timing: purely combinational; callers
// register the result.
module fp_add #(
  parameter int unsigned EW = 8,
  parameter int unsigned MW = 23
) (
  input  logic [EW+MW:0] a,
  input  logic [EW+MW:0] b,
  output logic [EW+MW:0] y
);
  localparam int unsigned W  = EW + MW + 1;
  localparam int unsigned SW = MW + 5;  // carry, hidden, fraction, G, R, S

  logic            sa, sb, sl, ss;
  logic [EW-1:0]   ea, eb, el, es;
  logic [MW-1:0]   fa, fb;
  logic [MW:0]     ml, ms;
  logic [SW-1:0]   xl, xs, acc;
  logic [EW+1:0]   e_res;
  logic [EW:0]     d;
  logic            sticky;
  int              lz;
  logic            found;
  logic [MW:0]     mant;
  logic            g, r, s, rnd;
  logic [MW+1:0]   mant_r;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    y = '0;
    lz = 0;
    found = 1'b0;
    // order by magnitude
    if ({ea, fa} >= {eb, fb}) begin
      sl = sa; el = ea; ml = {1'b1, fa};
      ss = sb; es = eb; ms = {1'b1, fb};
    end else begin
      sl = sb; el = eb; ml = {1'b1, fb};
      ss = sa; es = ea; ms = {1'b1, fa};
    end
    xl = {1'b0, ml, 3'b000};
    xs = {1'b0, ms, 3'b000};
    d  = {1'b0, el} - {1'b0, es};
    // align the smaller operand, folding shifted-out bits into sticky
    sticky = 1'b0;
    if (d >= (EW+1)'(SW)) begin
      sticky = 1'b1;
      xs     = '0;
    end else begin
      for (int i = 0; i < SW; i++)
        if (i < int'(d) && xs[i]) sticky = 1'b1;
      xs = xs >> d;
    end
    xs[0] = xs[0] | sticky;
    e_res = {2'b00, el};
    if (sl == ss) acc = xl + xs;
    else          acc = xl - xs;
    // normalise
    if (acc[SW-1]) begin
      acc   = {1'b0, acc[SW-1:2], acc[1] | acc[0]};
      e_res = e_res + 1'b1;
    end else begin
      for (int i = SW - 2; i >= 0; i--) begin
        if (acc[i]) found = 1'b1;
        if (!found) lz++;
      end
      if (lz > SW - 2) begin
        e_res = '0;
      end else begin
        acc   = acc << lz;
        e_res = e_res - (EW+2)'(lz);
      end
    end
    // round to nearest even
    mant   = acc[MW+3:3];
    g      = acc[2];
    r      = acc[1];
    s      = acc[0];
    rnd    = g & (r | s | mant[0]);
    mant_r = {1'b0, mant} + (MW+2)'(rnd);
    if (mant_r[MW+1]) begin
      mant_r = mant_r >> 1;
      e_res  = e_res + 1'b1;
    end
    if (ea == '0 && eb == '0) begin
      y = {sa & sb, {(W-1){1'b0}}};
    end else if (ea == '0) begin
      y = b;
    end else if (eb == '0) begin
      y = a;
    end else if (acc == '0 || $signed(e_res) <= 0) begin
      y = '0;
    end else if (e_res >= {2'b00, {EW{1'b1}}}) begin
      y = {sl, {EW{1'b1}}, {MW{1'b0}}};
    end else begin
      y = {sl, e_res[EW-1:0], mant_r[MW-1:0]};
    end
  end
endmodule
