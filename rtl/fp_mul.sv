// fp_mul: IEEE-754 floating-point multiplier, combinational.
//
// The accelerators multiply single-precision (matrix product) or double-precision
// (Jacobi solver) values; EXP_W and MAN_W select the format (8/23 or 11/52).
// The hidden-bit significands are multiplied exactly, the product is normalised
// by at most one place and rounded to nearest-even using a guard bit and a
// sticky bit. Subnormal inputs and results are flushed to zero, overflow gives
// infinity, and NaN or infinity inputs propagate (inf*0 gives a quiet NaN).
// The rounding and subnormal policy is this design's choice; the source only
// names the operators. No clock: the caller places the registers.
module fp_mul #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic [EXP_W+MAN_W:0] y
);
  localparam int unsigned W    = EXP_W + MAN_W + 1;
  localparam int signed   BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int signed   EMAX = (1 << EXP_W) - 1;

  logic              sa, sb, sy;
  logic [EXP_W-1:0]  ea, eb;
  logic [MAN_W-1:0]  fa, fb;
  logic              za, zb, ia, ib, na, nb;
  logic [2*MAN_W+1:0] prod;
  logic [MAN_W:0]    mant;
  logic              guard, sticky, inc;
  logic [MAN_W+1:0]  mant_r;
  logic signed [EXP_W+2:0] exp_n;

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sy = sa ^ sb;
    za = (ea == '0);
    zb = (eb == '0);
    ia = (ea == EXP_W'(EMAX)) && (fa == '0);
    ib = (eb == EXP_W'(EMAX)) && (fb == '0);
    na = (ea == EXP_W'(EMAX)) && (fa != '0);
    nb = (eb == EXP_W'(EMAX)) && (fb != '0);

    prod  = {1'b1, fa} * {1'b1, fb};
    exp_n = $signed({3'b000, ea}) + $signed({3'b000, eb}) - (EXP_W+3)'(BIAS);
    if (prod[2*MAN_W+1]) begin
      mant   = prod[2*MAN_W+1 -: MAN_W+1];
      guard  = prod[MAN_W];
      sticky = |prod[MAN_W-1:0];
      exp_n  = exp_n + 1;
    end else begin
      mant   = prod[2*MAN_W -: MAN_W+1];
      guard  = prod[MAN_W-1];
      sticky = |prod[MAN_W-2:0];
    end
    inc    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + (MAN_W+2)'(inc);
    if (mant_r[MAN_W+1]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 1;
    end

    if (na || nb || (ia && zb) || (ib && za))
      y = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    else if (ia || ib)
      y = {sy, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (za || zb)
      y = {sy, {(W-1){1'b0}}};
    else if (exp_n >= (EXP_W+3)'(EMAX))
      y = {sy, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (exp_n <= 0)
      y = {sy, {(W-1){1'b0}}};
    else
      y = {sy, exp_n[EXP_W-1:0], mant_r[MAN_W-1:0]};
  end
endmodule
