// fp_add: IEEE-754 floating-point adder/subtractor, combinational.
//
// Used for the summing chains of the matrix product and the Jacobi solver and
// for the two subtractions of the Jacobi row update. EXP_W/MAN_W select single
// (8/23) or double (11/52) precision; sub=1 computes a-b.
// How it works: the operand of larger magnitude is taken as the base, the other
// significand is shifted right with three extra bits (guard, round, sticky),
// the two are added or subtracted, the result is normalised (one place right
// on carry, or left by the leading-zero count) and rounded to nearest-even.
// Subnormals are flushed to zero, an exact zero result is +0, overflow gives
// infinity and NaN/infinity inputs propagate. These policies are this design's
// choice. No clock: the caller places the registers.
module fp_add #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23
) (
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  input  logic                 sub,
  output logic [EXP_W+MAN_W:0] y
);
  localparam int unsigned W    = EXP_W + MAN_W + 1;
  localparam int signed   EMAX = (1 << EXP_W) - 1;
  localparam int unsigned MW   = MAN_W + 4;       // 1.f plus guard/round/sticky

  logic [W-1:0]      bb, big, sml;
  logic              sbig, ssml, eff_sub;
  logic [EXP_W-1:0]  ebig, esml;
  logic [MW-1:0]     mbig, msml;
  logic [2*MW-1:0]   shifted;
  logic [EXP_W:0]    d;
  logic [MW:0]       sum;
  logic [MW-1:0]     norm;
  logic signed [EXP_W+2:0] exp_n;
  int unsigned       lz;
  logic              guard, sticky, inc;
  logic [MAN_W+1:0]  mant_r;
  logic              nan_in, inf_big, inf_sml;

  always_comb begin
    bb = {b[W-1] ^ sub, b[W-2:0]};
    if (a[W-2:0] >= bb[W-2:0]) begin
      big = a;  sml = bb;
    end else begin
      big = bb; sml = a;
    end
    sbig = big[W-1];
    ssml = sml[W-1];
    ebig = big[W-2 -: EXP_W];
    esml = sml[W-2 -: EXP_W];
    nan_in  = ((ebig == EXP_W'(EMAX)) && (big[MAN_W-1:0] != '0)) ||
              ((esml == EXP_W'(EMAX)) && (sml[MAN_W-1:0] != '0));
    inf_big = (ebig == EXP_W'(EMAX));
    inf_sml = (esml == EXP_W'(EMAX));
    eff_sub = sbig ^ ssml;

    mbig = (ebig == '0) ? '0 : {1'b1, big[MAN_W-1:0], 3'b000};
    msml = (esml == '0) ? '0 : {1'b1, sml[MAN_W-1:0], 3'b000};
    d    = {1'b0, ebig} - {1'b0, esml};
    // Right shift of the smaller significand; the bits shifted out form the sticky bit.
    shifted = {msml, {MW{1'b0}}} >> d;
    msml    = {shifted[2*MW-1 -: MW-1], shifted[MW] | (|shifted[MW-1:0])};

    exp_n = $signed({3'b000, ebig});
    if (eff_sub) sum = {1'b0, mbig} - {1'b0, msml};
    else         sum = {1'b0, mbig} + {1'b0, msml};

    norm = '0;
    lz   = 0;
    if (sum[MW]) begin
      norm  = {sum[MW:2], sum[1] | sum[0]};
      exp_n = exp_n + 1;
    end else begin
      for (int k = MW - 1; k >= 0; k--) begin
        if (sum[k]) begin
          lz = MW - 1 - k;
          break;
        end
      end
      norm  = sum[MW-1:0] << lz;
      exp_n = exp_n - (EXP_W+3)'(lz);
    end

    guard  = norm[2];
    sticky = norm[1] | norm[0];
    inc    = guard & (sticky | norm[3]);
    mant_r = {1'b0, norm[MW-1:3]} + (MAN_W+2)'(inc);
    if (mant_r[MAN_W+1]) begin
      mant_r = mant_r >> 1;
      exp_n  = exp_n + 1;
    end

    if (nan_in || (inf_big && inf_sml && eff_sub))
      y = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
    else if (inf_big)
      y = {sbig, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (sum == '0)
      y = '0;
    else if (exp_n >= (EXP_W+3)'(EMAX))
      y = {sbig, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
    else if (exp_n <= 0)
      y = {sbig, {(W-1){1'b0}}};
    else
      y = {sbig, exp_n[EXP_W-1:0], mant_r[MAN_W-1:0]};
  end
endmodule
