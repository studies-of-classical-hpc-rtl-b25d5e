// fp_div: pipelined IEEE-754 floating-point divider.
//
// Serves the last step of the Jacobi row update, x[i] = (b[i] - sum) / A[i][i].
// The significand quotient is formed by restoring division unrolled into
// NQ = MAN_W+3 register stages, one quotient bit per stage, so a new division
// can enter every clock. After the last stage the quotient is normalised (it
// lies in (0.5, 2)), rounded to nearest-even with the remainder as sticky bit
// and registered.
// Timing: y/out_valid/out_tag appear MAN_W+5 clocks after in_valid (one input
// register, NQ step registers, one output register).
// Policies (this design's choice): subnormals flush to zero, x/0 gives infinity,
// 0/0, inf/inf and NaN inputs give a quiet NaN. in_tag rides along unchanged.
module fp_div #(
  parameter int unsigned EXP_W = 11,
  parameter int unsigned MAN_W = 52,
  parameter int unsigned TAG_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic [EXP_W+MAN_W:0] a,
  input  logic [EXP_W+MAN_W:0] b,
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output logic [EXP_W+MAN_W:0] y
);
  localparam int unsigned W    = EXP_W + MAN_W + 1;
  localparam int unsigned NQ   = MAN_W + 3;
  localparam int signed   BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int signed   EMAX = (1 << EXP_W) - 1;

  typedef enum logic [1:0] {K_NUM, K_ZERO, K_INF, K_NAN} kind_e;

  typedef struct packed {
    logic                    valid;
    logic [TAG_W-1:0]        tag;
    logic                    sign;
    logic signed [EXP_W+2:0] exp;
    kind_e                   kind;
    logic [MAN_W+2:0]        rem;
    logic [MAN_W:0]          div;
    logic [NQ-1:0]           q;
  } stage_t;

  stage_t st [NQ+1];
  stage_t s0;

  // Input decode
  always_comb begin
    logic [EXP_W-1:0] ea, eb;
    logic [MAN_W-1:0] fa, fb;
    ea = a[W-2 -: EXP_W];  fa = a[MAN_W-1:0];
    eb = b[W-2 -: EXP_W];  fb = b[MAN_W-1:0];
    s0       = '0;
    s0.valid = in_valid;
    s0.tag   = in_tag;
    s0.sign  = a[W-1] ^ b[W-1];
    s0.exp   = $signed({3'b000, ea}) - $signed({3'b000, eb}) + (EXP_W+3)'(BIAS);
    s0.rem   = {3'b001, fa};
    s0.div   = {1'b1, fb};
    if ((ea == EXP_W'(EMAX) && fa != '0) || (eb == EXP_W'(EMAX) && fb != '0) ||
        (ea == EXP_W'(EMAX) && eb == EXP_W'(EMAX)) || (ea == '0 && eb == '0))
      s0.kind = K_NAN;
    else if (ea == EXP_W'(EMAX) || eb == '0)
      s0.kind = K_INF;
    else if (ea == '0 || eb == EXP_W'(EMAX))
      s0.kind = K_ZERO;
    else
      s0.kind = K_NUM;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st[0] <= '0;
    else        st[0] <= s0;
  end

  // One restoring-division step per stage
  for (genvar k = 0; k < int'(NQ); k++) begin : g_step
    stage_t nx;
    always_comb begin
      nx = st[k];
      if (st[k].rem >= {2'b00, st[k].div}) begin
        nx.rem = (st[k].rem - {2'b00, st[k].div}) << 1;
        nx.q   = {st[k].q[NQ-2:0], 1'b1};
      end else begin
        nx.rem = st[k].rem << 1;
        nx.q   = {st[k].q[NQ-2:0], 1'b0};
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) st[k+1] <= '0;
      else        st[k+1] <= nx;
    end
  end

  // Normalise, round, pack
  logic [W-1:0] y_n;
  always_comb begin
    stage_t f;
    logic [MAN_W:0]   mant;
    logic             guard, sticky, rnd;
    logic [MAN_W+1:0] mant_r;
    logic signed [EXP_W+2:0] e;
    f = st[NQ];
    e = f.exp;
    if (f.q[NQ-1]) begin
      mant   = f.q[NQ-1 -: MAN_W+1];
      guard  = f.q[1];
      sticky = f.q[0] | (f.rem != '0);
    end else begin
      mant   = f.q[NQ-2 -: MAN_W+1];
      guard  = f.q[0];
      sticky = (f.rem != '0);
      e      = e - 1;
    end
    rnd    = guard & (sticky | mant[0]);
    mant_r = {1'b0, mant} + (MAN_W+2)'(rnd);
    if (mant_r[MAN_W+1]) begin
      mant_r = mant_r >> 1;
      e      = e + 1;
    end
    unique case (f.kind)
      K_NAN:  y_n = {1'b0, {EXP_W{1'b1}}, 1'b1, {(MAN_W-1){1'b0}}};
      K_INF:  y_n = {f.sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
      K_ZERO: y_n = {f.sign, {(W-1){1'b0}}};
      default: begin
        if (e >= (EXP_W+3)'(EMAX)) y_n = {f.sign, {EXP_W{1'b1}}, {MAN_W{1'b0}}};
        else if (e <= 0)           y_n = {f.sign, {(W-1){1'b0}}};
        else                       y_n = {f.sign, e[EXP_W-1:0], mant_r[MAN_W-1:0]};
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      y         <= '0;
    end else begin
      out_valid <= st[NQ].valid;
      out_tag   <= st[NQ].tag;
      y         <= y_n;
    end
  end
endmodule
