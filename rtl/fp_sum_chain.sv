// fp_sum_chain: pipelined chain of floating-point adders summing N lanes.
//
// This is the "pipelining" half of the dot-product graphs: N products enter
// together, stage 0 registers lane 0, and stage s (1..N-1) adds lane s to the
// running sum while lanes above s travel along in the same stage register.
// The lanes are therefore added strictly in order 0,1,...,N-1 with one adder
// per stage, as the chain of adders in the dependency graphs, not as a tree.
// Timing: a new vector can enter every clock; out_sum/out_valid/out_tag appear
// exactly N clocks after in_valid. in_tag is carried unchanged.
module fp_sum_chain #(
  parameter int unsigned N     = 32,
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  parameter int unsigned TAG_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [TAG_W-1:0]     in_tag,
  input  logic [EXP_W+MAN_W:0] in_vals [N],
  output logic                 out_valid,
  output logic [TAG_W-1:0]     out_tag,
  output logic [EXP_W+MAN_W:0] out_sum
);
  localparam int unsigned W = EXP_W + MAN_W + 1;

  logic [W-1:0]     sum   [N];
  logic [W-1:0]     ops   [N][N];   // ops[s][k]: lane k waiting in stage s (k > s used)
  logic             vld   [N];
  logic [TAG_W-1:0] tag   [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld[0] <= 1'b0;
      tag[0] <= '0;
    end else begin
      vld[0] <= in_valid;
      tag[0] <= in_tag;
    end
  end

  always_ff @(posedge clk) begin
    sum[0] <= in_vals[0];
    for (int k = 1; k < int'(N); k++) ops[0][k] <= in_vals[k];
  end

  for (genvar s = 1; s < int'(N); s++) begin : g_stage
    logic [W-1:0] add_y;
    fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add (
      .a(sum[s-1]), .b(ops[s-1][s]), .sub(1'b0), .y(add_y)
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[s] <= 1'b0;
        tag[s] <= '0;
      end else begin
        vld[s] <= vld[s-1];
        tag[s] <= tag[s-1];
      end
    end
    always_ff @(posedge clk) begin
      sum[s] <= add_y;
      for (int k = s + 1; k < int'(N); k++) ops[s][k] <= ops[s-1][k];
    end
  end

  assign out_valid = vld[N-1];
  assign out_tag   = tag[N-1];
  assign out_sum   = sum[N-1];
endmodule
