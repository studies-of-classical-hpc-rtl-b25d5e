// cordic_pipe: fully pipelined CORDIC sine and cosine, one angle per clock.
//
// Input: a target angle alpha in degrees, 0..360, as a signed integer scaled
// by SCALE (10^10 by default, the pseudo fixed point of the design). An input
// register picks the start point: 270 degrees with (x, y) = (0, -K) for
// alpha > 180, else 90 degrees with (0, +K), where K is the CORDIC aggregate
// constant prod 1/sqrt(1 + 2^-2i) for STAGES steps (about 0.607253) times
// SCALE. STAGES cordic_stage instances then rotate by +-atan(2^-i),
// i = 0..STAGES-1; the gain of the rotations cancels K, so x ends at
// cos(alpha) and y at sin(alpha), both scaled by SCALE.
// Timing: out_valid/out_cos/out_sin follow in_valid by STAGES+1 clocks; a new
// angle may enter every clock. The angle table and K are computed at
// elaboration. Accuracy: about 2^-STAGES rad of angle error.
module cordic_pipe #(
  parameter int unsigned STAGES = 20,
  parameter int unsigned W      = 64,
  parameter longint      SCALE  = 64'd10000000000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_angle,
  output logic                out_valid,
  output logic signed [W-1:0] out_cos,
  output logic signed [W-1:0] out_sin
);
  localparam real PI = 3.14159265358979323846;

  function automatic longint atan_scaled(int i);
    return longint'($atan(2.0 ** (-i)) * 180.0 / PI * real'(SCALE));
  endfunction

  function automatic longint gain_scaled(int n);
    real k;
    k = 1.0;
    for (int i = 0; i < n; i++) k = k / $sqrt(1.0 + 2.0 ** (-2 * i));
    return longint'(k * real'(SCALE));
  endfunction

  localparam longint K = gain_scaled(STAGES);

  logic                v   [STAGES+1];
  logic signed [W-1:0] x   [STAGES+1];
  logic signed [W-1:0] y   [STAGES+1];
  logic signed [W-1:0] phi [STAGES+1];
  logic signed [W-1:0] alp [STAGES+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v[0] <= 1'b0;
    else        v[0] <= in_valid;
  end

  always_ff @(posedge clk) begin
    alp[0] <= in_angle;
    x[0]   <= '0;
    if (in_angle > W'(180 * SCALE)) begin
      phi[0] <= W'(270 * SCALE);
      y[0]   <= -W'(K);
    end else begin
      phi[0] <= W'(90 * SCALE);
      y[0]   <= W'(K);
    end
  end

  for (genvar i = 0; i < int'(STAGES); i++) begin : g_stage
    cordic_stage #(.W(W), .SHIFT(i), .ATAN(atan_scaled(i))) u_stage (
      .clk, .rst_n,
      .in_valid(v[i]),    .in_x(x[i]),    .in_y(y[i]),    .in_phi(phi[i]),    .in_alpha(alp[i]),
      .out_valid(v[i+1]), .out_x(x[i+1]), .out_y(y[i+1]), .out_phi(phi[i+1]), .out_alpha(alp[i+1])
    );
  end

  assign out_valid = v[STAGES];
  assign out_cos   = x[STAGES];
  assign out_sin   = y[STAGES];
endmodule
