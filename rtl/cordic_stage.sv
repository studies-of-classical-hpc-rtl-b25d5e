// cordic_stage: one rotation step of the CORDIC sine/cosine pipeline.
//
// Holds the running angle phi, the target angle alpha and the vector (x, y).
// If phi < alpha the vector is turned up by atan(2^-SHIFT), otherwise down:
//   up:   x' = x - (y >>> SHIFT),  y' = y + (x >>> SHIFT),  phi' = phi + ATAN
//   down: x' = x + (y >>> SHIFT),  y' = y - (x >>> SHIFT),  phi' = phi - ATAN
// x and y are updated together from the old values. All quantities are signed
// integers carrying a fixed decimal scale (the pipeline uses 10^10); ATAN is
// atan(2^-SHIFT) in degrees on that scale. Output registered: one clock.
module cordic_stage #(
  parameter int unsigned W     = 64,
  parameter int unsigned SHIFT = 0,
  parameter longint      ATAN  = 64'sd450000000000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_x,
  input  logic signed [W-1:0] in_y,
  input  logic signed [W-1:0] in_phi,
  input  logic signed [W-1:0] in_alpha,
  output logic                out_valid,
  output logic signed [W-1:0] out_x,
  output logic signed [W-1:0] out_y,
  output logic signed [W-1:0] out_phi,
  output logic signed [W-1:0] out_alpha
);
  logic signed [W-1:0] xs, ys;
  assign xs = in_x >>> SHIFT;
  assign ys = in_y >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_alpha <= in_alpha;
    if (in_phi < in_alpha) begin
      out_x   <= in_x - ys;
      out_y   <= in_y + xs;
      out_phi <= in_phi + W'(ATAN);
    end else begin
      out_x   <= in_x + ys;
      out_y   <= in_y - xs;
      out_phi <= in_phi - W'(ATAN);
    end
  end
endmodule
