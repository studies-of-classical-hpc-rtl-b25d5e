// cordic_unit: LANES data-parallel CORDIC pipelines streaming from and to RAM.
//
// On start, count angles (count/LANES words, LANES angles of 64 bits per word,
// lane 0 in the low bits) are read from the angle RAM, one word per clock, and
// fed to LANES cordic_pipe instances. Each result word of sines goes to the
// sine RAM and each word of cosines to the cosine RAM, at the same word
// address as its angles. Angles are degrees x 10^10; results are x 10^10.
// Timing: count/LANES read clocks, then STAGES+2 clocks of pipeline latency
// (one clock RAM read, STAGES+1 in the pipelines); done pulses after the last
// write. count must be a multiple of LANES.
// Following the design: two 20-stage pipelines, two angles per clock, one RAM
// for the angles and one each for the sines and cosines. Packing and the RAM
// latency are this design's choices.
module cordic_unit #(
  parameter int unsigned LANES  = 2,
  parameter int unsigned STAGES = 20,
  parameter int unsigned ADDR_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W:0]       count,
  output logic                  busy,
  output logic                  done,
  output logic                  rd_en,
  output logic [ADDR_W-1:0]     rd_addr,
  input  logic [64*LANES-1:0]   rd_data,
  output logic                  sin_wr_en,
  output logic [ADDR_W-1:0]     sin_wr_addr,
  output logic [64*LANES-1:0]   sin_wr_data,
  output logic                  cos_wr_en,
  output logic [ADDR_W-1:0]     cos_wr_addr,
  output logic [64*LANES-1:0]   cos_wr_data
);
  logic [ADDR_W:0]   nwords, rd_k, wr_k;
  logic              q_v;
  logic              o_v [LANES];
  logic [63:0]       o_cos [LANES];
  logic [63:0]       o_sin [LANES];

  assign nwords  = (ADDR_W+1)'(32'(count) / LANES);
  assign rd_en   = busy && (rd_k < nwords);
  assign rd_addr = rd_k[ADDR_W-1:0];

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    cordic_pipe #(.STAGES(STAGES), .W(64)) u_pipe (
      .clk, .rst_n, .in_valid(q_v), .in_angle(rd_data[64*l +: 64]),
      .out_valid(o_v[l]), .out_cos(o_cos[l]), .out_sin(o_sin[l])
    );
    assign sin_wr_data[64*l +: 64] = o_sin[l];
    assign cos_wr_data[64*l +: 64] = o_cos[l];
  end

  assign sin_wr_en   = o_v[0];
  assign cos_wr_en   = o_v[0];
  assign sin_wr_addr = wr_k[ADDR_W-1:0];
  assign cos_wr_addr = wr_k[ADDR_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      rd_k <= '0;
      wr_k <= '0;
      q_v  <= 1'b0;
    end else begin
      done <= 1'b0;
      q_v  <= rd_en;
      if (rd_en) rd_k <= rd_k + 1'b1;
      if (o_v[0]) wr_k <= wr_k + 1'b1;
      if (!busy && start) begin
        busy <= 1'b1;
        rd_k <= '0;
        wr_k <= '0;
      end else if (busy && wr_k == nwords && !q_v && rd_k == nwords) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
