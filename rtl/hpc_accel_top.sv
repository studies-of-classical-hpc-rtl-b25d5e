// hpc_accel_top: the four FPGA accelerators side by side.
//
// Each accelerator is a separate configuration of the reconfigurable
// co-processor with its own start/busy/done handshake and its own external
// RAM ports; they share only clock and reset:
//   mm_* : single-precision matrix product C = A x B (mm_engine), N=128,
//          32 products per clock, operands preloaded into on-chip banks.
//   jc_* : double-precision Jacobi solver (jacobi_engine), N=64, 8 products
//          per clock.
//   hw_* : two-level 2-D Haar wavelet transform of a 1024x768 8-bit image
//          (haar_dwt2), 16 pixels per clock.
//   cd_* : sine/cosine by two 20-stage CORDIC pipelines (cordic_unit).
// RAM read ports return data one clock after the address. Placing the four
// designs in one top is a packaging choice; the design treats them as separate
// programs for the same platform.
module hpc_accel_top #(
  parameter int unsigned MM_N    = 128,
  parameter int unsigned MM_NPAR = 32,
  parameter int unsigned JC_N    = 64,
  parameter int unsigned JC_NPAR = 8,
  parameter int unsigned HW_W    = 1024,
  parameter int unsigned HW_H    = 768,
  parameter int unsigned CD_STAGES = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  // matrix product
  input  logic          mm_start,
  input  logic [15:0]   mm_a_base,
  input  logic [15:0]   mm_b_base,
  output logic          mm_busy,
  output logic          mm_done,
  output logic          mm_rd_en,
  output logic [15:0]   mm_rd_addr,
  input  logic [63:0]   mm_rd_data [4],
  output logic          mm_c_wr_en,
  output logic [2*$clog2(MM_N)-1:0] mm_c_wr_addr,
  output logic [31:0]   mm_c_wr_data,
  // Jacobi solver
  input  logic          jc_start,
  input  logic [15:0]   jc_iterations,
  input  logic [15:0]   jc_a_base,
  input  logic [15:0]   jc_b_base,
  input  logic [15:0]   jc_x_base,
  output logic          jc_busy,
  output logic          jc_done,
  output logic          jc_rd_en,
  output logic [15:0]   jc_rd_addr,
  input  logic [63:0]   jc_rd_data [4],
  output logic          jc_x_wr_en,
  output logic [15:0]   jc_x_wr_addr,
  output logic [63:0]   jc_x_wr_data,
  // Haar wavelet
  input  logic          hw_start,
  output logic          hw_busy,
  output logic          hw_done,
  output logic          hw_rd_en,
  output logic [15:0]   hw_rd_addr,
  input  logic [127:0]  hw_rd_data,
  output logic          hw_wr_en,
  output logic [15:0]   hw_wr_addr,
  output logic [127:0]  hw_wr_data,
  // CORDIC
  input  logic          cd_start,
  input  logic [16:0]   cd_count,
  output logic          cd_busy,
  output logic          cd_done,
  output logic          cd_rd_en,
  output logic [15:0]   cd_rd_addr,
  input  logic [127:0]  cd_rd_data,
  output logic          cd_sin_wr_en,
  output logic [15:0]   cd_sin_wr_addr,
  output logic [127:0]  cd_sin_wr_data,
  output logic          cd_cos_wr_en,
  output logic [15:0]   cd_cos_wr_addr,
  output logic [127:0]  cd_cos_wr_data
);
  mm_engine #(.N(MM_N), .NPAR(MM_NPAR), .EXP_W(8), .MAN_W(23), .ADDR_W(16)) u_mm (
    .clk, .rst_n, .start(mm_start), .a_base(mm_a_base), .b_base(mm_b_base),
    .busy(mm_busy), .done(mm_done),
    .ext_rd_en(mm_rd_en), .ext_rd_addr(mm_rd_addr), .ext_rd_data(mm_rd_data),
    .c_wr_en(mm_c_wr_en), .c_wr_addr(mm_c_wr_addr), .c_wr_data(mm_c_wr_data)
  );

  jacobi_engine #(.N(JC_N), .NPAR(JC_NPAR), .EXP_W(11), .MAN_W(52), .ADDR_W(16)) u_jc (
    .clk, .rst_n, .start(jc_start), .iterations(jc_iterations),
    .a_base(jc_a_base), .b_base(jc_b_base), .x_base(jc_x_base),
    .busy(jc_busy), .done(jc_done),
    .ext_rd_en(jc_rd_en), .ext_rd_addr(jc_rd_addr), .ext_rd_data(jc_rd_data),
    .x_wr_en(jc_x_wr_en), .x_wr_addr(jc_x_wr_addr), .x_wr_data(jc_x_wr_data)
  );

  haar_dwt2 #(.IMG_W(HW_W), .IMG_H(HW_H), .ADDR_W(16)) u_hw (
    .clk, .rst_n, .start(hw_start), .busy(hw_busy), .done(hw_done),
    .rd_en(hw_rd_en), .rd_addr(hw_rd_addr), .rd_data(hw_rd_data),
    .wr_en(hw_wr_en), .wr_addr(hw_wr_addr), .wr_data(hw_wr_data)
  );

  cordic_unit #(.LANES(2), .STAGES(CD_STAGES), .ADDR_W(16)) u_cd (
    .clk, .rst_n, .start(cd_start), .count(cd_count), .busy(cd_busy), .done(cd_done),
    .rd_en(cd_rd_en), .rd_addr(cd_rd_addr), .rd_data(cd_rd_data),
    .sin_wr_en(cd_sin_wr_en), .sin_wr_addr(cd_sin_wr_addr), .sin_wr_data(cd_sin_wr_data),
    .cos_wr_en(cd_cos_wr_en), .cos_wr_addr(cd_cos_wr_addr), .cos_wr_data(cd_cos_wr_data)
  );
endmodule
