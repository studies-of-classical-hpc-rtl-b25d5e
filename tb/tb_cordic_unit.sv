// tb_cordic_unit: 200 angles, two per RAM word, through the two pipelines.
// Checks every sine and cosine against $sin/$cos (3e-6), one write per word,
// and the run time of count/2 read clocks plus the pipeline latency.
module tb_cordic_unit;
  localparam int NANG = 200, STAGES = 20;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = 1.0e10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, rd_en;
  logic [16:0]  count = 17'(NANG);
  logic [15:0]  rd_addr, sin_wr_addr, cos_wr_addr;
  logic [127:0] rd_data, sin_wr_data, cos_wr_data;
  logic         sin_wr_en, cos_wr_en;
  logic [127:0] amem [NANG/2], smem [NANG/2], cmem [NANG/2];
  int           nw [NANG/2];
  real          ang [NANG];
  longint       cyc = 0, t0, t1;

  cordic_unit #(.LANES(2), .STAGES(STAGES), .ADDR_W(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always_ff @(posedge clk) rd_data <= amem[rd_addr];
  always @(posedge clk) if (rst_n) begin
    if (sin_wr_en) begin smem[sin_wr_addr] = sin_wr_data; nw[sin_wr_addr]++; end
    if (cos_wr_en) cmem[cos_wr_addr] = cos_wr_data;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NANG; k++) begin
      ang[k] = real'($urandom_range(0, 3600000)) / 10000.0;
      amem[k / 2][64 * (k % 2) +: 64] = longint'(ang[k] * SC);
    end
    for (int k = 0; k < NANG / 2; k++) nw[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    for (int k = 0; k < NANG; k++) begin
      real es, ec;
      es = real'($signed(smem[k / 2][64 * (k % 2) +: 64])) / SC - $sin(ang[k] * PI / 180.0);
      ec = real'($signed(cmem[k / 2][64 * (k % 2) +: 64])) / SC - $cos(ang[k] * PI / 180.0);
      checks++;
      if (es > 3e-6 || es < -3e-6 || ec > 3e-6 || ec < -3e-6 || nw[k / 2] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL angle %f err %e %e writes %0d", ang[k], es, ec, nw[k / 2]);
      end
    end
    checks++;
    if (t1 - t0 < NANG / 2 + STAGES || t1 - t0 > NANG / 2 + STAGES + 6) begin
      failures++;
      $display("FAIL run took %0d clocks", t1 - t0);
    end
    $display("cordic_unit: %0d angles in %0d clocks", NANG, t1 - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
