// tb_cordic_pipe: streams angles (fixed corner cases and random values in
// 0..360 degrees, one per clock) through the 20-stage pipeline and compares
// sine and cosine with the simulator's $sin/$cos within 3e-6 (results are
// scaled by 1e10), and the latency of STAGES+1 clocks.
module tb_cordic_pipe;
  localparam int STAGES = 20;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = 1.0e10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [63:0] in_angle = 0, out_cos, out_sin;
  real    ang [$];
  longint t_in [$];
  longint cyc = 0;
  real    worst = 0.0;

  cordic_pipe #(.STAGES(STAGES), .W(64)) dut (.*);
  always #5 clk = ~clk;
  // cyc counts rising edges; an input set up at t_in is taken at edge t_in+1
  always @(posedge clk) cyc++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real a, es, ec;
    longint t;
    a = ang.pop_front();
    t = t_in.pop_front();
    es = real'(out_sin) / SC - $sin(a * PI / 180.0);
    ec = real'(out_cos) / SC - $cos(a * PI / 180.0);
    if (es < 0) es = -es;
    if (ec < 0) ec = -ec;
    if (es > worst) worst = es;
    if (ec > worst) worst = ec;
    checks++;
    if (es > 3.0e-6 || ec > 3.0e-6 || cyc - t - 1 != STAGES + 1) begin
      failures++;
      if (failures < 10) $display("FAIL angle %f: sin %f cos %f latency %0d", a, real'(out_sin) / SC,
                                  real'(out_cos) / SC, cyc - t - 1);
    end
  end

  initial begin
    real fixed [10] = '{0.0, 45.0, 90.0, 135.0, 180.0, 180.5, 225.0, 270.0, 315.0, 360.0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      real a;
      @(negedge clk);
      a = (n < 10) ? fixed[n] : real'($urandom_range(0, 3600000)) / 10000.0;
      in_valid = 1;
      in_angle = longint'(a * SC);
      ang.push_back(a);
      t_in.push_back(cyc);
    end
    @(negedge clk) in_valid = 0;
    repeat (STAGES + 4) @(posedge clk);
    $display("cordic_pipe: worst error %e", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
