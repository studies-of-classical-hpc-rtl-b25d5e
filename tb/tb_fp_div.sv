// tb_fp_div: streams random double-precision divisions through fp_div, one per
// clock, and checks every quotient against the simulator's IEEE division, the
// carried tag and the latency of MAN_W+5 clocks.
module tb_fp_div;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [7:0] in_tag = 0, out_tag;
  logic [63:0] a = 0, b = 0, y;
  logic [63:0] qa [256], qb [256];
  longint t_in [256];
  longint cyc = 0;
  localparam int LAT = 52 + 5;

  fp_div #(.EXP_W(11), .MAN_W(52), .TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  // cyc counts rising edges; an input set up at t_in is taken at edge t_in+1
  always @(posedge clk) cyc++;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    real r;
    r = $bitstoreal(qa[out_tag]) / $bitstoreal(qb[out_tag]);
    checks++;
    if (y !== $realtobits(r) || cyc - t_in[out_tag] - 1 != LAT) begin
      failures++;
      if (failures < 10) $display("FAIL tag %0d: %h / %h = %h expected %h, latency %0d", out_tag,
                                  qa[out_tag], qb[out_tag], y, $realtobits(r), cyc - t_in[out_tag]);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_tag   = 8'(n);
      a = {1'($urandom), 11'(1023 - 100 + $urandom_range(0, 200)), 20'($urandom), 32'($urandom)};
      b = {1'($urandom), 11'(1023 - 100 + $urandom_range(0, 200)), 20'($urandom), 32'($urandom)};
      if (n % 50 == 7) b = a;                     // exact one
      qa[in_tag] = a; qb[in_tag] = b; t_in[in_tag] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
