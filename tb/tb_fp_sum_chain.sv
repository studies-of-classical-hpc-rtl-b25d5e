// tb_fp_sum_chain: feeds random single-precision vectors (one per clock, with
// gaps) into an 8-lane chain and checks each sum against a reference that adds
// the lanes in order with rounding after every addition, plus the N-clock
// latency and the tag.
module tb_fp_sum_chain;
  import tb_fp_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [7:0] in_tag = 0, out_tag;
  logic [31:0] in_vals [N];
  logic [31:0] out_sum;
  logic [31:0] ref_sum [256];
  longint t_in [256];
  longint cyc = 0;

  fp_sum_chain #(.N(N), .EXP_W(8), .MAN_W(23), .TAG_W(8)) dut (.*);

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
    checks++;
    if (out_sum !== ref_sum[out_tag] || cyc - t_in[out_tag] - 1 != N) begin
      failures++;
      if (failures < 10) $display("FAIL tag %0d: %h expected %h latency %0d", out_tag, out_sum,
                                  ref_sum[out_tag], cyc - t_in[out_tag]);
    end
  end

  initial begin
    for (int k = 0; k < N; k++) in_vals[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [31:0] acc;
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_tag   = 8'(n);
      for (int k = 0; k < N; k++) in_vals[k] = rand_s(6);
      acc = in_vals[0];
      for (int k = 1; k < N; k++) acc = r2s(s2r(acc) + s2r(in_vals[k]));
      ref_sum[in_tag] = acc;
      t_in[in_tag] = cyc;
    end
    @(negedge clk) in_valid = 0;
    repeat (N + 4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
