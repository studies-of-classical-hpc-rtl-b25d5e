// tb_cordic_stage: random states through stage SHIFT=3; checks the rotation
// direction, the shifted cross terms and the angle update one clock later.
module tb_cordic_stage;
  localparam longint AT = 64'sd71250163489;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [63:0] in_x, in_y, in_phi, in_alpha, out_x, out_y, out_phi, out_alpha;
  logic signed [63:0] ex, ey, ep;

  cordic_stage #(.W(64), .SHIFT(3), .ATAN(AT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_x     = 64'($signed($urandom)) * 4;
      in_y     = 64'($signed($urandom)) * 4;
      in_phi   = 64'($signed($urandom)) * 100;
      in_alpha = (n % 3 == 0) ? in_phi : 64'($signed($urandom)) * 100;
      if (in_phi < in_alpha) begin
        ex = in_x - (in_y >>> 3); ey = in_y + (in_x >>> 3); ep = in_phi + AT;
      end else begin
        ex = in_x + (in_y >>> 3); ey = in_y - (in_x >>> 3); ep = in_phi - AT;
      end
      @(negedge clk);
      checks++;
      if (!out_valid || out_x != ex || out_y != ey || out_phi != ep || out_alpha != in_alpha) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
