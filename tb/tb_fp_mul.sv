// tb_fp_mul: checks fp_mul in single and double precision against the
// simulator's IEEE double arithmetic (random normals and special values).
module tb_fp_mul;
  import tb_fp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] sa, sb, sy;
  logic [63:0] da, db, dy;

  fp_mul #(.EXP_W(8),  .MAN_W(23)) u_s (.a(sa), .b(sb), .y(sy));
  fp_mul #(.EXP_W(11), .MAN_W(52)) u_d (.a(da), .b(db), .y(dy));

  task automatic chk_s(logic [31:0] exp_y, string what);
    #1;
    checks++;
    if (sy !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h * %h = %h expected %h", what, sa, sb, sy, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      sa = rand_s(40); sb = rand_s(40);
      chk_s(r2s(s2r(sa) * s2r(sb)), "single");
    end
    for (int n = 0; n < 3000; n++) begin
      da = rand_d(300); db = rand_d(300);
      #1;
      checks++;
      if (dy !== $realtobits($bitstoreal(da) * $bitstoreal(db))) begin
        failures++;
        if (failures < 10) $display("FAIL double %h * %h = %h", da, db, dy);
      end
    end
    // special values
    sa = 32'h3f800000; sb = 32'h00000000; chk_s(32'h00000000, "x*0");
    sa = 32'h40000000; sb = 32'h40400000; chk_s(32'h40c00000, "2*3");
    sa = 32'h7f800000; sb = 32'hbf800000; chk_s(32'hff800000, "inf*-1");
    sa = 32'h7f800000; sb = 32'h00000000; chk_s(32'h7fc00000, "inf*0");
    sa = 32'h7f000000; sb = 32'h7f000000; chk_s(32'h7f800000, "overflow");
    sa = 32'h00800000; sb = 32'h00800000; chk_s(32'h00000000, "underflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
