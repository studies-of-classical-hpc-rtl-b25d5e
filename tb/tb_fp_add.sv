// tb_fp_add: checks fp_add (add and subtract) in single and double precision
// against the simulator's IEEE double arithmetic, including cancellation.
module tb_fp_add;
  import tb_fp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] sa, sb, sy;
  logic [63:0] da, db, dy;
  logic        sub;

  fp_add #(.EXP_W(8),  .MAN_W(23)) u_s (.a(sa), .b(sb), .sub(sub), .y(sy));
  fp_add #(.EXP_W(11), .MAN_W(52)) u_d (.a(da), .b(db), .sub(sub), .y(dy));

  task automatic chk_s(logic [31:0] exp_y, string what);
    #1;
    checks++;
    if (sy !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h op%0d %h = %h expected %h", what, sa, sub, sb, sy, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      sub = 1'($urandom);
      sa = rand_s(20);
      // half the time make b close to a to exercise cancellation
      sb = (n % 2) ? rand_s(20) : {1'($urandom), sa[30:0] ^ 31'($urandom_range(0, 255))};
      chk_s(r2s(sub ? s2r(sa) - s2r(sb) : s2r(sa) + s2r(sb)), "single");
    end
    for (int n = 0; n < 4000; n++) begin
      sub = 1'($urandom);
      da = rand_d(60);
      db = (n % 2) ? rand_d(60) : {1'($urandom), da[62:0] ^ 63'($urandom_range(0, 4095))};
      #1;
      checks++;
      if (dy !== $realtobits(sub ? $bitstoreal(da) - $bitstoreal(db) : $bitstoreal(da) + $bitstoreal(db))) begin
        failures++;
        if (failures < 10) $display("FAIL double %h op%0d %h = %h", da, sub, db, dy);
      end
    end
    sub = 0;
    sa = 32'h3f800000; sb = 32'hbf800000; chk_s(32'h00000000, "1+-1");
    sa = 32'h3f800000; sb = 32'h00000000; chk_s(32'h3f800000, "1+0");
    sa = 32'h7f800000; sb = 32'hff800000; chk_s(32'h7fc00000, "inf-inf");
    sa = 32'h7f7fffff; sb = 32'h7f7fffff; chk_s(32'h7f800000, "overflow");
    sub = 1;
    sa = 32'h40400000; sb = 32'h3f800000; chk_s(32'h40000000, "3-1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
