// tb_haar_lift: random 8-lane vectors; checks s = floor((a+b)/2) and
// d = (b-a) mod 256 per lane, and that (a, b) is recovered from (s, d).
module tb_haar_lift;
  int checks = 0, failures = 0;
  logic [63:0] a, b, s, d;
  haar_lift #(.N(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = {$urandom, $urandom};
      b = (n == 0) ? 64'h0 : {$urandom, $urandom};
      if (n == 0) a = 64'h0101010101010101;       // example: a=1, b=0 gives d=255
      #1;
      for (int q = 0; q < 8; q++) begin
        int ai, bi, si, di, ra, rb;
        ai = a[8*q +: 8]; bi = b[8*q +: 8];
        si = (ai + bi) / 2;
        di = (bi - ai + 256) % 256;
        checks++;
        if (s[8*q +: 8] != si || d[8*q +: 8] != di) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d s=%0d d=%0d", ai, bi, s[8*q +: 8], d[8*q +: 8]);
        end
        // inverse with the signed difference
        di = bi - ai;
        ra = si - ((di < 0) ? -((-di + 1) / 2) : di / 2);
        rb = ra + di;
        checks++;
        if (ra != ai || rb != bi) begin
          failures++;
          if (failures < 10) $display("FAIL inverse a=%0d b=%0d -> %0d %0d", ai, bi, ra, rb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
