// tb_haar_chunk: random 2x2-word chunks; recomputes the four bands pixel by
// pixel (horizontal pair filter, then vertical) and compares every coefficient.
module tb_haar_chunk;
  int checks = 0, failures = 0;
  logic [127:0] w00, w01, w10, w11, ll, hl, lh, hh;
  haar_chunk dut (.*);

  function automatic int px(int r, int c);   // pixel of the 2x32 chunk
    logic [127:0] w;
    w = (r == 0) ? ((c < 16) ? w00 : w01) : ((c < 16) ? w10 : w11);
    return int'(w[8*(c % 16) +: 8]);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      w00 = {$urandom, $urandom, $urandom, $urandom};
      w01 = {$urandom, $urandom, $urandom, $urandom};
      w10 = {$urandom, $urandom, $urandom, $urandom};
      w11 = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int q = 0; q < 16; q++) begin
        int L0, H0, L1, H1, eLL, eHL, eLH, eHH;
        L0 = (px(0, 2*q) + px(0, 2*q+1)) / 2;  H0 = (px(0, 2*q+1) - px(0, 2*q) + 256) % 256;
        L1 = (px(1, 2*q) + px(1, 2*q+1)) / 2;  H1 = (px(1, 2*q+1) - px(1, 2*q) + 256) % 256;
        eLL = (L0 + L1) / 2;  eLH = (L1 - L0 + 256) % 256;
        eHL = (H0 + H1) / 2;  eHH = (H1 - H0 + 256) % 256;
        checks++;
        if (ll[8*q +: 8] != eLL || lh[8*q +: 8] != eLH || hl[8*q +: 8] != eHL || hh[8*q +: 8] != eHH) begin
          failures++;
          if (failures < 10) $display("FAIL q=%0d", q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
