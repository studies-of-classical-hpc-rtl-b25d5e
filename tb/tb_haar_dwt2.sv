// tb_haar_dwt2: two-level transform of a random 128x16 image. The reference
// computes every band pixel by pixel and places it as in the target layout
// (LLLL|LLHL over LLLH|LLHH in the top-left quarter, HL, LH, HH in the other
// quarters); the whole target image is compared. Also checks the clock count:
// W*H/16 reads plus W*H/64 buffer-copy clocks plus a short pipeline flush, and
// that no target word is written twice.
module tb_haar_dwt2;
  localparam int IW = 128, IH = 16, WPR = IW / 16, NWD = IW * IH / 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, rd_en, wr_en;
  logic [15:0] rd_addr, wr_addr;
  logic [127:0] rd_data, wr_data;
  logic [127:0] src [NWD], dst [NWD];
  int           nwr [NWD];
  int           P [IH][IW], O [IH][IW];
  int           Lh [IH][IW/2], Hh [IH][IW/2];
  int           LL1 [IH/2][IW/2];
  longint       cyc = 0, t0, t1;

  haar_dwt2 #(.IMG_W(IW), .IMG_H(IH), .ADDR_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always_ff @(posedge clk) rd_data <= src[rd_addr];
  always @(posedge clk) if (rst_n && wr_en) begin
    dst[wr_addr] = wr_data;
    nwr[wr_addr]++;
  end

  function automatic int avg(int a, int b); return (a + b) / 2; endfunction
  function automatic int dif(int a, int b); return (b - a + 256) % 256; endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NWD; k++) begin dst[k] = '0; nwr[k] = 0; end
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) begin
        P[r][c] = $urandom_range(0, 255);
        src[r * WPR + c / 16][8 * (c % 16) +: 8] = 8'(P[r][c]);
      end
    // reference, level 1
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW / 2; c++) begin
        Lh[r][c] = avg(P[r][2*c], P[r][2*c+1]);
        Hh[r][c] = dif(P[r][2*c], P[r][2*c+1]);
      end
    for (int r = 0; r < IH / 2; r++)
      for (int c = 0; c < IW / 2; c++) begin
        LL1[r][c]               = avg(Lh[2*r][c], Lh[2*r+1][c]);
        O[r][IW/2 + c]          = avg(Hh[2*r][c], Hh[2*r+1][c]);   // HL
        O[IH/2 + r][c]          = dif(Lh[2*r][c], Lh[2*r+1][c]);   // LH
        O[IH/2 + r][IW/2 + c]   = dif(Hh[2*r][c], Hh[2*r+1][c]);   // HH
      end
    // level 2 on LL1
    for (int r = 0; r < IH / 4; r++)
      for (int c = 0; c < IW / 4; c++) begin
        int l0, l1, h0, h1;
        l0 = avg(LL1[2*r][2*c], LL1[2*r][2*c+1]);     h0 = dif(LL1[2*r][2*c], LL1[2*r][2*c+1]);
        l1 = avg(LL1[2*r+1][2*c], LL1[2*r+1][2*c+1]); h1 = dif(LL1[2*r+1][2*c], LL1[2*r+1][2*c+1]);
        O[r][c]                 = avg(l0, l1);   // LLLL
        O[r][IW/4 + c]          = avg(h0, h1);   // LLHL
        O[IH/4 + r][c]          = dif(l0, l1);   // LLLH
        O[IH/4 + r][IW/4 + c]   = dif(h0, h1);   // LLHH
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    for (int r = 0; r < IH; r++)
      for (int c = 0; c < IW; c++) begin
        checks++;
        if (int'(dst[r * WPR + c / 16][8 * (c % 16) +: 8]) != O[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL pixel (%0d,%0d) = %0d expected %0d", r, c,
                                      dst[r * WPR + c / 16][8 * (c % 16) +: 8], O[r][c]);
        end
      end
    for (int k = 0; k < NWD; k++) begin
      checks++;
      if (nwr[k] != 1) begin
        failures++;
        if (failures < 10) $display("FAIL word %0d written %0d times", k, nwr[k]);
      end
    end
    checks++;
    if (t1 - t0 < NWD + NWD / 4 || t1 - t0 > NWD + NWD / 4 + 16) begin
      failures++;
      $display("FAIL run took %0d clocks", t1 - t0);
    end
    $display("haar_dwt2: %0d clocks (%0d reads, %0d copies)", t1 - t0, NWD, NWD / 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
