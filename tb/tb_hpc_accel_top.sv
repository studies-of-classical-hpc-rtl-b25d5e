// tb_hpc_accel_top: end-to-end test of the top level with all four engines
// running side by side from one start. Each engine gets its own memory model
// (one-clock read latency, like the board's external SRAM banks) and its
// result is compared with a reference computed here:
//   - matrix multiply: small-integer entries, exact product, bit for bit;
//   - Jacobi: same operation order in IEEE double, bit for bit;
//   - 2D Haar transform: integer reference of both levels and the layout;
//   - CORDIC: $sin/$cos within 3e-6.
// It also counts how often each mechanism of the design happened (listed in
// the final report); a mechanism that never happened is a failure.
module tb_hpc_accel_top;
  import tb_fp_pkg::*;
  localparam int MM_N = 16, MM_NPAR = 8, JC_N = 16, JC_NPAR = 4, ITERS = 3;
  localparam int HW_W = 128, HW_H = 16, NANG = 40, CD_STAGES = 20;
  localparam int MNW = MM_N * MM_N / 8, WPR = HW_W / 16, NWD = HW_W * HW_H / 16;
  localparam int JB = 16'd4096, JX = 16'd8192;
  localparam real PI = 3.14159265358979323846;
  localparam real SC = 1.0e10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  // ---- matrix multiply ports and memory
  logic        mm_start = 0, mm_busy, mm_done, mm_rd_en, mm_c_wr_en;
  logic [15:0] mm_a_base = 16'd0, mm_b_base = 16'(MNW), mm_rd_addr;
  logic [63:0] mm_rd_data [4];
  logic [2*$clog2(MM_N)-1:0] mm_c_wr_addr;
  logic [31:0] mm_c_wr_data;
  logic [63:0] mram [4][2*MNW];
  int          MA [MM_N][MM_N], MB [MM_N][MM_N];
  logic [31:0] MC [MM_N*MM_N];
  int          mnw [MM_N*MM_N];
  // ---- Jacobi ports and memory
  logic        jc_start = 0, jc_busy, jc_done, jc_rd_en, jc_x_wr_en;
  logic [15:0] jc_iterations = 16'(ITERS), jc_a_base = 16'd0, jc_b_base = 16'(JB), jc_x_base = 16'(JX);
  logic [15:0] jc_rd_addr, jc_x_wr_addr;
  logic [63:0] jc_rd_data [4], jc_x_wr_data;
  logic [63:0] jram [4][JX];
  real         JA [JC_N][JC_N], Jb [JC_N], Jx [JC_N], Jxn [JC_N];
  logic [63:0] Jxo [JC_N];
  // ---- Haar ports and memory
  logic         hw_start = 0, hw_busy, hw_done, hw_rd_en, hw_wr_en;
  logic [15:0]  hw_rd_addr, hw_wr_addr;
  logic [127:0] hw_rd_data, hw_wr_data;
  logic [127:0] hsrc [NWD], hdst [NWD];
  int           hnw [NWD];
  int           P [HW_H][HW_W], O [HW_H][HW_W];
  int           Lh [HW_H][HW_W/2], Hh [HW_H][HW_W/2], LL1 [HW_H/2][HW_W/2];
  // ---- CORDIC ports and memory
  logic         cd_start = 0, cd_busy, cd_done, cd_rd_en, cd_sin_wr_en, cd_cos_wr_en;
  logic [16:0]  cd_count = 17'(NANG);
  logic [15:0]  cd_rd_addr, cd_sin_wr_addr, cd_cos_wr_addr;
  logic [127:0] cd_rd_data, cd_sin_wr_data, cd_cos_wr_data;
  logic [127:0] camem [NANG/2], csmem [NANG/2], ccmem [NANG/2];
  real          cang [NANG];

  // ---- mechanism counters
  int m_mm_load = 0, m_mm_accum = 0, m_mm_cwr = 0;
  int m_jc_load = 0, m_jc_bread = 0, m_jc_diag = 0, m_jc_xwr = 0;
  int m_hw_read = 0, m_hw_detail = 0, m_hw_copy = 0;
  int m_cd_read = 0, m_cd_low = 0, m_cd_high = 0, m_cd_lane1 = 0;
  bit mm_ok = 0, jc_ok = 0, hw_ok = 0, cd_ok = 0;
  longint cyc = 0, t_start = 0, t_mm = 0, t_jc = 0, t_hw = 0, t_cd = 0;

  hpc_accel_top #(.MM_N(MM_N), .MM_NPAR(MM_NPAR), .JC_N(JC_N), .JC_NPAR(JC_NPAR),
                  .HW_W(HW_W), .HW_H(HW_H), .CD_STAGES(CD_STAGES)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) for (int r = 0; r < 4; r++) mm_rd_data[r] <= mram[r][mm_rd_addr];
  always_ff @(posedge clk) for (int r = 0; r < 4; r++) jc_rd_data[r] <= jram[r][jc_rd_addr % JX];
  always_ff @(posedge clk) hw_rd_data <= hsrc[hw_rd_addr];
  always_ff @(posedge clk) cd_rd_data <= camem[cd_rd_addr];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mm_done) t_mm = cyc;
    if (jc_done) t_jc = cyc;
    if (hw_done) t_hw = cyc;
    if (cd_done) t_cd = cyc;
    if (mm_rd_en) m_mm_load++;
    if (dut.u_mm.ch_v && !dut.u_mm.ch_tag.first) m_mm_accum++;
    if (mm_c_wr_en) begin MC[mm_c_wr_addr] = mm_c_wr_data; mnw[mm_c_wr_addr]++; m_mm_cwr++; end
    if (jc_rd_en && jc_rd_addr < JB) m_jc_load++;
    if (jc_rd_en && jc_rd_addr >= JB && jc_rd_addr < JB + JC_N) m_jc_bread++;
    if (dut.u_jc.p1_v) m_jc_diag++;
    if (jc_x_wr_en) begin Jxo[jc_x_wr_addr - JX] = jc_x_wr_data; m_jc_xwr++; end
    if (hw_rd_en) m_hw_read++;
    if (hw_wr_en) begin
      hdst[hw_wr_addr] = hw_wr_data;
      hnw[hw_wr_addr]++;
      if (hw_wr_addr / WPR < HW_H / 2 && hw_wr_addr % WPR < WPR / 2) m_hw_copy++;
      else m_hw_detail++;
    end
    if (cd_rd_en) m_cd_read++;
    if (cd_sin_wr_en) csmem[cd_sin_wr_addr] = cd_sin_wr_data;
    if (cd_cos_wr_en) ccmem[cd_cos_wr_addr] = cd_cos_wr_data;
  end

  function automatic void mput(int base, int e, logic [31:0] v);
    if (e % 2 == 0) mram[(e % 8) / 2][base + e / 8][31:0] = v;
    else            mram[(e % 8) / 2][base + e / 8][63:32] = v;
  endfunction
  function automatic int avg(int a, int b); return (a + b) / 2; endfunction
  function automatic int dif(int a, int b); return (b - a + 256) % 256; endfunction

  task automatic fail(string s);
    failures++;
    if (failures < 12) $display("FAIL %s", s);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    // matrix multiply data: A row-major at 0, B column-major after it
    for (int k = 0; k < MM_N * MM_N; k++) mnw[k] = 0;
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        MA[i][j] = $urandom_range(0, 16) - 8;
        MB[i][j] = $urandom_range(0, 16) - 8;
      end
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        mput(0, i * MM_N + j, r2s(real'(MA[i][j])));
        mput(MNW, j * MM_N + i, r2s(real'(MB[i][j])));
      end
    // Jacobi data: diagonally dominant system, A row-major at 0, b at JB
    for (int i = 0; i < JC_N; i++) begin
      real rs;
      rs = 0.0;
      for (int j = 0; j < JC_N; j++) begin
        JA[i][j] = (real'($urandom_range(0, 2000)) - 1000.0) / 337.0;
        if (j != i) rs += (JA[i][j] < 0.0) ? -JA[i][j] : JA[i][j];
      end
      JA[i][i] = rs + 1.0 + real'($urandom_range(0, 100)) / 7.0;
      Jb[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 13.0;
      Jx[i] = 0.0;
    end
    for (int e = 0; e < JC_N * JC_N; e++) jram[e % 4][e / 4] = $realtobits(JA[e / JC_N][e % JC_N]);
    for (int i = 0; i < JC_N; i++) jram[0][JB + i] = $realtobits(Jb[i]);
    // Haar data
    for (int k = 0; k < NWD; k++) begin hdst[k] = '0; hnw[k] = 0; end
    for (int r = 0; r < HW_H; r++)
      for (int c = 0; c < HW_W; c++) begin
        P[r][c] = $urandom_range(0, 255);
        hsrc[r * WPR + c / 16][8 * (c % 16) +: 8] = 8'(P[r][c]);
      end
    // CORDIC angles: both halves of the circle, two per word
    for (int k = 0; k < NANG; k++) begin
      cang[k] = (k % 2 == 0) ? real'($urandom_range(0, 1800000)) / 10000.0
                             : 180.0 + real'($urandom_range(1, 1800000)) / 10000.0;
      camem[k / 2][64 * (k % 2) +: 64] = longint'(cang[k] * SC);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin mm_start = 1; jc_start = 1; hw_start = 1; cd_start = 1; t_start = cyc; end
    @(negedge clk) begin mm_start = 0; jc_start = 0; hw_start = 0; cd_start = 0; end
  end

  // ------------------------------------------------------------ checkers
  initial begin : mm_check
    @(posedge mm_done);
    @(negedge clk);
    for (int i = 0; i < MM_N; i++)
      for (int j = 0; j < MM_N; j++) begin
        int s;
        s = 0;
        for (int k = 0; k < MM_N; k++) s += MA[i][k] * MB[k][j];
        checks++;
        if (MC[i * MM_N + j] !== r2s(real'(s)) || mnw[i * MM_N + j] != 1)
          fail($sformatf("mm C[%0d][%0d] = %h expected %h", i, j, MC[i * MM_N + j], r2s(real'(s))));
      end
    mm_ok = 1;
  end

  initial begin : jc_check
    for (int it = 0; it < ITERS; it++) begin
      for (int i = 0; i < JC_N; i++) begin
        real s, cs;
        for (int c = 0; c < JC_N / JC_NPAR; c++) begin
          cs = JA[i][c * JC_NPAR] * Jx[c * JC_NPAR];
          for (int k = 1; k < JC_NPAR; k++) cs = cs + JA[i][c * JC_NPAR + k] * Jx[c * JC_NPAR + k];
          s = (c == 0) ? cs : s + cs;
        end
        Jxn[i] = (Jb[i] - (s - JA[i][i] * Jx[i])) / JA[i][i];
      end
      Jx = Jxn;
    end
    @(posedge jc_done);
    @(negedge clk);
    for (int i = 0; i < JC_N; i++) begin
      checks++;
      if (Jxo[i] !== $realtobits(Jx[i]))
        fail($sformatf("jacobi x[%0d] = %f expected %f", i, $bitstoreal(Jxo[i]), Jx[i]));
    end
    jc_ok = 1;
  end

  initial begin : hw_check
    for (int r = 0; r < HW_H; r++)
      for (int c = 0; c < HW_W / 2; c++) begin
        Lh[r][c] = avg(P[r][2*c], P[r][2*c+1]);
        Hh[r][c] = dif(P[r][2*c], P[r][2*c+1]);
      end
    for (int r = 0; r < HW_H / 2; r++)
      for (int c = 0; c < HW_W / 2; c++) begin
        LL1[r][c]                 = avg(Lh[2*r][c], Lh[2*r+1][c]);
        O[r][HW_W/2 + c]          = avg(Hh[2*r][c], Hh[2*r+1][c]);
        O[HW_H/2 + r][c]          = dif(Lh[2*r][c], Lh[2*r+1][c]);
        O[HW_H/2 + r][HW_W/2 + c] = dif(Hh[2*r][c], Hh[2*r+1][c]);
      end
    for (int r = 0; r < HW_H / 4; r++)
      for (int c = 0; c < HW_W / 4; c++) begin
        int l0, l1, h0, h1;
        l0 = avg(LL1[2*r][2*c], LL1[2*r][2*c+1]);     h0 = dif(LL1[2*r][2*c], LL1[2*r][2*c+1]);
        l1 = avg(LL1[2*r+1][2*c], LL1[2*r+1][2*c+1]); h1 = dif(LL1[2*r+1][2*c], LL1[2*r+1][2*c+1]);
        O[r][c]                   = avg(l0, l1);
        O[r][HW_W/4 + c]          = avg(h0, h1);
        O[HW_H/4 + r][c]          = dif(l0, l1);
        O[HW_H/4 + r][HW_W/4 + c] = dif(h0, h1);
      end
    @(posedge hw_done);
    @(negedge clk);
    for (int r = 0; r < HW_H; r++)
      for (int c = 0; c < HW_W; c++) begin
        checks++;
        if (int'(hdst[r * WPR + c / 16][8 * (c % 16) +: 8]) != O[r][c])
          fail($sformatf("haar pixel (%0d,%0d) = %0d expected %0d", r, c,
                         hdst[r * WPR + c / 16][8 * (c % 16) +: 8], O[r][c]));
      end
    for (int k = 0; k < NWD; k++) begin
      checks++;
      if (hnw[k] != 1) fail($sformatf("haar word %0d written %0d times", k, hnw[k]));
    end
    hw_ok = 1;
  end

  initial begin : cd_check
    @(posedge cd_done);
    @(negedge clk);
    for (int k = 0; k < NANG; k++) begin
      real es, ec;
      es = real'($signed(csmem[k / 2][64 * (k % 2) +: 64])) / SC - $sin(cang[k] * PI / 180.0);
      ec = real'($signed(ccmem[k / 2][64 * (k % 2) +: 64])) / SC - $cos(cang[k] * PI / 180.0);
      checks++;
      if (es > 3e-6 || es < -3e-6 || ec > 3e-6 || ec < -3e-6)
        fail($sformatf("cordic angle %f errors %e %e", cang[k], es, ec));
      else begin
        if (cang[k] > 180.0) m_cd_high++; else m_cd_low++;
        if (k % 2 == 1) m_cd_lane1++;
      end
    end
    cd_ok = 1;
  end

  // ------------------------------------------------------------ report
  task automatic need(string name, int n);
    checks++;
    $display("  mechanism %-34s %0d", name, n);
    if (n == 0) fail($sformatf("mechanism %s never happened", name));
  endtask

  initial begin
    wait (mm_ok && jc_ok && hw_ok && cd_ok);
    repeat (2) @(negedge clk);
    $display("hpc_accel_top: mechanism counts");
    need("mm preload read (A and B)", m_mm_load);
    need("mm chunk accumulation", m_mm_accum);
    need("mm C write", m_mm_cwr);
    need("jacobi matrix preload read", m_jc_load);
    need("jacobi b read (one per row per sweep)", m_jc_bread);
    need("jacobi diagonal correction", m_jc_diag);
    need("jacobi x write-back", m_jc_xwr);
    need("haar image read", m_hw_read);
    need("haar detail band write", m_hw_detail);
    need("haar level-2 buffer copy write", m_hw_copy);
    need("cordic angle word read", m_cd_read);
    need("cordic angle <= 180 (90 deg start)", m_cd_low);
    need("cordic angle > 180 (270 deg start)", m_cd_high);
    need("cordic second lane", m_cd_lane1);
    checks++;
    if (m_mm_load != 2 * MNW || m_jc_bread != ITERS * JC_N || m_jc_diag != ITERS * JC_N ||
        m_jc_xwr != JC_N || m_hw_read != NWD || m_hw_copy != NWD / 4 || m_cd_read != NANG / 2)
      fail("mechanism counts differ from the expected numbers");
    // run times in clocks from start to done, against the rates of each engine
    $display("  clocks: mm %0d, jacobi %0d, haar %0d, cordic %0d",
             t_mm - t_start, t_jc - t_start, t_hw - t_start, t_cd - t_start);
    checks++;
    if (t_mm - t_start < 2 * MNW + MM_N * MM_N * MM_N / MM_NPAR ||
        t_mm - t_start > 2 * MNW + MM_N * MM_N * MM_N / MM_NPAR + MM_NPAR + 16)
      fail("matrix multiply clock count");
    checks++;
    if (t_jc - t_start < JC_N * JC_N / 4 + ITERS * (JC_N * JC_N / JC_NPAR + JC_N) ||
        t_jc - t_start > JC_N * JC_N / 4 + ITERS * (JC_N * JC_N / JC_NPAR + JC_N + JC_NPAR + 70))
      fail("jacobi clock count");
    checks++;
    if (t_hw - t_start < NWD + NWD / 4 || t_hw - t_start > NWD + NWD / 4 + 16)
      fail("haar clock count");
    checks++;
    if (t_cd - t_start < NANG / 2 + CD_STAGES || t_cd - t_start > NANG / 2 + CD_STAGES + 6)
      fail("cordic clock count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
