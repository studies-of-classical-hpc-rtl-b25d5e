// tb_mm_engine: 16x16 single-precision product with 8 lanes (two chunks per
// entry). Entries are small integers, so every product and sum is exact and C
// must match the integer product bit for bit. Also checks that each C entry is
// written once and that the run takes 2*(N*N/8) preload clocks plus N^3/NPAR
// compute clocks plus the pipeline tail.
module tb_mm_engine;
  import tb_fp_pkg::*;
  localparam int N = 16, NPAR = 8;
  localparam int NW = N * N / 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] a_base = 16'd0, b_base = 16'(NW);
  logic        ext_rd_en;
  logic [15:0] ext_rd_addr;
  logic [63:0] ext_rd_data [4];
  logic        c_wr_en;
  logic [7:0]  c_wr_addr;
  logic [31:0] c_wr_data;
  logic [63:0] ram [4][2*NW];
  int          A [N][N], B [N][N];
  logic [31:0] C [N*N];
  int          nwr [N*N];
  longint      cyc = 0, t0, t1;

  mm_engine #(.N(N), .NPAR(NPAR), .EXP_W(8), .MAN_W(23), .ADDR_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always_ff @(posedge clk) for (int r = 0; r < 4; r++) ext_rd_data[r] <= ram[r][ext_rd_addr];
  always @(posedge clk) if (rst_n && c_wr_en) begin
    C[c_wr_addr] = c_wr_data;
    nwr[c_wr_addr]++;
  end

  function automatic void put(int base, int e, logic [31:0] v);
    int t, r;
    t = e / 8; r = (e % 8) / 2;
    if (e % 2 == 0) ram[r][base + t][31:0] = v;
    else            ram[r][base + t][63:32] = v;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N * N; k++) nwr[k] = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        A[i][j] = $urandom_range(0, 16) - 8;
        B[i][j] = $urandom_range(0, 16) - 8;
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        put(0, i * N + j, r2s(real'(A[i][j])));     // A row-major
        put(NW, j * N + i, r2s(real'(B[i][j])));    // B column-major
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int s;
        s = 0;
        for (int k = 0; k < N; k++) s += A[i][k] * B[k][j];
        checks++;
        if (C[i * N + j] !== r2s(real'(s)) || nwr[i * N + j] != 1) begin
          failures++;
          if (failures < 10) $display("FAIL C[%0d][%0d] = %h expected %h (%0d writes)", i, j,
                                      C[i * N + j], r2s(real'(s)), nwr[i * N + j]);
        end
      end
    // timing: two preloads, one chunk per clock, pipeline tail
    checks++;
    if (t1 - t0 < 2 * NW + N * N * N / NPAR || t1 - t0 > 2 * NW + N * N * N / NPAR + NPAR + 8) begin
      failures++;
      $display("FAIL run took %0d clocks", t1 - t0);
    end
    $display("mm_engine: %0d clocks (preload %0d, compute %0d)", t1 - t0, 2 * NW, N * N * N / NPAR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
