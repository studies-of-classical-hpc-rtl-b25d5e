// tb_jacobi_engine: 16x16 diagonally dominant system, 4 lanes, 3 sweeps.
// The reference repeats the engine's arithmetic in IEEE double with the same
// order of operations (lane-ordered chunk sums, chunk accumulation, diagonal
// correction, b - sum, division), so the final x must match bit for bit.
// Also checks the preload and per-sweep clock counts.
module tb_jacobi_engine;
  localparam int N = 16, NPAR = 4, ITERS = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [15:0] iterations = 16'(ITERS);
  logic [15:0] a_base = 16'd0, b_base = 16'd100, x_base = 16'd200;
  logic        ext_rd_en;
  logic [15:0] ext_rd_addr;
  logic [63:0] ext_rd_data [4];
  logic        x_wr_en;
  logic [15:0] x_wr_addr;
  logic [63:0] x_wr_data;
  logic [63:0] ram [4][256];
  real         A [N][N], b [N], x [N], xn [N];
  logic [63:0] xo [N];
  int          nx = 0;
  longint      cyc = 0, t0, t1;

  jacobi_engine #(.N(N), .NPAR(NPAR), .EXP_W(11), .MAN_W(52), .ADDR_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always_ff @(posedge clk) for (int r = 0; r < 4; r++) ext_rd_data[r] <= ram[r][ext_rd_addr[7:0]];
  always @(posedge clk) if (rst_n && x_wr_en) begin
    xo[x_wr_addr - x_base] = x_wr_data;
    nx++;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      real rs;
      rs = 0.0;
      for (int j = 0; j < N; j++) begin
        A[i][j] = (real'($urandom_range(0, 2000)) - 1000.0) / 337.0;
        if (j != i) rs += (A[i][j] < 0.0) ? -A[i][j] : A[i][j];
      end
      A[i][i] = rs + 1.0 + real'($urandom_range(0, 100)) / 7.0;
      b[i] = (real'($urandom_range(0, 2000)) - 1000.0) / 13.0;
      x[i] = 0.0;
    end
    for (int e = 0; e < N * N; e++) ram[e % 4][a_base + e / 4] = $realtobits(A[e / N][e % N]);
    for (int i = 0; i < N; i++) ram[0][b_base + i] = $realtobits(b[i]);

    // reference sweeps
    for (int it = 0; it < ITERS; it++) begin
      for (int i = 0; i < N; i++) begin
        real s, cs;
        for (int c = 0; c < N / NPAR; c++) begin
          cs = A[i][c * NPAR] * x[c * NPAR];
          for (int k = 1; k < NPAR; k++) cs = cs + A[i][c * NPAR + k] * x[c * NPAR + k];
          s = (c == 0) ? cs : s + cs;
        end
        xn[i] = (b[i] - (s - A[i][i] * x[i])) / A[i][i];
      end
      x = xn;
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t0 = cyc;
    @(negedge clk) start = 0;
    wait (done);
    t1 = cyc;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (xo[i] !== $realtobits(x[i])) begin
        failures++;
        if (failures < 10) $display("FAIL x[%0d] = %h (%f) expected %h (%f)", i, xo[i], $bitstoreal(xo[i]), $realtobits(x[i]), x[i]);
      end
    end
    checks++;
    if (nx != N) begin
      failures++;
      $display("FAIL %0d x writes", nx);
    end
    // timing: preload N*N/4, then per sweep N*N/NPAR issue clocks + tail + N write-back clocks
    checks++;
    if (t1 - t0 < N * N / 4 + ITERS * (N * N / NPAR + N) ||
        t1 - t0 > N * N / 4 + ITERS * (N * N / NPAR + N + NPAR + 70)) begin
      failures++;
      $display("FAIL run took %0d clocks", t1 - t0);
    end
    $display("jacobi_engine: %0d clocks for %0d sweeps", t1 - t0, ITERS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
