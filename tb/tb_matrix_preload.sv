// tb_matrix_preload: loads a 16x16 single-precision matrix (8 values per clock
// from four 64-bit RAMs) into 8 banks and checks every bank write against the
// mapping element e -> bank e mod 8, word e div 8, the number of clocks
// (n*n/8 reads) and the diagonal-capture element stream.
module tb_matrix_preload;
  localparam int N = 16, NB = 8, NW = N * N / 8, DEPTH = N * N / NB;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, ext_rd_en;
  logic [15:0] base = 16'd5, ext_rd_addr;
  logic [63:0] ext_rd_data [4];
  logic        bank_we [NB];
  logic [4:0]  bank_waddr;
  logic [31:0] bank_wdata [NB];
  logic        elem_valid;
  logic [31:0] elem_idx;
  logic [31:0] elem_vals [8];
  logic [63:0] ram [4][64];
  logic [31:0] banks [NB][DEPTH];
  int          nrd = 0, t0, t1;

  matrix_preload #(.DATA_W(32), .PORTS(4), .PORT_W(64), .NBANKS(NB), .NWORDS(NW), .ADDR_W(16)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) for (int r = 0; r < 4; r++) ext_rd_data[r] <= ram[r][ext_rd_addr[5:0]];
  always @(posedge clk) if (rst_n) begin
    if (ext_rd_en) nrd++;
    for (int b = 0; b < NB; b++) if (bank_we[b]) banks[b][bank_waddr] <= bank_wdata[b];
    if (elem_valid) begin
      checks++;
      if (elem_vals[3] !== 32'(elem_idx + 3)) begin
        failures++;
        $display("FAIL element stream idx %0d value %h", elem_idx, elem_vals[3]);
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // element e has value e; word t of RAM r holds elements 8t+2r (low) and 8t+2r+1
    for (int t = 0; t < 64; t++)
      for (int r = 0; r < 4; r++) ram[r][t] = '0;
    for (int e = 0; e < N * N; e++) begin
      int t, r;
      t = e / 8; r = (e % 8) / 2;
      if (e % 2 == 0) ram[r][t + 5][31:0] = 32'(e);
      else            ram[r][t + 5][63:32] = 32'(e);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) start = 1;
    t0 = $time;
    @(negedge clk) start = 0;
    wait (done);
    t1 = $time;
    @(negedge clk);
    for (int e = 0; e < N * N; e++) begin
      checks++;
      if (banks[e % NB][e / NB] !== 32'(e)) begin
        failures++;
        if (failures < 10) $display("FAIL element %0d: bank %0d word %0d holds %h", e, e % NB, e / NB, banks[e % NB][e / NB]);
      end
    end
    checks++;
    if (nrd != NW || (t1 - t0) / 10 != NW + 1) begin
      failures++;
      $display("FAIL reads %0d clocks %0d", nrd, (t1 - t0) / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
