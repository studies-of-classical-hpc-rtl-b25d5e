// tb_bank_ram: random writes and reads against a shadow array; checks the
// one-clock read latency and old-data-on-collision behaviour.
module tb_bank_ram;
  localparam int W = 16, D = 32;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [4:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] shadow [D];
  logic [W-1:0] expect_q;
  logic         chk_q = 0;

  bank_ram #(.W(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int k = 0; k < D; k++) begin
      @(negedge clk); we = 1; waddr = 5'(k); wdata = W'($urandom); shadow[k] = wdata;
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (chk_q) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL read %h expected %h", rdata, expect_q);
        end
      end
      raddr = 5'($urandom);
      we    = 1'($urandom);
      waddr = (n % 7 == 0) ? raddr : 5'($urandom);
      wdata = W'($urandom);
      expect_q = shadow[raddr];          // old data even if written now
      chk_q = 1;
      if (we) shadow[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
