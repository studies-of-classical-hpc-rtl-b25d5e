// matrix_preload: copies a matrix from the external RAMs into the internal banks.
//
// Every clock one word is read at the same address from each of the PORTS
// external RAMs (PORTS x PORT_W bits, e.g. 4 x 64 = eight single-precision or
// four double-precision values). The matrix lies in external memory as a flat
// sequence of elements: word t of RAM r holds elements VPC*t + r*VPW ...
// (VPW values per word, lowest element in the low bits). Element e is written
// to bank (e mod NBANKS) at word (e div NBANKS), so each group of NBANKS
// consecutive elements of a row lands in NBANKS different banks and can later
// be read in a single clock. Since VPC divides NBANKS, each bank receives at
// most one write per clock.
// base is sampled with start. Timing: after start, NWORDS reads are issued on consecutive clocks; the
// external RAM returns data one clock after the address, and the bank writes
// happen in that clock. done pulses (and busy falls) the clock after the last
// bank write, when a new start is accepted. The element
// stream (elem_valid/elem_idx/elem_vals) is also brought out so that a client
// can pick out individual elements (the Jacobi solver copies the diagonal).
// The element-to-bank mapping follows the storage schemes of the design; the
// word packing and the one-clock RAM latency are this design's choices.
module matrix_preload #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned PORTS  = 4,
  parameter int unsigned PORT_W = 64,
  parameter int unsigned NBANKS = 32,
  parameter int unsigned NWORDS = 2048,
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned VPW    = PORT_W / DATA_W,
  parameter int unsigned VPC    = PORTS * VPW,
  parameter int unsigned DEPTH  = NWORDS * VPC / NBANKS,
  parameter int unsigned BAW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  output logic              busy,
  output logic              done,
  output logic              ext_rd_en,
  output logic [ADDR_W-1:0] ext_rd_addr,
  input  logic [PORT_W-1:0] ext_rd_data [PORTS],
  output logic              bank_we    [NBANKS],
  output logic [BAW-1:0]    bank_waddr,
  output logic [DATA_W-1:0] bank_wdata [NBANKS],
  output logic              elem_valid,
  output logic [31:0]       elem_idx,
  output logic [DATA_W-1:0] elem_vals  [VPC]
);
  initial begin
    assert (NBANKS % VPC == 0) else $error("VPC must divide NBANKS");
  end

  logic [31:0] t;
  logic        rd_q;
  logic [31:0] t_q;
  logic [ADDR_W-1:0] base_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      t    <= '0;
      rd_q <= 1'b0;
      t_q  <= '0;
      base_q <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      rd_q <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          t      <= '0;
          base_q <= base;
        end
      end else begin
        if (t < NWORDS) begin
          rd_q <= 1'b1;
          t_q  <= t;
          t    <= t + 1;
        end
        if (rd_q && t_q == NWORDS - 1) begin
          done <= 1'b1;
          busy <= 1'b0;
        end
      end
    end
  end

  assign ext_rd_en   = busy && (t < NWORDS);
  assign ext_rd_addr = base_q + ADDR_W'(t);

  // Data returned for word t_q: split into values, route to the bank group.
  always_comb begin
    logic [31:0] e0;
    int unsigned grp;
    e0         = t_q * VPC;
    grp        = (e0 % NBANKS) / VPC;
    bank_waddr = BAW'(e0 / NBANKS);
    elem_valid = rd_q;
    elem_idx   = e0;
    for (int p = 0; p < int'(VPC); p++)
      elem_vals[p] = ext_rd_data[p / VPW][(p % VPW)*DATA_W +: DATA_W];
    for (int b = 0; b < int'(NBANKS); b++) begin
      bank_we[b]    = rd_q && ((b / VPC) == grp);
      bank_wdata[b] = elem_vals[b % VPC];
    end
  end
endmodule
