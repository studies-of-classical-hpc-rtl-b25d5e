// mm_engine: single-precision matrix product C = A x B with preloaded operands.
//
// Operation: on start, A and then B are copied from the four external RAMs into
// two sets of NPAR internal banks (matrix_preload, 8 values per clock, N*N/8
// clocks per matrix). A is stored row-wise and B column-wise (B must lie in
// external memory transposed), so that for every (i, j, c) the NPAR elements
// A[i][c*NPAR + k] and B[c*NPAR + k][j] come out of the banks in one clock.
// Every clock one such chunk is read, the NPAR products are formed in parallel
// (fp_mul) and summed by the adder chain (fp_sum_chain). The N/NPAR chunk sums
// of one entry are then accumulated in order and C[i][j] is written to the
// result port at address i*N + j. Loop order: i, then j, then chunk c.
// Timing: compute takes N*N*N/NPAR clocks (one chunk per clock) plus a pipeline
// tail of NPAR+3 clocks; busy is high from start until done pulses.
// Following the design: the preload, the bank layout, NPAR parallel multipliers
// and the chained summation. This design's choices: the result port, loading A
// before B through the same RAMs, B supplied transposed.
module mm_engine #(
  parameter int unsigned N      = 128,
  parameter int unsigned NPAR   = 32,
  parameter int unsigned EXP_W  = 8,
  parameter int unsigned MAN_W  = 23,
  parameter int unsigned ADDR_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [ADDR_W-1:0]     a_base,
  input  logic [ADDR_W-1:0]     b_base,
  output logic                  busy,
  output logic                  done,
  output logic                  ext_rd_en,
  output logic [ADDR_W-1:0]     ext_rd_addr,
  input  logic [63:0]           ext_rd_data [4],
  output logic                  c_wr_en,
  output logic [2*$clog2(N)-1:0] c_wr_addr,
  output logic [EXP_W+MAN_W:0]  c_wr_data
);
  localparam int unsigned W     = EXP_W + MAN_W + 1;
  localparam int unsigned CH    = N / NPAR;
  localparam int unsigned DEPTH = N * N / NPAR;
  localparam int unsigned BAW   = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned IW    = $clog2(N);
  localparam int unsigned CW    = (CH > 1) ? $clog2(CH) : 1;
  localparam int unsigned VPC   = 4 * 64 / W;

  initial begin
    assert (N % NPAR == 0) else $error("N must be a multiple of NPAR");
  end

  typedef enum logic [2:0] {S_IDLE, S_LOAD_A, S_LOAD_B, S_COMPUTE, S_DRAIN} state_e;
  typedef struct packed {
    logic          first;
    logic          last;
    logic [IW-1:0] i;
    logic [IW-1:0] j;
  } tag_t;

  state_e state;

  // ---------------- preload -----------------
  logic              pl_start, pl_busy, pl_done;
  logic [ADDR_W-1:0] pl_base;
  logic              pl_we    [NPAR];
  logic [BAW-1:0]    pl_waddr;
  logic [W-1:0]      pl_wdata [NPAR];
  logic              pl_ev;
  logic [31:0]       pl_eidx;
  logic [W-1:0]      pl_evals [VPC];

  matrix_preload #(
    .DATA_W(W), .PORTS(4), .PORT_W(64), .NBANKS(NPAR),
    .NWORDS(N * N / VPC), .ADDR_W(ADDR_W)
  ) u_preload (
    .clk, .rst_n, .start(pl_start), .base(pl_base), .busy(pl_busy), .done(pl_done),
    .ext_rd_en, .ext_rd_addr, .ext_rd_data,
    .bank_we(pl_we), .bank_waddr(pl_waddr), .bank_wdata(pl_wdata),
    .elem_valid(pl_ev), .elem_idx(pl_eidx), .elem_vals(pl_evals)
  );

  // ---------------- banks -------------------
  logic [BAW-1:0] ra_addr, rb_addr;
  logic [W-1:0]   a_q [NPAR];
  logic [W-1:0]   b_q [NPAR];

  for (genvar k = 0; k < int'(NPAR); k++) begin : g_bank
    bank_ram #(.W(W), .DEPTH(DEPTH)) u_a (
      .clk, .we(pl_we[k] && state == S_LOAD_A), .waddr(pl_waddr), .wdata(pl_wdata[k]),
      .raddr(ra_addr), .rdata(a_q[k])
    );
    bank_ram #(.W(W), .DEPTH(DEPTH)) u_b (
      .clk, .we(pl_we[k] && state == S_LOAD_B), .waddr(pl_waddr), .wdata(pl_wdata[k]),
      .raddr(rb_addr), .rdata(b_q[k])
    );
  end

  // ---------------- control -----------------
  logic [IW-1:0] ci, cj;
  logic [CW-1:0] cc;
  logic          iss_v;
  tag_t          iss_tag, q_tag;
  logic          q_v;
  logic [2*IW:0] n_out;

  assign pl_base  = (state == S_IDLE) ? a_base : b_base;
  assign pl_start = (state == S_IDLE && start) || (state == S_LOAD_A && pl_done);
  assign iss_v    = (state == S_COMPUTE);
  assign ra_addr  = BAW'(ci * CH + cc);
  assign rb_addr  = BAW'(cj * CH + cc);
  assign iss_tag  = '{first: (cc == 0), last: (cc == CW'(CH - 1)), i: ci, j: cj};
  assign busy     = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ci <= '0; cj <= '0; cc <= '0;
      q_v <= 1'b0;
      q_tag <= '0;
      done <= 1'b0;
    end else begin
      done  <= 1'b0;
      q_v   <= iss_v;
      q_tag <= iss_tag;
      unique case (state)
        S_IDLE:   if (start) state <= S_LOAD_A;
        S_LOAD_A: if (pl_done) state <= S_LOAD_B;
        S_LOAD_B: if (pl_done) begin
                    state <= S_COMPUTE;
                    ci <= '0; cj <= '0; cc <= '0;
                  end
        S_COMPUTE: begin
          if (cc == CW'(CH - 1)) begin
            cc <= '0;
            if (cj == IW'(N - 1)) begin
              cj <= '0;
              if (ci == IW'(N - 1)) state <= S_DRAIN;
              else ci <= ci + 1'b1;
            end else cj <= cj + 1'b1;
          end else cc <= cc + 1'b1;
        end
        S_DRAIN: if (n_out == (2*IW+1)'(N * N)) begin
                   state <= S_IDLE;
                   done  <= 1'b1;
                 end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- datapath ----------------
  logic [W-1:0] prod [NPAR];
  for (genvar k = 0; k < int'(NPAR); k++) begin : g_mul
    fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul (.a(a_q[k]), .b(b_q[k]), .y(prod[k]));
  end

  logic         ch_v;
  tag_t         ch_tag;
  logic [W-1:0] ch_sum;
  fp_sum_chain #(.N(NPAR), .EXP_W(EXP_W), .MAN_W(MAN_W), .TAG_W($bits(tag_t))) u_chain (
    .clk, .rst_n, .in_valid(q_v), .in_tag(q_tag), .in_vals(prod),
    .out_valid(ch_v), .out_tag(ch_tag), .out_sum(ch_sum)
  );

  // Accumulate the CH chunk sums of one entry
  logic [W-1:0] acc, acc_add, acc_n;
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_acc (.a(acc), .b(ch_sum), .sub(1'b0), .y(acc_add));
  assign acc_n = ch_tag.first ? ch_sum : acc_add;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      c_wr_en   <= 1'b0;
      c_wr_addr <= '0;
      c_wr_data <= '0;
      n_out     <= '0;
    end else begin
      c_wr_en <= 1'b0;
      if (state == S_IDLE && start) n_out <= '0;
      if (ch_v) begin
        acc <= acc_n;
        if (ch_tag.last) begin
          c_wr_en   <= 1'b1;
          c_wr_addr <= {ch_tag.i, ch_tag.j};
          c_wr_data <= acc_n;
          n_out     <= n_out + 1'b1;
        end
      end
    end
  end
endmodule
