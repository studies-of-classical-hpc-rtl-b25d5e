// jacobi_engine: double-precision Jacobi solver for A x = b with A held on chip.
//
// Operation: on start, A (N x N, row-major in the four external RAMs, one
// double per 64-bit word) is copied into NPAR internal banks so that NPAR
// consecutive elements of a row can be read in one clock; the diagonal is
// copied into a separate RAM on the way, and x is cleared to zero. Each sweep
// then walks the rows i = 0..N-1 and, for each row, the N/NPAR chunks c:
// NPAR products A[i][cNPAR+k]*x[cNPAR+k] are formed in parallel, summed by the
// adder chain and accumulated over the chunks into S = sum_j A[i][j] x[j].
// The row update follows the dependency graph of the design:
//     x_new[i] = (b[i] - (S - A[i][i]*x[i])) / A[i][i]
// using copies of the diagonal and of x, with b[i] read from external RAM 0
// at b_base+i. x_new goes to a buffer; once the whole sweep has drained, the
// buffer is written back into the x banks one element per clock (N clocks).
// After the last sweep the same write-back also sends x to external RAM 1
// (x_wr_*, address x_base+i) and done pulses.
// Timing per sweep: N*N/NPAR issue clocks, a pipeline tail (chain NPAR, a few
// post stages and the MAN_W+5 divider), then N write-back clocks. Preload:
// N*N/4 clocks (four doubles per clock over four 64-bit RAMs).
// iterations = 0 is treated as 1. Following the design: the bank layout, the
// NPAR-wide multiply, chained summation, diagonal correction, buffering and
// write-back of x. This design's choices: port layout, addresses, RAM latency.
module jacobi_engine #(
  parameter int unsigned N      = 64,
  parameter int unsigned NPAR   = 8,
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned MAN_W  = 52,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       iterations,
  input  logic [ADDR_W-1:0] a_base,
  input  logic [ADDR_W-1:0] b_base,
  input  logic [ADDR_W-1:0] x_base,
  output logic              busy,
  output logic              done,
  output logic              ext_rd_en,
  output logic [ADDR_W-1:0] ext_rd_addr,
  input  logic [63:0]       ext_rd_data [4],
  output logic              x_wr_en,
  output logic [ADDR_W-1:0] x_wr_addr,
  output logic [63:0]       x_wr_data
);
  localparam int unsigned W     = EXP_W + MAN_W + 1;
  localparam int unsigned CH    = N / NPAR;
  localparam int unsigned DEPTH = N * N / NPAR;
  localparam int unsigned BAW   = $clog2(DEPTH);
  localparam int unsigned IW    = $clog2(N);
  localparam int unsigned CW    = (CH > 1) ? $clog2(CH) : 1;
  localparam int unsigned VPC   = 4;

  initial begin
    assert (W == 64) else $error("the external RAM word holds one double");
    assert (N % NPAR == 0) else $error("N must be a multiple of NPAR");
  end

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_COMPUTE, S_WAIT, S_WB} state_e;
  typedef struct packed {
    logic          first;
    logic          last;
    logic [IW-1:0] i;
    logic [W-1:0]  b;
    logic [W-1:0]  aii;
    logic [W-1:0]  xi;
  } tag_t;

  state_e      state;
  logic [15:0] iter;
  logic        last_sweep;
  assign last_sweep = (iter + 1'b1 >= iterations);

  // ---------------- preload of A and the diagonal ----------------
  logic              pl_start, pl_busy, pl_done, pl_rd_en;
  logic [ADDR_W-1:0] pl_rd_addr;
  logic              pl_we    [NPAR];
  logic [BAW-1:0]    pl_waddr;
  logic [W-1:0]      pl_wdata [NPAR];
  logic              pl_ev;
  logic [31:0]       pl_eidx;
  logic [W-1:0]      pl_evals [VPC];

  matrix_preload #(
    .DATA_W(W), .PORTS(4), .PORT_W(64), .NBANKS(NPAR), .NWORDS(N * N / VPC), .ADDR_W(ADDR_W)
  ) u_preload (
    .clk, .rst_n, .start(pl_start), .base(a_base), .busy(pl_busy), .done(pl_done),
    .ext_rd_en(pl_rd_en), .ext_rd_addr(pl_rd_addr), .ext_rd_data,
    .bank_we(pl_we), .bank_waddr(pl_waddr), .bank_wdata(pl_wdata),
    .elem_valid(pl_ev), .elem_idx(pl_eidx), .elem_vals(pl_evals)
  );

  // Diagonal element among the VPC elements arriving this clock
  logic          dg_we;
  logic [IW-1:0] dg_waddr;
  logic [W-1:0]  dg_wdata;
  always_comb begin
    dg_we = 1'b0; dg_waddr = '0; dg_wdata = '0;
    for (int p = 0; p < int'(VPC); p++) begin
      automatic logic [31:0] e = pl_eidx + 32'(p);
      if (pl_ev && (e / N) == (e % N)) begin
        dg_we    = 1'b1;
        dg_waddr = IW'(e / N);
        dg_wdata = pl_evals[p];
      end
    end
  end

  // ---------------- memories ----------------
  logic [IW-1:0]  ci;
  logic [CW-1:0]  cc;
  logic [W-1:0]   a_q  [NPAR];
  logic [W-1:0]   xb_q [NPAR];
  logic [W-1:0]   aii_q, xi_q, xbuf_q;
  // x write port (clear during preload, write-back after each sweep)
  logic           x_we;
  logic [IW-1:0]  x_widx;
  logic [W-1:0]   x_wdata;
  // result buffer
  logic           rb_we;
  logic [IW-1:0]  rb_waddr, wb_k;
  logic [W-1:0]   rb_wdata;

  for (genvar k = 0; k < int'(NPAR); k++) begin : g_bank
    bank_ram #(.W(W), .DEPTH(DEPTH)) u_a (
      .clk, .we(pl_we[k]), .waddr(pl_waddr), .wdata(pl_wdata[k]),
      .raddr(BAW'(ci * CH + cc)), .rdata(a_q[k])
    );
    bank_ram #(.W(W), .DEPTH(CH)) u_x (
      .clk, .we(x_we && (32'(x_widx) % NPAR) == k), .waddr(CW'(32'(x_widx) / NPAR)), .wdata(x_wdata),
      .raddr(cc), .rdata(xb_q[k])
    );
  end
  bank_ram #(.W(W), .DEPTH(N)) u_diag (
    .clk, .we(dg_we), .waddr(dg_waddr), .wdata(dg_wdata), .raddr(ci), .rdata(aii_q)
  );
  bank_ram #(.W(W), .DEPTH(N)) u_xcopy (
    .clk, .we(x_we), .waddr(x_widx), .wdata(x_wdata), .raddr(ci), .rdata(xi_q)
  );
  bank_ram #(.W(W), .DEPTH(N)) u_xbuf (
    .clk, .we(rb_we), .waddr(rb_waddr), .wdata(rb_wdata), .raddr(wb_k), .rdata(xbuf_q)
  );

  // ---------------- control ----------------
  logic          iss_v, q_v, wb_q, clr_v;
  logic [IW-1:0] wb_kq, clr_k, q_i;
  logic          q_first, q_last;
  logic [IW:0]   n_res;
  logic          wb_act;

  assign busy      = (state != S_IDLE);
  assign pl_start  = (state == S_IDLE) && start;
  assign iss_v     = (state == S_COMPUTE);
  assign ext_rd_en   = (state == S_LOAD) ? pl_rd_en : (iss_v && cc == '0);
  assign ext_rd_addr = (state == S_LOAD) ? pl_rd_addr : (b_base + ADDR_W'(ci));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      iter  <= '0;
      ci <= '0; cc <= '0;
      q_v <= 1'b0; q_first <= 1'b0; q_last <= 1'b0; q_i <= '0;
      wb_k <= '0; wb_q <= 1'b0; wb_kq <= '0; wb_act <= 1'b0;
      clr_k <= '0; clr_v <= 1'b0;
      done <= 1'b0;
    end else begin
      done    <= 1'b0;
      q_v     <= iss_v;
      q_first <= (cc == '0);
      q_last  <= (cc == CW'(CH - 1));
      q_i     <= ci;
      wb_q    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          iter  <= '0;
          clr_k <= '0;
          clr_v <= 1'b1;
        end
        S_LOAD: begin
          if (clr_v) begin
            clr_k <= clr_k + 1'b1;
            if (clr_k == IW'(N - 1)) clr_v <= 1'b0;
          end
          if (pl_done) begin
            state <= S_COMPUTE;
            ci <= '0; cc <= '0;
          end
        end
        S_COMPUTE: begin
          if (cc == CW'(CH - 1)) begin
            cc <= '0;
            if (ci == IW'(N - 1)) begin
              ci    <= '0;
              state <= S_WAIT;
            end else ci <= ci + 1'b1;
          end else cc <= cc + 1'b1;
        end
        S_WAIT: if (n_res == (IW+1)'(N)) begin
          state  <= S_WB;
          wb_k   <= '0;
          wb_act <= 1'b1;
        end
        S_WB: begin
          if (wb_act) begin
            wb_q  <= 1'b1;
            wb_kq <= wb_k;
            if (wb_k == IW'(N - 1)) wb_act <= 1'b0;
            else wb_k <= wb_k + 1'b1;
          end else if (wb_q) begin
            // the last buffered element is written in this clock
            if (last_sweep) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_COMPUTE;
              iter  <= iter + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    if (state == S_LOAD) begin
      x_we = clr_v; x_widx = clr_k; x_wdata = '0;
    end else begin
      x_we = wb_q; x_widx = wb_kq; x_wdata = xbuf_q;
    end
  end

  // final x leaves during the write-back of the last sweep
  assign x_wr_en   = (state == S_WB) && wb_q && last_sweep;
  assign x_wr_addr = x_base + ADDR_W'(wb_kq);
  assign x_wr_data = xbuf_q;

  // ---------------- datapath ----------------
  logic [W-1:0] prod [NPAR];
  for (genvar k = 0; k < int'(NPAR); k++) begin : g_mul
    fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_mul (.a(a_q[k]), .b(xb_q[k]), .y(prod[k]));
  end

  tag_t q_tag, ch_tag, side;
  logic ch_v;
  logic [W-1:0] ch_sum;
  assign q_tag = '{first: q_first, last: q_last, i: q_i, b: ext_rd_data[0], aii: aii_q, xi: xi_q};

  fp_sum_chain #(.N(NPAR), .EXP_W(EXP_W), .MAN_W(MAN_W), .TAG_W($bits(tag_t))) u_chain (
    .clk, .rst_n, .in_valid(q_v), .in_tag(q_tag), .in_vals(prod),
    .out_valid(ch_v), .out_tag(ch_tag), .out_sum(ch_sum)
  );

  // accumulate chunk sums; the side values (b, A[i][i], x[i]) come with chunk 0
  logic [W-1:0] acc, acc_add, acc_n;
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_acc (.a(acc), .b(ch_sum), .sub(1'b0), .y(acc_add));
  assign acc_n = ch_tag.first ? ch_sum : acc_add;

  // post stages
  logic          p1_v, p2_v, p3_v;
  logic [IW-1:0] p1_i, p2_i, p3_i;
  logic [W-1:0]  p1_s, p1_b, p1_aii, p1_xi, p2_s, p2_b, p2_aii, p3_n, p3_aii;
  logic [W-1:0]  t_diag, t_off, t_num;
  tag_t          side_n;
  assign side_n = ch_tag.first ? ch_tag : side;

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_dmul (.a(p1_aii), .b(p1_xi), .y(t_diag));
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_off  (.a(p1_s), .b(t_diag), .sub(1'b1), .y(t_off));
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_num  (.a(p2_b), .b(p2_s), .sub(1'b1), .y(t_num));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; side <= '0;
      p1_v <= 1'b0; p2_v <= 1'b0; p3_v <= 1'b0;
      p1_i <= '0; p2_i <= '0; p3_i <= '0;
      p1_s <= '0; p1_b <= '0; p1_aii <= '0; p1_xi <= '0;
      p2_s <= '0; p2_b <= '0; p2_aii <= '0; p3_n <= '0; p3_aii <= '0;
    end else begin
      if (ch_v) begin
        acc  <= acc_n;
        side <= side_n;
      end
      // P1: full row sum with its side values
      p1_v   <= ch_v && ch_tag.last;
      p1_i   <= ch_tag.i;
      p1_s   <= acc_n;
      p1_b   <= side_n.b;
      p1_aii <= side_n.aii;
      p1_xi  <= side_n.xi;
      // P2: remove the diagonal term
      p2_v   <= p1_v;  p2_i <= p1_i;
      p2_s   <= t_off; p2_b <= p1_b; p2_aii <= p1_aii;
      // P3: b[i] - off-diagonal sum
      p3_v   <= p2_v;  p3_i <= p2_i;
      p3_n   <= t_num; p3_aii <= p2_aii;
    end
  end

  fp_div #(.EXP_W(EXP_W), .MAN_W(MAN_W), .TAG_W(IW)) u_div (
    .clk, .rst_n, .in_valid(p3_v), .in_tag(p3_i), .a(p3_n), .b(p3_aii),
    .out_valid(rb_we), .out_tag(rb_waddr), .y(rb_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_res <= '0;
    else if (state == S_WB) n_res <= '0;
    else if (rb_we) n_res <= n_res + 1'b1;
  end
endmodule
