// haar_dwt2: two-level 2-D integer Haar wavelet transform of an 8-bit image.
//
// The image (IMG_W x IMG_H pixels, row-major, 16 pixels per 128-bit word,
// WPR = IMG_W/16 words per row) is read from the source RAM one word per clock.
// It is walked in blocks of 4 rows x 4 words (64 pixels); each block is split
// into four 2x2-word chunks (raster order), and a chunk is read upper-left,
// upper-right, lower-left, lower-right word. When the fourth word of a chunk
// arrives, haar_chunk produces one 128-bit word of each level-1 band. HL, LH
// and HH go straight to the target RAM over the next three clocks (one write
// port). The four LL words of a block form a 2x2 chunk of the LL image, so
// after the block's last chunk they are transformed again; the four level-2
// words (LLLL, LLHL, LLLH, LLHH) go to an internal buffer RAM of
// IMG_W*IMG_H/64 words. When the image has been read, that buffer is copied
// to the top-left quarter of the target, one word per clock.
// Target layout (WPR words per row, IMG_H rows): LL quarter top-left holding
// LLLL | LLHL over LLLH | LLHH, HL top-right, LH bottom-left, HH bottom-right.
// Timing: IMG_W*IMG_H/16 read clocks + a few pipeline clocks +
// IMG_W*IMG_H/64 copy clocks; done pulses at the end.
// Following the design: 16 pixels per clock from one RAM, the 4x4-word reading
// blocks, direct write of the level-1 detail bands, buffering and final copy of
// the level-2 bands. This design's choices: order inside a block, pixel packing,
// address layout and one-clock RAM latency.
module haar_dwt2 #(
  parameter int unsigned IMG_W  = 1024,
  parameter int unsigned IMG_H  = 768,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [127:0]      rd_data,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [127:0]      wr_data
);
  localparam int unsigned WPR    = IMG_W / 16;       // words per image row
  localparam int unsigned BR     = IMG_H / 4;        // block rows
  localparam int unsigned BC     = WPR / 4;          // block columns
  localparam int unsigned HW     = WPR / 2;          // words per row of a level-1 band
  localparam int unsigned BUF_D  = (IMG_H / 2) * HW; // level-2 buffer words
  localparam int unsigned BUF_AW = $clog2(BUF_D);
  localparam int unsigned RW     = (BR > 1) ? $clog2(BR) : 1;
  localparam int unsigned CW     = (BC > 1) ? $clog2(BC) : 1;

  initial begin
    assert (IMG_W % 64 == 0 && IMG_H % 4 == 0) else $error("image must be a multiple of 64x4");
    assert (IMG_W * IMG_H / 16 <= (1 << ADDR_W)) else $error("ADDR_W too small");
  end

  typedef enum logic [2:0] {S_IDLE, S_READ, S_FLUSH, S_COPY, S_END} state_e;
  state_e state;

  // ---------------- read sequencing ----------------
  logic [RW-1:0] br;
  logic [CW-1:0] bc;
  logic [3:0]    sub;          // {l, k, j, i}: chunk row, chunk col, word row, word col
  logic          q_v;
  logic [RW-1:0] q_br;
  logic [CW-1:0] q_bc;
  logic [3:0]    q_sub;

  assign rd_en   = (state == S_READ);
  assign rd_addr = ADDR_W'((4 * br + 2 * sub[3] + sub[1]) * WPR + 4 * bc + 2 * sub[2] + sub[0]);
  assign busy    = (state != S_IDLE);

  // ---------------- level 1 ----------------
  logic [127:0] wb00, wb01, wb10;
  logic [127:0] c_ll, c_hl, c_lh, c_hh;
  haar_chunk u_l1 (.w00(wb00), .w01(wb01), .w10(wb10), .w11(rd_data),
                   .ll(c_ll), .hl(c_hl), .lh(c_lh), .hh(c_hh));

  logic [127:0]      d_hl, d_lh, d_hh;
  logic [1:0]        d_cnt;                 // detail words still to write
  logic [ADDR_W-1:0] d_row, d_col;          // level-1 band coordinates
  logic [127:0]      llb [4];               // LL words of the current block
  logic              l2_go;
  logic [RW-1:0]     l2_br;
  logic [CW-1:0]     l2_bc;

  // ---------------- level 2 ----------------
  logic [127:0] e_ll, e_hl, e_lh, e_hh;
  haar_chunk u_l2 (.w00(llb[0]), .w01(llb[1]), .w10(llb[2]), .w11(llb[3]),
                   .ll(e_ll), .hl(e_hl), .lh(e_lh), .hh(e_hh));

  logic [127:0]      f_w [4];
  logic [2:0]        f_cnt;
  logic [RW-1:0]     f_br;
  logic [CW-1:0]     f_bc;
  logic              bf_we;
  logic [BUF_AW-1:0] bf_waddr, bf_raddr;
  logic [127:0]      bf_wdata, bf_q;

  always_comb begin
    logic [1:0] n;
    n        = 2'(3'd4 - f_cnt);
    bf_we    = (f_cnt != 0);
    bf_wdata = f_w[n];
    unique case (n)
      2'd0: bf_waddr = BUF_AW'(f_br * HW + f_bc);                  // LLLL
      2'd1: bf_waddr = BUF_AW'(f_br * HW + BC + f_bc);             // LLHL
      2'd2: bf_waddr = BUF_AW'((BR + f_br) * HW + f_bc);           // LLLH
      default: bf_waddr = BUF_AW'((BR + f_br) * HW + BC + f_bc);   // LLHH
    endcase
  end

  bank_ram #(.W(128), .DEPTH(BUF_D)) u_buf (
    .clk, .we(bf_we), .waddr(bf_waddr), .wdata(bf_wdata), .raddr(bf_raddr), .rdata(bf_q)
  );

  // ---------------- copy ----------------
  logic [BUF_AW:0]   cp_k;
  logic              cp_q;
  logic [BUF_AW-1:0] cp_kq;
  logic [3:0]        fl_cnt;
  assign bf_raddr = cp_k[BUF_AW-1:0];

  // ---------------- write port ----------------
  always_comb begin
    wr_en = 1'b0; wr_addr = '0; wr_data = '0;
    if (state == S_COPY || state == S_END) begin
      wr_en   = cp_q;
      wr_addr = ADDR_W'((32'(cp_kq) / HW) * WPR + (32'(cp_kq) % HW));
      wr_data = bf_q;
    end else if (d_cnt != 0) begin
      wr_en = 1'b1;
      unique case (d_cnt)
        2'd3: begin wr_addr = ADDR_W'(d_row * WPR + HW + d_col);                 wr_data = d_hl; end
        2'd2: begin wr_addr = ADDR_W'((IMG_H / 2 + d_row) * WPR + d_col);        wr_data = d_lh; end
        default: begin wr_addr = ADDR_W'((IMG_H / 2 + d_row) * WPR + HW + d_col); wr_data = d_hh; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      br <= '0; bc <= '0; sub <= '0;
      q_v <= 1'b0; q_br <= '0; q_bc <= '0; q_sub <= '0;
      wb00 <= '0; wb01 <= '0; wb10 <= '0;
      d_hl <= '0; d_lh <= '0; d_hh <= '0; d_cnt <= '0; d_row <= '0; d_col <= '0;
      for (int n = 0; n < 4; n++) begin llb[n] <= '0; f_w[n] <= '0; end
      l2_go <= 1'b0; l2_br <= '0; l2_bc <= '0;
      f_cnt <= '0; f_br <= '0; f_bc <= '0;
      cp_k <= '0; cp_q <= 1'b0; cp_kq <= '0; fl_cnt <= '0;
      done <= 1'b0;
    end else begin
      done  <= 1'b0;
      q_v   <= rd_en;
      q_br  <= br;
      q_bc  <= bc;
      q_sub <= sub;
      l2_go <= 1'b0;
      cp_q  <= 1'b0;
      if (d_cnt != 0 && state != S_COPY) d_cnt <= d_cnt - 1'b1;
      if (f_cnt != 0) f_cnt <= f_cnt - 1'b1;

      // returned words
      if (q_v) begin
        unique case (q_sub[1:0])
          2'd0: wb00 <= rd_data;
          2'd1: wb01 <= rd_data;
          2'd2: wb10 <= rd_data;
          default: begin
            d_hl  <= c_hl;
            d_lh  <= c_lh;
            d_hh  <= c_hh;
            d_cnt <= 2'd3;
            d_row <= ADDR_W'(2 * q_br + q_sub[3]);
            d_col <= ADDR_W'(2 * q_bc + q_sub[2]);
            llb[q_sub[3:2]] <= c_ll;
            if (q_sub[3:2] == 2'd3) begin
              l2_go <= 1'b1;
              l2_br <= q_br;
              l2_bc <= q_bc;
            end
          end
        endcase
      end
      if (l2_go) begin
        f_w[0] <= e_ll;
        f_w[1] <= e_hl;
        f_w[2] <= e_lh;
        f_w[3] <= e_hh;
        f_cnt  <= 3'd4;
        f_br   <= l2_br;
        f_bc   <= l2_bc;
      end

      unique case (state)
        S_IDLE: if (start) begin
          state <= S_READ;
          br <= '0; bc <= '0; sub <= '0;
        end
        S_READ: begin
          sub <= sub + 1'b1;
          if (sub == 4'hF) begin
            if (bc == CW'(BC - 1)) begin
              bc <= '0;
              if (br == RW'(BR - 1)) begin
                state  <= S_FLUSH;
                fl_cnt <= '0;
              end else br <= br + 1'b1;
            end else bc <= bc + 1'b1;
          end
        end
        S_FLUSH: begin
          // let the last chunk, its detail writes and the level-2 words settle
          fl_cnt <= fl_cnt + 1'b1;
          if (fl_cnt == 4'd9) begin
            state <= S_COPY;
            cp_k  <= '0;
          end
        end
        S_COPY: begin
          cp_q  <= 1'b1;
          cp_kq <= cp_k[BUF_AW-1:0];
          cp_k  <= cp_k + 1'b1;
          if (cp_k == (BUF_AW+1)'(BUF_D - 1)) state <= S_END;
        end
        S_END: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
