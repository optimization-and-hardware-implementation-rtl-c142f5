// image_embedder: still-image watermark embedder, y = x + alpha * M_NVF .* w.
//
// The cover image x (IMG_M rows by IMG_N columns, 8-bit grey) and the watermark w (10.10) sit in
// one single-port SRAM; the embedder writes the masked watermark u there and finally overwrites
// u with the watermarked image y (10.10). Word layout: x at 0..MN-1 (low 8 bits), w at MN..2MN-1,
// u and then y at 2MN..3MN-1; the SRAM answers a read in the next cycle.
// Only one computation block works at a time, so the blocks share one divider and (in the serial
// variant) one multiplier. A start pulse runs two passes:
//  1. Pixels are visited column by column (the order in which the ||u||^2 sum is defined). For
//     each one, mu and sigma^2/256 are computed from the 3x3 neighbourhood (PARALLEL=1: nine
//     multipliers, 6 cycles including the w read; PARALLEL=0: one multiplier, 19 cycles), the
//     mask division is issued in the cycle the variance is ready, u = M * w is formed as the
//     mask arrives, u is written back and handed to the strength block, and the controller
//     waits while that block uses the divider. The neighbourhood is read by a small read
//     engine: all nine pixels at the top of a column, only the three new ones further down
//     (six are shifted), pixels outside the image as zero. Because the memory is idle during
//     the mask division, the engine reads the next pixel's neighbours then, so that in the
//     middle of a column no cycle is spent on reading. About 17.2 cycles per pixel (parallel)
//     and 30.2 (serial) at 1280x720.
//  2. After alpha is known, x and u of every pixel are read again and y is written over u,
//     three memory cycles per pixel: read x(p), read u(p), write y(p-1).
// done pulses at the end; alpha stays readable. evt_chunk pulses for every accumulated chunk.
// The blocks, their sharing, the memory contents and the visiting order follow the document;
// the memory layout, the cycle schedule, the reuse of six neighbours when moving down a column
// and the overlap of neighbour reads with the mask division are this design's choices.
module image_embedder
  import wm_pkg::*;
#(
  parameter int unsigned IMG_M       = 720,
  parameter int unsigned IMG_N       = 1280,
  parameter bit          PARALLEL    = 1'b1,
  parameter int unsigned DIV_STAGES  = 6,
  parameter int unsigned SQRT_STAGES = 2,
  localparam int unsigned MN = IMG_M * IMG_N,
  localparam int unsigned AW = $clog2(3 * MN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [3:0]    psnr_sel,
  output logic          busy,
  output logic          done,
  output fx_t           alpha,
  output logic          evt_chunk,
  // SRAM port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [19:0]   mem_wdata,
  input  logic [19:0]   mem_rdata
);
  localparam logic [AW-1:0] W_BASE = AW'(MN);
  localparam logic [AW-1:0] U_BASE = AW'(2 * MN);
  localparam int unsigned IW = $clog2(IMG_M + 1);
  localparam int unsigned JW = $clog2(IMG_N + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_READ, S_STATS, S_MASK, S_U, S_ALPHA, S_FINAL,
    S_Y_RX, S_Y_RU, S_Y_WR, S_Y_DRAIN, S_Y_LAST, S_DONE
  } state_e;
  state_e state;

  logic [IW-1:0]  i;          // row of the current pixel
  logic [JW-1:0]  j;          // column of the current pixel
  logic [AW-1:0]  p;          // raster address i*N + j
  logic [IW-1:0]  ri;         // row of the pixel whose neighbourhood is being read
  logic [JW-1:0]  rj;         // its column
  logic [AW-1:0]  rp;         // its raster address
  logic           rd_v_q;     // a neighbour read was issued in the previous cycle
  logic           rd_go;      // a neighbour read is issued in this cycle
  logic [AW-1:0]  pw;         // address of the y value waiting to be written
  logic           y_have;     // a y value is waiting to be written
  logic [3:0]     rcnt;       // read step counter
  logic [3:0]     rfirst;     // first neighbour index read this pixel (0 or 6)
  logic           rd_ok_q;    // previous read was inside the image
  logic [3:0]     rd_k_q;     // neighbour index of the previous read
  logic [3:0]     scnt;       // stats / wait counter
  logic           w_got;
  fx_t            w_reg;
  fx_t            nbhd [9];

  // ---------------------------------------------------------------- neighbourhood addressing
  logic [3:0] k_cur;
  logic [1:0] na, nb;
  logic signed [IW+1:0] ni;
  logic signed [JW+1:0] nj;
  logic       n_ok;
  logic [AW-1:0] n_addr;
  assign k_cur = rfirst + rcnt;
  always_comb begin
    // row / column of neighbour k_cur inside the 3x3 window (k = 3*row + col)
    case (k_cur)
      4'd0: begin na = 2'd0; nb = 2'd0; end
      4'd1: begin na = 2'd0; nb = 2'd1; end
      4'd2: begin na = 2'd0; nb = 2'd2; end
      4'd3: begin na = 2'd1; nb = 2'd0; end
      4'd4: begin na = 2'd1; nb = 2'd1; end
      4'd5: begin na = 2'd1; nb = 2'd2; end
      4'd6: begin na = 2'd2; nb = 2'd0; end
      4'd7: begin na = 2'd2; nb = 2'd1; end
      default: begin na = 2'd2; nb = 2'd2; end
    endcase
    ni = $signed({2'b00, ri}) + $signed({{IW{1'b0}}, na}) - 1;
    nj = $signed({2'b00, rj}) + $signed({{JW{1'b0}}, nb}) - 1;
    n_ok = (ni >= 0) && (ni < IMG_M) && (nj >= 0) && (nj < IMG_N);
    n_addr = AW'(rp + AW'(IMG_N) * AW'(na) + AW'(nb) - AW'(IMG_N) - AW'(1));
  end
  // Neighbour reads run in S_READ and, for the next pixel, while the mask division is under way
  // (the memory is idle then and the current neighbourhood is no longer needed).
  assign rd_go = (state == S_READ || state == S_MASK) && (rcnt < 4'(9) - rfirst);

  // ---------------------------------------------------------------- mu and sigma^2/256
  fx_t  mu, var_256;
  logic stats_done;
  logic ld_mu_prod, ld_mu, ld_diff, ld_var_prod, ld_var;
  if (PARALLEL) begin : g_par
    mu_var_par u_stats (
      .clk(clk), .nbhd(nbhd), .ld_mu_prod(ld_mu_prod), .ld_mu(ld_mu), .ld_diff(ld_diff),
      .ld_var_prod(ld_var_prod), .ld_var(ld_var), .mu(mu), .var_256(var_256));
    assign stats_done = (state == S_STATS) && (scnt == 4'd5);
  end else begin : g_ser
    logic ser_busy;
    mu_var_ser u_stats (
      .clk(clk), .rst_n(rst_n), .start(ld_mu_prod), .nbhd(nbhd), .mu(mu), .var_256(var_256),
      .busy(ser_busy), .done(stats_done));
  end
  always_comb begin
    ld_mu_prod  = (state == S_STATS) && (scnt == 4'd0);
    ld_mu       = (state == S_STATS) && (scnt == 4'd1);
    ld_diff     = (state == S_STATS) && (scnt == 4'd2);
    ld_var_prod = (state == S_STATS) && (scnt == 4'd3);
    ld_var      = (state == S_STATS) && (scnt == 4'd4);
  end

  // ---------------------------------------------------------------- shared divider
  logic        mask_req, alpha_req, dv_valid;
  logic [29:0] mask_dd, alpha_dd, dv_dd;
  logic [19:0] mask_ds, alpha_ds, dv_ds;
  logic        dv_tag_in, res_valid, res_tag;
  logic [29:0] res_quot;
  logic [19:0] res_q;
  logic        mask_tag_unused;

  always_comb begin
    if (alpha_req) begin
      dv_valid = 1'b1; dv_dd = alpha_dd; dv_ds = alpha_ds; dv_tag_in = DIV_ALPHA;
    end else begin
      dv_valid = mask_req; dv_dd = mask_dd; dv_ds = mask_ds; dv_tag_in = DIV_MASK;
    end
  end

  pipe_div #(.STAGES(DIV_STAGES), .TAG_W(1)) u_div (
    .clk(clk), .rst_n(rst_n), .in_valid(dv_valid), .dividend(dv_dd), .divisor(dv_ds),
    .in_tag(dv_tag_in), .out_valid(res_valid), .quotient(res_quot), .q20(res_q), .out_tag(res_tag));

  // ---------------------------------------------------------------- M_NVF
  logic m_valid, head_valid;
  fx_t  m_out;
  logic head_tag_unused, m_tag_unused;
  mnvf_block #(.CAP_LEN(1), .TAG_W(1)) u_mask (
    .clk(clk), .rst_n(rst_n),
    .var_256(var_256), .var_valid(stats_done), .var_tag(1'b0),
    .div_req(mask_req), .div_dividend(mask_dd), .div_divisor(mask_ds), .div_tag(mask_tag_unused),
    .res_valid(res_valid && res_tag == DIV_MASK), .res_q(res_q), .res_tag(1'b0),
    .pop(1'b1), .head_valid(head_valid), .head_tag(head_tag_unused),
    .m_valid(m_valid), .m_out(m_out), .m_tag(m_tag_unused));

  // ---------------------------------------------------------------- u
  logic u_valid, u_tag_unused;
  fx_t  u_val;
  u_block #(.TAG_W(1)) u_ublk (
    .clk(clk), .rst_n(rst_n), .in_valid(state == S_MASK && m_valid), .m_nvf(m_out), .w(w_reg),
    .in_tag(1'b0), .u_valid(u_valid), .u(u_val), .u_tag(u_tag_unused));

  // ---------------------------------------------------------------- alpha
  logic a_busy, a_valid, a_take;
  logic last_pix;
  assign last_pix = (i == IW'(IMG_M - 1)) && (j == JW'(IMG_N - 1));
  alpha_block #(.IMG_M(IMG_M), .IMG_N(IMG_N), .SQRT_STAGES(SQRT_STAGES)) u_alpha (
    .clk(clk), .rst_n(rst_n), .psnr_sel(psnr_sel), .u_valid(u_valid), .u(u_val), .u_last(last_pix),
    .busy(a_busy), .take(a_take), .div_req(alpha_req), .div_dividend(alpha_dd), .div_divisor(alpha_ds),
    .div_res_valid(res_valid && res_tag == DIV_ALPHA), .div_res_q(res_q),
    .alpha_valid(a_valid), .alpha(alpha), .chunk_done(evt_chunk));

  // ---------------------------------------------------------------- y
  logic y_valid, y_x_full;
  fx_t  y_val;
  logic [0:0] y_x_count;
  y_block #(.X_DEPTH(1)) u_y (
    .clk(clk), .rst_n(rst_n), .alpha(alpha),
    .x_push(state == S_Y_RU), .x_in(mem_rdata[7:0]),
    .u_valid(state == S_Y_WR), .u(fx_t'(mem_rdata)),
    .x_count(y_x_count), .x_full(y_x_full), .y_valid(y_valid), .y(y_val));

  // ---------------------------------------------------------------- memory port
  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    case (state)
      S_READ, S_MASK: if (rd_go && n_ok) begin
        mem_en = 1'b1; mem_addr = n_addr;
      end
      S_STATS: if (!w_got) begin
        mem_en = 1'b1; mem_addr = W_BASE + p;
      end
      S_U: if (u_valid) begin
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = U_BASE + p; mem_wdata = u_val;
      end
      S_Y_RX: begin mem_en = 1'b1; mem_addr = p; end
      S_Y_RU: begin mem_en = 1'b1; mem_addr = U_BASE + p; end
      S_Y_WR: if (y_have) begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = U_BASE + pw; mem_wdata = y_val; end
      S_Y_LAST: begin mem_en = 1'b1; mem_we = 1'b1; mem_addr = U_BASE + pw; mem_wdata = y_val; end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  // ---------------------------------------------------------------- control logic
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      i       <= '0;
      j       <= '0;
      p       <= '0;
      ri      <= '0;
      rj      <= '0;
      rp      <= '0;
      rd_v_q  <= 1'b0;
      pw      <= '0;
      y_have  <= 1'b0;
      rcnt    <= '0;
      rfirst  <= '0;
      rd_ok_q <= 1'b0;
      rd_k_q  <= '0;
      scnt    <= '0;
      w_got   <= 1'b0;
      w_reg   <= '0;
      done    <= 1'b0;
      for (int k = 0; k < 9; k++) nbhd[k] <= '0;
    end else begin
      done <= 1'b0;
      // neighbour read engine: issue read k_cur, store the word read in the previous cycle
      rd_v_q <= rd_go;
      if (rd_go) begin
        rd_ok_q <= n_ok;
        rd_k_q  <= k_cur;
        rcnt    <= rcnt + 1'b1;
      end
      if (rd_v_q) nbhd[rd_k_q] <= rd_ok_q ? fx_from_pix(mem_rdata[7:0]) : '0;
      case (state)
        S_IDLE: if (start) begin
          i <= '0; j <= '0; p <= '0;
          ri <= '0; rj <= '0; rp <= '0;
          rcnt <= '0; rfirst <= '0;
          state <= S_READ;
        end
        S_READ: if (!rd_go) begin
          // all reads issued; the last word is stored at this clock edge
          state <= S_STATS;
          scnt  <= '0;
          w_got <= 1'b0;
        end
        S_STATS: begin
          if (!w_got) w_got <= 1'b1;
          if (scnt == 4'd1) w_reg <= fx_t'(mem_rdata);
          if (scnt != 4'd15) scnt <= scnt + 1'b1;
          if (stats_done) begin
            state <= S_MASK;
            scnt  <= '0;
            // the neighbourhood registers are free now: start reading the next pixel's
            if (!last_pix) begin
              rcnt <= '0;
              if (ri == IW'(IMG_M - 1)) begin
                ri <= '0;
                rj <= rj + 1'b1;
                rp <= AW'(rj) + AW'(1);
                rfirst <= '0;
              end else begin
                ri <= ri + 1'b1;
                rp <= rp + AW'(IMG_N);
                rfirst <= 4'd6;
                for (int k = 0; k < 6; k++) nbhd[k] <= nbhd[k+3];
              end
            end
          end
        end
        S_MASK: if (m_valid) state <= S_U;   // u = M * w is formed at this edge
        // u is written and handed to the strength block; unless that block now needs the
        // divider, the next pixel starts right away
        S_U, S_ALPHA: if ((state == S_U) ? (u_valid && !a_take) : !a_busy) begin
          if (last_pix) begin
            state <= S_FINAL;
          end else begin
            // next pixel, column by column; its neighbourhood is already being read
            i <= ri;
            j <= rj;
            p <= rp;
            if (rcnt == 4'(9) - rfirst) begin
              state <= S_STATS;
              scnt  <= '0;
              w_got <= 1'b0;
            end else begin
              state <= S_READ;
            end
          end
        end else if (state == S_U && u_valid) begin
          state <= S_ALPHA;
        end
        S_FINAL: if (a_valid || !a_busy) begin
          p      <= '0;
          y_have <= 1'b0;
          state  <= S_Y_RX;
        end
        // output pass, three cycles per pixel: read x(p), read u(p), write y(p-1)
        S_Y_RX:  state <= S_Y_RU;
        S_Y_RU:  state <= S_Y_WR;
        S_Y_WR: begin
          pw     <= p;
          y_have <= 1'b1;
          if (p == AW'(MN - 1)) begin
            state <= S_Y_DRAIN;
          end else begin
            p     <= p + 1'b1;
            state <= S_Y_RX;
          end
        end
        S_Y_DRAIN: state <= S_Y_LAST;
        S_Y_LAST:  state <= S_DONE;
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The two users of the divider never ask in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(mask_req && alpha_req));
endmodule
