// video_embedder: pipelined video watermark embedder, one pixel every three clock cycles.
//
// Pixels of a raw frame (IMG_M rows of IMG_N 8-bit pixels, raster order) stream in through
// pix_valid / pix_ready and run through two line buffers that present the 3x3 neighbourhood of
// each pixel. The pipeline then computes mu (2 stages) and sigma^2/256 (3 stages) on one shared
// set of nine multipliers and eight adders, the mask M_NVF on the pipelined divider, u = M * w
// and the running u^2 sum of the strength block. Everything moves in slots of three cycles
// (phase 0, 1, 2), because the multiply-add structure serves mu and sigma^2 in different phases
// and because each pixel needs five memory accesses on two single-port SRAMs:
//   phase 0: SRAM1 writes the incoming x           SRAM2 reads an old u for the output pass
//   phase 1: SRAM1 reads an old x for the output    SRAM2 writes the new u
//   phase 2: SRAM2 reads w for the next mask value
// SRAM1 holds x (addresses 0..MN-1); SRAM2 holds w (0..MN-1) and u (MN..2MN-1).
// When the u^2 sum reaches its threshold the strength block needs the divider: the whole slot
// machine stalls (stall high, pix_ready low) while mask divisions already inside the divider
// drain into the capture register of the mask block; afterwards they are used first. At the end
// of a frame the strength block finishes alpha (another stall). Then the output pass reads x and
// u of every pixel of that frame again, one per slot, and streams y = x + alpha * u out on
// y_valid / y_out (y_last on the last pixel), while the next frame enters. A pixel of the next
// frame is only accepted once the output pass has read the old x and u at its address, so the
// two frames can share the memories.
// Following the document: the line buffers, the shared multiply-add structure, the three-cycle
// pixel period, the two SRAMs and the pairing of their accesses, the stall for strength
// divisions with a capture register, the x buffer of seven entries and the a_u register.
// This design's choices: the phase assignment of each step, the ready/valid input, the address
// check that lets the next frame overwrite the memories, and a short gap at each frame boundary
// while the last pixels drain and alpha is computed.
module video_embedder
  import wm_pkg::*;
#(
  parameter int unsigned IMG_M       = 720,
  parameter int unsigned IMG_N       = 1280,
  parameter int unsigned DIV_STAGES  = 6,
  parameter int unsigned SQRT_STAGES = 1,
  parameter int unsigned X_DEPTH     = 7,
  localparam int unsigned MN  = IMG_M * IMG_N,
  localparam int unsigned AW  = $clog2(MN),
  localparam int unsigned AW2 = $clog2(2 * MN)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [3:0]     psnr_sel,
  // pixel stream in
  input  logic           pix_valid,
  input  pix_t           pix_in,
  output logic           pix_ready,
  // watermarked pixel stream out
  output logic           y_valid,
  output fx_t            y_out,
  output logic           y_last,
  output fx_t            alpha,
  output logic           stall,
  // events, one-cycle pulses, for observation
  output logic           evt_chunk,     // a u^2 chunk went through the divider
  output logic           evt_capture,   // a mask result left the divider during a stall
  output logic           evt_wait_out,  // the next frame waited for the output pass
  // SRAM1: x
  output logic           s1_en,
  output logic           s1_we,
  output logic [AW-1:0]  s1_addr,
  output pix_t           s1_wdata,
  input  pix_t           s1_rdata,
  // SRAM2: w and u
  output logic           s2_en,
  output logic           s2_we,
  output logic [AW2-1:0] s2_addr,
  output logic [19:0]    s2_wdata,
  input  logic [19:0]    s2_rdata
);
  localparam int unsigned CAP_LEN = (DIV_STAGES > 1) ? DIV_STAGES - 1 : 1;

  // ---------------------------------------------------------------- slot phase
  logic [1:0] ph;
  logic       run;
  logic       a_busy, a_take;   // a_take: the image embedder's early hint, not needed here
  assign stall = a_busy;
  assign run   = !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   ph <= 2'd0;
    else if (run) ph <= (ph == 2'd2) ? 2'd0 : ph + 2'd1;
  end

  logic p0, p1, p2;
  assign p0 = run && (ph == 2'd0);
  assign p1 = run && (ph == 2'd1);
  assign p2 = run && (ph == 2'd2);

  // ---------------------------------------------------------------- output pass bookkeeping
  logic          y_active, y_pend, y_ok, alpha_pend;
  logic [AW:0]   xr, ur, yc;        // x reads, u reads, y results of the output pass
  fx_t           alpha_new, alpha_out;

  // ---------------------------------------------------------------- line buffers and window
  logic          need_pix, w_adv, gate_ok;
  logic [AW-1:0] pix_addr;
  logic          c_valid, c_last;
  logic [AW-1:0] c_addr;
  fx_t           nbhd [9];

  // y_pend: the memories still hold a frame whose output pass has not read them all;
  // y_ok: that frame's output pass has started, so its read counters are meaningful.
  assign gate_ok   = !y_pend || (y_ok && (ur > (AW+1)'(pix_addr)) && (xr > (AW+1)'(pix_addr)));
  assign pix_ready = p0 && need_pix && gate_ok;
  assign w_adv     = p0 && (!need_pix || (pix_valid && gate_ok));

  window_3x3 #(.IMG_M(IMG_M), .IMG_N(IMG_N)) u_win (
    .clk(clk), .rst_n(rst_n), .adv(w_adv), .pix_in(pix_in), .need_pix(need_pix),
    .pix_addr(pix_addr), .center_valid(c_valid), .center_addr(c_addr), .center_last(c_last),
    .nbhd(nbhd));

  // ---------------------------------------------------------------- mu and sigma^2/256
  typedef struct packed {
    logic          v;
    logic          last;
    logic [AW-1:0] addr;
  } tag_t;
  tag_t t_mu, t_diff, t_var;

  fx_t mu, var_256;
  mu_var_par u_stats (
    .clk(clk), .nbhd(nbhd),
    .ld_mu_prod(p1), .ld_mu(p2), .ld_diff(p0), .ld_var_prod(p2), .ld_var(p0),
    .mu(mu), .var_256(var_256));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_mu <= '0; t_diff <= '0; t_var <= '0;
    end else begin
      if (p1) t_mu <= '{v: c_valid, last: c_last, addr: c_addr};
      if (p0) begin
        t_var  <= t_diff;
        t_diff <= t_mu;
      end
    end
  end

  // ---------------------------------------------------------------- shared divider
  localparam int unsigned TW = AW + 1;   // {last, addr}
  logic          mask_req, alpha_req, dv_valid, res_valid;
  logic [29:0]   mask_dd, alpha_dd, dv_dd, res_quot;
  logic [19:0]   mask_ds, alpha_ds, dv_ds, res_q;
  logic [TW-1:0] mask_tag;
  logic [TW:0]   dv_tag, res_tag;

  always_comb begin
    if (alpha_req) begin
      dv_valid = 1'b1; dv_dd = alpha_dd; dv_ds = alpha_ds; dv_tag = {DIV_ALPHA, TW'(0)};
    end else begin
      dv_valid = mask_req; dv_dd = mask_dd; dv_ds = mask_ds; dv_tag = {DIV_MASK, mask_tag};
    end
  end

  pipe_div #(.STAGES(DIV_STAGES), .TAG_W(TW + 1)) u_div (
    .clk(clk), .rst_n(rst_n), .in_valid(dv_valid), .dividend(dv_dd), .divisor(dv_ds),
    .in_tag(dv_tag), .out_valid(res_valid), .quotient(res_quot), .q20(res_q), .out_tag(res_tag));

  // ---------------------------------------------------------------- M_NVF
  logic          res_mask, head_valid, m_valid, do_pop;
  logic [TW-1:0] head_tag, m_tag;
  fx_t           m_out;
  assign res_mask = res_valid && (res_tag[TW] == DIV_MASK);
  assign do_pop   = p2 && head_valid;

  mnvf_block #(.CAP_LEN(CAP_LEN), .TAG_W(TW)) u_mask (
    .clk(clk), .rst_n(rst_n),
    .var_256(var_256), .var_valid(p1 && t_var.v), .var_tag({t_var.last, t_var.addr}),
    .div_req(mask_req), .div_dividend(mask_dd), .div_divisor(mask_ds), .div_tag(mask_tag),
    .res_valid(res_mask), .res_q(res_q), .res_tag(res_tag[TW-1:0]),
    .pop(do_pop), .head_valid(head_valid), .head_tag(head_tag),
    .m_valid(m_valid), .m_out(m_out), .m_tag(m_tag));

  assign evt_capture = res_mask && stall;

  // ---------------------------------------------------------------- u
  logic          u_valid;
  fx_t           u_val;
  logic [TW-1:0] u_tag;
  u_block #(.TAG_W(TW)) u_ublk (
    .clk(clk), .rst_n(rst_n), .in_valid(m_valid), .m_nvf(m_out), .w(fx_t'(s2_rdata)),
    .in_tag(m_tag), .u_valid(u_valid), .u(u_val), .u_tag(u_tag));

  // ---------------------------------------------------------------- alpha
  logic a_valid;
  alpha_block #(.IMG_M(IMG_M), .IMG_N(IMG_N), .SQRT_STAGES(SQRT_STAGES)) u_alpha (
    .clk(clk), .rst_n(rst_n), .psnr_sel(psnr_sel), .u_valid(u_valid), .u(u_val),
    .u_last(u_tag[TW-1]), .busy(a_busy), .take(a_take), .div_req(alpha_req), .div_dividend(alpha_dd),
    .div_divisor(alpha_ds), .div_res_valid(res_valid && res_tag[TW] == DIV_ALPHA),
    .div_res_q(res_q), .alpha_valid(a_valid), .alpha(alpha_new), .chunk_done(evt_chunk));

  // ---------------------------------------------------------------- y (output pass)
  logic                  rd_x, rd_u, x_arrive, u_arrive;
  logic [$clog2(X_DEPTH+1)-1:0] x_count;
  logic                  x_full, yb_valid;
  fx_t                   yb_y;
  assign rd_x = p1 && y_active && (xr < (AW+1)'(MN)) && (x_count < ($bits(x_count))'(X_DEPTH - 1));
  assign rd_u = p0 && y_active && (ur < xr);

  y_block #(.X_DEPTH(X_DEPTH)) u_y (
    .clk(clk), .rst_n(rst_n), .alpha(alpha_out), .x_push(x_arrive), .x_in(s1_rdata),
    .u_valid(u_arrive), .u(fx_t'(s2_rdata)), .x_count(x_count), .x_full(x_full),
    .y_valid(yb_valid), .y(yb_y));

  assign y_valid = yb_valid;
  assign y_out   = yb_y;
  assign y_last  = yb_valid && (yc == (AW+1)'(MN - 1));
  assign alpha   = alpha_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_arrive   <= 1'b0;
      u_arrive   <= 1'b0;
      y_active   <= 1'b0;
      y_pend     <= 1'b0;
      y_ok       <= 1'b0;
      alpha_pend <= 1'b0;
      alpha_out  <= '0;
      xr         <= '0;
      ur         <= '0;
      yc         <= '0;
    end else begin
      x_arrive <= rd_x;
      u_arrive <= rd_u;
      if (a_valid) alpha_pend <= 1'b1;
      if (rd_x) xr <= xr + 1'b1;
      if (rd_u) begin
        ur <= ur + 1'b1;
        if (ur == (AW+1)'(MN - 1)) y_pend <= 1'b0;
      end
      if (yb_valid) begin
        if (yc == (AW+1)'(MN - 1)) y_active <= 1'b0;
        yc <= yc + 1'b1;
      end
      if ((alpha_pend || a_valid) && !y_active) begin
        y_active   <= 1'b1;
        y_ok       <= 1'b1;
        alpha_pend <= 1'b0;
        alpha_out  <= alpha_new;
        xr <= '0; ur <= '0; yc <= '0;
      end
      if (pix_ready && pix_valid && pix_addr == AW'(MN - 1)) begin
        y_pend <= 1'b1;
        y_ok   <= 1'b0;
      end
    end
  end

  assign evt_wait_out = p0 && need_pix && pix_valid && !gate_ok;

  // ---------------------------------------------------------------- memory ports
  always_comb begin
    s1_en = 1'b0; s1_we = 1'b0; s1_addr = '0; s1_wdata = '0;
    s2_en = 1'b0; s2_we = 1'b0; s2_addr = '0; s2_wdata = '0;
    if (pix_ready && pix_valid) begin            // phase 0: write the incoming x
      s1_en = 1'b1; s1_we = 1'b1; s1_addr = pix_addr; s1_wdata = pix_in;
    end else if (rd_x) begin                     // phase 1: read an old x
      s1_en = 1'b1; s1_addr = AW'(xr);
    end
    if (rd_u) begin                              // phase 0: read an old u
      s2_en = 1'b1; s2_addr = AW2'(MN) + AW2'(ur);
    end else if (u_valid) begin                  // phase 1: write the new u
      s2_en = 1'b1; s2_we = 1'b1; s2_addr = AW2'(MN) + AW2'(u_tag[AW-1:0]); s2_wdata = u_val;
    end else if (do_pop) begin                   // phase 2: read w for the next mask value
      s2_en = 1'b1; s2_addr = AW2'(head_tag[AW-1:0]);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) u_valid |-> ph == 2'd1)
    else $error("video_embedder: u write outside its phase");
  assert property (@(posedge clk) disable iff (!rst_n) !(mask_req && alpha_req))
    else $error("video_embedder: divider requested twice");
endmodule
