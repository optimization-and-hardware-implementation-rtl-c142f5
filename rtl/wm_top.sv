// wm_top: the three watermark embedders side by side, each with its own memories.
//
// Spatial-domain watermarking y = x + alpha * M_NVF .* w with a noise-visibility mask, for
// low-cost cameras and sensor nodes. Three variants:
//   img_par  still-image embedder, parallel mean/variance (nine multipliers), one SRAM
//   img_ser  still-image embedder, serial mean/variance (one multiplier), one SRAM
//   vid      pipelined video embedder, one pixel per three cycles, SRAM1 (x) and SRAM2 (w, u)
// The memories are instantiated here. A host port per memory loads the cover image and the
// watermark and reads the result: while its *_host_en is high the host owns that memory (the
// read answers one cycle later on *_host_rdata); it must leave the memory alone while the
// embedder uses it. Image memory layout: x at 0..MN-1 (low 8 bits), w at MN..2MN-1, u and
// finally y at 2MN..3MN-1. Video SRAM2 holds w at 0..MN-1 and u at MN..2MN-1; the watermarked
// frame leaves on vid_y_valid / vid_y. Every embedder uses IMG_M rows by IMG_N columns (720 by
// 1280 by default, the larger frame size the document evaluates) and the ASIC pipeline depths
// of the document: divider 6 stages (parallel image, video) or 5 (serial image), square root 2
// stages (image) or 1 (video). The host ports are this design's; the document leaves the
// board interface out of the design.
module wm_top
  import wm_pkg::*;
#(
  parameter int unsigned IMG_M = 720,
  parameter int unsigned IMG_N = 1280,
  localparam int unsigned MN    = IMG_M * IMG_N,
  localparam int unsigned IAW   = $clog2(3 * MN),
  localparam int unsigned VAW   = $clog2(MN),
  localparam int unsigned VAW2  = $clog2(2 * MN)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [3:0]      psnr_sel,
  // parallel image embedder
  input  logic            par_start,
  output logic            par_busy,
  output logic            par_done,
  output fx_t             par_alpha,
  output logic            par_evt_chunk,
  input  logic            par_host_en,
  input  logic            par_host_we,
  input  logic [IAW-1:0]  par_host_addr,
  input  logic [19:0]     par_host_wdata,
  output logic [19:0]     par_host_rdata,
  // serial image embedder
  input  logic            ser_start,
  output logic            ser_busy,
  output logic            ser_done,
  output fx_t             ser_alpha,
  output logic            ser_evt_chunk,
  input  logic            ser_host_en,
  input  logic            ser_host_we,
  input  logic [IAW-1:0]  ser_host_addr,
  input  logic [19:0]     ser_host_wdata,
  output logic [19:0]     ser_host_rdata,
  // video embedder: pixel stream from the sensor, watermarked stream out
  input  logic            vid_pix_valid,
  input  pix_t            vid_pix,
  output logic            vid_pix_ready,
  output logic            vid_y_valid,
  output fx_t             vid_y,
  output logic            vid_y_last,
  output fx_t             vid_alpha,
  output logic            vid_stall,
  output logic            vid_evt_chunk,
  output logic            vid_evt_capture,
  output logic            vid_evt_wait_out,
  input  logic            vid_host_en,       // host access to SRAM2 (watermark load)
  input  logic            vid_host_we,
  input  logic [VAW2-1:0] vid_host_addr,
  input  logic [19:0]     vid_host_wdata,
  output logic [19:0]     vid_host_rdata
);
  // ------------------------------------------------------------ parallel image embedder
  logic            pe_en, pe_we;
  logic [IAW-1:0]  pe_addr;
  logic [19:0]     pe_wdata, pm_rdata;
  image_embedder #(.IMG_M(IMG_M), .IMG_N(IMG_N), .PARALLEL(1'b1), .DIV_STAGES(6), .SQRT_STAGES(2))
  u_img_par (
    .clk(clk), .rst_n(rst_n), .start(par_start), .psnr_sel(psnr_sel), .busy(par_busy),
    .done(par_done), .alpha(par_alpha), .evt_chunk(par_evt_chunk),
    .mem_en(pe_en), .mem_we(pe_we), .mem_addr(pe_addr), .mem_wdata(pe_wdata), .mem_rdata(pm_rdata));
  sram #(.DEPTH(3 * MN), .WIDTH(20)) u_par_mem (
    .clk(clk), .en(par_host_en ? 1'b1 : pe_en), .we(par_host_en ? par_host_we : pe_we),
    .addr(par_host_en ? par_host_addr : pe_addr), .wdata(par_host_en ? par_host_wdata : pe_wdata),
    .rdata(pm_rdata));
  assign par_host_rdata = pm_rdata;

  // ------------------------------------------------------------ serial image embedder
  logic            se_en, se_we;
  logic [IAW-1:0]  se_addr;
  logic [19:0]     se_wdata, sm_rdata;
  image_embedder #(.IMG_M(IMG_M), .IMG_N(IMG_N), .PARALLEL(1'b0), .DIV_STAGES(5), .SQRT_STAGES(2))
  u_img_ser (
    .clk(clk), .rst_n(rst_n), .start(ser_start), .psnr_sel(psnr_sel), .busy(ser_busy),
    .done(ser_done), .alpha(ser_alpha), .evt_chunk(ser_evt_chunk),
    .mem_en(se_en), .mem_we(se_we), .mem_addr(se_addr), .mem_wdata(se_wdata), .mem_rdata(sm_rdata));
  sram #(.DEPTH(3 * MN), .WIDTH(20)) u_ser_mem (
    .clk(clk), .en(ser_host_en ? 1'b1 : se_en), .we(ser_host_en ? ser_host_we : se_we),
    .addr(ser_host_en ? ser_host_addr : se_addr), .wdata(ser_host_en ? ser_host_wdata : se_wdata),
    .rdata(sm_rdata));
  assign ser_host_rdata = sm_rdata;

  // ------------------------------------------------------------ video embedder
  logic            v1_en, v1_we, v2_en, v2_we;
  logic [VAW-1:0]  v1_addr;
  logic [VAW2-1:0] v2_addr;
  pix_t            v1_wdata, v1_rdata;
  logic [19:0]     v2_wdata, v2_rdata;
  video_embedder #(.IMG_M(IMG_M), .IMG_N(IMG_N), .DIV_STAGES(6), .SQRT_STAGES(1), .X_DEPTH(7))
  u_vid (
    .clk(clk), .rst_n(rst_n), .psnr_sel(psnr_sel),
    .pix_valid(vid_pix_valid), .pix_in(vid_pix), .pix_ready(vid_pix_ready),
    .y_valid(vid_y_valid), .y_out(vid_y), .y_last(vid_y_last), .alpha(vid_alpha),
    .stall(vid_stall), .evt_chunk(vid_evt_chunk), .evt_capture(vid_evt_capture),
    .evt_wait_out(vid_evt_wait_out),
    .s1_en(v1_en), .s1_we(v1_we), .s1_addr(v1_addr), .s1_wdata(v1_wdata), .s1_rdata(v1_rdata),
    .s2_en(v2_en), .s2_we(v2_we), .s2_addr(v2_addr), .s2_wdata(v2_wdata), .s2_rdata(v2_rdata));
  sram #(.DEPTH(MN), .WIDTH(8)) u_sram1 (
    .clk(clk), .en(v1_en), .we(v1_we), .addr(v1_addr), .wdata(v1_wdata), .rdata(v1_rdata));
  sram #(.DEPTH(2 * MN), .WIDTH(20)) u_sram2 (
    .clk(clk), .en(vid_host_en ? 1'b1 : v2_en), .we(vid_host_en ? vid_host_we : v2_we),
    .addr(vid_host_en ? vid_host_addr : v2_addr), .wdata(vid_host_en ? vid_host_wdata : v2_wdata),
    .rdata(v2_rdata));
  assign vid_host_rdata = v2_rdata;
endmodule
