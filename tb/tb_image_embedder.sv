// tb_image_embedder: the parallel and the serial still-image embedders, each with its own SRAM,
// watermark the same images (textured and flat regions, two watermark strengths, two PSNR
// settings). Afterwards the y words in memory, alpha and the number of u^2 chunks must match
// the reference model, which accumulates u column by column. Cycles per pixel are reported and
// must stay within 18.5 (parallel) and 35.2 (serial).
module tb_image_embedder;
  import wm_pkg::*; import wm_ref_pkg::*;
  localparam int M = 32, N = 48, MN = M * N, AW = $clog2(3 * MN);
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic start = 0; logic [3:0] psnr_sel = 0;
  int checks = 0, failures = 0;

  logic p_busy, p_done, p_chunk, p_en, p_we; fx_t p_alpha; logic [AW-1:0] p_addr; logic [19:0] p_wd, p_rd;
  logic s_busy, s_done, s_chunk, s_en, s_we; fx_t s_alpha; logic [AW-1:0] s_addr; logic [19:0] s_wd, s_rd;
  image_embedder #(.IMG_M(M), .IMG_N(N), .PARALLEL(1'b1), .DIV_STAGES(6)) u_par (.clk, .rst_n, .start,
    .psnr_sel, .busy(p_busy), .done(p_done), .alpha(p_alpha), .evt_chunk(p_chunk), .mem_en(p_en),
    .mem_we(p_we), .mem_addr(p_addr), .mem_wdata(p_wd), .mem_rdata(p_rd));
  sram #(.DEPTH(3 * MN)) u_pmem (.clk, .en(p_en), .we(p_we), .addr(p_addr), .wdata(p_wd), .rdata(p_rd));
  image_embedder #(.IMG_M(M), .IMG_N(N), .PARALLEL(1'b0), .DIV_STAGES(5)) u_ser (.clk, .rst_n, .start,
    .psnr_sel, .busy(s_busy), .done(s_done), .alpha(s_alpha), .evt_chunk(s_chunk), .mem_en(s_en),
    .mem_we(s_we), .mem_addr(s_addr), .mem_wdata(s_wd), .mem_rdata(s_rd));
  sram #(.DEPTH(3 * MN)) u_smem (.clk, .en(s_en), .we(s_we), .addr(s_addr), .wdata(s_wd), .rdata(s_rd));

  int p_chunks, s_chunks;
  always @(posedge clk) if (rst_n) begin
    if (p_chunk) p_chunks++;
    if (s_chunk) s_chunks++;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    byte unsigned x []; int w [], u [], y []; longint ea; int ech;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      int cyc_p, cyc_s, yerr;
      bit pd, sd;
      x = new[MN]; w = new[MN];
      for (int k = 0; k < MN; k++) begin
        automatic int i = k / N, j = k % N;
        x[k] = (j < N / 2) ? 8'(4 * i + j) : 8'($urandom);     // flat ramp | texture
        if (i == 5 && t == 1) x[k] = 8'd255;
        w[k] = gauss_w(t == 0 ? 1.0 : 3.0);
      end
      rembed(x, w, M, N, t * 10, 1'b1, u, y, ea, ech);
      for (int k = 0; k < MN; k++) begin
        u_pmem.mem[k] = 20'(x[k]); u_smem.mem[k] = 20'(x[k]);
        u_pmem.mem[MN + k] = 20'(w[k]); u_smem.mem[MN + k] = 20'(w[k]);
      end
      psnr_sel = 4'(t * 10);
      p_chunks = 0; s_chunks = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc_p = 1; cyc_s = 1; pd = 0; sd = 0;
      while (!(pd && sd)) begin
        @(negedge clk);
        if (!pd) cyc_p++;
        if (!sd) cyc_s++;
        if (p_done) pd = 1;
        if (s_done) sd = 1;
      end
      yerr = 0;
      for (int k = 0; k < MN; k++) begin
        checks += 2;
        if (longint'(signed'(u_pmem.mem[2*MN + k])) != longint'(y[k])) begin failures++; yerr++; end
        if (longint'(signed'(u_smem.mem[2*MN + k])) != longint'(y[k])) begin failures++; yerr++; end
      end
      checks += 4;
      if (longint'(p_alpha) != ea) begin failures++; $display("FAIL par alpha %0d exp %0d", p_alpha, ea); end
      if (longint'(s_alpha) != ea) begin failures++; $display("FAIL ser alpha %0d exp %0d", s_alpha, ea); end
      if (p_chunks != ech) begin failures++; $display("FAIL par chunks %0d exp %0d", p_chunks, ech); end
      if (s_chunks != ech) begin failures++; $display("FAIL ser chunks %0d exp %0d", s_chunks, ech); end
      // rate: at most 18.1 cycles per pixel (parallel, 10 images/s of 1280x720 at 166.7 MHz) and
      // 35.2 (serial, 5.6 images/s at 181.82 MHz) are what the ASIC builds reach; the parallel
      // bound gets 0.4 cycles for the nine reads at the top of each short column
      checks += 2;
      if (real'(cyc_p) / MN > 18.5) begin failures++; $display("FAIL parallel rate"); end
      if (real'(cyc_s) / MN > 35.2) begin failures++; $display("FAIL serial rate"); end
      $display("image %0d: alpha=%f chunks=%0d y mismatches=%0d; cycles/pixel parallel %f serial %f",
               t, real'(ea) / 1024.0, ech, yerr, real'(cyc_p) / MN, real'(cyc_s) / MN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
