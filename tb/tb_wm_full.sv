// tb_wm_full: full-size run of the whole design with the top at its default parameters
// (720 x 1280 frames, the HD size the embedders are meant for). Through the host ports it loads
// a cover image and a watermark into the memories of both still-image embedders and the
// watermark into the video SRAM2, starts both image embedders and at the same time streams two
// full video frames in. It reads the watermarked images back through the host ports and checks
// every pixel, both alphas and the video output stream against the reference model, requires
// that chunked u^2 divisions, video stalls, parked mask results and frame-overlap waits all
// occurred, and that the video embedder sustains at most 3.3 cycles per pixel. It prints the
// measured cycles per pixel of all three embedders. About 45 million clock cycles.
module tb_wm_full;
  import wm_pkg::*; import wm_ref_pkg::*;
  localparam int M = 720, N = 1280, MN = M * N, FRAMES = 2;
  localparam int IAW = $clog2(3 * MN), VAW2 = $clog2(2 * MN);
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic [3:0] psnr_sel = 4'd5;
  logic par_start = 0, ser_start = 0, par_busy, ser_busy, par_done, ser_done, par_evt_chunk, ser_evt_chunk;
  fx_t par_alpha, ser_alpha;
  logic par_host_en = 0, par_host_we = 0, ser_host_en = 0, ser_host_we = 0;
  logic [IAW-1:0] par_host_addr = 0, ser_host_addr = 0; logic [19:0] par_host_wdata = 0, ser_host_wdata = 0;
  logic [19:0] par_host_rdata, ser_host_rdata;
  logic vid_pix_valid = 0, vid_pix_ready, vid_y_valid, vid_y_last, vid_stall, vid_evt_chunk, vid_evt_capture, vid_evt_wait_out;
  pix_t vid_pix = 0; fx_t vid_y, vid_alpha;
  logic vid_host_en = 0, vid_host_we = 0; logic [VAW2-1:0] vid_host_addr = 0;
  logic [19:0] vid_host_wdata = 0, vid_host_rdata;

  wm_top dut (.*);

  int checks = 0, failures = 0;
  int n_pchunk = 0, n_schunk = 0, n_vchunk = 0, n_stall = 0, n_cap = 0, n_wait = 0;
  logic stall_q = 0;
  byte unsigned xi []; int wi [], ui [], yi []; longint ai; int ci;
  byte unsigned xv [FRAMES][]; int wv [], uv [], yv [FRAMES][]; longint av [FRAMES]; int cv [FRAMES];
  int fo = 0, ko = 0;
  longint cyc = 0, t_start = 0, t_par = 0, t_ser = 0, t_last [FRAMES];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (par_done) t_par = cyc;
    if (ser_done) t_ser = cyc;
    stall_q <= vid_stall && rst_n;
    if (rst_n) begin
      if (vid_stall && !stall_q) n_stall++;
      if (par_evt_chunk) n_pchunk++;
      if (ser_evt_chunk) n_schunk++;
      if (vid_evt_chunk) n_vchunk++;
      if (vid_evt_capture) n_cap++;
      if (vid_evt_wait_out) n_wait++;
    end
    if (rst_n && vid_y_valid && fo < FRAMES) begin
      checks++;
      if (longint'(vid_y) != longint'(yv[fo][ko]) || vid_y_last != (ko == MN - 1)) begin
        failures++; if (failures < 10) $display("FAIL video frame %0d pixel %0d", fo, ko); end
      if (ko == MN - 1) begin
        checks++; if (longint'(vid_alpha) != av[fo]) failures++;
        t_last[fo] = cyc; ko = 0; fo++;
      end else ko++;
    end
  end
  initial begin
    repeat (150000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic host_write(int a, logic [19:0] d, bit img, bit vid);
    @(negedge clk);
    par_host_en = img; par_host_we = img; par_host_addr = IAW'(a); par_host_wdata = d;
    ser_host_en = img; ser_host_we = img; ser_host_addr = IAW'(a); ser_host_wdata = d;
    vid_host_en = vid; vid_host_we = vid; vid_host_addr = VAW2'(a); vid_host_wdata = d;
    @(negedge clk);
    par_host_en = 0; ser_host_en = 0; vid_host_en = 0; par_host_we = 0; ser_host_we = 0; vid_host_we = 0;
  endtask

  initial begin
    bit pd, sd;
    xi = new[MN]; wi = new[MN]; wv = new[MN];
    for (int k = 0; k < MN; k++) begin
      automatic int i = k / N, j = k % N;
      xi[k] = (i < M / 2) ? 8'(2 * i + 3 * j) : 8'($urandom);
      wi[k] = gauss_w(2.5);
      wv[k] = gauss_w(2.0);
    end
    rembed(xi, wi, M, N, 5, 1'b1, ui, yi, ai, ci);
    for (int f = 0; f < FRAMES; f++) begin
      xv[f] = new[MN];
      for (int k = 0; k < MN; k++) xv[f][k] = ((k % N) < N / 3 + 4 * f) ? 8'(k / N + f) : 8'($urandom);
      rembed(xv[f], wv, M, N, 5, 1'b0, uv, yv[f], av[f], cv[f]);
    end
    repeat (3) @(negedge clk); rst_n = 1;
    // load memories through the host ports
    for (int k = 0; k < MN; k++) begin
      host_write(k, 20'(xi[k]), 1, 0);
      host_write(MN + k, 20'(wi[k]), 1, 1);
      host_write(k, 20'(wv[k]), 0, 1);
    end
    @(negedge clk); par_start = 1; ser_start = 1; t_start = cyc; @(negedge clk); par_start = 0; ser_start = 0;
    fork
      begin
        for (int f = 0; f < FRAMES; f++)
          for (int k = 0; k < MN; k++) begin
            vid_pix_valid = 1; vid_pix = xv[f][k];
            @(posedge clk); while (!vid_pix_ready) @(posedge clk);
            @(negedge clk);
          end
        vid_pix_valid = 0;
      end
      begin
        pd = 0; sd = 0;
        while (!(pd && sd)) begin @(negedge clk); if (par_done) pd = 1; if (ser_done) sd = 1; end
      end
    join
    while (fo < FRAMES) @(negedge clk);
    // read back the watermarked images
    for (int k = 0; k < MN; k++) begin
      @(negedge clk);
      par_host_en = 1; ser_host_en = 1; par_host_addr = IAW'(2 * MN + k); ser_host_addr = IAW'(2 * MN + k);
      @(negedge clk); par_host_en = 0; ser_host_en = 0;
      checks += 2;
      if (longint'(signed'(par_host_rdata)) != longint'(yi[k])) failures++;
      if (longint'(signed'(ser_host_rdata)) != longint'(yi[k])) failures++;
    end
    checks += 2;
    if (longint'(par_alpha) != ai) failures++;
    if (longint'(ser_alpha) != ai) failures++;
    checks += 6;
    if (n_pchunk != ci || n_schunk != ci) begin failures++; $display("FAIL image chunks %0d %0d exp %0d", n_pchunk, n_schunk, ci); end
    if (n_vchunk == 0) begin failures++; $display("FAIL no video chunk"); end
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    if (n_cap == 0) begin failures++; $display("FAIL no parked mask result"); end
    if (n_wait == 0) begin failures++; $display("FAIL no frame wait"); end
    if (ci == 0) failures++;
    $display("cycles per pixel: parallel image %f, serial image %f, video frames 2..%0d %f",
             real'(t_par - t_start) / MN, real'(t_ser - t_start) / MN, FRAMES,
             real'(t_last[FRAMES-1] - t_last[0]) / (real'(FRAMES - 1) * MN));
    // the pipelined embedder takes one pixel every three cycles; stalls for strength divisions
    // and the frame boundary may add a little
    checks++;
    if (real'(t_last[FRAMES-1] - t_last[0]) / (real'(FRAMES - 1) * MN) > 3.3) begin
      failures++; $display("FAIL video embedder slower than 3.3 cycles per pixel"); end
    $display("image chunks %0d/%0d, video chunks %0d, stalls %0d, parked %0d, frame waits %0d, image alpha %f",
             n_pchunk, n_schunk, n_vchunk, n_stall, n_cap, n_wait, real'(ai) / 1024.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
