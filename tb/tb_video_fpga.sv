// tb_video_fpga: the video embedder in its FPGA configuration (11-stage divider, so a capture
// register of 10 mask results, and a 2-stage square root). Same stimulus and checks as the ASIC
// configuration: four frames streamed with random gaps, every output pixel, alpha and chunk
// count against the reference model, stalls, parked mask results and frame waits required, and
// never more than one pixel accepted per three cycles.
module tb_video_fpga;
  import wm_pkg::*; import wm_ref_pkg::*;
  localparam int M = 16, N = 32, MN = M * N, AW = $clog2(MN), AW2 = $clog2(2 * MN), FRAMES = 4;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic [3:0] psnr_sel = 0;
  logic pix_valid = 0, pix_ready, y_valid, y_last, stall, e_chunk, e_cap, e_wait;
  pix_t pix = 0; fx_t y, alpha;
  logic s1_en, s1_we, s2_en, s2_we; logic [AW-1:0] s1_addr; logic [AW2-1:0] s2_addr;
  pix_t s1_wd, s1_rd; logic [19:0] s2_wd, s2_rd;
  int checks = 0, failures = 0, n_stall = 0, n_cap = 0, n_wait = 0, n_chunk = 0;
  video_embedder #(.IMG_M(M), .IMG_N(N), .DIV_STAGES(11), .SQRT_STAGES(2), .X_DEPTH(7)) dut (
    .clk, .rst_n, .psnr_sel, .pix_valid, .pix_in(pix), .pix_ready, .y_valid, .y_out(y), .y_last,
    .alpha, .stall, .evt_chunk(e_chunk), .evt_capture(e_cap), .evt_wait_out(e_wait),
    .s1_en, .s1_we, .s1_addr, .s1_wdata(s1_wd), .s1_rdata(s1_rd),
    .s2_en, .s2_we, .s2_addr, .s2_wdata(s2_wd), .s2_rdata(s2_rd));
  sram #(.DEPTH(MN), .WIDTH(8)) u_s1 (.clk, .en(s1_en), .we(s1_we), .addr(s1_addr), .wdata(s1_wd), .rdata(s1_rd));
  sram #(.DEPTH(2 * MN), .WIDTH(20)) u_s2 (.clk, .en(s2_en), .we(s2_we), .addr(s2_addr), .wdata(s2_wd), .rdata(s2_rd));

  byte unsigned x [FRAMES][]; int w [], u [], yexp [FRAMES][]; longint ea [FRAMES]; int ech [FRAMES];
  int fo = 0, ko = 0, last_in_cyc = -10, cyc = 0, min_gap = 1000;
  logic stall_q = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    stall_q <= stall && rst_n;
    if (rst_n && stall && !stall_q) n_stall++;
    if (rst_n && e_cap) n_cap++;
    if (rst_n && e_wait) n_wait++;
    if (rst_n && e_chunk) n_chunk++;
    if (pix_valid && pix_ready) begin
      if (cyc - last_in_cyc < min_gap) min_gap = cyc - last_in_cyc;
      last_in_cyc <= cyc;
    end
    if (rst_n && y_valid && fo < FRAMES) begin
      checks++;
      if (longint'(y) != longint'(yexp[fo][ko]) || y_last != (ko == MN - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d pixel %0d y=%0d exp %0d", fo, ko, y, yexp[fo][ko]);
      end
      if (ko == MN - 1) begin
        checks++;
        if (longint'(alpha) != ea[fo]) begin failures++; $display("FAIL alpha %0d exp %0d", alpha, ea[fo]); end
        $display("frame %0d out: alpha=%f chunks=%0d", fo, real'(alpha) / 1024.0, ech[fo]);
        ko = 0; fo++;
      end else ko++;
    end
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    w = new[MN];
    for (int k = 0; k < MN; k++) w[k] = gauss_w(2.0);
    for (int f = 0; f < FRAMES; f++) begin
      x[f] = new[MN];
      for (int k = 0; k < MN; k++) begin
        automatic int i = k / N, j = k % N;
        x[f][k] = (((j + 3 * f) % N) < N / 2) ? 8'(8 * i + j + f) : 8'($urandom);
      end
      rembed(x[f], w, M, N, 2, 1'b0, u, yexp[f], ea[f], ech[f]);
    end
    for (int k = 0; k < MN; k++) u_s2.mem[k] = 20'(w[k]);
    psnr_sel = 4'd2;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int k = 0; k < MN; k++) begin
        pix_valid = 1; pix = x[f][k];
        if ((k % 37) == 5) begin pix_valid = 0; repeat ($urandom_range(1, 6)) @(negedge clk); pix_valid = 1; end
        @(posedge clk); while (!pix_ready) @(posedge clk);
        @(negedge clk);
      end
      pix_valid = 0;
    end
    while (fo < FRAMES) @(negedge clk);
    checks += 4;
    if (n_stall == 0) begin failures++; $display("FAIL no stall"); end
    if (n_cap == 0) begin failures++; $display("FAIL capture register never used"); end
    if (n_wait == 0) begin failures++; $display("FAIL next frame never waited for the output pass"); end
    if (min_gap != 3) begin failures++; $display("FAIL input period %0d", min_gap); end
    $display("stalls=%0d chunks=%0d parked mask results=%0d frame waits=%0d min input period=%0d cycles/frame=%f",
             n_stall, n_chunk, n_cap, n_wait, min_gap, real'(cyc) / FRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
