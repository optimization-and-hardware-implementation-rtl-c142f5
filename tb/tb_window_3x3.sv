// tb_window_3x3: three random frames stream through the line buffers with random gaps; each
// centre the window announces must come in raster order with the right address and last flag
// and its nine pixels must match the frame, zero outside it.
module tb_window_3x3;
  import wm_pkg::*;
  localparam int M = 6, N = 9, AW = $clog2(M * N);
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic adv = 0, need_pix, center_valid, center_last; pix_t pix_in = 0;
  logic [AW-1:0] pix_addr, center_addr; fx_t nbhd [9];
  int checks = 0, failures = 0, centers = 0, fr_out = 0, fr_in = 0, k_in = 0;
  window_3x3 #(.IMG_M(M), .IMG_N(N)) dut (.clk, .rst_n, .adv, .pix_in, .need_pix, .pix_addr,
    .center_valid, .center_addr, .center_last, .nbhd);
  pix_t img [3][M*N];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && center_valid) begin
    automatic int i = centers / N, j = centers % N;
    checks++;
    if (int'(center_addr) != centers || center_last != (centers == M*N-1)) begin
      failures++; $display("FAIL addr %0d exp %0d", center_addr, centers); end
    for (int a = 0; a < 3; a++) for (int b = 0; b < 3; b++) begin
      automatic int ii = i + a - 1, jj = j + b - 1;
      automatic fx_t e = (ii >= 0 && ii < M && jj >= 0 && jj < N) ? fx_from_pix(img[fr_out][ii*N+jj]) : '0;
      checks++; if (nbhd[a*3+b] != e) begin failures++; $display("FAIL f%0d (%0d,%0d) k%0d", fr_out, i, j, a*3+b); end
    end
    centers++;
    if (centers == M*N) begin centers = 0; fr_out++; end
  end
  initial begin
    for (int f = 0; f < 3; f++) for (int k = 0; k < M*N; k++) img[f][k] = pix_t'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    while (fr_out < 3) begin
      @(negedge clk);
      adv = ($urandom_range(0, 2) != 0) && !(fr_in == 3 && need_pix);
      if (adv && need_pix) begin
        pix_in = img[fr_in][k_in];
        #1; checks++; if (int'(pix_addr) != k_in) failures++;
        k_in++; if (k_in == M*N) begin k_in = 0; fr_in++; end
      end
    end
    @(negedge clk); adv = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
