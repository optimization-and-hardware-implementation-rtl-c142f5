// tb_y_block: cover pixels pushed ahead into the x buffer (up to its depth), u values later;
// every y must equal x + alpha * u from the reference model, two cycles after its u, in order.
module tb_y_block;
  import wm_pkg::*; import wm_ref_pkg::*;
  localparam int D = 7;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  fx_t alpha = 0, u = 0, y; logic x_push = 0, u_valid = 0, x_full, y_valid; pix_t x_in = 0;
  logic [2:0] x_count;
  int checks = 0, failures = 0, maxc = 0;
  y_block #(.X_DEPTH(D)) dut (.clk, .rst_n, .alpha, .x_push, .x_in, .u_valid, .u, .x_count, .x_full, .y_valid, .y);
  pix_t xs [$]; longint ey [$]; int nx = 0, nu = 0;
  pix_t xv [4000];
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (int'(x_count) > maxc) maxc = int'(x_count);
    if (y_valid) begin
      automatic longint e = ey.pop_front();
      checks++; if (longint'(y) != e) begin failures++; $display("FAIL y %0d %0d", y, e); end
    end
  end
  initial begin
    for (int k = 0; k < 4000; k++) xv[k] = pix_t'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    alpha = fx_t'($urandom_range(100, 40000));
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // x may run ahead of u by up to D-2 entries (one more can be in flight)
      x_push = (nx < 4000) && (nx - nu < D - 1) && ($urandom_range(0, 2) != 0);
      if (n < 20) u_valid = 0; else u_valid = (nu < nx) && ($urandom_range(0, 2) == 0);
      if (x_push) begin x_in = xv[nx]; nx++; end
      if (u_valid) begin
        u = fx_t'(gauss_w(2.0));
        ey.push_back(wrap20((longint'(xv[nu]) << 10) + rmul(longint'(alpha), longint'(u))));
        nu++;
      end
    end
    @(negedge clk); x_push = 0; u_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (ey.size() != 0 || nu < 1000) failures++;
    checks++; if (maxc < D - 2) begin failures++; $display("FAIL buffer never filled: %0d", maxc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
