// tb_alpha_block: several frames of masked-watermark values (strong enough that many u^2
// chunks reach the threshold) go into the strength block, which uses a real pipelined divider.
// alpha and the number of chunks must equal the reference computation of eq. (11) and
// alpha = 16 A / sqrt(256 ||u||^2) for every PSNR setting used; u is only offered when not busy.
// Every cycle after a u, busy must be high exactly when take announced it.
module tb_alpha_block;
  import wm_pkg::*; import wm_ref_pkg::*;
  localparam int M = 32, N = 48, STAGES = 6;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic [3:0] psnr_sel = 0; logic u_valid = 0, u_last = 0; fx_t u = 0;
  logic busy, take, take_q = 0, ntake_q = 0, div_req, div_res_valid, alpha_valid, chunk_done;
  logic [29:0] dd, quo; logic [19:0] ds, q; fx_t alpha; logic tag_o;
  int checks = 0, failures = 0, chunks_seen = 0;
  pipe_div #(.STAGES(STAGES), .TAG_W(1)) u_div (.clk, .rst_n, .in_valid(div_req), .dividend(dd),
    .divisor(ds), .in_tag(1'b1), .out_valid(div_res_valid), .quotient(quo), .q20(q), .out_tag(tag_o));
  alpha_block #(.IMG_M(M), .IMG_N(N), .SQRT_STAGES(2)) dut (.clk, .rst_n, .psnr_sel, .u_valid, .u,
    .u_last, .busy, .take, .div_req, .div_dividend(dd), .div_divisor(ds), .div_res_valid, .div_res_q(q),
    .alpha_valid, .alpha, .chunk_done);
  always @(posedge clk) if (chunk_done) chunks_seen++;
  // take announces busy one cycle ahead
  always @(posedge clk) begin
    take_q <= take && rst_n;
    if (rst_n && take_q) begin checks++; if (!busy) failures++; end
    ntake_q <= rst_n && u_valid && !busy && !take;
    if (rst_n && ntake_q) begin checks++; if (busy) failures++; end
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      longint sum, acc, qq, r, ea; int ech;
      int us [];
      us = new[M*N];
      psnr_sel = 4'(f * 3);
      for (int k = 0; k < M*N; k++) begin
        us[k] = (f % 2 == 0) ? gauss_w(1.0 + f) : (gauss_w(1.0) * int'($urandom_range(0, 1024))) / 1024;
      end
      sum = 0; acc = 0; ech = 0;
      for (int k = 0; k < M*N; k++) begin
        sum = wrap20(sum + rmul(us[k], us[k]));
        if (sum >= 462 * 1024 || (k == M*N-1 && sum != 0)) begin
          qq = rdiv(sum << 10, (M / 16) * 1024); qq = rdiv(qq << 10, (N / 16) * 1024);
          acc = wrap20(acc + qq); sum = 0; ech++;
        end
      end
      r = risqrt(acc & 64'hFFFFF);
      ea = wrap20(rdiv(wrap20(amp(f * 3) * 16) << 10, r << 5));
      chunks_seen = 0;
      for (int k = 0; k < M*N; k++) begin
        @(negedge clk);
        while (busy) begin u_valid = 0; @(negedge clk); end
        u_valid = 1; u = fx_t'(us[k]); u_last = (k == M*N-1);
        if ($urandom_range(0, 3) == 0) begin @(negedge clk); u_valid = 0; end
      end
      @(negedge clk); u_valid = 0; u_last = 0;
      while (!alpha_valid) @(negedge clk);
      checks++; if (longint'(alpha) != ea) begin failures++; $display("FAIL alpha %0d exp %0d", alpha, ea); end
      checks++; if (chunks_seen != ech) begin failures++; $display("FAIL chunks %0d exp %0d", chunks_seen, ech); end
      $display("frame %0d: alpha=%0d (%f) chunks=%0d", f, alpha, real'(alpha) / 1024.0, chunks_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
