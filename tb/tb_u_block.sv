// tb_u_block: random mask and watermark values; u must be the truncated 10.10 product,
// registered one cycle after in_valid, with the tag.
module tb_u_block;
  import wm_pkg::*; import wm_ref_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic in_valid = 0, u_valid; fx_t m = 0, w = 0, u; logic [5:0] tg = 0, ut;
  int checks = 0, failures = 0;
  u_block #(.TAG_W(6)) dut (.clk, .rst_n, .in_valid, .m_nvf(m), .w, .in_tag(tg), .u_valid, .u, .u_tag(ut));
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint e;
      @(negedge clk);
      in_valid = 1; m = fx_t'($urandom_range(0, 1024)); w = fx_t'(gauss_w(1.0) * ((n % 2) ? 1 : 3));
      tg = 6'(n); e = rmul(longint'(m), longint'(w));
      @(negedge clk); in_valid = 0;
      checks++; if (!u_valid || longint'(u) != e || ut != 6'(n)) begin failures++; $display("FAIL %0d %0d", u, e); end
      @(negedge clk);
      checks++; if (u_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
