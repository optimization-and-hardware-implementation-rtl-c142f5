// tb_mac9: random signed operand sets through the nine multipliers and the adder tree; the sum
// must equal the reference sum of truncated 10.10 products one cycle after load, and hold.
module tb_mac9;
  import wm_pkg::*; import wm_ref_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  logic load = 0; fx_t a [9]; fx_t b [9]; fx_t sum;
  int checks = 0, failures = 0;
  mac9 dut (.clk, .load, .a, .b, .sum);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint e;
      @(negedge clk);
      e = 0;
      for (int k = 0; k < 9; k++) begin
        a[k] = fx_t'($urandom); b[k] = fx_t'($urandom);
        if (n % 3 == 0) begin a[k] = fx_t'($urandom_range(0, 255) << 2); b[k] = fx_t'(29127); end
        e = wrap20(e + rmul(longint'(a[k]), longint'(b[k])));
      end
      load = 1;
      @(negedge clk); load = 0;
      for (int k = 0; k < 9; k++) a[k] = fx_t'($urandom);
      checks++; if (longint'(sum) != e) begin failures++; $display("FAIL %0d %0d", sum, e); end
      @(negedge clk);
      checks++; if (longint'(sum) != e) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
