// tb_mu_var_ser: random 3x3 neighbourhoods through the serial mean/variance block; results must
// equal the reference model and done must come 19 cycles after start.
module tb_mu_var_ser;
  import wm_pkg::*; import wm_ref_pkg::*;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  fx_t nbhd [9]; fx_t mu, var_256; logic start = 0, busy, done;
  int checks = 0, failures = 0;
  mu_var_ser dut (.clk, .rst_n, .start, .nbhd, .mu, .var_256, .busy, .done);
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      longint nb [9]; longint em, ev; int lat;
      for (int k = 0; k < 9; k++) begin
        nb[k] = (n % 3 == 0) ? (($urandom_range(0, 1) ? 255 : 0) << 10)
                             : (longint'($urandom_range(0, 255)) << 10);
        if (n % 5 == 0 && k < 3) nb[k] = 0;
        nbhd[k] = fx_t'(nb[k]);
      end
      em = rmean(nb); ev = rvar(nb, em);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      checks++; if (longint'(mu) != em || longint'(var_256) != ev) begin
        failures++; $display("FAIL %0d/%0d %0d/%0d", mu, em, var_256, ev); end
      checks++; if (lat != 19) begin failures++; $display("FAIL latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
