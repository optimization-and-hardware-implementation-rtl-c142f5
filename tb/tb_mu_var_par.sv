// tb_mu_var_par: random 3x3 neighbourhoods (including flat, zero-padded and high-contrast ones)
// through the five-step schedule of the parallel mean/variance blocks; mu must be ready two
// cycles and sigma^2/256 five cycles after the first step, equal to the reference model.
module tb_mu_var_par;
  import wm_pkg::*; import wm_ref_pkg::*;
  logic clk = 0; always #5 clk = ~clk;
  fx_t nbhd [9]; fx_t mu, var_256;
  logic ld_mu_prod = 0, ld_mu = 0, ld_diff = 0, ld_var_prod = 0, ld_var = 0;
  int checks = 0, failures = 0;
  mu_var_par dut (.clk, .nbhd, .ld_mu_prod, .ld_mu, .ld_diff, .ld_var_prod, .ld_var, .mu, .var_256);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint nb [9]; longint em, ev;
      for (int k = 0; k < 9; k++) begin
        case (n % 4)
          0: nb[k] = longint'($urandom_range(0, 255)) << 10;
          1: nb[k] = longint'(n % 256) << 10;
          2: nb[k] = ($urandom_range(0, 1) ? 255 : 0) << 10;
          default: nb[k] = ($urandom_range(0, 2) == 0) ? 0 : longint'($urandom_range(100, 140)) << 10;
        endcase
        nbhd[k] = fx_t'(nb[k]);
      end
      em = rmean(nb); ev = rvar(nb, em);
      @(negedge clk); ld_mu_prod = 1;
      @(negedge clk); ld_mu_prod = 0; ld_mu = 1;
      @(negedge clk); ld_mu = 0; ld_diff = 1;
      checks++; if (longint'(mu) != em) begin failures++; $display("FAIL mu %0d %0d", mu, em); end
      @(negedge clk); ld_diff = 0; ld_var_prod = 1;
      @(negedge clk); ld_var_prod = 0; ld_var = 1;
      @(negedge clk); ld_var = 0;
      checks++; if (longint'(var_256) != ev) begin failures++; $display("FAIL var %0d %0d", var_256, ev); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
