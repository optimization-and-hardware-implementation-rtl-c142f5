// tb_pipe_sqrt: exhaustive-corner and random square roots through the pipelined root unit,
// checked against floor(sqrt(x)), with its latency of STAGES cycles and the 10.10 widening.
module tb_pipe_sqrt;
  localparam int STAGES = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0; logic [19:0] rad = 0;
  logic out_valid; logic [9:0] root; logic [19:0] root_fx;
  int checks = 0, failures = 0, cyc = 0;
  pipe_sqrt #(.STAGES(STAGES)) dut (.clk, .rst_n, .in_valid, .radicand(rad), .out_valid, .root, .root_fx);
  int exp_r [$]; int exp_c [$];
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int e = exp_r.pop_front();
    automatic int ec = exp_c.pop_front();
    checks++;
    if (int'(root) != e || root_fx != {5'b0, 10'(e), 5'b0} || cyc - ec != STAGES) begin
      failures++; $display("FAIL root=%0d exp %0d lat %0d", root, e, cyc - ec);
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (n < 1100) rad = 20'(n * n + (n % 3) - 1);
      else rad = 20'($urandom);
      if (n == 5) rad = 20'hFFFFF;
      if (in_valid) begin
        automatic int r = 0;
        while ((r + 1) * (r + 1) <= int'(rad)) r++;
        exp_r.push_back(r); exp_c.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 3) @(posedge clk);
    checks++; if (exp_r.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
