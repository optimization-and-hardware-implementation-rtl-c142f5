// tb_pipe_div: random and corner divisions through the pipelined divider, one per cycle,
// checked against integer division; also checks the latency of STAGES cycles and the tags.
module tb_pipe_div;
  localparam int STAGES = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0; logic [29:0] dd = 0; logic [19:0] ds = 1; logic [3:0] tag = 0;
  logic out_valid; logic [29:0] quo; logic [19:0] q20; logic [3:0] otag;
  int checks = 0, failures = 0;
  pipe_div #(.STAGES(STAGES), .TAG_W(4)) dut (.clk, .rst_n, .in_valid, .dividend(dd), .divisor(ds),
    .in_tag(tag), .out_valid, .quotient(quo), .q20, .out_tag(otag));
  logic [29:0] exp_q [$]; logic [3:0] exp_t [$]; int exp_c [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic logic [29:0] e = exp_q.pop_front();
    automatic logic [3:0] et = exp_t.pop_front();
    automatic int ec = exp_c.pop_front();
    checks++;
    if (quo !== e || q20 !== e[19:0] || otag !== et || cyc - ec != STAGES) begin
      failures++; $display("FAIL q=%0d exp %0d tag %0d/%0d lat %0d", quo, e, otag, et, cyc - ec);
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      dd = {$urandom, $urandom} ;
      case ($urandom_range(0, 4))
        0: ds = 20'($urandom_range(1, 16));
        1: ds = 20'hFFFFF;
        2: ds = 20'd0;
        default: ds = 20'($urandom);
      endcase
      if (n % 7 == 0) dd = 30'h3FFFFFFF;
      tag = 4'($urandom);
      if (in_valid) begin
        exp_q.push_back(ds == 0 ? 30'h3FFFFFFF : 30'(dd / 30'(ds)));
        exp_t.push_back(tag);
        exp_c.push_back(cyc);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (STAGES + 3) @(posedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
