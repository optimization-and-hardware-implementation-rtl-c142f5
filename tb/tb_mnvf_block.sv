// tb_mnvf_block: mask requests with random variances go through a real pipelined divider; pops
// are withheld at random (as during a stall) so quotients pile up in the capture register. Every
// mask value must equal 1 - 1/(1 + 256 sigma^2/256) from the reference model, arrive in request
// order with its tag, and the capture register must have been used.
module tb_mnvf_block;
  import wm_pkg::*; import wm_ref_pkg::*;
  localparam int STAGES = 6, CAP = 5;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  fx_t var_256 = 0; logic var_valid = 0; logic [7:0] var_tag = 0;
  logic div_req; logic [29:0] dd; logic [19:0] ds; logic [7:0] dtag;
  logic res_valid; logic [29:0] quo; logic [19:0] q; logic [7:0] rtag;
  logic pop = 0, head_valid, m_valid; logic [7:0] head_tag, m_tag; fx_t m_out;
  int checks = 0, failures = 0, max_parked = 0, in_flight = 0;
  pipe_div #(.STAGES(STAGES), .TAG_W(8)) u_div (.clk, .rst_n, .in_valid(div_req), .dividend(dd),
    .divisor(ds), .in_tag(dtag), .out_valid(res_valid), .quotient(quo), .q20(q), .out_tag(rtag));
  mnvf_block #(.CAP_LEN(CAP), .TAG_W(8)) dut (.clk, .rst_n, .var_256, .var_valid, .var_tag,
    .div_req, .div_dividend(dd), .div_divisor(ds), .div_tag(dtag), .res_valid, .res_q(q),
    .res_tag(rtag), .pop, .head_valid, .head_tag, .m_valid, .m_out, .m_tag);
  longint exp_m [$]; int exp_t [$];
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.count) > max_parked) max_parked = int'(dut.count);
    if (m_valid) begin
      automatic longint e = exp_m.pop_front(); automatic int et = exp_t.pop_front();
      checks++;
      if (longint'(m_out) != e || int'(m_tag) != et) begin
        failures++; $display("FAIL m=%0d exp %0d tag %0d/%0d", m_out, e, m_tag, et); end
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    begin
      int ph, stall_left;
      ph = 0; stall_left = 0;
      for (int n = 0; n < 3000; n++) begin
        automatic bit stalled;
        @(negedge clk);
        // a slot of three phases as in the video pipeline: request in phase 1, pop in phase 2;
        // a stall freezes the phase counter in phase 2 for a random number of cycles
        if (stall_left == 0 && ph == 2 && $urandom_range(0, 6) == 0) stall_left = $urandom_range(4, 20);
        stalled = (stall_left != 0);
        var_valid = (!stalled && ph == 1);
        case ($urandom_range(0, 3))
          0: var_256 = 0;
          1: var_256 = fx_t'($urandom_range(0, 64));
          2: var_256 = fx_t'($urandom_range(0, 300000));
          default: var_256 = fx_t'($urandom_range(0, 4096));
        endcase
        var_tag = 8'(n);
        pop = !stalled && ph == 2;
        if (var_valid) begin
          exp_m.push_back(rmask(longint'(var_256))); exp_t.push_back(n % 256);
          #1; checks++; if (dd != 30'(4 << 10) || ds != 20'(4 + var_256)) begin failures++; $display("FAIL op %0d %0d %0d", dd, ds, var_256); end
        end
        if (stalled) stall_left--;
        else ph = (ph + 1) % 3;
      end
    end
    @(negedge clk); var_valid = 0; pop = 1;
    repeat (40) @(negedge clk);
    checks++; if (exp_m.size() != 0) begin failures++; $display("FAIL %0d left", exp_m.size()); end
    checks++; if (max_parked < 2) begin failures++; $display("FAIL capture unused"); end
    $display("capture register peak occupancy %0d", max_parked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
