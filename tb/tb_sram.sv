// tb_sram: writes random words to random addresses, reads them back one cycle later and
// compares with a shadow copy; checks that a read answers in the next cycle and en=0 holds data.
module tb_sram;
  localparam int DEPTH = 256;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0; logic [7:0] addr = 0; logic [19:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [19:0] shadow [DEPTH];
  sram #(.DEPTH(DEPTH), .WIDTH(20)) dut (.clk, .en, .we, .addr, .wdata, .rdata);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 8'(a); wdata = 20'($urandom); shadow[a] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = 1; we = ($urandom_range(0, 2) == 0); addr = 8'($urandom); wdata = 20'($urandom);
      if (we) shadow[addr] = wdata;
      else begin
        automatic logic [19:0] e = shadow[addr];
        @(negedge clk); en = 0; we = 0;
        checks++; if (rdata !== e) begin failures++; $display("FAIL addr %0d", addr); end
        @(negedge clk);
        checks++; if (rdata !== e) failures++;   // held while idle
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
