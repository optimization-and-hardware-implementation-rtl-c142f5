// mnvf_block: noise-visibility mask M_NVF = 1 - (1/256) / (1/256 + sigma^2/256), eq. (7).
//
// Front half: a first adder forms the divisor 1/256 + sigma^2/256 and the dividend is 1/256 with
// ten zero bits appended (so the shared 30:20 divider returns a 10.10 quotient). A division is
// requested in the cycle var_valid is high; the request carries a caller tag (the pixel address
// in the video embedder). Back half: when the quotient returns (res_valid), it is either used at
// once or captured in a shift register of CAP_LEN entries. pop takes the oldest quotient: from the
// shift register if it holds any, else straight from the divider output (the two inputs of the
// multiplexer in front of the second adder). The second adder computes M = 1 + ~q + 1, and M and
// its tag are registered (m_valid one cycle after pop). head_valid / head_tag tell the owner which
// pixel the next pop will deliver, so it can fetch that pixel's watermark in time.
// The capture register exists for the video embedder: while the pipeline is stalled for the
// watermark-strength divisions, the mask divisions still inside the divider keep coming out and
// must not be lost. Its length follows the document (one less than the divider stages); using it
// as a first-in first-out buffer with a bypass is this design's way of realising the multiplexer.
module mnvf_block
  import wm_pkg::*;
#(
  parameter int unsigned CAP_LEN = 5,
  parameter int unsigned TAG_W   = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // request side
  input  fx_t              var_256,
  input  logic             var_valid,
  input  logic [TAG_W-1:0] var_tag,
  output logic             div_req,
  output logic [29:0]      div_dividend,
  output logic [19:0]      div_divisor,
  output logic [TAG_W-1:0] div_tag,
  // result side
  input  logic             res_valid,
  input  logic [19:0]      res_q,
  input  logic [TAG_W-1:0] res_tag,
  input  logic             pop,
  output logic             head_valid,
  output logic [TAG_W-1:0] head_tag,
  output logic             m_valid,
  output fx_t              m_out,
  output logic [TAG_W-1:0] m_tag
);
  localparam int unsigned CW = $clog2(CAP_LEN + 1);

  // First adder and divider operands.
  assign div_req      = var_valid;
  assign div_divisor  = 20'(FX_INV256 + var_256);
  assign div_dividend = {20'(FX_INV256), 10'b0};
  assign div_tag      = var_tag;

  // Capture shift register.
  logic [19:0]      cap_q   [CAP_LEN];
  logic [TAG_W-1:0] cap_tag [CAP_LEN];
  logic [CW-1:0]    count;

  logic             from_reg;
  logic [19:0]      sel_q;
  logic [TAG_W-1:0] sel_tag;

  assign from_reg   = (count != 0);
  assign head_valid = from_reg || res_valid;
  assign head_tag   = from_reg ? cap_tag[0] : res_tag;
  assign sel_q      = from_reg ? cap_q[0]   : res_q;
  assign sel_tag    = head_tag;

  logic do_pop, do_push;
  assign do_pop  = pop && head_valid;
  assign do_push = res_valid && !(do_pop && !from_reg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      m_valid <= 1'b0;
      m_out   <= '0;
      m_tag   <= '0;
    end else begin
      m_valid <= do_pop;
      if (do_pop) begin
        m_out <= FX_ONE + fx_t'(~sel_q) + fx_t'(1);   // second adder: 1 - q
        m_tag <= sel_tag;
      end
      // shift out the head, append the new result
      begin
        int unsigned n;
        n = count;
        if (do_pop && from_reg) begin
          for (int k = 0; k < int'(CAP_LEN) - 1; k++) begin
            cap_q[k]   <= cap_q[k+1];
            cap_tag[k] <= cap_tag[k+1];
          end
          n = n - 1;
        end
        if (do_push) begin
          cap_q[n]   <= res_q;
          cap_tag[n] <= res_tag;
          n = n + 1;
        end
        count <= CW'(n);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   !(do_push && !(do_pop && from_reg) && count == CW'(CAP_LEN)))
    else $error("mnvf_block: capture register overflow");
endmodule
