// alpha_block: watermark strength alpha = (A * 16) / sqrt(256 * ||u||^2), eqs. (9) and (11).
//
// Each masked-watermark value u is squared with a multiplier and added to a temporary sum.
// When that sum reaches 462 (so it can never pass 511 and its integer part stays 10 bits), it
// is divided by M/16 and the quotient by N/16, both on the shared divider, and the second
// quotient is added to the running value of 256*||u||^2; the temporary sum restarts at zero.
// With the last u of the image (u_last) whatever remains in the temporary sum is divided in the
// same way, then 256*||u||^2 goes through the square root (10-bit 5.5 root, widened to 10.10)
// and A*16, taken from a 16-entry PSNR table (30..45 dB, psnr_sel = PSNR - 30), is divided by
// that root. alpha is registered and alpha_valid pulses once.
// busy is high while the block needs the divider or the square root: the video embedder
// stalls its pipeline on it, the image embedder waits on it. take tells one cycle earlier,
// together with u_valid, that this u fills a chunk (or is the last) so that busy follows. Divider requests (div_req with
// operands) must be accepted in the cycle they are made; div_res_valid must be high only for
// this block's own results. M and N (rows, columns) are parameters; the threshold, the order
// of the two divisions, the table and the datapath follow the document. Dividing the remainder
// at the end of the image and the request/response interface are this design's choices.
module alpha_block
  import wm_pkg::*;
#(
  parameter int unsigned IMG_M       = 720,
  parameter int unsigned IMG_N       = 1280,
  parameter int unsigned SQRT_STAGES = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  psnr_sel,
  input  logic        u_valid,
  input  fx_t         u,
  input  logic        u_last,
  output logic        busy,
  output logic        take,          // u_valid is accepted and the block becomes busy next cycle
  output logic        div_req,
  output logic [29:0] div_dividend,
  output logic [19:0] div_divisor,
  input  logic        div_res_valid,
  input  logic [19:0] div_res_q,
  output logic        alpha_valid,
  output fx_t         alpha,
  output logic        chunk_done     // pulses when a chunk has been added to 256*||u||^2
);
  localparam logic [19:0] M_DIV16 = 20'((IMG_M / 16) * 1024);
  localparam logic [19:0] N_DIV16 = 20'((IMG_N / 16) * 1024);

  typedef enum logic [2:0] {A_ACC, A_D1, A_W1, A_W2, A_SQ, A_WSQ, A_WA} state_e;
  state_e state;

  fx_t  u2_sum_temp;     // temporary sum of u^2
  fx_t  u2_norm;         // 256 * ||u||^2 so far
  fx_t  dividend_r;
  logic final_r;

  fx_t  u_sq, sum_next;
  assign u_sq     = fx_mul(u, u);
  assign sum_next = u2_sum_temp + u_sq;

  logic        sq_in_valid, sq_out_valid;
  logic [9:0]  sq_root;
  logic [19:0] sq_root_fx;
  pipe_sqrt #(.STAGES(SQRT_STAGES)) u_sqrt (
    .clk(clk), .rst_n(rst_n), .in_valid(sq_in_valid), .radicand(u2_norm),
    .out_valid(sq_out_valid), .root(sq_root), .root_fx(sq_root_fx));

  assign busy = (state != A_ACC);
  assign take = (state == A_ACC) && u_valid && (sum_next >= U2_THRESHOLD || u_last);

  // Divider operand multiplexers (dividend: temporary sum, first quotient or A*16;
  // divisor: M/16, N/16 or the square root).
  fx_t a16;
  assign a16 = psnr_amplitude(psnr_sel) <<< 4;
  always_comb begin
    div_req      = 1'b0;
    div_dividend = {dividend_r, 10'b0};
    div_divisor  = M_DIV16;
    sq_in_valid  = 1'b0;
    case (state)
      A_D1: div_req = 1'b1;
      A_W1: if (div_res_valid) begin
        div_req      = 1'b1;
        div_dividend = {div_res_q, 10'b0};
        div_divisor  = N_DIV16;
      end
      A_SQ: sq_in_valid = 1'b1;
      A_WSQ: if (sq_out_valid) begin
        div_req      = 1'b1;
        div_dividend = {a16, 10'b0};
        div_divisor  = sq_root_fx;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= A_ACC;
      u2_sum_temp <= '0;
      u2_norm     <= '0;
      dividend_r  <= '0;
      final_r     <= 1'b0;
      alpha       <= '0;
      alpha_valid <= 1'b0;
      chunk_done  <= 1'b0;
    end else begin
      alpha_valid <= 1'b0;
      chunk_done  <= 1'b0;
      case (state)
        A_ACC: if (u_valid) begin
          final_r <= u_last;
          if (sum_next >= U2_THRESHOLD || (u_last && sum_next != 0)) begin
            dividend_r  <= sum_next;
            u2_sum_temp <= '0;
            state       <= A_D1;
          end else begin
            u2_sum_temp <= sum_next;
            if (u_last) state <= A_SQ;
          end
        end
        A_D1: state <= A_W1;
        A_W1: if (div_res_valid) state <= A_W2;
        A_W2: if (div_res_valid) begin
          u2_norm    <= u2_norm + fx_t'(div_res_q);
          chunk_done <= 1'b1;
          state      <= final_r ? A_SQ : A_ACC;
        end
        A_SQ:  state <= A_WSQ;
        A_WSQ: if (sq_out_valid) state <= A_WA;
        A_WA: if (div_res_valid) begin
          alpha       <= fx_t'(div_res_q);
          alpha_valid <= 1'b1;
          u2_norm     <= '0;
          final_r     <= 1'b0;
          state       <= A_ACC;
        end
        default: state <= A_ACC;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !u_valid)
    else $error("alpha_block: u arrived while busy");
endmodule
