// mu_var_ser: serial local-mean (mu) and local-variance (sigma^2/256) blocks.
//
// The low-cost variant of mu_var_par: one multiplier and one accumulating adder serve both
// computations, plus one more adder that forms the differences pixel - mu. After start (one
// cycle, with the nine 10.10 neighbourhood pixels held stable on nbhd) the mean is accumulated
// over nine cycles from (pixel >> 8) * 256/9, then the variance over nine more cycles from
// (diff >>> 5) * (diff >>> 6), diff = pixel - mu. done pulses for one cycle when both mu and
// var_256 are valid, 19 cycles after start. The results are bit-identical to the parallel
// block: the same products are added, only in sequence. One multiplier, one adder and one extra
// adder for the subtraction follow the document; the cycle schedule is this design's.
module mu_var_ser
  import wm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  nbhd [9],
  output fx_t  mu,
  output fx_t  var_256,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {S_IDLE, S_MEAN, S_VAR} state_e;
  state_e     state;
  logic [3:0] idx;
  fx_t        acc;
  fx_t        pix, diff, op_a, op_b;

  always_comb begin
    pix  = nbhd[idx];
    diff = pix + ~mu + fx_t'(1);                  // the extra adder
    if (state == S_VAR) begin
      op_a = diff >>> 5;
      op_b = diff >>> 6;
    end else begin
      op_a = pix >>> 8;
      op_b = K_MEAN;
    end
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      acc     <= '0;
      mu      <= '0;
      var_256 <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_MEAN;
          idx   <= '0;
          acc   <= '0;
        end
        S_MEAN: begin
          if (idx == 4'd8) begin
            mu    <= acc + fx_mul(op_a, op_b);
            acc   <= '0;
            idx   <= '0;
            state <= S_VAR;
          end else begin
            acc <= acc + fx_mul(op_a, op_b);
            idx <= idx + 4'd1;
          end
        end
        S_VAR: begin
          if (idx == 4'd8) begin
            var_256 <= acc + fx_mul(op_a, op_b);
            state   <= S_IDLE;
            done    <= 1'b1;
          end else begin
            acc <= acc + fx_mul(op_a, op_b);
            idx <= idx + 4'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
