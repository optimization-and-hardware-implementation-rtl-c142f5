// y_block: watermarked pixel y(i,j) = x(i,j) + alpha * u(i,j), eq. (1).
//
// Two stages. When u_valid is high the product alpha * u (10.10, truncated) is latched in the
// a_u register; in the next cycle the adder adds the oldest cover pixel x waiting in the x
// buffer and registers y (10.10, not clipped: watermarked values may leave 0..255). The cover
// pixels are read ahead of their u values and pushed with x_push into a shift register of
// X_DEPTH entries that acts as a first-in first-out buffer; x_count tells the owner how many
// are waiting, and x_full that no more may be pushed. Each u must find its x in the buffer when
// its product reaches the adder. The multiplier, the a_u register and the x buffer (7 entries in
// the document's deepest pipeline) follow the document; the count and full outputs are this
// design's.
module y_block
  import wm_pkg::*;
#(
  parameter int unsigned X_DEPTH = 7,
  localparam int unsigned CW = $clog2(X_DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fx_t           alpha,
  input  logic          x_push,
  input  pix_t          x_in,
  input  logic          u_valid,
  input  fx_t           u,
  output logic [CW-1:0] x_count,
  output logic          x_full,
  output logic          y_valid,
  output fx_t           y
);
  pix_t xbuf [X_DEPTH];
  fx_t  a_u;
  logic a_u_valid;

  assign x_full = (x_count == CW'(X_DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_u       <= '0;
      a_u_valid <= 1'b0;
      y_valid   <= 1'b0;
      y         <= '0;
      x_count   <= '0;
    end else begin
      a_u_valid <= u_valid;
      if (u_valid) a_u <= fx_mul(alpha, u);
      y_valid <= a_u_valid;
      if (a_u_valid) y <= fx_from_pix(xbuf[0]) + a_u;
      begin
        int unsigned n;
        n = x_count;
        if (a_u_valid) begin
          for (int k = 0; k < int'(X_DEPTH) - 1; k++) xbuf[k] <= xbuf[k+1];
          n = n - 1;
        end
        if (x_push) begin
          xbuf[n] <= x_in;
          n = n + 1;
        end
        x_count <= CW'(n);
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) a_u_valid |-> x_count != 0)
    else $error("y_block: no cover pixel for the product");
  assert property (@(posedge clk) disable iff (!rst_n) (x_push && !a_u_valid) |-> !x_full)
    else $error("y_block: x buffer overflow");
endmodule
