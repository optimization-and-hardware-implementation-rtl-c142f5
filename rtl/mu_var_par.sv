// mu_var_par: parallel local-mean (mu) and local-variance (sigma^2/256) blocks.
//
// The nine neighbourhood pixels arrive as 10.10 numbers (pixels outside the image are zero).
// Local mean, eq. (13) with delta = 8: every pixel is shifted right by 8 and multiplied by 256/9,
// and the nine products are added. Scaled local variance, eq. (21) with d = 2: the differences
// diff[k] = pixel[k] - mu are formed with nine adders (adding the inverted mean and a carry of
// one) and registered, then the products (diff >>> 5) * (diff >>> 6) are added. Both use one
// mac9 structure, so they never compute in the same cycle.
// The owner sequences the steps with five strobes, each acting at the clock edge:
//   ld_mu_prod  capture the mean products        ld_mu   mu  <= sum of products
//   ld_diff     diff[k] <= pixel[k] - mu         ld_var_prod capture the variance products
//   ld_var      var <= sum of products
// A stand-alone computation takes five cycles (mean: 2 stages, variance: 3 stages, as in the
// document's pipeline); in the video embedder the steps of two pixels interleave. The arithmetic,
// shifts and register placement follow the document; the strobe interface is this design's.
module mu_var_par
  import wm_pkg::*;
(
  input  logic clk,
  input  fx_t  nbhd [9],
  input  logic ld_mu_prod,
  input  logic ld_mu,
  input  logic ld_diff,
  input  logic ld_var_prod,
  input  logic ld_var,
  output fx_t  mu,
  output fx_t  var_256
);
  fx_t diff [9];
  fx_t op_a [9];
  fx_t op_b [9];
  fx_t sum;

  always_comb begin
    for (int k = 0; k < 9; k++) begin
      if (ld_var_prod) begin
        op_a[k] = diff[k] >>> 5;
        op_b[k] = diff[k] >>> 6;
      end else begin
        op_a[k] = nbhd[k] >>> 8;
        op_b[k] = K_MEAN;
      end
    end
  end

  mac9 u_mac (.clk(clk), .load(ld_mu_prod | ld_var_prod), .a(op_a), .b(op_b), .sum(sum));

  always_ff @(posedge clk) begin
    if (ld_mu)  mu      <= sum;
    if (ld_var) var_256 <= sum;
    if (ld_diff) begin
      for (int k = 0; k < 9; k++) diff[k] <= nbhd[k] + ~mu + fx_t'(1);
    end
  end

  // The two users of the multiply-add structure must never load it in the same cycle.
  assert property (@(posedge clk) !(ld_mu_prod && ld_var_prod));
endmodule
