// mac9: the shared multiply-add structure of the local-mean and local-variance blocks.
//
// Nine 10.10 multipliers take one operand pair each; when load is high their products (the
// middle 20 bits of each 40-bit product, truncated) are captured in nine prod registers. An
// eight-adder tree adds the nine registered products combinationally, so sum is valid in the
// cycle after load and stays valid while load is low. Whoever owns the structure in a cycle
// supplies the operands: the local-mean block feeds pixels shifted right by 8 and the constant
// 256/9, the variance block feeds the pixel-minus-mean differences shifted by 5 and by 6.
// Nine multipliers, prod registers and eight adders follow the document; the adders wrap
// modulo 2^20 like the document's 20-bit adders.
module mac9
  import wm_pkg::*;
(
  input  logic clk,
  input  logic load,
  input  fx_t  a [9],
  input  fx_t  b [9],
  output fx_t  sum
);
  fx_t prod [9];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int k = 0; k < 9; k++) prod[k] <= fx_mul(a[k], b[k]);
    end
  end

  // Adder tree: 4 + 2 + 1 + 1 = 8 adders.
  fx_t l1 [4];
  fx_t l2 [2];
  fx_t l3;
  always_comb begin
    for (int k = 0; k < 4; k++) l1[k] = prod[2*k] + prod[2*k+1];
    l2[0] = l1[0] + l1[1];
    l2[1] = l1[2] + l1[3];
    l3    = l2[0] + l2[1];
    sum   = l3 + prod[8];
  end
endmodule
