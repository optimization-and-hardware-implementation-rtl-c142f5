// u_block: masked watermark u(i,j) = M_NVF(i,j) * w(i,j).
//
// One 10.10 multiplier (middle 20 bits of the product, truncated) between the mask value and
// the watermark sample read from memory; the product is registered together with a tag, so u
// is valid the cycle after in_valid. This follows the document's u-block; the tag is this
// design's way to keep the pixel address with the value.
module u_block
  import wm_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  fx_t              m_nvf,
  input  fx_t              w,
  input  logic [TAG_W-1:0] in_tag,
  output logic             u_valid,
  output fx_t              u,
  output logic [TAG_W-1:0] u_tag
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_valid <= 1'b0;
      u       <= '0;
      u_tag   <= '0;
    end else begin
      u_valid <= in_valid;
      if (in_valid) begin
        u     <= fx_mul(m_nvf, w);
        u_tag <= in_tag;
      end
    end
  end
endmodule
