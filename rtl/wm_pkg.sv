// wm_pkg: types and constants shared by the watermark embedders.
//
// Every internal quantity is a 20-bit two's-complement fixed-point number with 10 integer and
// 10 fraction bits (the "10.10" format). Pixels of the cover image are 8-bit unsigned values and
// are placed in that format by appending ten zero fraction bits. Multiplications keep the middle
// 20 bits of the 40-bit product (truncation, no rounding). The constants below are the values
// the embedding algorithm needs in that format; the PSNR lookup table holds the amplitude
// A = 255 / sqrt(10^(PSNR/10)) for PSNR = 30..45 dB, truncated to 10.10.
package wm_pkg;

  localparam int unsigned FX_W    = 20;   // total width of a 10.10 number
  localparam int unsigned FX_FRAC = 10;   // fraction bits

  typedef logic signed [FX_W-1:0] fx_t;
  typedef logic        [7:0]      pix_t;

  // 256/9 in 10.10 (truncated): weight of a neighbour pre-shifted by 8 in the local mean.
  localparam fx_t K_MEAN = fx_t'(29127);
  // 1/256 and 1 in 10.10.
  localparam fx_t FX_INV256 = fx_t'(4);
  localparam fx_t FX_ONE    = fx_t'(1024);
  // Chunk threshold of the ||u||^2 accumulation: 462 = 511 - 7^2.
  localparam fx_t U2_THRESHOLD = fx_t'(462 * 1024);

  // Tag carried through the shared divider to tell whose result comes out.
  typedef enum logic {DIV_MASK = 1'b0, DIV_ALPHA = 1'b1} div_owner_e;

  // 10.10 multiply: 40-bit signed product, keep bits [29:10].
  function automatic fx_t fx_mul(fx_t a, fx_t b);
    logic signed [2*FX_W-1:0] p;
    p = a * b;
    return p[FX_W+FX_FRAC-1:FX_FRAC];
  endfunction

  // Pixel to 10.10.
  function automatic fx_t fx_from_pix(pix_t x);
    return fx_t'({2'b00, x, 10'b0});
  endfunction

  // Amplitude A for PSNR = 30 + sel dB, in 10.10 (A = 255 / sqrt(10^(PSNR/10))).
  function automatic fx_t psnr_amplitude(logic [3:0] sel);
    case (sel)
      4'd0:  return fx_t'(8257);   // 30 dB
      4'd1:  return fx_t'(7359);
      4'd2:  return fx_t'(6559);
      4'd3:  return fx_t'(5845);
      4'd4:  return fx_t'(5210);
      4'd5:  return fx_t'(4643);   // 35 dB
      4'd6:  return fx_t'(4138);
      4'd7:  return fx_t'(3688);
      4'd8:  return fx_t'(3287);
      4'd9:  return fx_t'(2929);
      4'd10: return fx_t'(2611);   // 40 dB
      4'd11: return fx_t'(2327);
      4'd12: return fx_t'(2074);
      4'd13: return fx_t'(1848);
      4'd14: return fx_t'(1647);
      default: return fx_t'(1468); // 45 dB
    endcase
  endfunction

endpackage
