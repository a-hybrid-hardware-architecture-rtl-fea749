// csc_forward: RGB to YCbCr conversion of one 4x4 macroblock.
//
// Each pixel is converted with 8-bit fixed-point BT.601 weights:
//   Y  = (77 R + 150 G + 29 B + 128) >> 8, output centred as Y - 128
//   Cb = (-43 R - 85 G + 128 B + 128) >>> 8
//   Cr = (128 R - 107 G - 21 B + 128) >>> 8
// All three outputs are signed samples around zero, ready for the DCT.
// Purely combinational. The document names the YCbCr colour space; the
// weights and their precision are this design's choice.
module csc_forward
  import od_pkg::*;
(
  input  rgb_t  pix [NPIX],
  output samp_t y   [NPIX],
  output samp_t cb  [NPIX],
  output samp_t cr  [NPIX]
);
  always_comb begin
    for (int i = 0; i < NPIX; i++) begin
      logic signed [18:0] r, g, b, ty, tb, tr;
      r  = 19'(pix[i].r);
      g  = 19'(pix[i].g);
      b  = 19'(pix[i].b);
      ty = 19'sd77 * r + 19'sd150 * g + 19'sd29 * b + 19'sd128;
      tb = -19'sd43 * r - 19'sd85 * g + 19'sd128 * b + 19'sd128;
      tr = 19'sd128 * r - 19'sd107 * g - 19'sd21 * b + 19'sd128;
      y[i]  = samp_t'((ty >>> 8) - 19'sd128);
      cb[i] = samp_t'(tb >>> 8);
      cr[i] = samp_t'(tr >>> 8);
    end
  end
endmodule
