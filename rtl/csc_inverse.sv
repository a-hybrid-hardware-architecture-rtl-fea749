// csc_inverse: YCbCr to RGB conversion of one 4x4 macroblock.
//
// Inverse of csc_forward with 8-bit fixed-point weights:
//   R = Y + (359 Cr + 128) >>> 8
//   G = Y - (88 Cb + 183 Cr - 128) >>> 8
//   B = Y + (454 Cb + 128) >>> 8
// where Y is the un-centred luma (sample + 128). Results are clamped to
// 0..255. Purely combinational; weights are this design's choice.
module csc_inverse
  import od_pkg::*;
(
  input  samp_t y   [NPIX],
  input  samp_t cb  [NPIX],
  input  samp_t cr  [NPIX],
  output rgb_t  pix [NPIX]
);
  function automatic logic [7:0] clamp8(input logic signed [19:0] v);
    if (v < 0) return 8'd0;
    if (v > 255) return 8'd255;
    return v[7:0];
  endfunction

  always_comb begin
    for (int i = 0; i < NPIX; i++) begin
      logic signed [19:0] yy, bb, rr;
      yy = 20'(y[i]) + 20'sd128;
      bb = 20'(cb[i]);
      rr = 20'(cr[i]);
      pix[i].r = clamp8(yy + ((20'sd359 * rr + 20'sd128) >>> 8));
      pix[i].g = clamp8(yy - ((20'sd88 * bb + 20'sd183 * rr - 20'sd128) >>> 8));
      pix[i].b = clamp8(yy + ((20'sd454 * bb + 20'sd128) >>> 8));
    end
  end
endmodule
