// block_reconstruct: reconstruction of one macroblock from its record.
//
// DCT mode: the three components go through dequantizer and idct4x4 and
// the result through csc_inverse. Silhouette mode: every pixel takes the
// high or low colour as its bitmap bit says. The record's lo_rgb/hi_rgb
// must already hold the actual colours (palette indices resolved).
// Purely combinational. The same block serves as the encoder's
// reconstruction (the first decoder of the dual-decoder overdrive scheme)
// and inside the frame-memory decoder, so both see identical pictures.
module block_reconstruct
  import od_pkg::*;
(
  input  blk_rec_t rec,
  output rgb_t     pix [NPIX]
);
  level_t             lev [3][NPIX];
  logic signed [27:0] w   [3][NPIX];
  samp_t              smp [3][NPIX];
  rgb_t               dct_pix [NPIX];

  always_comb
    for (int ch = 0; ch < 3; ch++)
      for (int k = 0; k < NPIX; k++) lev[ch][k] = level_t'(rec.lev[ch][k]);

  for (genvar ch = 0; ch < 3; ch++) begin : g_ch
    dequantizer u_dq (.lev(lev[ch]), .qp(rec.qp), .w(w[ch]));
    idct4x4     u_it (.w(w[ch]), .x(smp[ch]));
  end

  csc_inverse u_csc (.y(smp[0]), .cb(smp[1]), .cr(smp[2]), .pix(dct_pix));

  always_comb
    for (int i = 0; i < NPIX; i++)
      if (rec.mode == MODE_SIL) pix[i] = rec.bitmap[i] ? rec.hi_rgb : rec.lo_rgb;
      else pix[i] = dct_pix[i];
endmodule
