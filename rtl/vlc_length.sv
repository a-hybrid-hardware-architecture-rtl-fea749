// vlc_length: exact code length of a DCT-mode macroblock.
//
// len = 5 header bits + 3 count bits per component + the length of every
// non-zero run/level symbol (od_pkg::sym_len). Because the code table is
// length-limited and regular, the length is known before the VLC encoder
// runs, which is what lets the rate controller guarantee that a segment
// never overflows (the document's point). Purely combinational.
module vlc_length
  import od_pkg::*;
(
  input  level_t           lev [3][NPIX],   // [Y,Cb,Cr][zigzag]
  output logic [LEN_W-1:0] len
);
  always_comb begin
    int unsigned acc;
    acc = HDR_DCT + 9;
    for (int ch = 0; ch < 3; ch++)
      for (int k = 0; k < NPIX; k++)
        if (lev[ch][k] != 0) acc += sym_len(lev[ch][k]);
    len = LEN_W'(acc);
  end
endmodule
