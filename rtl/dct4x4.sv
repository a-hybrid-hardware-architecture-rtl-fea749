// dct4x4: forward 4x4 integer DCT of one colour component.
//
// Computes Y = C X C^T with the integer core matrix
//   C = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
// (the H.264-style approximation of the DCT). Rows of C have squared norms
// 4, 10, 4, 10; the quantizer folds that normalisation in (od_pkg::nscale).
// Input and output are raster order (row*4+col). Purely combinational.
// The document specifies a DCT without its size or arithmetic; the 4x4
// integer form is this design's choice.
module dct4x4
  import od_pkg::*;
(
  input  samp_t x [NPIX],
  output coef_t c [NPIX]
);
  // Butterfly form of one 4-point transform.
  function automatic void t4(input coef_t a0, a1, a2, a3,
                             output coef_t o0, o1, o2, o3);
    coef_t s0, s1, d0, d1;
    s0 = a0 + a3;  d0 = a0 - a3;
    s1 = a1 + a2;  d1 = a1 - a2;
    o0 = s0 + s1;
    o2 = s0 - s1;
    o1 = (d0 <<< 1) + d1;
    o3 = d0 - (d1 <<< 1);
  endfunction

  coef_t h [NPIX];

  always_comb begin
    for (int r = 0; r < 4; r++)  // transform rows
      t4(coef_t'(x[r*4]), coef_t'(x[r*4+1]), coef_t'(x[r*4+2]), coef_t'(x[r*4+3]),
         h[r*4], h[r*4+1], h[r*4+2], h[r*4+3]);
    for (int k = 0; k < 4; k++)  // then columns
      t4(h[k], h[4+k], h[8+k], h[12+k], c[k], c[4+k], c[8+k], c[12+k]);
  end
endmodule
