// idct4x4: inverse 4x4 integer DCT of one colour component.
//
// Input are normalised coefficients already multiplied by the scale
// od_pkg::nscale (x4096), as produced by the dequantizer. The output is
//   X = (C^T W C + 2048) >>> 12
// with the same core matrix C as dct4x4, clamped to the sample range
// -512..511. Purely combinational; the arithmetic is this design's choice.
module idct4x4
  import od_pkg::*;
(
  input  logic signed [27:0] w [NPIX],
  output samp_t              x [NPIX]
);
  typedef logic signed [31:0] acc_t;

  // Transposed core matrix applied to one 4-vector: C^T v.
  function automatic void it4(input acc_t v0, v1, v2, v3,
                              output acc_t o0, o1, o2, o3);
    acc_t e0, e1, f0, f1;
    e0 = v0 + v2;            e1 = v0 - v2;
    f0 = (v1 <<< 1) + v3;    f1 = v1 - (v3 <<< 1);
    o0 = e0 + f0;
    o3 = e0 - f0;
    o1 = e1 + f1;
    o2 = e1 - f1;
  endfunction

  acc_t h [NPIX];
  acc_t g [NPIX];

  always_comb begin
    for (int k = 0; k < 4; k++)  // columns: C^T W
      it4(acc_t'(w[k]), acc_t'(w[4+k]), acc_t'(w[8+k]), acc_t'(w[12+k]),
          h[k], h[4+k], h[8+k], h[12+k]);
    for (int r = 0; r < 4; r++)  // rows: (C^T W) C
      it4(h[r*4], h[r*4+1], h[r*4+2], h[r*4+3],
          g[r*4], g[r*4+1], g[r*4+2], g[r*4+3]);
    for (int i = 0; i < NPIX; i++) begin
      acc_t v;
      v = (g[i] + 32'sd2048) >>> 12;
      if (v > 511) x[i] = 10'sd511;
      else if (v < -512) x[i] = -10'sd512;
      else x[i] = samp_t'(v);
    end
  end
endmodule
