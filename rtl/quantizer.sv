// quantizer: quantization, zigzag scan and non-zero limit of one component.
//
// For raster position p the integer DCT coefficient c is first normalised
// (|c| * nscale(p) / 4096, see od_pkg) and then divided by the step 2^qp:
//   level = sign(c) * min(1023, (|c| * nscale(p) + 2^(10+qp)) >> (12+qp))
// i.e. rounding with a quarter-step offset. Positions outside the top-left
// 2x2 are forced to zero when low_only is set (down-sampled chroma). The
// levels are then read out in zigzag order and only the first MAX_NZ
// non-zero levels are kept; truncated reports that more were present.
// Purely combinational.
// The document gives the functions (quantize, scan, limit on the number of
// non-zero coefficients); the step law, rounding and MAX_NZ = 6 are this
// design's choices.
module quantizer
  import od_pkg::*;
(
  input  coef_t      c   [NPIX],   // raster order
  input  logic [2:0] qp,
  input  logic       low_only,
  output level_t     lev [NPIX],   // zigzag order
  output logic       truncated
);
  always_comb begin
    int unsigned nz;
    nz = 0;
    truncated = 1'b0;
    for (int k = 0; k < NPIX; k++) begin
      int unsigned p;
      logic [CW-1:0] mag;
      logic [31:0] prod, q;
      level_t l;
      p   = zz(k);
      mag = c[p][CW-1] ? CW'(-c[p]) : c[p];
      prod = 32'(mag) * 32'(nscale(p)) + (32'd1 << (10 + qp));
      q    = prod >> (12 + qp);
      if (q > 1023) q = 1023;
      if (low_only && (p[1] || p[3])) q = 0;
      l = c[p][CW-1] ? -level_t'(q) : level_t'(q);
      if (q != 0) begin
        if (nz < MAX_NZ) nz++;
        else begin
          l = '0;
          truncated = 1'b1;
        end
      end
      lev[k] = l;
    end
  end
endmodule
