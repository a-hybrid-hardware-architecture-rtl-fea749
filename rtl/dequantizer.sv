// dequantizer: inverse scan and inverse quantization of one component.
//
// Level k of the zigzag scan goes back to raster position p = zz(k). Its
// reconstruction is (|l| << qp) + (2^qp >> 2) with the sign of l (the
// centre of the quantizer's interval), multiplied by nscale(p) so that the
// idct4x4 can apply the transposed core matrix directly.
// Purely combinational; the reconstruction rule is this design's choice,
// matched to quantizer.
module dequantizer
  import od_pkg::*;
(
  input  level_t             lev [NPIX],   // zigzag order
  input  logic [2:0]         qp,
  output logic signed [27:0] w   [NPIX]    // raster order, x nscale
);
  always_comb begin
    for (int k = 0; k < NPIX; k++) begin
      int unsigned p;
      logic [LW-1:0] mag;
      logic [27:0] rec;
      p   = zz(k);
      mag = lev[k][LW-1] ? LW'(-lev[k]) : lev[k];
      if (mag == 0) rec = '0;
      else rec = ((28'(mag) << qp) + ((28'd1 << qp) >> 2)) * 28'(nscale(p));
      w[p] = lev[k][LW-1] ? -$signed(rec) : $signed(rec);
    end
  end
endmodule
