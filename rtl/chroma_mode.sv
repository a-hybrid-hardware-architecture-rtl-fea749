// chroma_mode: dynamic colour space decision of one macroblock.
//
// The chroma of a macroblock may be down-sampled (coded as 4:2:0-like, only
// the four lowest-frequency coefficients of Cb and Cr) when it holds little
// high spatial frequency energy. The measure is the sum, over Cb and Cr and
// over the 12 coefficients outside the top-left 2x2, of the normalised
// magnitude |c| * nscale / 4096; cdown is set when it is at most TH.
// Purely combinational. The document states the decision and that only
// low-frequency areas are down-sampled; the measure and TH are this
// design's choices.
module chroma_mode
  import od_pkg::*;
#(
  parameter int unsigned TH = 16
) (
  input  coef_t cb [NPIX],   // raster order
  input  coef_t cr [NPIX],
  output logic  cdown,
  output logic [15:0] hf_energy
);
  always_comb begin
    logic [31:0] acc;
    acc = '0;
    for (int p = 0; p < NPIX; p++) begin
      if (p[1] || p[3]) begin
        logic [CW-1:0] mb, mr;
        mb = cb[p][CW-1] ? CW'(-cb[p]) : cb[p];
        mr = cr[p][CW-1] ? CW'(-cr[p]) : cr[p];
        acc += (32'(mb) * 32'(nscale(p))) >> 12;
        acc += (32'(mr) * 32'(nscale(p))) >> 12;
      end
    end
    hf_energy = (acc > 32'hFFFF) ? 16'hFFFF : acc[15:0];
    cdown = (acc <= 32'(TH));
  end
endmodule
