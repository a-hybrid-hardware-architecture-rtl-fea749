// silhouette_detector: synthetic-image processor of one macroblock.
//
// Luma of each pixel is Y = (77 R + 150 G + 29 B + 128) >> 8. Pixels with
// Y above the block mean form the high group, the others the low group;
// the group membership is the 16-bit silhouette bitmap (1 = high). The low
// and high colour levels are the rounded per-component means of each group.
// The block is declared synthetic when both groups are non-empty, the gap
// between the mean lumas of the groups is at least GAP_TH, and the noise of
// each group, taken as the largest first-order (absolute) difference of a
// member's luma from its group mean, is at most NOISE_TH.
// Purely combinational.
// The document gives the low/high grouping of luminance, the bitmap, the
// decision on gap and group noise and the use of a first-order measure;
// the exact measures and thresholds are this design's choices.
module silhouette_detector
  import od_pkg::*;
#(
  parameter int unsigned GAP_TH   = 48,
  parameter int unsigned NOISE_TH = 12
) (
  input  rgb_t            pix [NPIX],
  output logic [NPIX-1:0] bitmap,
  output rgb_t            lo_rgb,
  output rgb_t            hi_rgb,
  output logic            synthetic
);
  function automatic logic [7:0] luma(input rgb_t p);
    logic [16:0] t;
    t = 17'd77 * 17'(p.r) + 17'd150 * 17'(p.g) + 17'd29 * 17'(p.b) + 17'd128;
    return t[15:8];
  endfunction

  function automatic logic [7:0] rdiv(input logic [11:0] s, input logic [4:0] n);
    logic [11:0] q;
    q = (s + 12'(n >> 1)) / 12'(n);
    return q[7:0];
  endfunction

  logic [7:0] y [NPIX];

  always_comb begin
    logic [11:0] ysum, ylo_s, yhi_s;
    logic [11:0] rl, gl, bl, rh, gh, bh;
    logic [4:0]  nhi, nlo;
    logic [7:0]  ylo_m, yhi_m, nlo_max, nhi_max;
    ysum = '0;
    for (int i = 0; i < NPIX; i++) begin
      y[i] = luma(pix[i]);
      ysum += 12'(y[i]);
    end
    {ylo_s, yhi_s, rl, gl, bl, rh, gh, bh} = '0;
    nhi = '0;
    for (int i = 0; i < NPIX; i++) begin
      bitmap[i] = ({y[i], 4'b0} > ysum);   // y > mean without dividing
      if (bitmap[i]) begin
        nhi++;
        yhi_s += 12'(y[i]);
        rh += 12'(pix[i].r);  gh += 12'(pix[i].g);  bh += 12'(pix[i].b);
      end else begin
        ylo_s += 12'(y[i]);
        rl += 12'(pix[i].r);  gl += 12'(pix[i].g);  bl += 12'(pix[i].b);
      end
    end
    nlo = 5'd16 - nhi;
    if (nhi == 0 || nlo == 0) begin
      synthetic = 1'b0;
      lo_rgb = '0;
      hi_rgb = '0;
      ylo_m = '0;
      yhi_m = '0;
    end else begin
      lo_rgb = '{rdiv(rl, nlo), rdiv(gl, nlo), rdiv(bl, nlo)};
      hi_rgb = '{rdiv(rh, nhi), rdiv(gh, nhi), rdiv(bh, nhi)};
      ylo_m  = rdiv(ylo_s, nlo);
      yhi_m  = rdiv(yhi_s, nhi);
      synthetic = 1'b1;
    end
    nlo_max = '0;
    nhi_max = '0;
    for (int i = 0; i < NPIX; i++) begin
      logic [7:0] m, d;
      m = bitmap[i] ? yhi_m : ylo_m;
      d = (y[i] > m) ? y[i] - m : m - y[i];
      if (bitmap[i]) begin
        if (d > nhi_max) nhi_max = d;
      end else begin
        if (d > nlo_max) nlo_max = d;
      end
    end
    if ({1'b0, yhi_m} < {1'b0, ylo_m} + 9'(GAP_TH)) synthetic = 1'b0;
    if (nlo_max > 8'(NOISE_TH) || nhi_max > 8'(NOISE_TH)) synthetic = 1'b0;
  end
endmodule
