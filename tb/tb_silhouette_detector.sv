// tb_silhouette_detector: checks bitmap, colour levels and the synthetic
// decision against the testbench model for two-colour blocks with and
// without noise, low-contrast blocks, flat blocks and random blocks.
module tb_silhouette_detector;
  import od_pkg::*;
  import od_ref_pkg::*;
  rgb_t            pix [NPIX];
  logic [NPIX-1:0] bitmap;
  rgb_t            lo_rgb, hi_rgb;
  logic            synthetic;
  int checks = 0, failures = 0, nsyn = 0, nnat = 0;
  silhouette_detector #(.GAP_TH(48), .NOISE_TH(12)) dut (.*);

  function automatic int luma(input rgb_t p);
    return (77 * p.r + 150 * p.g + 29 * p.b + 128) / 256;
  endfunction

  function automatic int rdiv(input int s, input int n);
    return (s + n / 2) / n;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      rgb_t a, b;
      int noise, y[16], sum, n1, s1[4], s0[4], m1, m0, d1, d0;
      bit  bm[16], e_syn;
      a = rgb_t'(24'($urandom));
      b = rgb_t'(24'($urandom));
      noise = (t % 4 == 0) ? 0 : (t % 4 == 1) ? 3 : (t % 4 == 2) ? 40 : 0;
      for (int i = 0; i < NPIX; i++) begin
        rgb_t p;
        p = ($urandom_range(0, 1) == 1) ? a : b;
        if (t % 4 == 3 && t % 8 == 7) p = a;   // flat block
        if (noise != 0) begin
          p.r = 8'(clamp(int'(p.r) + int'($urandom_range(0, noise)), 0, 255));
          p.g = 8'(clamp(int'(p.g) + int'($urandom_range(0, noise)), 0, 255));
        end
        pix[i] = p;
      end
      #1;
      sum = 0;
      for (int i = 0; i < NPIX; i++) begin y[i] = luma(pix[i]); sum += y[i]; end
      n1 = 0;
      s1 = '{0, 0, 0, 0};
      s0 = '{0, 0, 0, 0};
      for (int i = 0; i < NPIX; i++) begin
        bm[i] = (y[i] * 16 > sum);
        if (bm[i]) begin n1++; s1[0] += pix[i].r; s1[1] += pix[i].g; s1[2] += pix[i].b; s1[3] += y[i]; end
        else begin s0[0] += pix[i].r; s0[1] += pix[i].g; s0[2] += pix[i].b; s0[3] += y[i]; end
      end
      e_syn = (n1 != 0 && n1 != 16);
      if (e_syn) begin
        m1 = rdiv(s1[3], n1);
        m0 = rdiv(s0[3], 16 - n1);
        d1 = 0;  d0 = 0;
        for (int i = 0; i < NPIX; i++)
          if (bm[i]) d1 = (iabs(y[i] - m1) > d1) ? iabs(y[i] - m1) : d1;
          else d0 = (iabs(y[i] - m0) > d0) ? iabs(y[i] - m0) : d0;
        e_syn = (m1 >= m0 + 48) && d1 <= 12 && d0 <= 12;
        checks += 2;
        if (lo_rgb != rgb_t'({8'(rdiv(s0[0], 16 - n1)), 8'(rdiv(s0[1], 16 - n1)), 8'(rdiv(s0[2], 16 - n1))})) begin
          failures++;
          $display("FAIL: low level %h", lo_rgb);
        end
        if (hi_rgb != rgb_t'({8'(rdiv(s1[0], n1)), 8'(rdiv(s1[1], n1)), 8'(rdiv(s1[2], n1))})) begin
          failures++;
          $display("FAIL: high level %h", hi_rgb);
        end
      end
      for (int i = 0; i < NPIX; i++) begin
        checks++;
        if (bitmap[i] != bm[i]) begin
          failures++;
          $display("FAIL: bitmap bit %0d", i);
        end
      end
      checks++;
      if (synthetic != e_syn) begin
        failures++;
        $display("FAIL: test %0d synthetic %0d expected %0d", t, synthetic, e_syn);
      end
      if (synthetic) nsyn++; else nnat++;
    end
    checks++;
    if (nsyn < 100 || nnat < 100) begin
      failures++;
      $display("FAIL: too few of one kind: %0d synthetic %0d natural", nsyn, nnat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
