// tb_block_reconstruct: checks the reconstruction of random DCT-mode
// records against the testbench's dequantize / matrix IDCT / colour
// conversion chain, and of silhouette records against the bitmap
// selection; also that a smooth block quantized at qp 0 comes back within
// 3 codes of the original.
module tb_block_reconstruct;
  import od_pkg::*;
  import od_ref_pkg::*;
  blk_rec_t rec;
  rgb_t     pix [NPIX];
  int checks = 0, failures = 0;
  block_reconstruct dut (.*);
  initial begin
    for (int t = 0; t < 600; t++) begin
      rgb_t e [16];
      rgb_t src [16];
      if (t % 3 == 0) rec = rand_sil_rec();
      else if (t % 3 == 1) begin
        rec = rand_dct_rec();
        for (int ch = 0; ch < 3; ch++)
          for (int k = 0; k < NPIX; k++)
            if ($signed(rec.lev[ch][k]) > 200 || $signed(rec.lev[ch][k]) < -200) rec.lev[ch][k] = LW'(7);
      end else begin
        // smooth block, transformed and quantized by the testbench at qp 0
        blk16_t s [3];
        rec = '0;
        rec.mode = MODE_DCT;
        for (int i = 0; i < 16; i++) begin
          src[i] = '{8'(40 + 3 * (i % 4) + t % 50), 8'(90 + 2 * (i / 4)), 8'(160 - i)};
          csc_fwd(src[i], s[0][i], s[1][i], s[2][i]);
        end
        for (int ch = 0; ch < 3; ch++) begin
          blk16_t l;
          void'(quant(dct(s[ch]), 0, 1'b0, l));
          for (int k = 0; k < 16; k++) rec.lev[ch][k] = LW'(l[k]);
        end
      end
      #1;
      reconstruct(rec, e);
      for (int i = 0; i < NPIX; i++) begin
        checks++;
        if (pix[i] != e[i]) begin
          failures++;
          $display("FAIL: test %0d pixel %0d = %h expected %h", t, i, pix[i], e[i]);
        end
        if (t % 3 == 2) begin
          checks++;
          if (iabs(int'(pix[i].r) - int'(src[i].r)) > 3 || iabs(int'(pix[i].g) - int'(src[i].g)) > 3 ||
              iabs(int'(pix[i].b) - int'(src[i].b)) > 3) begin
            failures++;
            $display("FAIL: smooth block pixel %0d = %h, was %h", i, pix[i], src[i]);
          end
        end
      end
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
