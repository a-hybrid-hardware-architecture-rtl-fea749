// tb_csc_inverse: checks YCbCr to RGB conversion (with clamping) against
// the formulas evaluated in the testbench, and that converting a pixel
// forward and back returns it within 3 codes per component.
module tb_csc_inverse;
  import od_pkg::*;
  import od_ref_pkg::*;
  samp_t y [NPIX], cb [NPIX], cr [NPIX];
  rgb_t  pix [NPIX];
  rgb_t  src [NPIX];
  int checks = 0, failures = 0;
  csc_inverse dut (.*);
  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NPIX; i++) begin
        int a, b, c;
        src[i] = rgb_t'(24'($urandom));
        if (t % 2 == 0) csc_fwd(src[i], a, b, c);
        else begin
          a = $urandom_range(0, 400) - 200;
          b = $urandom_range(0, 400) - 200;
          c = $urandom_range(0, 400) - 200;
        end
        y[i] = samp_t'(a);  cb[i] = samp_t'(b);  cr[i] = samp_t'(c);
      end
      #1;
      for (int i = 0; i < NPIX; i++) begin
        rgb_t e;
        e = csc_inv(int'(y[i]), int'(cb[i]), int'(cr[i]));
        checks++;
        if (pix[i] != e) begin
          failures++;
          $display("FAIL: %0d %0d %0d -> %h expected %h", y[i], cb[i], cr[i], pix[i], e);
        end
        if (t % 2 == 0) begin
          checks++;
          if (iabs(int'(pix[i].r) - int'(src[i].r)) > 3 || iabs(int'(pix[i].g) - int'(src[i].g)) > 3 ||
              iabs(int'(pix[i].b) - int'(src[i].b)) > 3) begin
            failures++;
            $display("FAIL: round trip %h -> %h", src[i], pix[i]);
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
