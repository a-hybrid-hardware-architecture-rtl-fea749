// tb_csc_forward: checks RGB to YCbCr conversion on corner and random
// pixels against the conversion formulas evaluated in the testbench, and
// against real-valued BT.601 within one code.
module tb_csc_forward;
  import od_pkg::*;
  import od_ref_pkg::*;
  rgb_t  pix [NPIX];
  samp_t y [NPIX], cb [NPIX], cr [NPIX];
  int checks = 0, failures = 0;
  csc_forward dut (.*);
  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < NPIX; i++)
        pix[i] = (t == 0) ? rgb_t'(i[0] ? 24'hFFFFFF : 24'h000000) : rgb_t'(24'($urandom));
      #1;
      for (int i = 0; i < NPIX; i++) begin
        int ry, rb, rr;
        real fy;
        csc_fwd(pix[i], ry, rb, rr);
        checks++;
        if (int'(y[i]) != ry || int'(cb[i]) != rb || int'(cr[i]) != rr) begin
          failures++;
          $display("FAIL: pixel %h -> %0d %0d %0d, expected %0d %0d %0d", pix[i], y[i], cb[i], cr[i], ry, rb, rr);
        end
        fy = 0.299 * pix[i].r + 0.587 * pix[i].g + 0.114 * pix[i].b - 128.0;
        checks++;
        if (real'(y[i]) - fy > 1.5 || fy - real'(y[i]) > 1.5) begin
          failures++;
          $display("FAIL: luma %0d far from %f", y[i], fy);
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
