// tb_dct4x4: checks the forward integer DCT against the matrix product
// C X C^T computed in the testbench, for extreme and random blocks.
module tb_dct4x4;
  import od_pkg::*;
  import od_ref_pkg::*;
  samp_t x [NPIX];
  coef_t c [NPIX];
  int checks = 0, failures = 0;
  dct4x4 dut (.*);
  initial begin
    for (int t = 0; t < 300; t++) begin
      blk16_t xi, e;
      for (int i = 0; i < NPIX; i++) begin
        case (t)
          0: xi[i] = -256;
          1: xi[i] = 255;
          2: xi[i] = ((i / 4 + i % 4) % 2 == 0) ? 255 : -256;
          default: xi[i] = $urandom_range(0, 511) - 256;
        endcase
        x[i] = samp_t'(xi[i]);
      end
      #1;
      e = dct(xi);
      for (int i = 0; i < NPIX; i++) begin
        checks++;
        if (int'(c[i]) != e[i]) begin
          failures++;
          $display("FAIL: block %0d coef %0d = %0d expected %0d", t, i, c[i], e[i]);
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
