// tb_quantizer: checks quantization, zigzag order, the chroma low-only
// mask and the non-zero limit against the testbench model, over all qp
// values, and that the limit is really reached by rich blocks.
module tb_quantizer;
  import od_pkg::*;
  import od_ref_pkg::*;
  coef_t      c [NPIX];
  logic [2:0] qp;
  logic       low_only;
  level_t     lev [NPIX];
  logic       truncated;
  int checks = 0, failures = 0, ntrunc = 0;
  quantizer dut (.*);
  initial begin
    for (int t = 0; t < 800; t++) begin
      blk16_t ci, e;
      bit tr;
      for (int i = 0; i < NPIX; i++) begin
        ci[i] = (t % 3 == 0) ? int'($urandom_range(0, 9000)) - 4500 : int'($urandom_range(0, 80)) - 40;
        c[i] = coef_t'(ci[i]);
      end
      qp = 3'(t % 8);
      low_only = (t % 5 == 1);
      #1;
      tr = quant(ci, int'(qp), low_only, e);
      if (tr) ntrunc++;
      checks++;
      if (truncated != tr) begin
        failures++;
        $display("FAIL: truncated %0d expected %0d", truncated, tr);
      end
      for (int k = 0; k < NPIX; k++) begin
        checks++;
        if (int'(lev[k]) != e[k]) begin
          failures++;
          $display("FAIL: test %0d qp %0d level %0d = %0d expected %0d", t, qp, k, lev[k], e[k]);
        end
      end
    end
    checks++;
    if (ntrunc == 0) begin
      failures++;
      $display("FAIL: non-zero limit never reached");
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
