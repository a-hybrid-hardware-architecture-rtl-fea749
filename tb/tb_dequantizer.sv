// tb_dequantizer: checks inverse scan and inverse quantization against
// the testbench model for random levels and every qp.
module tb_dequantizer;
  import od_pkg::*;
  import od_ref_pkg::*;
  level_t             lev [NPIX];
  logic [2:0]         qp;
  logic signed [27:0] w [NPIX];
  int checks = 0, failures = 0;
  dequantizer dut (.*);
  initial begin
    for (int t = 0; t < 800; t++) begin
      blk16_t li, e;
      for (int k = 0; k < NPIX; k++) begin
        li[k] = ($urandom_range(0, 2) == 0) ? 0 : int'($urandom_range(0, 2046)) - 1023;
        lev[k] = level_t'(li[k]);
      end
      qp = 3'(t % 8);
      #1;
      e = dequant(li, int'(qp));
      for (int p = 0; p < NPIX; p++) begin
        checks++;
        if (int'(w[p]) != e[p]) begin
          failures++;
          $display("FAIL: qp %0d position %0d = %0d expected %0d", qp, p, w[p], e[p]);
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
