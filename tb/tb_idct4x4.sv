// tb_idct4x4: checks the inverse DCT against (C^T W C + 2048) >> 12
// computed in the testbench, and that a block taken through dct4x4's
// arithmetic, normalised and inverted comes back unchanged.
module tb_idct4x4;
  import od_pkg::*;
  import od_ref_pkg::*;
  logic signed [27:0] w [NPIX];
  samp_t              x [NPIX];
  int checks = 0, failures = 0;
  idct4x4 dut (.*);
  initial begin
    for (int t = 0; t < 300; t++) begin
      blk16_t wi, e, xs;
      if (t % 2 == 0) begin
        for (int i = 0; i < NPIX; i++) wi[i] = int'($urandom_range(0, 1 << 22)) - (1 << 21);
      end else begin
        // exact round trip: W = (C X C^T) .* nscale^2 / 4096 is the exact
        // inverse input when scaled back; use DC-only and random blocks
        for (int i = 0; i < NPIX; i++) xs[i] = $urandom_range(0, 255) - 128;
        e = dct(xs);
        for (int i = 0; i < NPIX; i++) wi[i] = int'((longint'(e[i]) * nsc(i) * nsc(i) + 2048) >>> 12);
      end
      for (int i = 0; i < NPIX; i++) w[i] = 28'(wi[i]);
      #1;
      e = idct(wi);
      for (int i = 0; i < NPIX; i++) begin
        checks++;
        if (int'(x[i]) != e[i]) begin
          failures++;
          $display("FAIL: block %0d sample %0d = %0d expected %0d", t, i, x[i], e[i]);
        end
        if (t % 2 == 1) begin
          checks++;
          if (iabs(int'(x[i]) - xs[i]) > 1) begin
            failures++;
            $display("FAIL: round trip sample %0d = %0d, was %0d", i, x[i], xs[i]);
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
