// tb_chroma_mode: checks the high-frequency chroma measure and the
// down-sampling decision against the testbench model, with blocks on
// both sides of the threshold.
module tb_chroma_mode;
  import od_pkg::*;
  import od_ref_pkg::*;
  coef_t cb [NPIX], cr [NPIX];
  logic  cdown;
  logic [15:0] hf_energy;
  int checks = 0, failures = 0, ndown = 0;
  chroma_mode #(.TH(16)) dut (.*);
  initial begin
    for (int t = 0; t < 600; t++) begin
      int e;
      int amp;
      amp = (t % 4 == 0) ? 2000 : (t % 4 == 1) ? 20 : 8;
      e = 0;
      for (int p = 0; p < NPIX; p++) begin
        int vb, vr;
        vb = int'($urandom_range(0, 2 * amp)) - amp;
        vr = int'($urandom_range(0, 2 * amp)) - amp;
        if ((p % 4) < 2 && (p / 4) < 2) begin
          vb = vb * 50;  vr = vr * 50;   // low frequencies do not count
          if (vb > 4000) vb = 4000;
          if (vb < -4000) vb = -4000;
          if (vr > 4000) vr = 4000;
          if (vr < -4000) vr = -4000;
        end else e += (iabs(vb) * nsc(p)) / 4096 + (iabs(vr) * nsc(p)) / 4096;
        cb[p] = coef_t'(vb);
        cr[p] = coef_t'(vr);
      end
      #1;
      checks += 2;
      if (int'(hf_energy) != ((e > 65535) ? 65535 : e)) begin
        failures++;
        $display("FAIL: energy %0d expected %0d", hf_energy, e);
      end
      if (cdown != (e <= 16)) begin
        failures++;
        $display("FAIL: cdown %0d for energy %0d", cdown, e);
      end
      if (cdown) ndown++;
    end
    checks++;
    if (ndown == 0 || ndown == 600) begin
      failures++;
      $display("FAIL: decision never varied");
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
