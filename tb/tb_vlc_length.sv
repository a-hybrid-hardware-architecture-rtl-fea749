// tb_vlc_length: checks the computed DCT-mode code length against the
// length of the code string built by the testbench's own encoder.
module tb_vlc_length;
  import od_pkg::*;
  import od_ref_pkg::*;
  level_t           lev [3][NPIX];
  logic [LEN_W-1:0] len;
  int checks = 0, failures = 0;
  vlc_length dut (.*);
  initial begin
    for (int t = 0; t < 1000; t++) begin
      blk_rec_t r;
      string s;
      r = rand_dct_rec();
      for (int ch = 0; ch < 3; ch++)
        for (int k = 0; k < NPIX; k++) lev[ch][k] = level_t'(r.lev[ch][k]);
      #1;
      s = encode(r);
      checks++;
      if (int'(len) != s.len()) begin
        failures++;
        $display("FAIL: length %0d expected %0d", len, s.len());
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
