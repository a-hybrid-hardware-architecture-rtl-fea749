// tb_vlc_encoder: checks the packed code and its length against the
// testbench's string encoder for random DCT and silhouette records,
// including the longest symbols (10-bit magnitudes) and palette hits.
module tb_vlc_encoder;
  import od_pkg::*;
  import od_ref_pkg::*;
  blk_rec_t          rec;
  logic [CODE_W-1:0] code;
  logic [LEN_W-1:0]  len;
  int checks = 0, failures = 0;
  vlc_encoder dut (.*);
  initial begin
    for (int t = 0; t < 1000; t++) begin
      string s;
      bit ok;
      rec = (t % 3 == 0) ? rand_sil_rec() : rand_dct_rec();
      #1;
      s = encode(rec);
      ok = (int'(len) == s.len());
      for (int i = 0; i < CODE_W; i++)
        if (code[CODE_W-1-i] != ((i < s.len()) ? (s[i] == "1") : 1'b0)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL: test %0d length %0d expected %0d", t, len, s.len());
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
