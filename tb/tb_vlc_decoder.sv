// tb_vlc_decoder: builds segments of 8 random block records with the
// testbench's string encoder (DCT records with long and short symbols,
// silhouette records with and without palette hits), loads them into the
// decoder and compares every record it emits, its position, the number of
// records and the parse time (at most 13 clocks per DCT block).
module tb_vlc_decoder;
  import od_pkg::*;
  import od_ref_pkg::*;
  localparam int SB = 8, SEGB = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, busy, rec_valid, done;
  logic [SEGB-1:0] seg = '0;
  blk_rec_t rec;
  logic [2:0] rec_pos;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  vlc_decoder #(.SEG_BLOCKS(SB), .BLK_BITS(64)) dut (.*);

  blk_rec_t exp_q [SB];
  int nrec;

  always @(posedge clk) if (rec_valid) begin
    blk_rec_t e;
    e = exp_q[nrec];
    if (e.mode == MODE_SIL) begin
      if (e.lo_hit) e.lo_rgb = '0; else e.lo_idx = '0;
      if (e.hi_hit) e.hi_rgb = '0; else e.hi_idx = '0;
    end
    checks += 2;
    if (rec != e) begin
      failures++;
      $display("FAIL: record %0d differs (mode %0d)", nrec, e.mode);
    end
    if (int'(rec_pos) != nrec) begin
      failures++;
      $display("FAIL: position %0d expected %0d", rec_pos, nrec);
    end
    nrec++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      string s;
      int cyc, ndct;
      // draw records until 8 fit in a segment
      s = "";
      ndct = 0;
      for (int b = 0; b < SB; b++) begin
        blk_rec_t r;
        string c;
        do begin
          r = ($urandom_range(0, 2) == 0) ? rand_sil_rec() : rand_dct_rec();
          if (r.mode == MODE_DCT) r.cdown = 1'b0;
          c = encode(r);
        end while (s.len() + c.len() + (SB - 1 - b) * MIN_LEN > SEGB);
        if (r.mode == MODE_DCT) ndct++;
        exp_q[b] = r;
        s = {s, c};
      end
      for (int i = 0; i < SEGB; i++) seg[SEGB-1-i] = (i < s.len()) ? (s[i] == "1") : 1'b0;
      nrec = 0;
      @(negedge clk);
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      seg = '1;   // the decoder must have taken its own copy
      cyc = 0;
      while (!done && cyc < 1000) begin
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (nrec != SB) begin
        failures++;
        $display("FAIL: %0d records", nrec);
      end
      if (cyc > ndct * 13 + (SB - ndct) + 2) begin
        failures++;
        $display("FAIL: %0d clocks for %0d DCT blocks", cyc, ndct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
