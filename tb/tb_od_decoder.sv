// tb_od_decoder: fills a frame-memory model with NSEG segments coded by
// the testbench (DCT records, silhouette records whose palette hits follow
// a palette model) and lets the decoder run through them twice, with the
// allow input toggled at random. Checks every output block against the
// testbench's reconstruction with resolved colours, the block numbers, the
// read addresses and rd_count.
module tb_od_decoder;
  import od_pkg::*;
  import od_ref_pkg::*;
  localparam int SB = 8, W = 32, NSEG = 6, SWORDS = 16, AW = $clog2(NSEG * SWORDS);
  logic clk = 1'b0, rst_n = 1'b0;
  logic allow = 1'b0, mem_re, blk_valid;
  logic [AW-1:0] mem_raddr;
  logic [W-1:0]  mem_rdata;
  logic [31:0]   rd_count, blk_idx;
  rgb_t blk [NPIX];
  int checks = 0, failures = 0, nout = 0;
  always #5 clk = ~clk;
  od_decoder #(.SEG_BLOCKS(SB), .BLK_BITS(64), .W(W), .NSEG(NSEG)) dut (.*);

  logic [W-1:0] mem [NSEG * SWORDS];
  always_ff @(posedge clk) if (mem_re) mem_rdata <= mem[mem_raddr];

  rgb_t exp_px [NSEG * SB][16];

  task automatic fail(input string m);
    failures++;
    if (failures < 12) $display("FAIL: %s", m);
  endtask

  initial begin
    rgb_t cols [6];
    cols = '{24'h000000, 24'hFFFFFF, 24'h2040F0, 24'hF04020, 24'h808080, 24'h10E010};
    for (int sg = 0; sg < NSEG; sg++) begin
      string s;
      rgb_t p_ent [PAL_N];
      bit p_val [PAL_N];
      int p_ptr;
      logic [511:0] bitsv;
      p_ptr = 0;
      for (int i = 0; i < PAL_N; i++) p_val[i] = 0;
      s = "";
      for (int b = 0; b < SB; b++) begin
        blk_rec_t r, rr;
        string c;
        do begin
          if ($urandom_range(0, 1) == 0) begin
            r = rand_dct_rec();
            for (int ch = 0; ch < 3; ch++)
              for (int k = 0; k < 16; k++)
                if ($signed(r.lev[ch][k]) > 100 || $signed(r.lev[ch][k]) < -100) r.lev[ch][k] = LW'(-5);
          end else begin
            r = '0;
            r.mode = MODE_SIL;
            r.lo_rgb = cols[$urandom_range(0, 5)];
            r.hi_rgb = cols[$urandom_range(0, 5)];
            r.bitmap = 16'($urandom);
            for (int i = PAL_N - 1; i >= 0; i--) begin
              if (p_val[i] && p_ent[i] == r.lo_rgb) begin r.lo_hit = 1; r.lo_idx = 3'(i); end
              if (p_val[i] && p_ent[i] == r.hi_rgb) begin r.hi_hit = 1; r.hi_idx = 3'(i); end
            end
          end
          c = encode(r);
        end while (s.len() + c.len() + (SB - 1 - b) * MIN_LEN > 512);
        if (r.mode == MODE_SIL) begin
          if (!r.lo_hit) begin p_ent[p_ptr] = r.lo_rgb; p_val[p_ptr] = 1; p_ptr = (p_ptr + 1) % PAL_N; end
          if (!r.hi_hit) begin p_ent[p_ptr] = r.hi_rgb; p_val[p_ptr] = 1; p_ptr = (p_ptr + 1) % PAL_N; end
        end
        reconstruct(r, exp_px[sg * SB + b]);
        s = {s, c};
      end
      bitsv = '0;
      for (int i = 0; i < s.len(); i++) bitsv[511 - i] = (s[i] == "1");
      for (int k = 0; k < SWORDS; k++) mem[sg * SWORDS + k] = bitsv[511 - 32 * k -: 32];
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (nout < 2 * NSEG * SB) begin
      @(negedge clk);
      allow = ($urandom_range(0, 3) != 0) && (rd_count < 2 * NSEG);
    end
    repeat (5) @(negedge clk);
    checks += 2;
    if (rd_count != 2 * NSEG) fail($sformatf("rd_count %0d", rd_count));
    if (nout != 2 * NSEG * SB) fail($sformatf("%0d blocks", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // read address sequence: slot-major, words in order
  int nreads = 0;
  always @(negedge clk) begin
    if (mem_re) begin
      checks++;
      if (int'(mem_raddr) != ((nreads / SWORDS) % NSEG) * SWORDS + nreads % SWORDS) fail("read address");
      nreads++;
    end
    if (blk_valid) begin
      bit ok;
      int b;
      b = nout % (NSEG * SB);
      ok = (int'(blk_idx) == b);
      for (int i = 0; i < 16; i++) if (blk[i] != exp_px[b][i]) ok = 0;
      checks++;
      if (!ok) fail($sformatf("block %0d (idx %0d)", b, blk_idx));
      nout++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
