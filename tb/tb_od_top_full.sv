// tb_od_top_full: the end-to-end test of tb_od_top at the default full-HD
// size (1920x1080, od_top without parameter overrides), two frames: the
// first is compressed into the frame memory, and decoded back while the
// second one is compressed. The same checks as tb_od_top apply: decoded
// blocks identical to the encoder's reconstruction, every segment within
// its 512-bit slot, exact silhouette blocks, PSNR of the gradient and
// text bands, no overflow, and every coding mechanism exercised.
module tb_od_top_full;
  import od_pkg::*;

  localparam int H = 1920, V = 1080, NF = 2;
  localparam int BPL = H / 4, BPF = H * V / 16;
  localparam int SEG_BLOCKS = 8, SEG_BITS = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_valid = 1'b0, sof = 1'b0;
  rgb_t pix = '0;
  always #5 clk = ~clk;

  logic        cur_valid, prev_valid, code_valid, code_sil, code_cdown;
  logic        code_zero, code_trunc, seg_hold, overflow;
  rgb_t        cur_blk [NPIX], prev_blk [NPIX];
  logic [31:0] cur_idx, prev_idx;
  logic [2:0]  code_qp;
  logic [1:0]  code_pal_hits;
  logic [LEN_W-1:0] code_len;

  od_top dut (.*);  // default parameters: 1920x1080

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  // Triangle wave: a ramp that turns back instead of wrapping.
  function automatic logic [7:0] tri_wave(input int v);
    return ((v % 512) < 256) ? 8'(v % 256) : 8'(255 - v % 256);
  endfunction

  // Test picture.
  function automatic rgb_t pix_at(input int f, input int x, input int y);
    int band;
    logic [31:0] h;
    rgb_t p;
    band = (x / 4) * 4 / BPL;
    h = ((x * 73856093) ^ (y * 19349663) ^ (f * 83492791)) >>> 7;
    case (band)
      0: p = '{tri_wave(60 + x + f * 3), tri_wave(80 + y * 2 + x / 8), tri_wave(180 + x / 2)};
      1: p = (((x + f) % 5 == 0) || (y % 7 == 2)) ? rgb_t'(24'hF0F0F0) : rgb_t'(24'h1020A0);
      2: p = ((y / 4) % 2 == 0) ? rgb_t'({{8{h[3]}}, {8{h[9]}}, {8{h[14]}}})
                                  : rgb_t'({8'(h), 8'(h >> 8), 8'(h >> 16)});
      default: p = ((x / 2) % 2 == 0) ? rgb_t'(24'hE02010) : rgb_t'(24'h10C040);
    endcase
    return p;
  endfunction

  function automatic rgb_t orig_px(input int f, input int b, input int i);
    return pix_at(f, (b % BPL) * 4 + i % 4, (b / BPL) * 4 + i / 4);
  endfunction

  rgb_t cur_store [NF][BPF][NPIX];
  int   ncur = 0, nprev = 0, ncode = 0, seg_bits = 0;
  bit   sil_q [$];
  int   n_sil = 0, n_dct = 0, n_cdown = 0, n_hits = 0, n_qp = 0, n_zero = 0;
  int   n_trunc = 0, n_hold = 0, n_exact = 0;
  real  se = 0.0;
  real  seb [4] = '{0.0, 0.0, 0.0, 0.0};
  longint npx = 0;

  always @(negedge clk) if (rst_n) begin
    if (seg_hold) n_hold++;
    if (code_valid) begin
      sil_q.push_back(code_sil);
      if (code_sil) n_sil++; else n_dct++;
      if (code_cdown) n_cdown++;
      if (code_pal_hits != 0) n_hits++;
      if (!code_sil && code_qp != 0 && !code_zero) n_qp++;
      if (code_zero) n_zero++;
      if (code_trunc) n_trunc++;
      seg_bits += int'(code_len);
      ncode++;
      if (ncode % SEG_BLOCKS == 0) begin
        check(seg_bits <= SEG_BITS, $sformatf("segment of %0d bits", seg_bits));
        seg_bits = 0;
      end
    end
    if (cur_valid) begin
      int f, b;
      bit s, two, same;
      rgb_t c0, c1;
      f = ncur / BPF;
      b = int'(cur_idx);
      check(b == ncur % BPF, "current block order");
      s = sil_q.pop_front();
      if (f < NF) begin
        for (int i = 0; i < NPIX; i++) begin
          cur_store[f][b][i] = cur_blk[i];
          begin
            rgb_t o;
            o = orig_px(f, b, i);
            seb[(b % BPL) * 4 / BPL] += real'((int'(o.r) - int'(cur_blk[i].r)) ** 2 + (int'(o.g) - int'(cur_blk[i].g)) ** 2
                      + (int'(o.b) - int'(cur_blk[i].b)) ** 2);
          end
          if ((b % BPL) * 4 / BPL < 2) begin
            rgb_t o;
            o = orig_px(f, b, i);
            se += real'((int'(o.r) - int'(cur_blk[i].r)) ** 2 + (int'(o.g) - int'(cur_blk[i].g)) ** 2
                      + (int'(o.b) - int'(cur_blk[i].b)) ** 2);
            npx++;
          end
        end
        // a block of exactly two colours coded as silhouette is lossless
        c0 = orig_px(f, b, 0);
        two = 1'b0;
        c1 = c0;
        for (int i = 1; i < NPIX; i++)
          if (orig_px(f, b, i) != c0) begin
            if (!two) begin c1 = orig_px(f, b, i); two = 1'b1; end
          end
        for (int i = 1; i < NPIX; i++)
          if (orig_px(f, b, i) != c0 && orig_px(f, b, i) != c1) two = 1'b0;
        if (s && two) begin
          same = 1'b1;
          for (int i = 0; i < NPIX; i++) if (cur_blk[i] != orig_px(f, b, i)) same = 1'b0;
          check(same, $sformatf("silhouette block %0d of frame %0d not exact", b, f));
          n_exact++;
        end
      end
      ncur++;
    end
    if (prev_valid) begin
      int f;
      bit same;
      f = nprev / BPF;
      check(int'(prev_idx) == nprev % BPF, $sformatf("previous block order %0d", prev_idx));
      same = 1'b1;
      if (f < NF)
        for (int i = 0; i < NPIX; i++) if (prev_blk[i] != cur_store[f][prev_idx][i]) same = 1'b0;
      check(same, $sformatf("decoded block %0d of frame %0d differs", prev_idx, f));
      nprev++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < V; y++)
        for (int x = 0; x < H; x++) begin
          @(negedge clk);
          pix_valid = 1'b1;
          sof = (x == 0 && y == 0);
          pix = pix_at(f, x, y);
        end
    @(negedge clk);
    pix_valid = 1'b0;
    sof = 1'b0;
    repeat (200) @(posedge clk);
    begin
      real mse, psnr;
      mse = se / real'(npx * 3);
      psnr = 10.0 * $log10(255.0 * 255.0 / mse);
      $display("PSNR of gradient and text bands: %0.2f dB", psnr);
      for (int k = 0; k < 4; k++)
        $display("band %0d PSNR %0.2f dB", k, 10.0 * $log10(255.0 * 255.0 / (seb[k] / real'(NF * BPF / 4 * 16 * 3))));
      check(psnr >= 35.0, "PSNR below 35 dB");
    end
    check(!overflow, "segment buffer overflow");
    check(ncur == NF * BPF, $sformatf("%0d current blocks", ncur));
    check(nprev == (NF - 1) * BPF, $sformatf("%0d previous blocks decoded", nprev));
    $display("silhouette %0d dct %0d chroma-down %0d palette-hit %0d raised-qp %0d zero %0d truncated %0d exact-sil %0d hold-cycles %0d",
             n_sil, n_dct, n_cdown, n_hits, n_qp, n_zero, n_trunc, n_exact, n_hold);
    check(n_sil > 0, "no silhouette block");
    check(n_dct > 0, "no DCT block");
    check(n_cdown > 0, "no chroma down-sampling");
    check(n_hits > 0, "no palette hit");
    check(n_qp > 0, "no raised quantizer");
    check(n_zero > 0, "no all-zero fallback");
    check(n_trunc > 0, "no non-zero truncation");
    check(n_exact > 0, "no exact silhouette block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * H * V + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
