// tb_od_encoder: drives the encoder with segments of smooth, two-colour
// noisy and black/white random macroblocks (one block every 1 to 4 clocks) and checks, for
// every block:
//   - code and reconstruction appear exactly 2 and 3 clocks after input;
//   - the code equals the testbench's string encoding of the chosen record;
//   - DCT levels equal the testbench's colour conversion, matrix DCT and
//     quantization at the chosen qp, with the chroma decision recomputed;
//   - silhouette palette hits and indices follow a palette model;
//   - the reconstruction equals the testbench's reconstruction;
//   - two-colour blocks sent in silhouette mode come back exactly;
//   - no segment exceeds 512 bits.
module tb_od_encoder;
  import od_pkg::*;
  import od_ref_pkg::*;
  localparam int SB = 8, SW = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 0;
  rgb_t in_blk [NPIX];
  logic [2:0] in_pos = '0;
  logic [SW-1:0] in_seg = '0;
  logic [31:0] in_tag = '0;
  logic code_valid, code_first, code_last, st_trunc, st_zero, rc_valid;
  logic [CODE_W-1:0] code;
  logic [LEN_W-1:0] len;
  logic [SW-1:0] code_seg;
  blk_rec_t code_rec;
  rgb_t rc_blk [NPIX];
  logic [31:0] rc_tag;
  int checks = 0, failures = 0, cycle = 0;
  int n_sil = 0, n_dct = 0, n_zero = 0, n_hit = 0, n_cd = 0;
  always #5 clk = ~clk;
  od_encoder #(.SEG_BLOCKS(SB), .BLK_BITS(64), .SW(SW)) dut (.*);

  typedef struct { rgb_t px [16]; int t_in; int pos; int tag; } item_t;
  item_t q_code [$], q_rc [$];
  blk_rec_t rec_q [$];

  task automatic fail(input string m);
    failures++;
    if (failures < 12) $display("FAIL: %s", m);
  endtask

  // palette model
  rgb_t m_ent [PAL_N];
  bit   m_val [PAL_N];
  int   m_ptr = 0, seg_bits = 0;

  always @(posedge clk) cycle++;

  // outputs are sampled mid-cycle
  always @(negedge clk) begin
    if (code_valid) begin
      item_t it;
      string s;
      bit ok;
      it = q_code.pop_front();
      checks += 3;
      if (cycle != it.t_in + 2) fail($sformatf("code latency %0d", cycle - it.t_in));
      s = encode(code_rec);
      ok = (int'(len) == s.len());
      for (int i = 0; i < s.len(); i++) if (code[CODE_W-1-i] != (s[i] == "1")) ok = 0;
      if (!ok) fail("code differs from the record's encoding");
      if (it.pos == 0) seg_bits = 0;
      seg_bits += int'(len);
      if (seg_bits > 512) fail("segment over 512 bits");
      if (code_rec.mode == MODE_SIL) begin
        bit h;
        int ix;
        n_sil++;
        if (it.pos == 0) begin
          for (int i = 0; i < PAL_N; i++) m_val[i] = 0;
          m_ptr = 0;
        end
        checks += 2;
        h = 0; ix = 0;
        for (int i = 0; i < PAL_N; i++) if (!h && m_val[i] && m_ent[i] == code_rec.lo_rgb) begin h = 1; ix = i; end
        if (code_rec.lo_hit != h || (h && int'(code_rec.lo_idx) != ix)) fail("low palette entry");
        h = 0; ix = 0;
        for (int i = 0; i < PAL_N; i++) if (!h && m_val[i] && m_ent[i] == code_rec.hi_rgb) begin h = 1; ix = i; end
        if (code_rec.hi_hit != h || (h && int'(code_rec.hi_idx) != ix)) fail("high palette entry");
        if (code_rec.lo_hit || code_rec.hi_hit) n_hit++;
        if (!code_rec.lo_hit) begin m_ent[m_ptr] = code_rec.lo_rgb; m_val[m_ptr] = 1; m_ptr = (m_ptr + 1) % PAL_N; end
        if (!code_rec.hi_hit) begin m_ent[m_ptr] = code_rec.hi_rgb; m_val[m_ptr] = 1; m_ptr = (m_ptr + 1) % PAL_N; end
      end else begin
        blk16_t s3 [3], c3 [3];
        int e;
        bit cd;
        if (it.pos == 0) begin
          for (int i = 0; i < PAL_N; i++) m_val[i] = 0;
          m_ptr = 0;
        end
        n_dct++;
        for (int i = 0; i < 16; i++) csc_fwd(it.px[i], s3[0][i], s3[1][i], s3[2][i]);
        for (int ch = 0; ch < 3; ch++) c3[ch] = dct(s3[ch]);
        e = 0;
        for (int p = 0; p < 16; p++)
          if ((p % 4) >= 2 || (p / 4) >= 2)
            e += (iabs(c3[1][p]) * nsc(p)) / 4096 + (iabs(c3[2][p]) * nsc(p)) / 4096;
        cd = (e <= 16);
        if (cd) n_cd++;
        checks++;
        if (code_rec.cdown != cd) fail("chroma decision");
        if (st_zero) n_zero++;
        for (int ch = 0; ch < 3; ch++) begin
          blk16_t l;
          void'(quant(c3[ch], int'(code_rec.qp), ch != 0 && cd, l));
          for (int k = 0; k < 16; k++) begin
            checks++;
            if (lev_of(code_rec, ch, k) != (st_zero ? 0 : l[k])) fail("quantized level");
          end
        end
      end
      rec_q.push_back(code_rec);
      q_rc.push_back(it);
    end
    if (rc_valid) begin
      item_t it;
      blk_rec_t r;
      rgb_t e [16];
      bit two, exact;
      rgb_t c0, c1;
      it = q_rc.pop_front();
      r = rec_q.pop_front();
      checks += 2;
      if (cycle != it.t_in + 3) fail($sformatf("reconstruction latency %0d tag %0d", cycle - it.t_in, it.tag));
      if (int'(rc_tag) != it.tag) fail("tag");
      reconstruct(r, e);
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (rc_blk[i] != e[i]) fail("reconstruction");
      end
      c0 = it.px[0];  c1 = c0;  two = 1;
      for (int i = 0; i < 16; i++) if (it.px[i] != c0) c1 = it.px[i];
      for (int i = 0; i < 16; i++) if (it.px[i] != c0 && it.px[i] != c1) two = 0;
      if (two && r.mode == MODE_SIL) begin
        exact = 1;
        for (int i = 0; i < 16; i++) if (rc_blk[i] != it.px[i]) exact = 0;
        checks++;
        if (!exact) fail("two-colour silhouette block not exact");
      end
    end
  end

  initial begin
    rgb_t pal [4];
    for (int i = 0; i < NPIX; i++) in_blk[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    pal = '{24'h102040, 24'hF0E0D0, 24'h00FF00, 24'h800000};
    for (int t = 0; t < 1600; t++) begin
      item_t it;
      int kind;
      kind = $urandom_range(0, 4);
      for (int i = 0; i < 16; i++) begin
        case (kind)
          0: it.px[i] = '{8'(t % 200 + i % 4 * 2), 8'(50 + i / 4 * 3), 8'(120 + i)};
          1: it.px[i] = ($urandom_range(0, 1) == 1) ? pal[t % 2] : pal[2 + (t / 8) % 2];
          2: it.px[i] = rgb_t'(24'($urandom));
          3: it.px[i] = rgb_t'({{8{1'($urandom)}}, {8{1'($urandom)}}, {8{1'($urandom)}}});
          default: it.px[i] = '{8'(90 + i), 8'(90 + i), 8'(90 + (i % 4) * 20)};
        endcase
        in_blk[i] = it.px[i];
      end
      @(negedge clk);
      in_valid = 1;
      in_pos = 3'(t % SB);
      in_seg = SW'(t / SB);
      in_tag = 32'(t);
      it.t_in = cycle;
      it.pos = t % SB;
      it.tag = t;
      q_code.push_back(it);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    $display("INFO: silhouette %0d dct %0d zero %0d palette-hit %0d chroma-down %0d", n_sil, n_dct, n_zero, n_hit, n_cd);
    checks++;
    if (n_sil == 0 || n_dct == 0 || n_zero == 0 || n_hit == 0 || n_cd == 0) fail("a coding choice never occurred");
    checks++;
    if (q_code.size() != 0 || q_rc.size() != 0) fail("blocks lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
