// od_encoder: macroblock compression encoder with built-in reconstruction.
//
// Three pipeline stages, one macroblock may enter per clock:
//   A  csc_forward, three dct4x4, chroma_mode and silhouette_detector;
//   B  for every qp (0..7) three quantizers and a vlc_length, the palette
//      lookup of the silhouette colours, the rate_controller's choice, the
//      chosen block record and its vlc_encoder code; palette and rate
//      controller state advance here;
//   C  block_reconstruct of the chosen record: the picture the decoder
//      will rebuild, available for the current frame without reading the
//      frame memory.
// Code outputs are valid two clocks after in_valid, the reconstruction
// three clocks after. in_pos is the block's index in its segment and
// in_seg the segment's slot in the frame memory; in_tag is carried along
// unchanged (e.g. block coordinates). Each block's statistics (mode, qp,
// fallback, chroma down-sampling, non-zero truncation, palette hits) come
// with its code.
// The list of functions follows the document's block diagram; the
// pipeline split is this design's choice.
module od_encoder
  import od_pkg::*;
#(
  parameter int unsigned SEG_BLOCKS = 8,
  parameter int unsigned BLK_BITS   = 64,
  parameter int unsigned SW         = 14,
  parameter int unsigned CHROMA_TH  = 16,
  parameter int unsigned GAP_TH     = 48,
  parameter int unsigned NOISE_TH   = 12,
  localparam int unsigned PW        = $clog2(SEG_BLOCKS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  rgb_t              in_blk [NPIX],
  input  logic [PW-1:0]     in_pos,
  input  logic [SW-1:0]     in_seg,
  input  logic [31:0]       in_tag,
  // compressed code
  output logic              code_valid,
  output logic [CODE_W-1:0] code,
  output logic [LEN_W-1:0]  len,
  output logic              code_first,
  output logic              code_last,
  output logic [SW-1:0]     code_seg,
  output blk_rec_t          code_rec,
  output logic              st_trunc,
  output logic              st_zero,
  // reconstruction
  output logic              rc_valid,
  output rgb_t              rc_blk [NPIX],
  output logic [31:0]       rc_tag
);
  // ---------------- stage A ----------------
  samp_t y [NPIX], cb [NPIX], cr [NPIX];
  coef_t cy [NPIX], ccb [NPIX], ccr [NPIX];
  logic  cdown_a;
  logic [15:0] hf_unused;
  logic [NPIX-1:0] bm_a;
  rgb_t  lo_a, hi_a;
  logic  syn_a;

  csc_forward u_csc (.pix(in_blk), .y(y), .cb(cb), .cr(cr));
  dct4x4 u_dy (.x(y),  .c(cy));
  dct4x4 u_db (.x(cb), .c(ccb));
  dct4x4 u_dr (.x(cr), .c(ccr));
  chroma_mode #(.TH(CHROMA_TH)) u_cm (.cb(ccb), .cr(ccr), .cdown(cdown_a), .hf_energy(hf_unused));
  silhouette_detector #(.GAP_TH(GAP_TH), .NOISE_TH(NOISE_TH)) u_sil (
    .pix(in_blk), .bitmap(bm_a), .lo_rgb(lo_a), .hi_rgb(hi_a), .synthetic(syn_a));

  logic            v_b;
  coef_t           c_b [3][NPIX];
  logic            cdown_b, syn_b;
  logic [NPIX-1:0] bm_b;
  rgb_t            lo_b, hi_b;
  logic [PW-1:0]   pos_b;
  logic [SW-1:0]   seg_b;
  logic [31:0]     tag_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_b <= 1'b0;
      {cdown_b, syn_b, bm_b, lo_b, hi_b, pos_b, seg_b, tag_b} <= '0;
      for (int ch = 0; ch < 3; ch++)
        for (int i = 0; i < NPIX; i++) c_b[ch][i] <= '0;
    end else begin
      v_b <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < NPIX; i++) begin
          c_b[0][i] <= cy[i];
          c_b[1][i] <= ccb[i];
          c_b[2][i] <= ccr[i];
        end
        cdown_b <= cdown_a;
        syn_b   <= syn_a;
        bm_b    <= bm_a;
        lo_b    <= lo_a;
        hi_b    <= hi_a;
        pos_b   <= in_pos;
        seg_b   <= in_seg;
        tag_b   <= in_tag;
      end
    end
  end

  // ---------------- stage B ----------------
  level_t           lev_q [QP_N][3][NPIX];
  logic             trunc_q [QP_N][3];
  logic [LEN_W-1:0] len_q [QP_N];

  for (genvar q = 0; q < QP_N; q++) begin : g_qp
    for (genvar ch = 0; ch < 3; ch++) begin : g_ch
      quantizer u_q (.c(c_b[ch]), .qp(3'(q)), .low_only(ch != 0 && cdown_b),
                     .lev(lev_q[q][ch]), .truncated(trunc_q[q][ch]));
    end
    vlc_length u_len (.lev(lev_q[q]), .len(len_q[q]));
  end

  logic             lo_hit, hi_hit;
  logic [PAL_W-1:0] lo_idx, hi_idx;
  rgb_t             pal_r_lo, pal_r_hi;
  logic [LEN_W-1:0] sil_len;
  logic             sel_sil, sel_zero;
  logic [2:0]       sel_qp;
  logic [LEN_W-1:0] sel_len;
  logic [15:0]      limit_unused;

  assign sil_len = LEN_W'(1 + 2 + (lo_hit ? PAL_W : 24) + (hi_hit ? PAL_W : 24) + NPIX);

  color_palette u_pal (
    .clk, .rst_n, .restart(pos_b == 0),
    .q_lo(lo_b), .q_hi(hi_b), .lo_hit, .lo_idx, .hi_hit, .hi_idx,
    .r_lo_idx('0), .r_hi_idx('0), .r_lo(pal_r_lo), .r_hi(pal_r_hi),
    .upd(v_b), .ins_lo(sel_sil && !lo_hit), .ins_hi(sel_sil && !hi_hit),
    .w_lo(lo_b), .w_hi(hi_b));

  rate_controller #(.SEG_BLOCKS(SEG_BLOCKS), .BLK_BITS(BLK_BITS)) u_rc (
    .clk, .rst_n, .blk_valid(v_b), .blk_pos(pos_b), .len_q, .sil_ok(syn_b),
    .sil_len, .sel_sil, .sel_qp, .sel_zero, .sel_len, .limit(limit_unused));

  blk_rec_t         rec_b;
  logic             trunc_b;
  always_comb begin
    rec_b = '0;
    trunc_b = 1'b0;
    if (sel_sil) begin
      rec_b.mode   = MODE_SIL;
      rec_b.lo_hit = lo_hit;
      rec_b.lo_idx = lo_idx;
      rec_b.lo_rgb = lo_b;
      rec_b.hi_hit = hi_hit;
      rec_b.hi_idx = hi_idx;
      rec_b.hi_rgb = hi_b;
      rec_b.bitmap = bm_b;
    end else begin
      rec_b.mode  = MODE_DCT;
      rec_b.qp    = sel_qp;
      rec_b.cdown = cdown_b;
      if (!sel_zero) begin
        for (int ch = 0; ch < 3; ch++) begin
          for (int k = 0; k < NPIX; k++) rec_b.lev[ch][k] = lev_q[sel_qp][ch][k];
          trunc_b |= trunc_q[sel_qp][ch];
        end
      end
    end
  end

  logic [CODE_W-1:0] code_b;
  logic [LEN_W-1:0]  len_b;
  vlc_encoder u_vlc (.rec(rec_b), .code(code_b), .len(len_b));

  logic [31:0] tag_c;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_valid <= 1'b0;
      {code, len, code_first, code_last, code_seg, code_rec, st_trunc, st_zero, tag_c} <= '0;
    end else begin
      code_valid <= v_b;
      if (v_b) begin
        code       <= code_b;
        len        <= len_b;
        code_first <= (pos_b == 0);
        code_last  <= (32'(pos_b) == SEG_BLOCKS - 1);
        code_seg   <= seg_b;
        code_rec   <= rec_b;
        st_trunc   <= trunc_b;
        st_zero    <= sel_zero;
        tag_c      <= tag_b;
      end
    end
  end

  a_len_agrees: assert property (@(posedge clk) disable iff (!rst_n)
    v_b |-> len_b == sel_len);

  // ---------------- stage C ----------------
  rgb_t rc_c [NPIX];
  block_reconstruct u_rc_blk (.rec(code_rec), .pix(rc_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rc_valid <= 1'b0;
      rc_tag   <= '0;
      for (int i = 0; i < NPIX; i++) rc_blk[i] <= '0;
    end else begin
      rc_valid <= code_valid;
      if (code_valid) begin
        rc_blk <= rc_c;
        rc_tag <= tag_c;
      end
    end
  end
endmodule
