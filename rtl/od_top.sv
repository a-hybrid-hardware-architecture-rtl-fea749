// od_top: LCD overdrive frame-buffer compression engine.
//
// A raster RGB888 video stream (one pixel per clock when pix_valid, sof on
// the first pixel of a frame) is cut into 4x4 macroblocks (block_former),
// compressed to at most 64 bits per block, 1/6 of the raw size
// (od_encoder), packed into fixed-size segments (segment_buffer) and stored
// in an embedded frame memory sized for one compressed frame
// (frame_memory). The previous frame is read back and rebuilt by a second
// decoder (od_decoder) while the current frame overwrites it, slot by slot:
//   - the decoder may copy slot r of the previous frame once the current
//     frame has started the strip (4 pixel rows) that holds that slot;
//   - the writer may not overwrite a slot before the decoder has copied it
//     (seg_hold), which the third segment buffer absorbs.
// The overdrive stage itself is outside this design: cur_* carries the
// current frame as the decoder will see it (the encoder's reconstruction)
// and prev_* the decoded previous frame, each with its block number
// (row-major over the frame's blocks). prev_* trails cur_* by up to one
// strip; a block-aligning buffer belongs to the overdrive stage.
// Everything runs in the video clock domain, as in the document.
// H_ACTIVE must be a multiple of 32 and V_ACTIVE of 4.
module od_top
  import od_pkg::*;
#(
  parameter int unsigned H_ACTIVE   = 1920,
  parameter int unsigned V_ACTIVE   = 1080,
  parameter int unsigned SEG_BLOCKS = 8,
  parameter int unsigned BLK_BITS   = 64,
  localparam int unsigned W         = 32,
  localparam int unsigned BPL       = H_ACTIVE / 4,            // blocks per strip
  localparam int unsigned SPF       = V_ACTIVE / 4,            // strips per frame
  localparam int unsigned SPS       = BPL / SEG_BLOCKS,        // segments per strip
  localparam int unsigned NSEG      = SPF * SPS,
  localparam int unsigned SEG_WORDS = SEG_BLOCKS * BLK_BITS / W,
  localparam int unsigned DEPTH     = NSEG * SEG_WORDS,
  localparam int unsigned SW        = $clog2(NSEG),
  localparam int unsigned AW        = $clog2(DEPTH),
  localparam int unsigned PW        = $clog2(SEG_BLOCKS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  input  logic        sof,
  input  rgb_t        pix,
  // current frame, as reconstructed
  output logic        cur_valid,
  output rgb_t        cur_blk [NPIX],
  output logic [31:0] cur_idx,
  // previous frame, decoded from the frame memory
  output logic        prev_valid,
  output rgb_t        prev_blk [NPIX],
  output logic [31:0] prev_idx,
  // per-block coding report (valid with code_valid)
  output logic        code_valid,
  output logic        code_sil,
  output logic [2:0]  code_qp,
  output logic        code_cdown,
  output logic        code_zero,
  output logic        code_trunc,
  output logic [1:0]  code_pal_hits,
  output logic [LEN_W-1:0] code_len,
  // status
  output logic        seg_hold,
  output logic        overflow
);
  // ---------------- macroblocks ----------------
  logic                   fb_valid, strip_start;
  rgb_t                   fb_blk [NPIX];
  logic [$clog2(BPL)-1:0] fb_x;
  logic [15:0]            fb_y;

  block_former #(.H_ACTIVE(H_ACTIVE)) u_bf (
    .clk, .rst_n, .pix_valid, .sof, .pix,
    .blk_valid(fb_valid), .blk(fb_blk), .blk_x(fb_x), .blk_y(fb_y), .strip_start);

  logic [PW-1:0] pos;
  logic [SW-1:0] seg;
  logic [31:0]   bidx;
  assign pos  = PW'(32'(fb_x) % SEG_BLOCKS);
  assign seg  = SW'(32'(fb_y) * SPS + 32'(fb_x) / SEG_BLOCKS);
  assign bidx = 32'(fb_y) * BPL + 32'(fb_x);

  // ---------------- encoder ----------------
  logic [CODE_W-1:0] code;
  logic              code_first, code_last;
  logic [SW-1:0]     code_seg;
  blk_rec_t          code_rec;

  od_encoder #(.SEG_BLOCKS(SEG_BLOCKS), .BLK_BITS(BLK_BITS), .SW(SW)) u_enc (
    .clk, .rst_n, .in_valid(fb_valid), .in_blk(fb_blk), .in_pos(pos),
    .in_seg(seg), .in_tag(bidx),
    .code_valid, .code, .len(code_len), .code_first, .code_last, .code_seg,
    .code_rec, .st_trunc(code_trunc), .st_zero(code_zero),
    .rc_valid(cur_valid), .rc_blk(cur_blk), .rc_tag(cur_idx));

  assign code_sil      = (code_rec.mode == MODE_SIL);
  assign code_qp       = code_rec.qp;
  assign code_cdown    = !code_sil && code_rec.cdown;
  assign code_pal_hits = code_sil ? 2'(code_rec.lo_hit) + 2'(code_rec.hi_hit) : 2'd0;

  // ---------------- segment buffer and frame memory ----------------
  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  logic [W-1:0]  wdata, rdata;
  logic [31:0]   wr_count, rd_count;
  logic [1:0]    pending_unused;

  // The next slot written (number wr_count since reset) held frame data
  // number wr_count - NSEG, which the decoder must have copied first.
  assign seg_hold = (wr_count >= NSEG) && (rd_count + NSEG <= wr_count);

  segment_buffer #(.SEG_BLOCKS(SEG_BLOCKS), .BLK_BITS(BLK_BITS), .W(W), .NSEG(NSEG)) u_sb (
    .clk, .rst_n, .code_valid, .code, .len(code_len), .first(code_first),
    .last(code_last), .seg_addr(code_seg), .hold(seg_hold),
    .mem_we(we), .mem_addr(waddr), .mem_wdata(wdata),
    .wr_count, .overflow, .pending(pending_unused));

  frame_memory #(.W(W), .DEPTH(DEPTH)) u_mem (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  // ---------------- previous-frame decoder ----------------
  // Strips started since reset; copy r is allowed once the current frame
  // has entered the strip holding slot r, i.e. r < (strips - SPF) * SPS.
  logic [31:0] strips, rd_limit;
  logic        allow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) strips <= '0;
    else if (strip_start) strips <= strips + 32'd1;
  end
  assign rd_limit = (strips > SPF) ? (strips - SPF) * SPS : 32'd0;
  assign allow    = rd_count < rd_limit;

  od_decoder #(.SEG_BLOCKS(SEG_BLOCKS), .BLK_BITS(BLK_BITS), .W(W), .NSEG(NSEG)) u_dec (
    .clk, .rst_n, .allow, .mem_re(re), .mem_raddr(raddr), .mem_rdata(rdata),
    .rd_count, .blk_valid(prev_valid), .blk(prev_blk), .blk_idx(prev_idx));
endmodule
