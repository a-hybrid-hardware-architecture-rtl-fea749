// od_decoder: frame-memory decoder (the second decoder of the dual-decoder
// overdrive scheme).
//
// Reads stored segments in order, slot after slot (wrapping after NSEG),
// and rebuilds their macroblocks. A segment is copied word by word into a
// local buffer when allow is high (the read side of the frame memory, one
// word per clock, one clock read latency); rd_count counts the copies.
// The copied segment is handed to the vlc_decoder as soon as it is idle,
// so the next copy overlaps parsing. Each parsed record has its palette
// indices resolved in a color_palette kept in step with the encoder's, and
// goes through block_reconstruct. Output blocks come one clock after the
// record, with blk_idx the block's number within the frame.
// The document gives the decoder's function; the buffering is this
// design's choice.
module od_decoder
  import od_pkg::*;
#(
  parameter int unsigned SEG_BLOCKS = 8,
  parameter int unsigned BLK_BITS   = 64,
  parameter int unsigned W          = 32,
  parameter int unsigned NSEG       = 16200,
  localparam int unsigned SEG_BITS  = SEG_BLOCKS * BLK_BITS,
  localparam int unsigned SEG_WORDS = SEG_BITS / W,
  localparam int unsigned AW        = $clog2(NSEG * SEG_WORDS),
  localparam int unsigned PW        = $clog2(SEG_BLOCKS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          allow,
  output logic          mem_re,
  output logic [AW-1:0] mem_raddr,
  input  logic [W-1:0]  mem_rdata,
  output logic [31:0]   rd_count,
  output logic          blk_valid,
  output rgb_t          blk [NPIX],
  output logic [31:0]   blk_idx
);
  localparam int unsigned KW = $clog2(SEG_WORDS + 1);

  logic          take, load_q, dbusy, rvalid, ddone;

  // ---------------- copy ----------------
  logic [SEG_BITS-1:0] cbuf;
  logic                cfull, copying, rv;
  logic [KW-1:0]       kreq, krcv;
  logic [31:0]         slot;            // slot being copied
  logic [31:0]         cseg;            // slot of the copied segment

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cbuf <= '0;  cfull <= 1'b0;  copying <= 1'b0;  rv <= 1'b0;
      kreq <= '0;  krcv <= '0;  slot <= '0;  cseg <= '0;
      mem_re <= 1'b0;  mem_raddr <= '0;  rd_count <= '0;
    end else begin
      mem_re <= 1'b0;
      rv     <= mem_re;
      if (!copying) begin
        if (!cfull && allow) begin
          copying <= 1'b1;
          kreq <= '0;
          krcv <= '0;
        end
      end else begin
        if (32'(kreq) < SEG_WORDS) begin
          mem_re    <= 1'b1;
          mem_raddr <= AW'(slot) * AW'(SEG_WORDS) + AW'(kreq);
          kreq      <= kreq + 1'b1;
        end
        if (rv) begin
          cbuf[SEG_BITS - 1 - 32'(krcv) * W -: W] <= mem_rdata;
          krcv <= krcv + 1'b1;
          if (32'(krcv) == SEG_WORDS - 1) begin
            copying  <= 1'b0;
            cfull    <= 1'b1;
            cseg     <= slot;
            slot     <= (slot == NSEG - 1) ? '0 : slot + 32'd1;
            rd_count <= rd_count + 32'd1;
          end
        end
      end
      if (take) cfull <= 1'b0;
    end
  end

  // ---------------- parse ----------------
  blk_rec_t    rec;
  logic [PW-1:0] rpos;
  logic [31:0] pseg;

  assign take = cfull && !dbusy && !load_q;

  vlc_decoder #(.SEG_BLOCKS(SEG_BLOCKS), .BLK_BITS(BLK_BITS)) u_dec (
    .clk, .rst_n, .load(take), .seg(cbuf), .busy(dbusy),
    .rec_valid(rvalid), .rec, .rec_pos(rpos), .done(ddone));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_q <= 1'b0;
      pseg   <= '0;
    end else begin
      load_q <= take;
      if (take) pseg <= cseg;
    end
  end

  // ---------------- palette and reconstruction ----------------
  logic             lo_hit_u, hi_hit_u;
  logic [PAL_W-1:0] lo_idx_u, hi_idx_u;
  rgb_t             p_lo, p_hi;
  blk_rec_t         res;
  rgb_t             pix [NPIX];

  color_palette u_pal (
    .clk, .rst_n, .restart(rpos == 0),
    .q_lo(rec.lo_rgb), .q_hi(rec.hi_rgb),
    .lo_hit(lo_hit_u), .lo_idx(lo_idx_u), .hi_hit(hi_hit_u), .hi_idx(hi_idx_u),
    .r_lo_idx(rec.lo_idx), .r_hi_idx(rec.hi_idx), .r_lo(p_lo), .r_hi(p_hi),
    .upd(rvalid),
    .ins_lo(rec.mode == MODE_SIL && !rec.lo_hit),
    .ins_hi(rec.mode == MODE_SIL && !rec.hi_hit),
    .w_lo(rec.lo_rgb), .w_hi(rec.hi_rgb));

  always_comb begin
    res = rec;
    if (rec.lo_hit) res.lo_rgb = p_lo;
    if (rec.hi_hit) res.hi_rgb = p_hi;
  end

  block_reconstruct u_rc (.rec(res), .pix);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      blk_valid <= 1'b0;
      blk_idx   <= '0;
      for (int i = 0; i < NPIX; i++) blk[i] <= '0;
    end else begin
      blk_valid <= rvalid;
      if (rvalid) begin
        blk     <= pix;
        blk_idx <= pseg * SEG_BLOCKS + 32'(rpos);
      end
    end
  end
endmodule
