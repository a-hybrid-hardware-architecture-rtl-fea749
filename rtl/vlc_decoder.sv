// vlc_decoder: parser of one compressed segment.
//
// load copies a SEG_BITS-bit segment and starts parsing it; the decoder
// then emits SEG_BLOCKS block records (rec, with rec_valid for one clock
// each, rec_pos the index of the block in the segment) and pulses done.
// One parsing step per clock: a DCT header, a 3-bit non-zero count, up to
// two run/level symbols, or a whole silhouette block. A window of the next
// WIN bits is taken from the segment at the bit pointer, so any symbol of
// the length-limited table is read in a single step. Palette indices are
// passed on unresolved (the palette lives next to the reconstruction).
// Cycles per block: 1 for silhouette, at most 1 + 3 + 3*3 = 13 for DCT,
// below the 16 clocks a 4x4 block takes to arrive at one pixel per clock.
// The code format is this design's own (see od_pkg).
module vlc_decoder
  import od_pkg::*;
#(
  parameter int unsigned SEG_BLOCKS = 8,
  parameter int unsigned BLK_BITS   = 64,
  localparam int unsigned SEG_BITS  = SEG_BLOCKS * BLK_BITS,
  localparam int unsigned PW        = $clog2(SEG_BLOCKS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [SEG_BITS-1:0] seg,
  output logic                busy,
  output logic                rec_valid,
  output blk_rec_t            rec,
  output logic [PW-1:0]       rec_pos,
  output logic                done
);
  localparam int unsigned WIN = 72;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_CNT, S_SYM} state_e;

  state_e              st;
  logic [SEG_BITS-1:0] sbuf;
  logic [15:0]         ptr;
  logic [1:0]          ch;
  logic [2:0]          left;      // symbols left in this component
  logic [4:0]          k;         // next zigzag position
  logic [PW:0]         nblk;      // blocks emitted
  blk_rec_t            cur;

  logic [SEG_BITS+WIN-1:0] ext;
  logic [WIN-1:0]          win;
  assign ext = {sbuf, {WIN{1'b0}}} << ptr;
  assign win = ext[SEG_BITS+WIN-1 -: WIN];

  // One run/level symbol at the head of a window.
  typedef struct packed {
    logic [3:0] run;
    logic [4:0] len;
    level_t     lev;
  } sym_t;

  function automatic sym_t parse_sym(input logic [WIN-1:0] w);
    sym_t          r;
    logic [3:0]    ones, pl, sb;
    logic [LW-2:0] m;
    logic          stop;
    r.run = w[WIN-1 -: 4];
    ones = '0;
    stop = 1'b0;
    for (int i = 0; i < 9; i++)
      if (!stop) begin
        if (w[WIN-5-i]) ones++;
        else stop = 1'b1;
      end
    sb = ones + 4'd1;                       // magnitude bit length
    pl = (sb < 10) ? sb : 4'd9;             // prefix length
    m = '0;
    m[sb - 1] = 1'b1;
    for (int i = 0; i < 9; i++)
      if (i < 32'(sb) - 1) m[32'(sb) - 2 - i] = w[WIN - 5 - 32'(pl) - i];
    r.len = 5'(4 + 32'(pl) + 32'(sb));
    r.lev = w[WIN - 32'(r.len)] ? -level_t'({1'b0, m}) : level_t'({1'b0, m});
    return r;
  endfunction

  sym_t sym1, sym2;
  assign sym1 = parse_sym(win);
  assign sym2 = parse_sym(win << sym1.len);

  // A whole silhouette block at the head of the window.
  blk_rec_t   sil;
  logic [6:0] sil_len;
  always_comb begin
    int unsigned p;
    sil = '0;
    sil.mode = MODE_SIL;
    p = 1;
    sil.lo_hit = win[WIN-1-p];  p++;
    if (sil.lo_hit) begin
      sil.lo_idx = win[WIN-1-p -: PAL_W];  p += PAL_W;
    end else begin
      sil.lo_rgb = win[WIN-1-p -: 24];  p += 24;
    end
    sil.hi_hit = win[WIN-1-p];  p++;
    if (sil.hi_hit) begin
      sil.hi_idx = win[WIN-1-p -: PAL_W];  p += PAL_W;
    end else begin
      sil.hi_rgb = win[WIN-1-p -: 24];  p += 24;
    end
    sil.bitmap = win[WIN-1-p -: NPIX];  p += NPIX;
    sil_len = 7'(p);
  end

  assign busy = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;  sbuf <= '0;  ptr <= '0;  ch <= '0;  left <= '0;
      k <= '0;  nblk <= '0;  cur <= '0;
      rec <= '0;  rec_valid <= 1'b0;  rec_pos <= '0;  done <= 1'b0;
    end else begin
      rec_valid <= 1'b0;
      done <= 1'b0;
      case (st)
        S_IDLE: if (load) begin
          sbuf <= seg;
          ptr  <= '0;
          nblk <= '0;
          st   <= S_HDR;
        end
        S_HDR: begin
          if (32'(nblk) == SEG_BLOCKS) begin
            st   <= S_IDLE;
            done <= 1'b1;
          end else if (win[WIN-1]) begin
            rec       <= sil;
            rec_valid <= 1'b1;
            rec_pos   <= PW'(nblk);
            nblk      <= nblk + 1'b1;
            ptr       <= ptr + 16'(sil_len);
          end else begin
            cur       <= '0;
            cur.mode  <= MODE_DCT;
            cur.qp    <= win[WIN-2 -: 3];
            cur.cdown <= win[WIN-5];
            ptr       <= ptr + 16'(HDR_DCT);
            ch        <= '0;
            st        <= S_CNT;
          end
        end
        S_CNT: begin
          ptr  <= ptr + 16'd3;
          k    <= '0;
          left <= win[WIN-1 -: 3];
          if (win[WIN-1 -: 3] != 0) st <= S_SYM;
          else if (ch == 2'd2) begin
            rec       <= cur;
            rec_valid <= 1'b1;
            rec_pos   <= PW'(nblk);
            nblk      <= nblk + 1'b1;
            st        <= S_HDR;
          end else ch <= ch + 2'd1;
        end
        S_SYM: begin
          // up to two symbols per clock
          logic [4:0] at1, at2;
          blk_rec_t   nx;
          logic       two;
          two = (left >= 3'd2);
          at1 = k + 5'(sym1.run);
          at2 = at1 + 5'd1 + 5'(sym2.run);
          nx = cur;
          if (at1 < 5'(NPIX)) nx.lev[ch][at1[3:0]] = sym1.lev;
          if (two && at2 < 5'(NPIX)) nx.lev[ch][at2[3:0]] = sym2.lev;
          cur  <= nx;
          k    <= two ? at2 + 5'd1 : at1 + 5'd1;
          ptr  <= ptr + 16'(sym1.len) + (two ? 16'(sym2.len) : 16'd0);
          left <= left - (two ? 3'd2 : 3'd1);
          if (left <= 3'd2) begin
            if (ch == 2'd2) begin
              rec       <= nx;
              rec_valid <= 1'b1;
              rec_pos   <= PW'(nblk);
              nblk      <= nblk + 1'b1;
              st        <= S_HDR;
            end else begin
              ch <= ch + 2'd1;
              st <= S_CNT;
            end
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
