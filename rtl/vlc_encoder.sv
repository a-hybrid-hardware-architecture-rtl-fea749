// vlc_encoder: bit-string code of one macroblock.
//
// Builds the code described in od_pkg from the block record: DCT mode
// writes the header, then per component a 3-bit count of non-zero levels
// and one {run, prefix, mantissa, sign} symbol per non-zero level (run =
// zeros before it in zigzag order, 0..15); silhouette mode writes the two
// colour levels (palette index on a hit, else 24-bit RGB) and the bitmap.
// The code is left-aligned in code[CODE_W-1:0] (first bit at the MSB) and
// its length is len. Purely combinational.
// The document asks for a new length-limited VLC table; this table is this
// design's own.
module vlc_encoder
  import od_pkg::*;
(
  input  blk_rec_t         rec,
  output logic [CODE_W-1:0] code,
  output logic [LEN_W-1:0]  len
);
  function automatic logic [CODE_W+LEN_W-1:0] encode(input blk_rec_t rec);
    logic [CODE_W-1:0] acc;
    int unsigned       pos, nnz, run;
    acc = '0;
    nnz = 0;
    run = 0;
    pos = 0;
    if (rec.mode == MODE_SIL) begin
      acc[CODE_W-1] = 1'b1;
      pos = 1;
      acc |= CODE_W'({rec.lo_hit}) << (CODE_W - pos - 1);  pos += 1;
      if (rec.lo_hit) begin
        acc |= CODE_W'(rec.lo_idx) << (CODE_W - pos - PAL_W);  pos += PAL_W;
      end else begin
        acc |= CODE_W'(rec.lo_rgb) << (CODE_W - pos - 24);  pos += 24;
      end
      acc |= CODE_W'({rec.hi_hit}) << (CODE_W - pos - 1);  pos += 1;
      if (rec.hi_hit) begin
        acc |= CODE_W'(rec.hi_idx) << (CODE_W - pos - PAL_W);  pos += PAL_W;
      end else begin
        acc |= CODE_W'(rec.hi_rgb) << (CODE_W - pos - 24);  pos += 24;
      end
      acc |= CODE_W'(rec.bitmap) << (CODE_W - pos - NPIX);  pos += NPIX;
    end else begin
      acc |= CODE_W'({1'b0, rec.qp, rec.cdown}) << (CODE_W - HDR_DCT);
      pos = HDR_DCT;
      for (int ch = 0; ch < 3; ch++) begin
        nnz = 0;
        for (int k = 0; k < NPIX; k++) if (rec.lev[ch][k] != 0) nnz++;
        acc |= CODE_W'(3'(nnz)) << (CODE_W - pos - 3);  pos += 3;
        run = 0;
        for (int k = 0; k < NPIX; k++) begin
          level_t l;
          l = level_t'(rec.lev[ch][k]);
          if (l == 0) run++;
          else begin
            logic [LW-2:0] m;
            logic [SYM_MAX-1:0] sym;
            int unsigned s, pl, sl;
            m  = l[LW-1] ? (LW-1)'(-l) : l[LW-2:0];
            s  = mag_bits(m);
            pl = (s < 10) ? s : 9;
            sl = 4 + pl + (s - 1) + 1;
            // run, then prefix (s-1 ones, then a zero unless s = 10)
            sym = SYM_MAX'(run) << (sl - 4);
            sym |= SYM_MAX'((((1 << (s - 1)) - 1) << (pl - (s - 1)))) << (s - 1 + 1);
            sym |= SYM_MAX'(m & LW'((1 << (s - 1)) - 1)) << 1;
            sym |= SYM_MAX'(l[LW-1]);
            acc |= CODE_W'(sym) << (CODE_W - pos - sl);
            pos += sl;
            run = 0;
          end
        end
      end
    end
    return {acc, LEN_W'(pos)};
  endfunction

  assign {code, len} = encode(rec);
endmodule
