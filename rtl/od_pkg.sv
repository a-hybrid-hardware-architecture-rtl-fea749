// od_pkg: types, sizes and small helper functions shared by the overdrive
// frame-buffer compression engine.
//
// The engine works on 4x4-pixel macroblocks of 8-bit RGB. A macroblock is
// coded either in DCT mode (4x4 integer DCT of Y, Cb and Cr, quantized,
// zigzag scanned, run/level VLC) or in silhouette mode (a 16-bit bitmap
// selecting between a low and a high colour, the colours optionally taken
// from a small local palette). The block size, the code format and all
// thresholds are this design's own choices; the document fixes only the
// 1/6 compression ratio, the full-HD frame and the list of functions.
//
// Code format of one macroblock, most significant bit first:
//   DCT mode:   0, qp[2:0], cdown, then for Y, Cb, Cr: nnz[2:0] followed by
//               nnz symbols {run[3:0], prefix, mantissa, sign}
//   silhouette: 1, {hit, idx[2:0] | rgb[23:0]} for low then high, bitmap[15:0]
// A level of magnitude m with bit length s (1..10) is coded as the prefix
// (s-1 ones and a terminating zero, the zero omitted when s = 10), the s-1
// bits of m below its leading one, and a sign bit (1 = negative). So no
// symbol is longer than SYM_MAX bits.
package od_pkg;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  localparam int NPIX    = 16;           // pixels per 4x4 macroblock
  localparam int CW      = 16;           // signed transform coefficient width
  localparam int LW      = 11;           // signed quantized level width
  localparam int QP_N    = 8;            // number of quantization parameters
  localparam int MAX_NZ  = 6;            // non-zero levels kept per component
  localparam int CODE_W  = 512;          // longest macroblock code held
  localparam int LEN_W   = 10;           // width of a code length
  localparam int SYM_MAX = 23;           // longest run/level symbol
  localparam int HDR_DCT = 5;            // mode, qp, cdown
  localparam int MIN_LEN = HDR_DCT + 9;  // all-zero DCT block
  localparam int PAL_N   = 8;            // palette entries
  localparam int PAL_W   = 3;            // palette index width

  typedef logic signed [CW-1:0] coef_t;
  typedef logic signed [LW-1:0] level_t;
  typedef logic signed [9:0]    samp_t;  // centred Y, Cb or Cr sample

  typedef enum logic {MODE_DCT = 1'b0, MODE_SIL = 1'b1} mode_e;

  // Decoded or chosen description of one macroblock; what the VLC carries.
  typedef struct packed {
    mode_e              mode;
    logic [2:0]         qp;
    logic               cdown;
    logic [2:0][NPIX-1:0][LW-1:0] lev;  // [component][zigzag position]
    logic               lo_hit;
    logic [PAL_W-1:0]   lo_idx;
    rgb_t               lo_rgb;
    logic               hi_hit;
    logic [PAL_W-1:0]   hi_idx;
    rgb_t               hi_rgb;
    logic [NPIX-1:0]    bitmap;         // 1 selects the high colour
  } blk_rec_t;

  // Raster position (row*4+col) of zigzag scan position k.
  function automatic int unsigned zz(input int unsigned k);
    case (k)
      0: return 0;   1: return 1;   2: return 4;   3: return 8;
      4: return 5;   5: return 2;   6: return 3;   7: return 6;
      8: return 9;   9: return 12; 10: return 13; 11: return 10;
      12: return 7; 13: return 11; 14: return 14; default: return 15;
    endcase
  endfunction

  // Normalisation of the integer DCT, times 4096: 4096/sqrt(n_r*n_c) with
  // n = 4 for even and 10 for odd frequency indices.
  function automatic int unsigned nscale(input logic [3:0] pos);
    logic ro, co;
    ro = pos[2];   // row index bit 0 (pos = row*4+col)
    co = pos[0];
    if (!ro && !co) return 1024;
    else if (ro && co) return 410;
    else return 648;
  endfunction

  // Bit length of a non-zero magnitude (1..10).
  function automatic int unsigned mag_bits(input logic [LW-2:0] m);
    int unsigned s;
    s = 1;
    for (int i = 1; i < LW - 1; i++) if (m[i]) s = i + 1;
    return s;
  endfunction

  // Code length of one run/level symbol with non-zero level l.
  function automatic int unsigned sym_len(input level_t l);
    int unsigned s;
    logic [LW-2:0] m;
    m = l[LW-1] ? (LW-1)'(-l) : l[LW-2:0];
    s = mag_bits(m);
    return 4 + ((s < 10) ? s : 9) + (s - 1) + 1;
  endfunction

endpackage
