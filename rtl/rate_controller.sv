// rate_controller: per-macroblock mode and quantizer choice under a hard
// segment budget.
//
// The frame is cut into segments of SEG_BLOCKS macroblocks, each owning a
// fixed SEG_BLOCKS*BLK_BITS-bit slot of the frame memory (64 bits per block
// is 1/6 of 384 bits of RGB888). The exact code length of every candidate
// is known before encoding (vlc_length), so the choice never overflows:
//   rem   = bits still free in the segment, left = blocks still to code
//   hard  = rem - (left-1)*MIN_LEN   (room kept for the all-zero code of
//                                     every later block)
//   fair  = 1.125*rem/left           (a little above the fair share)
//   limit = min(hard, fair)
// A synthetic block takes silhouette mode if its code fits the limit;
// otherwise the smallest qp whose DCT code fits is taken; if none fits, the
// all-zero DCT code (MIN_LEN bits) is sent. Choice outputs are
// combinational; the used-bit count advances on blk_valid.
// The document gives the principle (length computed before VLC coding,
// segments mapped to fixed memory); the fairness rule is this design's own.
module rate_controller
  import od_pkg::*;
#(
  parameter int unsigned SEG_BLOCKS = 8,
  parameter int unsigned BLK_BITS   = 64,
  localparam int unsigned SEG_BITS  = SEG_BLOCKS * BLK_BITS,
  localparam int unsigned PW        = $clog2(SEG_BLOCKS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             blk_valid,
  input  logic [PW-1:0]    blk_pos,           // index of the block in its segment
  input  logic [LEN_W-1:0] len_q [QP_N],      // DCT code length for each qp
  input  logic             sil_ok,            // block is synthetic
  input  logic [LEN_W-1:0] sil_len,
  output logic             sel_sil,
  output logic [2:0]       sel_qp,
  output logic             sel_zero,
  output logic [LEN_W-1:0] sel_len,
  output logic [15:0]      limit
);
  logic [15:0] used;

  always_comb begin
    logic [15:0] base, rem, left, hard, fair;
    logic        found;
    base = (blk_pos == 0) ? '0 : used;
    rem  = 16'(SEG_BITS) - base;
    left = 16'(SEG_BLOCKS) - 16'(blk_pos);
    hard = rem - (left - 16'd1) * 16'(MIN_LEN);
    fair = rem / left;
    fair = fair + (fair >> 3);
    limit = (fair < hard) ? fair : hard;
    sel_sil  = 1'b0;
    sel_zero = 1'b0;
    sel_qp   = 3'(QP_N - 1);
    sel_len  = LEN_W'(MIN_LEN);
    found    = 1'b0;
    if (sil_ok && 16'(sil_len) <= limit) begin
      sel_sil = 1'b1;
      sel_len = sil_len;
      found   = 1'b1;
    end
    for (int q = 0; q < QP_N; q++)
      if (!found && 16'(len_q[q]) <= limit) begin
        sel_qp  = 3'(q);
        sel_len = len_q[q];
        found   = 1'b1;
      end
    if (!found) sel_zero = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) used <= '0;
    else if (blk_valid) begin
      if (32'(blk_pos) == SEG_BLOCKS - 1) used <= '0;
      else used <= ((blk_pos == 0) ? 16'd0 : used) + 16'(sel_len);
    end
  end

  // The chosen code always fits what is left of the segment.
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    blk_valid |-> (32'((blk_pos == 0) ? 16'd0 : used) + 32'(sel_len) +
                   (SEG_BLOCKS - 1 - 32'(blk_pos)) * MIN_LEN <= SEG_BITS));
endmodule
