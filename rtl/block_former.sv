// block_former: raster-to-macroblock conversion with three line buffers.
//
// Pixels arrive in raster order, one per clock when pix_valid is high; sof
// marks the first pixel of a frame. Rows 0..2 of every 4-row strip are
// stored in three line buffers, each word holding the four pixels of one
// 4-pixel column group. During row 3 every fourth pixel completes a group
// and the macroblock (three stored rows plus the group just assembled) is
// output one clock later with its block coordinates. Blocks therefore come
// in bursts of one every four clocks during the last row of a strip.
// strip_start pulses with the first pixel of each strip.
// The document only asks that the macroblock size keep the number of line
// buffers small; the 4x4 block and this buffer organisation are this
// design's choices. H_ACTIVE must be a multiple of 4.
module block_former
  import od_pkg::*;
#(
  parameter int unsigned H_ACTIVE = 1920,
  localparam int unsigned GROUPS  = H_ACTIVE / 4,
  localparam int unsigned GW      = $clog2(GROUPS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic          sof,
  input  rgb_t          pix,
  output logic          blk_valid,
  output rgb_t          blk [NPIX],
  output logic [GW-1:0] blk_x,        // block column
  output logic [15:0]   blk_y,        // block row (strip number)
  output logic          strip_start
);
  typedef rgb_t [3:0] group_t;

  group_t        lb [3][GROUPS];
  rgb_t          grp [3];
  logic [GW-1:0] gx;       // group column of the incoming pixel
  logic [1:0]    px;       // pixel within the group
  logic [1:0]    row;      // row within the strip
  logic [15:0]   strip;

  // Position of the incoming pixel; sof forces (0,0).
  logic [GW-1:0] cur_gx;
  logic [1:0]    cur_px, cur_row;
  logic [15:0]   cur_strip;
  assign cur_gx    = sof ? '0 : gx;
  assign cur_px    = sof ? '0 : px;
  assign cur_row   = sof ? '0 : row;
  assign cur_strip = sof ? '0 : strip;

  assign strip_start = pix_valid && cur_row == 0 && cur_gx == 0 && cur_px == 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gx <= '0;  px <= '0;  row <= '0;  strip <= '0;
      blk_valid <= 1'b0;
      blk_x <= '0;  blk_y <= '0;
      for (int i = 0; i < 3; i++) grp[i] <= '0;
      for (int i = 0; i < NPIX; i++) blk[i] <= '0;
    end else begin
      blk_valid <= 1'b0;
      if (pix_valid) begin
        if (cur_px != 2'd3) grp[cur_px] <= pix;
        else if (cur_row != 2'd3) lb[cur_row][cur_gx] <= {pix, grp[2], grp[1], grp[0]};
        else begin
          for (int r = 0; r < 3; r++)
            for (int c = 0; c < 4; c++) blk[r*4+c] <= lb[r][cur_gx][c];
          for (int c = 0; c < 3; c++) blk[12+c] <= grp[c];
          blk[15]   <= pix;
          blk_valid <= 1'b1;
          blk_x     <= cur_gx;
          blk_y     <= cur_strip;
        end
        // advance the raster position
        px <= cur_px + 2'd1;
        gx <= cur_gx;
        row <= cur_row;
        strip <= cur_strip;
        if (cur_px == 2'd3) begin
          if (32'(cur_gx) == GROUPS - 1) begin
            gx  <= '0;
            row <= cur_row + 2'd1;
            if (cur_row == 2'd3) strip <= cur_strip + 16'd1;
          end else gx <= cur_gx + 1'b1;
        end
      end
    end
  end
endmodule
