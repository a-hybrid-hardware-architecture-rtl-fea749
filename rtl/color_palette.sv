// color_palette: local palette of silhouette colour levels.
//
// Holds PAL_N recently used colours. Two query colours (the low and high
// level of the current silhouette block) are looked up in parallel; a hit
// gives the index of the matching entry. The read ports map indices back to
// colours for the decoder. When upd is pulsed, the colours flagged in
// ins_lo/ins_hi are written at a round-robin pointer, low first. restart
// marks the first block of a segment: lookups then miss and the update
// first empties the palette, so every segment can be decoded on its own.
// Encoder and decoder keep identical copies by applying the same updates.
// Lookups and reads are combinational, updates take effect on the next
// clock edge. The document gives the palette's purpose; its size, the
// replacement rule and the per-segment restart are this design's choices.
module color_palette
  import od_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  // lookup
  input  rgb_t             q_lo,
  input  rgb_t             q_hi,
  output logic             lo_hit,
  output logic [PAL_W-1:0] lo_idx,
  output logic             hi_hit,
  output logic [PAL_W-1:0] hi_idx,
  // read by index
  input  logic [PAL_W-1:0] r_lo_idx,
  input  logic [PAL_W-1:0] r_hi_idx,
  output rgb_t             r_lo,
  output rgb_t             r_hi,
  // update
  input  logic             upd,
  input  logic             ins_lo,
  input  logic             ins_hi,
  input  rgb_t             w_lo,
  input  rgb_t             w_hi
);
  rgb_t             ent   [PAL_N];
  logic [PAL_N-1:0] valid;
  logic [PAL_W-1:0] ptr;

  always_comb begin
    lo_hit = 1'b0;  lo_idx = '0;
    hi_hit = 1'b0;  hi_idx = '0;
    for (int i = PAL_N - 1; i >= 0; i--) begin
      if (valid[i] && !restart && ent[i] == q_lo) begin
        lo_hit = 1'b1;  lo_idx = PAL_W'(i);
      end
      if (valid[i] && !restart && ent[i] == q_hi) begin
        hi_hit = 1'b1;  hi_idx = PAL_W'(i);
      end
    end
    r_lo = ent[r_lo_idx];
    r_hi = ent[r_hi_idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      ptr   <= '0;
      for (int i = 0; i < PAL_N; i++) ent[i] <= '0;
    end else if (upd) begin
      logic [PAL_N-1:0] v;
      logic [PAL_W-1:0] p;
      v = restart ? '0 : valid;
      p = restart ? '0 : ptr;
      if (ins_lo) begin
        ent[p] <= w_lo;  v[p] = 1'b1;  p = p + 1'b1;
      end
      if (ins_hi) begin
        ent[p] <= w_hi;  v[p] = 1'b1;  p = p + 1'b1;
      end
      valid <= v;
      ptr   <= p;
    end
  end
endmodule
