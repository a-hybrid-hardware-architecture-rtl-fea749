// segment_buffer: triple segment buffer and burst writer to frame memory.
//
// Variable-length macroblock codes are packed, MSB first, into the segment
// buffer being filled; a code with first set starts a new segment and last
// closes it. A closed segment waits in its buffer until the writer copies it
// to its fixed slot of the frame memory, SEG_WORDS consecutive W-bit words
// at seg_addr*SEG_WORDS, one word per clock. Three buffers rotate: one
// filling, up to two waiting or being written. hold (from the overdrive
// read side) delays the start of a write so that the previous frame's data
// in that slot is read first; the third buffer absorbs such delays.
// overflow is a sticky error flag set if a segment closes while the next
// buffer is still occupied. wr_count counts segments written.
// The document gives the triple segment buffer and burst writing; the
// handshake is this design's choice.
module segment_buffer
  import od_pkg::*;
#(
  parameter int unsigned SEG_BLOCKS = 8,
  parameter int unsigned BLK_BITS   = 64,
  parameter int unsigned W          = 32,
  parameter int unsigned NSEG       = 16200,
  localparam int unsigned SEG_BITS  = SEG_BLOCKS * BLK_BITS,
  localparam int unsigned SEG_WORDS = SEG_BITS / W,
  localparam int unsigned SW        = $clog2(NSEG),
  localparam int unsigned AW        = $clog2(NSEG * SEG_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              code_valid,
  input  logic [CODE_W-1:0] code,        // left aligned
  input  logic [LEN_W-1:0]  len,
  input  logic              first,       // first block of a segment
  input  logic              last,        // last block of a segment
  input  logic [SW-1:0]     seg_addr,
  input  logic              hold,
  output logic              mem_we,
  output logic [AW-1:0]     mem_addr,
  output logic [W-1:0]      mem_wdata,
  output logic [31:0]       wr_count,
  output logic              overflow,
  output logic [1:0]        pending      // closed segments not yet written
);
  logic [SEG_BITS-1:0] buf_q [3];
  logic [SW-1:0]       addr_q [3];
  logic [2:0]          full;
  logic [1:0]          fi, wi;           // fill and write buffer indices
  logic [15:0]         bp;               // bits used in the filling buffer
  logic                wact;
  logic [$clog2(SEG_WORDS+1)-1:0] wk;

  function automatic logic [1:0] nxt(input logic [1:0] i);
    return (i == 2'd2) ? 2'd0 : i + 2'd1;
  endfunction

  logic [CODE_W+SEG_BITS-1:0] wide;
  logic [SEG_BITS-1:0]        placed;
  logic [15:0]                base;
  assign base   = first ? 16'd0 : bp;
  assign wide   = {code, {SEG_BITS{1'b0}}} >> base;
  assign placed = wide[CODE_W+SEG_BITS-1 -: SEG_BITS];

  assign pending = 2'(full[0]) + 2'(full[1]) + 2'(full[2]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0;  fi <= '0;  wi <= '0;  bp <= '0;
      wact <= 1'b0;  wk <= '0;
      mem_we <= 1'b0;  mem_addr <= '0;  mem_wdata <= '0;
      wr_count <= '0;  overflow <= 1'b0;
      for (int i = 0; i < 3; i++) begin
        buf_q[i] <= '0;
        addr_q[i] <= '0;
      end
    end else begin
      logic [2:0] f;
      f = full;
      // writer
      mem_we <= 1'b0;
      if (!wact) begin
        if (f[wi] && !hold) begin
          wact <= 1'b1;
          wk   <= '0;
        end
      end else begin
        mem_we    <= 1'b1;
        mem_addr  <= AW'(addr_q[wi]) * AW'(SEG_WORDS) + AW'(wk);
        mem_wdata <= buf_q[wi][SEG_BITS - 1 - 32'(wk) * W -: W];
        if (32'(wk) == SEG_WORDS - 1) begin
          wact <= 1'b0;
          f[wi] = 1'b0;
          wi <= nxt(wi);
          wr_count <= wr_count + 32'd1;
        end else wk <= wk + 1'b1;
      end
      // filler
      if (code_valid) begin
        buf_q[fi] <= first ? placed : (buf_q[fi] | placed);
        bp <= base + 16'(len);
        if (first) addr_q[fi] <= seg_addr;
        if (last) begin
          f[fi] = 1'b1;
          fi <= nxt(fi);
          if (f[nxt(fi)]) overflow <= 1'b1;
        end
      end
      full <= f;
    end
  end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    code_valid |-> 32'(base) + 32'(len) <= SEG_BITS);
endmodule
