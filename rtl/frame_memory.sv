// frame_memory: embedded compressed frame buffer.
//
// Simple dual-port RAM of DEPTH words of W bits: one write port and one
// read port with one clock of read latency (rdata is valid the clock after
// re). The default depth holds one full-HD frame at 1/6 compression:
// 1920*1080/16 macroblocks * 64 bits / 32 = 259200 words (8.3 Mbit). The
// document suggests an embedded frame memory at this ratio; its
// organisation is this design's choice. Contents are not reset.
module frame_memory #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 259200,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
