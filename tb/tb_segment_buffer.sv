// tb_segment_buffer: feeds segments of random-length codes (random bits,
// 8 blocks per segment, within the 512-bit slot) with random segment
// addresses, holds the writer now and then, and checks the words written
// to memory against the segments packed by the testbench: addresses,
// order, contents, burst of 16 consecutive words, wr_count, no overflow
// while the three buffers suffice, and overflow when they do not.
module tb_segment_buffer;
  import od_pkg::*;
  localparam int SB = 8, BB = 64, SEGB = SB * BB, W = 32, NSEG = 64, SWORDS = SEGB / W;
  localparam int SW = $clog2(NSEG), AW = $clog2(NSEG * SWORDS);
  logic clk = 1'b0, rst_n = 1'b0;
  logic code_valid = 0, first = 0, last = 0, hold = 0;
  logic [CODE_W-1:0] code = '0;
  logic [LEN_W-1:0]  len = '0;
  logic [SW-1:0]     seg_addr = '0;
  logic mem_we, overflow;
  logic [AW-1:0] mem_addr;
  logic [W-1:0]  mem_wdata;
  logic [31:0]   wr_count;
  logic [1:0]    pending;
  int checks = 0, failures = 0, nwords = 0, nheld = 0;
  always #5 clk = ~clk;
  segment_buffer #(.SEG_BLOCKS(SB), .BLK_BITS(BB), .W(W), .NSEG(NSEG)) dut (.*);

  logic [SEGB-1:0] exp_seg [$];
  int              exp_addr [$];

  always @(posedge clk) if (mem_we) begin
    int k;
    k = nwords % SWORDS;
    checks++;
    if (exp_seg.size() == 0) begin
      failures++;
      $display("FAIL: unexpected write");
    end else if (int'(mem_addr) != exp_addr[0] * SWORDS + k ||
                 mem_wdata != exp_seg[0][SEGB - 1 - k * W -: W]) begin
      failures++;
      $display("FAIL: word %0d of slot %0d: addr %0d data %h", k, exp_addr[0], mem_addr, mem_wdata);
    end
    nwords++;
    if (k == SWORDS - 1) begin
      void'(exp_seg.pop_front());
      void'(exp_addr.pop_front());
    end
  end

  // burst: once started, a segment is written on consecutive clocks
  logic we_q;
  always @(posedge clk) begin
    we_q <= mem_we;
    if (we_q && !mem_we && nwords % SWORDS != 0) begin
      failures++;
      $display("FAIL: burst interrupted");
    end
  end

  task automatic send_segment(input int gap);
    logic [SEGB-1:0] s;
    logic [CODE_W-1:0] c [SB];
    int l [SB];
    int pos, a;
    s = '0;
    pos = 0;
    a = $urandom_range(0, NSEG - 1);
    for (int b = 0; b < SB; b++) begin
      l[b] = $urandom_range(MIN_LEN, 64 + 8);
      if (pos + l[b] + (SB - 1 - b) * MIN_LEN > SEGB) l[b] = SEGB - pos - (SB - 1 - b) * MIN_LEN;
      c[b] = '0;
      for (int i = 0; i < l[b]; i++) c[b][CODE_W - 1 - i] = 1'($urandom);
      for (int i = 0; i < l[b]; i++) s[SEGB - 1 - pos - i] = c[b][CODE_W - 1 - i];
      pos += l[b];
    end
    exp_seg.push_back(s);
    exp_addr.push_back(a);
    for (int b = 0; b < SB; b++) begin
      @(negedge clk);
      code_valid = 1;  code = c[b];  len = LEN_W'(l[b]);
      first = (b == 0);  last = (b == SB - 1);  seg_addr = SW'(a);
      @(negedge clk);
      code_valid = 0;
      code = {CODE_W{1'b1}};
      repeat (gap) @(negedge clk);
    end
  endtask

  always @(negedge clk) begin
    if ($urandom_range(0, 9) == 0) hold <= ~hold;
    if (hold) nheld++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) send_segment(3);
    hold = 0;
    repeat (200) @(negedge clk);
    checks += 3;
    if (nwords != 200 * SWORDS) begin
      failures++;
      $display("FAIL: %0d words written", nwords);
    end
    if (wr_count != 200) begin
      failures++;
      $display("FAIL: wr_count %0d", wr_count);
    end
    if (overflow) begin
      failures++;
      $display("FAIL: overflow with the writer keeping up");
    end
    // a writer held for good: the fourth closed segment overflows
    force hold = 1'b1;
    for (int t = 0; t < 3; t++) send_segment(0);
    checks++;
    if (!overflow) begin
      failures++;
      $display("FAIL: no overflow with all buffers full");
    end
    release hold;
    $display("INFO: %0d held clocks", nheld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
