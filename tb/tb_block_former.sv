// tb_block_former: streams three frames of a 32x8 picture (pixel value
// made from its coordinates, sof on each first pixel, some idle clocks)
// and checks every macroblock's pixels, coordinates and order, that it
// appears exactly one clock after its last pixel, and the strip_start
// pulses.
module tb_block_former;
  import od_pkg::*;
  localparam int H = 32, V = 8, BPL = H / 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic pix_valid = 1'b0, sof = 1'b0;
  rgb_t pix = '0;
  logic blk_valid, strip_start;
  rgb_t blk [NPIX];
  logic [$clog2(BPL)-1:0] blk_x;
  logic [15:0] blk_y;
  int checks = 0, failures = 0, nblk = 0, nstrip = 0, last_px_cycle = -10, cycle = 0;
  always #5 clk = ~clk;
  block_former #(.H_ACTIVE(H)) dut (.*);

  function automatic rgb_t val(input int f, input int x, input int y);
    return '{8'(x), 8'(y), 8'(f * 16 + x % 4 + (y % 4) * 4)};
  endfunction

  int cur_f;
  always @(posedge clk) begin
    cycle++;
    if (strip_start) nstrip++;
    if (blk_valid) begin
      int bx, by;
      bit ok;
      bx = nblk % BPL;
      by = (nblk / BPL) % (V / 4);
      ok = (int'(blk_x) == bx) && (int'(blk_y) == by);
      for (int i = 0; i < NPIX; i++)
        if (blk[i] != val(cur_f, bx * 4 + i % 4, by * 4 + i / 4)) ok = 0;
      checks += 2;
      if (!ok) begin
        failures++;
        $display("FAIL: block %0d (%0d,%0d) got (%0d,%0d)", nblk, bx, by, blk_x, blk_y);
      end
      if (cycle != last_px_cycle + 1) begin
        failures++;
        $display("FAIL: block latency");
      end
      nblk++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      cur_f = f;
      for (int y = 0; y < V; y++)
        for (int x = 0; x < H; x++) begin
          @(negedge clk);
          pix_valid = 1'b0;
          sof = 1'b0;
          if ($urandom_range(0, 4) == 0) begin @(negedge clk); end
          pix_valid = 1'b1;
          sof = (x == 0 && y == 0);
          pix = val(f, x, y);
          if (x % 4 == 3 && y % 4 == 3) last_px_cycle = cycle + 1;
        end
      @(negedge clk);
      pix_valid = 1'b0;
      sof = 1'b0;
      repeat (3) @(negedge clk);
    end
    checks += 2;
    if (nblk != 3 * H * V / 16) begin
      failures++;
      $display("FAIL: %0d blocks", nblk);
    end
    if (nstrip != 3 * V / 4) begin
      failures++;
      $display("FAIL: %0d strip starts", nstrip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
