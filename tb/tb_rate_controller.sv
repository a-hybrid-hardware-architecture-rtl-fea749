// tb_rate_controller: feeds random candidate lengths for segments of 8
// blocks and compares every choice (silhouette, qp, all-zero fallback,
// length) with the budget rule modelled in the testbench; also checks that
// no segment exceeds its 512 bits and that each kind of choice occurs.
module tb_rate_controller;
  import od_pkg::*;
  localparam int SB = 8, BB = 64, SEGB = SB * BB;
  logic clk = 1'b0, rst_n = 1'b0;
  logic blk_valid, sil_ok, sel_sil, sel_zero;
  logic [2:0] blk_pos, sel_qp;
  logic [LEN_W-1:0] len_q [QP_N];
  logic [LEN_W-1:0] sil_len, sel_len;
  logic [15:0] limit;
  int checks = 0, failures = 0, n_sil = 0, n_zero = 0, n_q0 = 0, n_qhi = 0;
  always #5 clk = ~clk;
  rate_controller #(.SEG_BLOCKS(SB), .BLK_BITS(BB)) dut (.*);

  initial begin
    int used;
    blk_valid = 0;  sil_ok = 0;  blk_pos = '0;  sil_len = '0;
    for (int q = 0; q < QP_N; q++) len_q[q] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    used = 0;
    for (int t = 0; t < 4000; t++) begin
      int rem, left, hard, fair, lim, e_len, e_qp;
      bit e_sil, e_zero;
      int base;
      @(negedge clk);
      blk_pos = 3'(t % SB);
      // decreasing lengths with qp, scaled by a random block richness
      begin
        int rich;
        rich = ($urandom_range(0, 9) == 0) ? $urandom_range(400, 900) : $urandom_range(14, 300);
        for (int q = 0; q < QP_N; q++) len_q[q] = LEN_W'(14 + (rich - 14) / (q + 1) + $urandom_range(0, 3) * (q == 0 ? 1 : 0));
      end
      sil_ok = ($urandom_range(0, 3) == 0);
      sil_len = LEN_W'($urandom_range(0, 1) ? 25 : 67);
      blk_valid = 1'b1;
      #1;
      base = (blk_pos == 0) ? 0 : used;
      rem = SEGB - base;
      left = SB - int'(blk_pos);
      hard = rem - (left - 1) * MIN_LEN;
      fair = rem / left;
      fair = fair + fair / 8;
      lim = (fair < hard) ? fair : hard;
      e_sil = 0;  e_zero = 0;  e_qp = QP_N - 1;  e_len = MIN_LEN;
      if (sil_ok && int'(sil_len) <= lim) begin e_sil = 1; e_len = sil_len; end
      else begin
        e_zero = 1;
        for (int q = QP_N - 1; q >= 0; q--)
          if (int'(len_q[q]) <= lim) begin e_zero = 0; e_qp = q; e_len = len_q[q]; end
      end
      checks += 2;
      if (sel_sil != e_sil || sel_zero != e_zero || int'(sel_len) != e_len ||
          (!e_sil && !e_zero && int'(sel_qp) != e_qp)) begin
        failures++;
        $display("FAIL: block %0d: sil %0d zero %0d qp %0d len %0d, expected %0d %0d %0d %0d",
                 t, sel_sil, sel_zero, sel_qp, sel_len, e_sil, e_zero, e_qp, e_len);
      end
      if (int'(limit) != lim) begin
        failures++;
        $display("FAIL: limit %0d expected %0d", limit, lim);
      end
      if (e_sil) n_sil++;
      else if (e_zero) n_zero++;
      else if (e_qp == 0) n_q0++;
      else n_qhi++;
      used = base + e_len;
      checks++;
      if (used + (SB - 1 - int'(blk_pos)) * MIN_LEN > SEGB) begin
        failures++;
        $display("FAIL: segment overrun %0d", used);
      end
      @(posedge clk);
    end
    checks++;
    if (n_sil == 0 || n_zero == 0 || n_q0 == 0 || n_qhi == 0) begin
      failures++;
      $display("FAIL: choices sil %0d zero %0d qp0 %0d qp>0 %0d", n_sil, n_zero, n_q0, n_qhi);
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
