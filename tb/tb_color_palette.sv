// tb_color_palette: drives random lookups and updates (with segment
// restarts) and compares hits, indices and read-back colours with a
// model of the round-robin palette kept in the testbench.
module tb_color_palette;
  import od_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic restart, upd, ins_lo, ins_hi, lo_hit, hi_hit;
  rgb_t q_lo, q_hi, r_lo, r_hi, w_lo, w_hi;
  logic [PAL_W-1:0] lo_idx, hi_idx, r_lo_idx, r_hi_idx;
  int checks = 0, failures = 0, nhit = 0;
  always #5 clk = ~clk;
  color_palette dut (.*);

  rgb_t m_ent [PAL_N];
  bit   m_val [PAL_N];
  int   m_ptr;

  // a small colour set so that hits are frequent
  function automatic rgb_t pick();
    return rgb_t'(24'($urandom_range(0, 11) * 24'h111111));
  endfunction

  function automatic void lookup(input rgb_t c, input bit rs, output bit hit, output int idx);
    hit = 0;
    idx = 0;
    if (!rs)
      for (int i = 0; i < PAL_N; i++)
        if (!hit && m_val[i] && m_ent[i] == c) begin hit = 1; idx = i; end
  endfunction

  initial begin
    for (int i = 0; i < PAL_N; i++) begin m_val[i] = 0; m_ent[i] = '0; end
    m_ptr = 0;
    {restart, upd, ins_lo, ins_hi} = '0;
    {q_lo, q_hi, w_lo, w_hi, r_lo_idx, r_hi_idx} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      bit eh_lo, eh_hi;
      int ei_lo, ei_hi;
      @(negedge clk);
      restart = ($urandom_range(0, 15) == 0);
      q_lo = pick();
      q_hi = pick();
      r_lo_idx = PAL_W'($urandom);
      r_hi_idx = PAL_W'($urandom);
      upd = ($urandom_range(0, 3) != 0);
      #1;
      lookup(q_lo, restart, eh_lo, ei_lo);
      lookup(q_hi, restart, eh_hi, ei_hi);
      checks += 4;
      if (lo_hit != eh_lo || (eh_lo && int'(lo_idx) != ei_lo)) begin
        failures++;
        $display("FAIL: low lookup hit %0d idx %0d expected %0d %0d", lo_hit, lo_idx, eh_lo, ei_lo);
      end
      if (hi_hit != eh_hi || (eh_hi && int'(hi_idx) != ei_hi)) begin
        failures++;
        $display("FAIL: high lookup");
      end
      if (m_val[r_lo_idx] && r_lo != m_ent[r_lo_idx]) begin
        failures++;
        $display("FAIL: read port low");
      end
      if (m_val[r_hi_idx] && r_hi != m_ent[r_hi_idx]) begin
        failures++;
        $display("FAIL: read port high");
      end
      if (eh_lo || eh_hi) nhit++;
      ins_lo = !eh_lo;
      ins_hi = !eh_hi && (q_hi != q_lo);
      w_lo = q_lo;
      w_hi = q_hi;
      @(posedge clk);
      if (upd) begin
        if (restart) begin
          for (int i = 0; i < PAL_N; i++) m_val[i] = 0;
          m_ptr = 0;
        end
        if (ins_lo) begin m_ent[m_ptr] = w_lo; m_val[m_ptr] = 1; m_ptr = (m_ptr + 1) % PAL_N; end
        if (ins_hi) begin m_ent[m_ptr] = w_hi; m_val[m_ptr] = 1; m_ptr = (m_ptr + 1) % PAL_N; end
      end
    end
    checks++;
    if (nhit < 100) begin
      failures++;
      $display("FAIL: only %0d hits", nhit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
