// tb_frame_memory: random writes and reads against a model array,
// including a read and a write to the same address in one clock (the read
// returns the old word), with the one-clock read latency checked.
module tb_frame_memory;
  localparam int W = 32, DEPTH = 1000, AW = $clog2(DEPTH);
  logic clk = 1'b0;
  logic we = 1'b0, re = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  frame_memory #(.W(W), .DEPTH(DEPTH)) dut (.*);
  logic [W-1:0] model [DEPTH];
  bit           known [DEPTH];
  initial begin
    for (int i = 0; i < DEPTH; i++) known[i] = 0;
    for (int t = 0; t < 5000; t++) begin
      logic [W-1:0] e;
      bit chk;
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom_range(0, DEPTH - 1));
      wdata = W'($urandom);
      re = ($urandom_range(0, 1) == 1);
      raddr = (t % 7 == 0) ? waddr : AW'($urandom_range(0, DEPTH - 1));
      chk = re && known[raddr];
      e = model[raddr];
      @(posedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1; end
      #1;
      if (chk) begin
        checks++;
        if (rdata != e) begin
          failures++;
          $display("FAIL: read %0d = %h expected %h", raddr, rdata, e);
        end
      end
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
