// tb_slow_trig: sweeps the clock count through random delay/width windows
// (including zero width and windows reaching the end of the count range) and
// checks the registered trigger against the window of the previous count.
module tb_slow_trig;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [15:0] clk_cnt = '0, delay = '0, width = '0;
  logic        trig;
  int          checks = 0, failures = 0, highs = 0;

  slow_trig dut (.clk(clk), .rst_n(rst_n), .clk_cnt(clk_cnt), .delay(delay),
                 .width(width), .trig(trig));

  always #10 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lo, n, exp_highs;
    #25 rst_n = 1'b1;
    for (int k = 0; k < 24; k++) begin
      case (k % 4)
        0: begin delay = 16'($urandom_range(300)); width = 16'($urandom_range(1, 50)); lo = 0; end
        1: begin delay = 16'($urandom_range(300)); width = 16'h0; lo = 0; end
        2: begin delay = 16'hFFF0; width = 16'h0040; lo = 16'hFF00; end
        default: begin delay = 16'($urandom_range(1000)); width = 16'($urandom_range(300)); lo = 0; end
      endcase
      n = 400;
      exp_highs = 0;
      highs = 0;
      for (int i = lo; i < lo + n && i <= 16'hFFFF; i++) begin
        @(negedge clk);
        clk_cnt = 16'(i);
        if (i >= int'(delay) && i < int'(delay) + int'(width)) exp_highs++;
        @(negedge clk);
        checks++;
        if (trig !== (i >= int'(delay) && i < int'(delay) + int'(width))) begin
          failures++;
          $display("FAIL: cnt %0d delay %0d width %0d trig %0b", i, delay, width, trig);
        end
        if (trig) highs++;
      end
      checks++;
      if (highs != exp_highs) begin
        failures++;
        $display("FAIL: %0d high cycles, expected %0d", highs, exp_highs);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
