// tb_cycle_gen: feeds one-clock line ticks at random spacing and checks the
// line index (0 .. 59 and around), the cycle-start mark on index 0 and the
// clock count since the last cycle start, over several 1 Hz cycles.
module tb_cycle_gen;

  logic        clk = 1'b0, rst_n = 1'b0, line_tick = 1'b0;
  logic [5:0]  line_idx;
  logic        cycle_start;
  logic [15:0] clk_cnt;
  int          checks = 0, failures = 0, cycles = 0;

  cycle_gen dut (.clk(clk), .rst_n(rst_n), .line_tick(line_tick),
                 .line_idx(line_idx), .cycle_start(cycle_start), .clk_cnt(clk_cnt));

  always #10 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference count: clocks since the last tick 0, saturating at 16'hFFFF.
  int ref_cnt = 16'hFFFF;
  int exp_idx = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (line_tick && exp_idx == 0) ref_cnt <= 0;
      else if (ref_cnt != 16'hFFFF)  ref_cnt <= ref_cnt + 1;
    end
  end

  always @(negedge clk) begin
    checks++;
    if (clk_cnt != 16'(ref_cnt)) begin
      failures++;
      $display("FAIL: clk_cnt %0d expected %0d", clk_cnt, ref_cnt);
    end
  end

  initial begin
    #25 rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      repeat ($urandom_range(1, 12)) @(negedge clk);
      #1 line_tick = 1'b1;
      #1;
      checks++;
      if (line_idx != 6'(exp_idx) || cycle_start != (exp_idx == 0)) begin
        failures++;
        $display("FAIL: tick %0d idx %0d start %0b expected %0d", t, line_idx, cycle_start, exp_idx);
      end
      if (exp_idx == 0) cycles++;
      @(negedge clk);
      #1 line_tick = 1'b0;
      exp_idx = (exp_idx + 1) % 60;
    end
    checks++;
    if (cycles != 4) begin
      failures++;
      $display("FAIL: %0d cycle starts in 200 ticks", cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
