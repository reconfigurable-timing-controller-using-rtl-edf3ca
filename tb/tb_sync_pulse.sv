// tb_sync_pulse: checks the two-flip-flop synchronous pulse circuit.
//
// A free-running clock B (period 100) samples an input A that rises and falls
// at random offsets from the clock edges. For every rise of A the bench
// expects: C high and D low right after the next falling edge of B (E high,
// Y low while B is low), Y high during the following high phase of B, then D
// high and E, Y low after the second falling edge, and exactly one Y pulse per
// rise of A, one half period wide.
module tb_sync_pulse;

  logic rst_n = 1'b0, a = 1'b0, b = 1'b0;
  logic c, d, e, y;
  int   checks = 0, failures = 0;
  int   ypulses = 0;
  realtime yrise;

  sync_pulse dut (.rst_n(rst_n), .a(a), .b(b), .c(c), .d(d), .e(e), .y(y));

  always #50 b = ~b;

  always @(posedge y) if (rst_n) begin
    ypulses++;
    yrise = $realtime;
  end
  always @(negedge y) if (rst_n) begin
    checks++;
    if ($realtime - yrise != 50) begin
      failures++;
      $display("FAIL: Y width %0t", $realtime - yrise);
    end
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $realtime);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_before;
    #230 rst_n = 1'b1;
    repeat (3) @(negedge b);
    check(y, 1'b0, "Y idle after reset");
    for (int i = 0; i < 40; i++) begin
      // raise A at a random point of either clock phase
      if ($urandom_range(1)) @(posedge b); else @(negedge b);
      #($urandom_range(5, 45));
      n_before = ypulses;
      a = 1'b1;
      @(negedge b); #1;
      check(c, 1'b1, "C after first falling edge");
      check(d, 1'b0, "D after first falling edge");
      check(e, 1'b1, "E window open");
      check(y, 1'b0, "Y low while B low");
      @(posedge b); #1;
      check(y, 1'b1, "Y follows B inside E");
      @(negedge b); #1;
      check(d, 1'b1, "D after second falling edge");
      check(e, 1'b0, "E window closed");
      check(y, 1'b0, "Y ends");
      // hold A high a few more periods: no further pulse
      repeat ($urandom_range(0, 4)) @(negedge b);
      #($urandom_range(5, 45));
      a = 1'b0;
      repeat (2 + $urandom_range(0, 3)) @(negedge b);
      #1;
      check(c | d, 1'b0, "C and D clear after A low");
      checks++;
      if (ypulses - n_before != 1) begin
        failures++;
        $display("FAIL: %0d Y pulses for one rise of A", ypulses - n_before);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
