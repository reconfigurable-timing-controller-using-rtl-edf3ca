// tb_inj_seq: drives the injection sequencer with line ticks every SP clocks
// and a line index running 0 .. 59, random bucket delays, pulse counts and
// first-pulse ticks, and random start/stop/enable/clear commands. A reference
// model in the bench predicts, tick by tick, whether the gun gate opens; the
// bench checks the gate, that the delay presented during every gate is the
// bucket of that pulse and was loaded at least one line period earlier, the
// number of gates per cycle and the gun count.
module tb_inj_seq;
  import rtc_pkg::*;

  localparam int SP = 12;             // clocks per line period in this bench

  logic              clk = 1'b0, rst_n = 1'b0, clear = 1'b0, line_tick = 1'b0;
  logic [5:0]        line_idx = '0;
  delay_t [7:0]      bucket;
  logic [3:0]        npulse = '0;
  logic [5:0]        gun_tick = '0;
  logic              start = 1'b0, stop = 1'b0, enable = 1'b0;
  logic              gun_gate, suc_load, running;
  delay_t            suc_delay;
  logic [15:0]       gun_count;
  int                checks = 0, failures = 0;
  int                cyc = 0, last_load = -1000;
  int                gates_total = 0, loads = 0, full_bursts = 0;

  inj_seq dut (.clk(clk), .rst_n(rst_n), .clear(clear), .line_tick(line_tick),
               .line_idx(line_idx), .bucket(bucket), .npulse(npulse),
               .gun_tick(gun_tick), .start(start), .stop(stop), .enable(enable),
               .gun_gate(gun_gate), .suc_delay(suc_delay), .suc_load(suc_load),
               .gun_count(gun_count), .running(running));

  always #10 clk = ~clk;

  always @(posedge clk) begin
    cyc++;
    if (suc_load) begin
      last_load = cyc;
      loads++;
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  initial begin
    int  run_m = 0, k = 0, count_m = 0, gates_cycle = 0;
    bit  fire;
    bucket = '0;
    #25 rst_n = 1'b1;
    for (int c = 0; c < 40; c++) begin
      // new settings and commands between cycles (after line tick 59)
      for (int i = 0; i < 8; i++) bucket[i] = delay_t'($urandom_range(19487));
      npulse   = (c % 3 == 0) ? 4'd8 : 4'($urandom_range(8));
      gun_tick = 6'($urandom_range(12));
      @(negedge clk);
      case ($urandom_range(5))
        0: begin stop = 1'b1; run_m = 0; end
        1, 2, 3: begin start = 1'b1; run_m = 1; end
        default: ;
      endcase
      enable = ($urandom_range(4) != 0);
      if (c == 20) clear = 1'b1;
      @(negedge clk);
      start = 1'b0; stop = 1'b0;
      if (clear) begin
        clear = 1'b0;
        count_m = 0;
        #1 expect_eq(gun_count, 0, "count after clear");
      end
      expect_eq(running, run_m, "run flag");
      k = 0;
      gates_cycle = 0;
      for (int idx = 0; idx < 60; idx++) begin
        repeat (SP - 1) @(negedge clk);
        // a stop in the middle of one burst
        if (c == 7 && idx == int'(gun_tick) + 2) begin
          stop = 1'b1; run_m = 0;
          @(negedge clk);
          stop = 1'b0;
        end
        line_idx  = 6'(idx);
        line_tick = 1'b1;
        fire = (idx != 0) && (idx >= int'(gun_tick)) && (k < int'(npulse)) &&
               (run_m != 0) && enable;
        @(negedge clk);
        line_tick = 1'b0;
        expect_eq(gun_gate, fire, "gun gate");
        if (fire) begin
          expect_eq(suc_delay, bucket[k], "delay during gate");
          checks++;
          if (cyc - last_load < SP - 2) begin
            failures++;
            $display("FAIL: delay loaded only %0d clocks before gate", cyc - last_load);
          end
          k++;
          count_m++;
          gates_cycle++;
          gates_total++;
        end
        if (idx == 0) expect_eq(suc_delay, bucket[0], "delay at cycle start");
        expect_eq(gun_count, count_m, "gun count");
      end
      if (gates_cycle == 8) full_bursts++;
    end
    expect_eq(full_bursts > 0, 1, "an 8-pulse burst happened");
    $display("gates=%0d loads=%0d full 8-pulse bursts=%0d", gates_total, loads, full_bursts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
