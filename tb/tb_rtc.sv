// tb_rtc: the controller logic on its own, at a shortened cycle.
//
// The coincidence clock has period 100 and the AC line period 20 clocks; the
// cycle is shortened to 12 line periods (LINES_PER_CYCLE = 12). The bench
// writes settings over the serial lines, reads them back on the DIO outputs,
// starts and enables the gun and checks over several cycles: npulse gates per
// cycle, each one clock period long, the delay count presented during gate k
// equal to bucket[k], the gun count, the slow-trigger widths, stop, and the
// clear switch.
module tb_rtc;

  localparam int     LINES = 12;
  localparam int     T     = 100;           // clock period
  localparam int     LINE  = 20 * T + 37;   // AC line period, not a multiple of T

  logic        clk = 1'b0, rst_n = 1'b0, reset_sw = 1'b0, ac_line = 1'b0;
  logic [15:0] dio_in = '0;
  logic [31:0] dio_out;
  logic [14:0] suc_delay;
  logic        suc_load, gun_gate;
  logic [3:0]  slow_trig;
  logic [15:0] gun_count;
  int          checks = 0, failures = 0;
  int          gates = 0, k = 0, cyc = 0, last_gate = -100;
  int          slow_hi [4] = '{0, 0, 0, 0};
  int          slow_runs [4] = '{0, 0, 0, 0};

  logic [14:0] bucket [8];
  int          npulse = 5, gun_tick = 2;
  int          swidth [4] = '{3, 7, 1, 12};
  int          sdelay [4] = '{5, 40, 100, 150};

  rtc #(.LINES_PER_CYCLE(LINES)) dut (
    .clk(clk), .rst_n(rst_n), .reset_sw(reset_sw), .ac_line(ac_line), .dio_in(dio_in),
    .dio_out(dio_out), .suc_delay(suc_delay), .suc_load(suc_load), .gun_gate(gun_gate),
    .slow_trig(slow_trig), .gun_count(gun_count));

  always #(T / 2) clk = ~clk;

  initial begin
    #1234;
    forever begin
      ac_line = 1'b1;
      #(LINE / 2);
      ac_line = 1'b0;
      #(LINE - LINE / 2);
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL at %0t %s: got %0d expected %0d", $time, what, got, exp);
    end
  endtask

  // gate monitor: sampled on the falling edge, in the middle of a gate period
  always @(negedge clk) begin
    cyc++;
    if (rst_n && gun_gate) begin
      checks++;
      if (cyc - last_gate == 1) begin
        failures++;
        $display("FAIL: gate longer than one clock");
      end
      if (cyc - last_gate > 2 * 20) k = 0;   // first gate of a burst
      expect_eq(suc_delay, bucket[k], $sformatf("delay during gate %0d", k));
      k++;
      gates++;
      last_gate = cyc;
    end
    for (int i = 0; i < 4; i++) begin
      if (slow_trig[i]) slow_hi[i]++;
      else if (slow_hi[i] != 0) begin
        expect_eq(slow_hi[i], swidth[i], $sformatf("slow %0d width", i));
        slow_hi[i] = 0;
        slow_runs[i]++;
      end
    end
  end

  task automatic serial_write(input logic [7:0] a, input logic [15:0] v);
    logic [23:0] w;
    w = {a, v};
    for (int i = 23; i >= 0; i--) begin
      dio_in[0] = w[i];
      #7 dio_in[1] = 1'b1;
      #7 dio_in[1] = 1'b0;
    end
    #7 dio_in[2] = 1'b1;
    #(5 * T) dio_in[2] = 1'b0;
    #(2 * T);
  endtask

  task automatic pulse_line(input int b);
    dio_in[b] = 1'b1;
    #(4 * T) dio_in[b] = 1'b0;
    #(4 * T);
  endtask

  initial begin
    int n0;
    for (int i = 0; i < 8; i++) bucket[i] = 15'($urandom_range(19487));
    #(3 * T + 7) rst_n = 1'b1;
    for (int i = 0; i < 8; i++) serial_write(8'(i), 16'(bucket[i]));
    serial_write(8'd8, 16'(npulse));
    serial_write(8'd9, 16'(gun_tick));
    for (int i = 0; i < 4; i++) begin
      serial_write(8'(16 + 2 * i), 16'(sdelay[i]));
      serial_write(8'(17 + 2 * i), 16'(swidth[i]));
    end
    for (int a = 0; a < 8; a++) begin
      dio_in[11:7] = 5'(a);
      #1 expect_eq(dio_out[15:0], bucket[a], "read-back bucket");
    end
    dio_in[11:7] = 5'd8;  #1 expect_eq(dio_out[15:0], npulse, "read-back npulse");
    dio_in[11:7] = 5'd19; #1 expect_eq(dio_out[15:0], swidth[1], "read-back slow width");

    // wait for a cycle boundary (a slow trigger), then start
    dio_in[5] = 1'b1;
    @(posedge slow_trig[0]);
    pulse_line(3);
    n0 = gates;
    #(3 * LINES * LINE);
    expect_eq(gates - n0, 3 * npulse, "gates in three cycles");
    expect_eq(gun_count, gates, "gun count");
    expect_eq(dio_out[31:16], gates, "gun count on DIO");
    pulse_line(4);
    n0 = gates;
    #(2 * LINES * LINE);
    expect_eq(gates - n0, 0, "gates while stopped");
    for (int i = 0; i < 4; i++) expect_eq(slow_runs[i] >= 3, 1, $sformatf("slow %0d ran", i));

    reset_sw = 1'b1;
    #(4 * T) reset_sw = 1'b0;
    #(4 * T);
    dio_in[11:7] = 5'd8; #1 expect_eq(dio_out[15:0], 0, "npulse cleared by switch");
    expect_eq(gun_count, 0, "gun count cleared by switch");
    $display("gates=%0d", gates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
