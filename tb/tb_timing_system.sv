// tb_timing_system: end-to-end run of the timing system at its real rates.
//
// A behavioural counter model supplies the 26 kHz coincidence clock (19488 RF
// periods of 1.966 ns) and the delayed clock; a 60 Hz AC line runs
// asynchronously to it. The bench plays the VME DIO board: it writes all
// settings as 24-bit serial words, reads every one back, starts the gun and
// enables injection, then watches full 1 Hz cycles. It checks:
//   * every gun trigger lies inside a gate and sits exactly bucket[k] RF
//     periods after its clock edge, pulses 0..7 in order (8-pulse injection
//     with a new delay count per pulse);
//   * the pulses of one burst are one line period apart and bursts 1 s apart;
//   * the gun count on the DIO lines equals the triggers seen, and clears;
//   * stop, and disable, each suppress a whole cycle; start resumes;
//   * slow triggers have the programmed width and offset, once per second;
//   * the front-panel switch clears the settings.
// Each mechanism is counted; one that never happened is a failure. The top
// keeps all its default parameters.
module tb_timing_system;

  localparam real RF_NS   = 1.966256;
  localparam real CLK_NS  = RF_NS * 19488;
  localparam real LINE_NS = 1.0e9 / 60.0;

  logic        rst_n = 1'b0, reset_sw = 1'b0, ac_line = 1'b0;
  logic [15:0] dio_in = '0;
  logic [31:0] dio_out;
  logic [14:0] suc_delay;
  logic        suc_load, gun_gate, gun_trigger, clk, dclk;
  logic [3:0]  slow_trig;
  logic [15:0] gun_count;
  realtime     last_rise;
  int          applied_delay;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_serial = 0, n_readback = 0, n_burst8 = 0, n_delay_change = 0;
  int n_start = 0, n_stop_quiet = 0, n_disable_quiet = 0, n_clear = 0;
  int n_switch = 0, n_slow = 0;

  suc_model #(.DIV(19488), .RF_NS(RF_NS), .PULSE_RF(8)) u_suc (
    .delay(suc_delay), .clk(clk), .delayed_clk(dclk),
    .last_rise(last_rise), .applied_delay(applied_delay));

  timing_system dut (.clk(clk), .rst_n(rst_n), .reset_sw(reset_sw), .ac_line(ac_line),
                     .suc_delayed_clk(dclk), .dio_in(dio_in), .dio_out(dio_out),
                     .suc_delay(suc_delay), .suc_load(suc_load), .gun_gate(gun_gate),
                     .gun_trigger(gun_trigger), .slow_trig(slow_trig), .gun_count(gun_count));

  // 60 Hz AC line, started at an arbitrary phase
  initial begin
    #(3.7e6);
    forever begin
      ac_line = 1'b1;
      #(LINE_NS / 2);
      ac_line = 1'b0;
      #(LINE_NS / 2);
    end
  end

  initial begin
    #(9.0e9);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL at %0t: %s", $realtime, msg);
  endtask

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) fail($sformatf("%s: got %0d expected %0d", what, got, exp));
  endtask

  // ---- settings ----
  logic [14:0] bucket [8];
  int          npulse = 8, gun_tick = 3;
  int          sdelay [4] = '{200, 1500, 4000, 9000};
  int          swidth [4] = '{4, 30, 1, 200};

  task automatic serial_write(input logic [7:0] a, input logic [15:0] v);
    logic [23:0] w;
    w = {a, v};
    for (int i = 23; i >= 0; i--) begin
      dio_in[0] = w[i];
      #1000 dio_in[1] = 1'b1;
      #1000 dio_in[1] = 1'b0;
    end
    #1000 dio_in[2] = 1'b1;
    #(5 * CLK_NS) dio_in[2] = 1'b0;
    #(2 * CLK_NS);
    n_serial++;
  endtask

  function automatic int expected_reg(input int a);
    if (a < 8) return int'(bucket[a]);
    if (a == 8) return npulse;
    if (a == 9) return gun_tick;
    if (a >= 16 && a < 24) return (a % 2) ? swidth[(a - 16) / 2] : sdelay[(a - 16) / 2];
    return 0;
  endfunction

  task automatic read_all(input bit zero);
    for (int a = 0; a < 24; a++) begin
      dio_in[11:7] = 5'(a);
      #1000;
      expect_eq(int'(dio_out[15:0]), zero ? 0 : expected_reg(a), $sformatf("read-back %0d", a));
    end
    n_readback++;
  endtask

  task automatic pulse_line(input int bit_no);
    dio_in[bit_no] = 1'b1;
    #(4 * CLK_NS) dio_in[bit_no] = 1'b0;
    #(4 * CLK_NS);
  endtask

  // ---- gun trigger monitor ----
  int      trig_seen = 0, k_in_burst = 0, burst_pulses = 0;
  realtime t_prev = 0, t_burst0 = 0, t_prev_burst0 = 0;
  realtime burst_start [$];

  always @(posedge gun_trigger) begin
    int      meas;
    realtime dt;
    checks++;
    if (!gun_gate) fail("trigger outside gate");
    meas = int'(($realtime - last_rise) / RF_NS);  // int'() rounds to nearest
    dt = $realtime - t_prev;
    if (trig_seen == 0 || dt > 2 * LINE_NS) begin
      // first pulse of a burst
      if (trig_seen != 0 && k_in_burst == 8) n_burst8++;
      k_in_burst = 0;
      burst_start.push_back($realtime);
    end else begin
      checks++;
      if (dt < LINE_NS - 1.5 * CLK_NS || dt > LINE_NS + 1.5 * CLK_NS)
        fail($sformatf("pulse spacing %0t", dt));
    end
    expect_eq(meas, int'(bucket[k_in_burst]), $sformatf("bucket of pulse %0d", k_in_burst));
    if (meas != int'(bucket[k_in_burst])) $display("t=%f rise=%f applied=%0d", $realtime, last_rise, applied_delay);
    if (k_in_burst > 0 && bucket[k_in_burst] != bucket[k_in_burst - 1]) n_delay_change++;
    k_in_burst++;
    trig_seen++;
    t_prev = $realtime;
  end

  // ---- slow trigger monitor (channel widths and 1 s period) ----
  realtime s_rise [4];
  realtime s_first [4];
  int      s_count [4] = '{0, 0, 0, 0};
  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(posedge slow_trig[i]) begin
      if (s_count[i] > 0) begin
        checks++;
        if ($realtime - s_rise[i] < 60 * LINE_NS - 1.5 * CLK_NS ||
            $realtime - s_rise[i] > 60 * LINE_NS + 1.5 * CLK_NS)
          fail($sformatf("slow %0d period %0t", i, $realtime - s_rise[i]));
      end
      s_rise[i] = $realtime;
      s_count[i]++;
    end
    always @(negedge slow_trig[i]) begin
      if (rst_n && s_count[i] > 0) begin
        checks++;
        if ($realtime - s_rise[i] < swidth[i] * CLK_NS - 1.0 ||
            $realtime - s_rise[i] > swidth[i] * CLK_NS + 1.0)
          fail($sformatf("slow %0d width %0t", i, $realtime - s_rise[i]));
        else n_slow++;
      end
    end
  end

  initial begin
    int n_before;
    for (int i = 0; i < 8; i++) bucket[i] = 15'(1000 + 2300 * i + $urandom_range(200));
    bucket[5] = 15'd19000;
    #(3 * CLK_NS) rst_n = 1'b1;
    #(3 * CLK_NS);

    // settings over the serial link, then read back
    for (int i = 0; i < 8; i++) serial_write(8'(i), 16'(bucket[i]));
    serial_write(8'd8, 16'(npulse));
    serial_write(8'd9, 16'(gun_tick));
    for (int i = 0; i < 4; i++) begin
      serial_write(8'(16 + 2 * i), 16'(sdelay[i]));
      serial_write(8'(17 + 2 * i), 16'(swidth[i]));
    end
    read_all(0);
    dio_in[11:7] = 5'd31;
    #1000 expect_eq(int'(dio_out[0]), 1, "status: word received");

    // enable injection and start the gun: two full cycles of 8 pulses
    dio_in[5] = 1'b1;
    pulse_line(3);
    n_start++;
    #1000 expect_eq(int'(dio_out[2:1]), 3, "status: enabled and running");
    // the first burst may start late in a cycle; the second is regular
    wait (trig_seen > 0);
    #(1.5e9);
    expect_eq(trig_seen, 16, "triggers in two cycles");
    expect_eq(int'(gun_count), trig_seen, "gun count port");
    expect_eq(int'(dio_out[31:16]), trig_seen, "gun count on DIO");

    // slow-trigger offsets against the first burst
    for (int i = 0; i < 4; i++) begin
      realtime off, exp_off;
      checks++;
      if (burst_start.size() < 2) fail("no regular burst");
      else begin
        // tick 0 is gun_tick line periods n_before the first pulse; a trigger
        // rises delay+1 clock periods after tick 0 (one period of register)
        off = s_rise[i] - burst_start[1];
        while (off > 0.5e9) off -= 60 * LINE_NS;
        while (off < -0.5e9) off += 60 * LINE_NS;
        exp_off = (sdelay[i] + 1) * CLK_NS - gun_tick * LINE_NS;
        if (off < exp_off - 3 * CLK_NS || off > exp_off + 3 * CLK_NS)
          fail($sformatf("slow %0d offset %0t expected %0t", i, off, exp_off));
      end
    end

    // stop: one whole second without triggers
    pulse_line(4);
    n_before = trig_seen;
    #(1.1e9);
    expect_eq(trig_seen - n_before, 0, "triggers while stopped");
    if (trig_seen == n_before) n_stop_quiet++;

    // started but injection disabled: still none
    dio_in[5] = 1'b0;
    pulse_line(3);
    n_start++;
    n_before = trig_seen;
    #(1.1e9);
    expect_eq(trig_seen - n_before, 0, "triggers while disabled");
    if (trig_seen == n_before) n_disable_quiet++;

    // enable again: pulses resume
    dio_in[5] = 1'b1;
    #(1.1e9);
    expect_eq(trig_seen - n_before >= 8, 1, "triggers after re-enable");
    expect_eq(int'(gun_count), trig_seen, "gun count after re-enable");

    // clear the gun count from the DIO board
    pulse_line(4);
    pulse_line(6);
    #1000 expect_eq(int'(dio_out[31:16]), 0, "gun count cleared");
    if (dio_out[31:16] == 0) n_clear++;

    // front-panel switch clears the settings
    reset_sw = 1'b1;
    #(4 * CLK_NS) reset_sw = 1'b0;
    #(4 * CLK_NS);
    read_all(1);
    n_switch++;

    // every mechanism must have happened
    expect_eq(n_serial > 0, 1, "serial writes");
    expect_eq(n_readback > 1, 1, "read-back");
    expect_eq(n_burst8 + (k_in_burst == 8) > 0, 1, "8-pulse burst");
    expect_eq(n_delay_change > 0, 1, "delay changed between pulses");
    expect_eq(n_stop_quiet, 1, "stop");
    expect_eq(n_disable_quiet, 1, "disable");
    expect_eq(n_clear, 1, "count clear");
    expect_eq(n_slow > 0, 1, "slow triggers");
    for (int i = 0; i < 4; i++) expect_eq(s_count[i] >= 3, 1, $sformatf("slow %0d fired", i));
    $display("serial=%0d readback=%0d bursts8=%0d delay_changes=%0d start=%0d stop=%0d disable=%0d clear=%0d switch=%0d slow=%0d",
             n_serial, n_readback, n_burst8 + (k_in_burst == 8), n_delay_change, n_start,
             n_stop_quiet, n_disable_quiet, n_clear, n_switch, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
