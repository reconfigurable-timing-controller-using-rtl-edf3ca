// timing_system: injection timing system built around the timing controller.
//
// The external synchronous counter divides the 508.58 MHz RF by 19488 (the
// least common multiple of the booster and storage-ring harmonic numbers 672
// and 2436) into the 26 kHz coincidence clock that runs the controller, and
// produces a delayed copy of that clock whose delay count selects the RF
// bucket. The controller (rtc) sets that delay count for each injection pulse
// and opens a gate one clock period wide; the logic unit takes the coincidence
// of the gate with the delayed clock, so the gun trigger is RF-synchronised
// without any pulse-extend or delay modules. The controller also makes the
// slow triggers of the 1 Hz cycle and talks to the VME DIO board.
//
// The counter, the oscillator for the booster ramping clock, the front-panel
// display and the level-conversion circuits are outside this logic; their
// signals are ports. The block structure follows the source description.
module timing_system #(
  parameter int unsigned NSLOW           = rtc_pkg::NSLOW,
  parameter int unsigned LINES_PER_CYCLE = 60,
  parameter int unsigned MAX_PULSES      = rtc_pkg::MAX_PULSES
) (
  input  logic             clk,              // 26 kHz coincidence clock
  input  logic             rst_n,
  input  logic             reset_sw,
  input  logic             ac_line,          // 60 Hz AC line clock
  input  logic             suc_delayed_clk,  // delayed 26 kHz clock
  input  logic [15:0]      dio_in,
  output logic [31:0]      dio_out,
  output rtc_pkg::delay_t           suc_delay,
  output logic             suc_load,
  output logic             gun_gate,
  output logic             gun_trigger,
  output logic [NSLOW-1:0] slow_trig,
  output logic [15:0]      gun_count
);

  rtc #(.NSLOW(NSLOW), .LINES_PER_CYCLE(LINES_PER_CYCLE), .MAX_PULSES(MAX_PULSES)) u_rtc (
    .clk(clk), .rst_n(rst_n), .reset_sw(reset_sw), .ac_line(ac_line),
    .dio_in(dio_in), .dio_out(dio_out), .suc_delay(suc_delay),
    .suc_load(suc_load), .gun_gate(gun_gate), .slow_trig(slow_trig),
    .gun_count(gun_count));

  logic_unit u_lu (.gate(gun_gate), .delayed_clk(suc_delayed_clk), .trig(gun_trigger));

endmodule
