// logic_unit: coincidence unit that forms the RF-synchronised gun trigger.
//
// The timing controller opens a gate one coincidence-clock period wide; the
// external counter supplies a delayed copy of that clock whose phase selects
// the RF bucket. Their coincidence (logical AND) is the gun trigger, so the
// trigger edge carries the RF-locked timing of the delayed clock while the
// controller only decides in which period it fires. In the original system
// this is a standard NIM logic unit; taking coincidence as AND is this
// design's reading. Purely combinational, no clock.
module logic_unit (
  input  logic gate,
  input  logic delayed_clk,
  output logic trig
);

  assign trig = gate & delayed_clk;

endmodule
