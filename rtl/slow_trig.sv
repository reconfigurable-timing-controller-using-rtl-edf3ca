// slow_trig: one slow-trigger channel (ramping start, beam-charge monitor,
// orbit monitor, pulse-magnet pre-charge and the like).
//
// Replaces a gate/delay generator: the output is high while the clock count
// since the start of the 1 Hz cycle lies in [delay, delay + width). A width of
// zero disables the channel. The sum is formed one bit wider so that a window
// reaching past the end of the count range does not wrap.
//
// That the controller makes these triggers is from the source description;
// the delay/width window counted in coincidence-clock periods is this design's
// choice.
//
// Timing: registered output, high from the clock edge after clk_cnt reaches
// delay for width clock periods.
module slow_trig #(
  parameter int unsigned CNT_W = rtc_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] clk_cnt,
  input  logic [CNT_W-1:0] delay,
  input  logic [CNT_W-1:0] width,
  output logic             trig
);

  logic [CNT_W:0] stop;

  assign stop = {1'b0, delay} + {1'b0, width};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) trig <= 1'b0;
    else        trig <= (clk_cnt >= delay) && ({1'b0, clk_cnt} < stop);
  end

endmodule
