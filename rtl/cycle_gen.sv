// cycle_gen: 1 Hz injection cycle built from the 60 Hz AC line.
//
// line_tick is the AC line already synchronised to the coincidence clock (one
// clock period wide per line period). The block counts line ticks modulo
// LINES_PER_CYCLE; line_idx is the index of the tick happening now (valid while
// line_tick is high) and cycle_start marks tick 0. clk_cnt counts coincidence
// clock periods since the last cycle start, saturating at its maximum, and is
// the time base for the slow triggers.
//
// Sixty line periods per 1 Hz injection cycle follow the source description;
// the free-running count (no alignment to another 1 Hz signal) is this
// design's choice.
//
// Timing: clk_cnt is 0 in the clock period after the cycle-start tick.
module cycle_gen #(
  parameter int unsigned LINES_PER_CYCLE = 60,
  parameter int unsigned CNT_W           = rtc_pkg::CNT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              line_tick,
  output logic [rtc_pkg::LINE_W-1:0] line_idx,
  output logic              cycle_start,
  output logic [CNT_W-1:0]  clk_cnt
);

  logic [rtc_pkg::LINE_W-1:0] last_idx;   // index of the previous line tick

  // Reset so that the first tick after reset is tick 0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         last_idx <= rtc_pkg::LINE_W'(LINES_PER_CYCLE - 1);
    else if (line_tick) last_idx <= line_idx;
  end

  assign line_idx    = (last_idx == rtc_pkg::LINE_W'(LINES_PER_CYCLE - 1)) ? '0 : last_idx + 1'b1;
  assign cycle_start = line_tick && (line_idx == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                clk_cnt <= '1;
    else if (cycle_start)      clk_cnt <= '0;
    else if (clk_cnt != '1)    clk_cnt <= clk_cnt + 1'b1;
  end

endmodule
