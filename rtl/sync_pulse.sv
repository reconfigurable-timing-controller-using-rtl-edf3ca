// sync_pulse: the synchronous circuit that replaces the asynchronous
// coincidence/latch/delay arrangement of discrete modules.
//
// An asynchronous input A is sampled by a flip-flop clocked on the falling
// edge of the clock B, giving C; a second flip-flop on the same edge gives D,
// the value of C one period earlier. E = C & ~D is therefore high for exactly
// one period of B after A first goes high, and Y = E & B is the single B pulse
// inside that window. A second rising edge of A only produces a new pulse after
// A has been low for at least one falling edge of B.
//
// Structure (two flip-flops on the inverted clock, the AND with an inverted D
// input and the final AND with B) follows the published schematic and timing
// chart. The active-low asynchronous reset is this design's addition so that
// C and D start known.
//
// Timing: E rises 0..1 period of B after A (at the next falling edge of B) and
// lasts one period; Y follows with the next high phase of B.
module sync_pulse (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic c,
  output logic d,
  output logic e,
  output logic y
);

  always_ff @(negedge b or negedge rst_n) begin
    if (!rst_n) begin
      c <= 1'b0;
      d <= 1'b0;
    end else begin
      c <= a;
      d <= c;
    end
  end

  assign e = c & ~d;
  assign y = e & b;

endmodule
