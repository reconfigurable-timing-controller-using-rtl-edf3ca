// suc_model: behavioural model (not synthesizable) of the RF-synchronous
// universal counter that clocks the timing system.
//
// The real instrument counts the RF (508.58 MHz) modulo DIV = 19488 and emits
// a divided clock plus a delayed copy of it whose delay, in RF periods, is the
// delay count written by the controller. The model does not toggle the RF:
// it produces the divided clock with delays of DIV RF periods (high for the
// first half of each period) and, at every rising edge, takes the delay count
// present just before that edge and emits a pulse PULSE_RF RF periods wide,
// delay RF periods after the edge. Time unit of the delays: 1 ns.
// last_rise and applied_delay let a bench measure the delayed pulse against
// the clock edge it belongs to.
module suc_model #(
  parameter int  DIV      = 19488,
  parameter real RF_NS    = 1.966256,  // 1 / 508.58 MHz
  parameter int  PULSE_RF = 8
) (
  input  logic [14:0] delay,
  output logic        clk,
  output logic        delayed_clk,
  output realtime     last_rise,
  output int          applied_delay
);

  initial begin
    clk = 1'b0;
    delayed_clk = 1'b0;
    last_rise = 0;
    applied_delay = 0;
    forever begin
      #(RF_NS * (DIV / 2));
      clk = 1'b1;
      last_rise = $realtime;
      applied_delay = int'(delay);
      fork
        begin
          automatic int dly = int'(delay);
          #(RF_NS * dly);
          delayed_clk = 1'b1;
          #(RF_NS * PULSE_RF);
          delayed_clk = 1'b0;
        end
      join_none
      #(RF_NS * (DIV - DIV / 2));
      clk = 1'b0;
    end
  end

endmodule
