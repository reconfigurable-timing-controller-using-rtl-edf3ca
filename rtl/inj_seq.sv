// inj_seq: multi-pulse injection sequencer and gun-trigger control.
//
// Up to MAX_PULSES beam pulses are injected in each 1 Hz cycle, one per AC
// line period, each into its own RF bucket. The bucket is chosen by the delay
// count of the external counter, so the sequencer rewrites that count before
// every pulse:
//   * at line tick 0 (cycle start) it loads bucket[0] and rewinds the pulse
//     index;
//   * on each line tick from gun_tick on (never tick 0) while fewer than
//     npulse pulses have fired and the gun is both started and enabled, it
//     opens gun_gate for one clock period and counts the pulse; when the gate
//     closes it loads the delay of the next pulse, so the delay never changes
//     inside a gate period.
// Each delay is therefore settled about one line period before its gate
// (line ticks must be at least three clock periods apart).
// suc_load is a one-clock strobe whenever suc_delay is (re)loaded.
//
// Gun control for top-up injection: start and stop are one-clock pulses that
// set and clear the run flag (stop wins), enable is a level; clear zeroes the
// count of fired gun gates.
//
// The 8-pulse sequence, the per-pulse delay change and the start/stop,
// enable/disable and counting functions follow the source description; the
// load points, the interplay of start/stop and enable and the 16-bit count are
// this design's choices.
//
// Timing: gun_gate is registered, high for the clock period following the
// rising edge on which line_tick was sampled.
module inj_seq #(
  parameter int unsigned MAX_PULSES = rtc_pkg::MAX_PULSES
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clear,
  input  logic                            line_tick,
  input  logic [rtc_pkg::LINE_W-1:0]               line_idx,
  input  rtc_pkg::delay_t [MAX_PULSES-1:0]         bucket,
  input  logic [3:0]                      npulse,
  input  logic [rtc_pkg::LINE_W-1:0]               gun_tick,
  input  logic                            start,
  input  logic                            stop,
  input  logic                            enable,
  output logic                            gun_gate,
  output rtc_pkg::delay_t                          suc_delay,
  output logic                            suc_load,
  output logic [15:0]                     gun_count,
  output logic                            running
);

  localparam int unsigned IDX_W = $clog2(MAX_PULSES + 1);

  logic [IDX_W-1:0] pidx;     // pulses fired in this cycle
  logic             fire;
  logic             load_next; // load the next pulse's delay

  assign fire = line_tick && (line_idx != '0) && (line_idx >= gun_tick) &&
                (32'(pidx) < 32'(npulse)) && running && enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
    end else if (stop) begin
      running <= 1'b0;
    end else if (start) begin
      running <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pidx      <= '0;
      gun_gate  <= 1'b0;
      load_next <= 1'b0;
      suc_delay <= '0;
      suc_load  <= 1'b0;
    end else begin
      gun_gate  <= 1'b0;
      suc_load  <= 1'b0;
      load_next <= 1'b0;
      if (line_tick && line_idx == '0) begin
        pidx      <= '0;
        suc_delay <= bucket[0];
        suc_load  <= 1'b1;
      end else if (fire) begin
        gun_gate  <= 1'b1;
        pidx      <= pidx + 1'b1;
        load_next <= (32'(pidx) + 1 < 32'(npulse));
      end else if (load_next) begin
        // The gate period has ended: the counter may take the next delay.
        suc_delay <= bucket[pidx[$clog2(MAX_PULSES)-1:0]];
        suc_load  <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     gun_count <= '0;
    else if (clear) gun_count <= '0;
    else if (fire)  gun_count <= gun_count + 1'b1;
  end

  // The gate is a single clock period and never opens more than npulse times.
  a_gate_single: assert property (@(posedge clk) disable iff (!rst_n) gun_gate |=> !gun_gate);
  a_pidx_bound:  assert property (@(posedge clk) disable iff (!rst_n) 32'(pidx) <= MAX_PULSES);

endmodule
