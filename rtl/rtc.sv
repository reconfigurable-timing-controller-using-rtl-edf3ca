// rtc: logic of the reconfigurable timing controller.
//
// The controller replaces a rack of discrete logic, gate/delay and
// pulse-extend modules by synchronous logic running on the 26 kHz coincidence
// clock (RF divided by 19488, supplied by an external counter). Its parts:
//   * sync_pulse turns the asynchronous 60 Hz AC line into one clock-wide
//     tick per line period (the two-flip-flop circuit on the falling clock
//     edge);
//   * serial_rx and rtc_regs receive settings as 24-bit serial words from a
//     VME digital I/O board and hold them for read-back;
//   * cycle_gen divides the line ticks into the 1 Hz injection cycle;
//   * inj_seq runs the multi-pulse injection: it rewrites the external
//     counter's delay count for each pulse and opens the gun gate, and handles
//     gun start/stop, injection enable and the gun count;
//   * NSLOW slow_trig channels make the slow triggers of the cycle.
//
// VME DIO inputs (dio_in): [0] serial data, [1] serial clock, [2] strobe,
// [3] gun start, [4] gun stop, [5] injection enable, [6] gun count clear,
// [11:7] read-back address, [15:12] unused. Start, stop and clear act on their
// rising edge. dio_out = {gun_count, read-back word}; the status word at
// read-back address 31 is {13'b0, enable, running, serial word seen}.
// reset_sw (front-panel switch) clears all settings and the gun count.
//
// The functions follow the source description; the pin assignment, the
// register map, the edge-triggered commands and putting the logic of the three
// programmable devices into one design are this design's choices.
module rtc
  import rtc_pkg::cfg_t, rtc_pkg::delay_t, rtc_pkg::ADDR_W, rtc_pkg::DATA_W,
         rtc_pkg::LINE_W, rtc_pkg::CNT_W;
#(
  parameter int unsigned NSLOW           = rtc_pkg::NSLOW,
  parameter int unsigned LINES_PER_CYCLE = 60,
  parameter int unsigned MAX_PULSES      = rtc_pkg::MAX_PULSES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              reset_sw,
  input  logic              ac_line,
  input  logic [15:0]       dio_in,
  output logic [31:0]       dio_out,
  output delay_t            suc_delay,
  output logic              suc_load,
  output logic              gun_gate,
  output logic [NSLOW-1:0]  slow_trig,
  output logic [15:0]       gun_count
);

  // ---- AC line synchronisation (two flip-flops on the falling edge) ----
  logic line_c, line_d, line_tick, line_y;
  sync_pulse u_line (.rst_n(rst_n), .a(ac_line), .b(clk),
                     .c(line_c), .d(line_d), .e(line_tick), .y(line_y));

  // ---- control lines from the VME DIO board ----
  logic sw_s, start_s, stop_s, en_s, clr_s;
  logic start_d, stop_d, clr_d;
  sync2 u_sw    (.clk(clk), .rst_n(rst_n), .d(reset_sw),  .q(sw_s));
  sync2 u_start (.clk(clk), .rst_n(rst_n), .d(dio_in[3]), .q(start_s));
  sync2 u_stop  (.clk(clk), .rst_n(rst_n), .d(dio_in[4]), .q(stop_s));
  sync2 u_en    (.clk(clk), .rst_n(rst_n), .d(dio_in[5]), .q(en_s));
  sync2 u_clr   (.clk(clk), .rst_n(rst_n), .d(dio_in[6]), .q(clr_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {start_d, stop_d, clr_d} <= '0;
    else        {start_d, stop_d, clr_d} <= {start_s, stop_s, clr_s};
  end

  // ---- settings ----
  logic              wr_valid;
  logic [ADDR_W-1:0] wr_addr;
  logic [DATA_W-1:0] wr_data;
  logic [DATA_W-1:0] rd_data, status;
  logic              seen;
  logic              running;
  cfg_t              cfg;

  serial_rx u_rx (.clk(clk), .rst_n(rst_n), .sdata(dio_in[0]), .sclk(dio_in[1]),
                  .sstrobe(dio_in[2]), .wr_valid(wr_valid), .wr_addr(wr_addr),
                  .wr_data(wr_data));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        seen <= 1'b0;
    else if (sw_s)     seen <= 1'b0;
    else if (wr_valid) seen <= 1'b1;
  end

  assign status = {13'b0, en_s, running, seen};

  rtc_regs u_regs (.clk(clk), .rst_n(rst_n), .clear(sw_s), .wr_valid(wr_valid),
                   .wr_addr(wr_addr), .wr_data(wr_data), .rd_addr(dio_in[11:7]),
                   .status(status), .cfg(cfg), .rd_data(rd_data));

  // ---- 1 Hz cycle ----
  logic [LINE_W-1:0] line_idx;
  logic              cycle_start;
  logic [CNT_W-1:0]  clk_cnt;

  cycle_gen #(.LINES_PER_CYCLE(LINES_PER_CYCLE)) u_cycle (
    .clk(clk), .rst_n(rst_n), .line_tick(line_tick), .line_idx(line_idx),
    .cycle_start(cycle_start), .clk_cnt(clk_cnt));

  // ---- injection sequence and gun control ----
  inj_seq #(.MAX_PULSES(MAX_PULSES)) u_inj (
    .clk(clk), .rst_n(rst_n), .clear(sw_s | (clr_s & ~clr_d)),
    .line_tick(line_tick), .line_idx(line_idx),
    .bucket(cfg.bucket), .npulse(cfg.npulse), .gun_tick(cfg.gun_tick),
    .start(start_s & ~start_d), .stop(stop_s & ~stop_d), .enable(en_s),
    .gun_gate(gun_gate), .suc_delay(suc_delay), .suc_load(suc_load),
    .gun_count(gun_count), .running(running));

  // ---- slow triggers ----
  for (genvar i = 0; i < NSLOW; i++) begin : g_slow
    slow_trig u_slow (.clk(clk), .rst_n(rst_n), .clk_cnt(clk_cnt),
                      .delay(cfg.slow_delay[i]), .width(cfg.slow_width[i]),
                      .trig(slow_trig[i]));
  end

  assign dio_out = {gun_count, rd_data};

endmodule
