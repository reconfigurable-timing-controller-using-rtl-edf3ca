// rtc_regs: settings register file of the timing controller.
//
// Holds the counter values the control system writes over the serial link and
// returns any of them, plus a status word, for read-back. Writes are one-clock
// strobes from serial_rx. The map (rtc_pkg) is: 0..7 delay count of injection
// pulse 0..7, 8 number of pulses per cycle (values above 8 are stored as 8),
// 9 line tick of the first pulse, 16+2i delay and 17+2i width of slow trigger
// i, 31 the read-only status word supplied by the caller. Unused addresses read
// as zero and ignore writes.
//
// The front-panel switch that resets the counter values is the clear input:
// it returns every register to zero, as does the power-on reset. Holding
// settings and reading them back follows the source description; the map,
// widths and reset values are this design's choices.
//
// Timing: a write is visible on cfg the clock after wr_valid. rd_data is
// combinational in rd_addr.
module rtc_regs
  import rtc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 wr_valid,
  input  logic [ADDR_W-1:0]    wr_addr,
  input  logic [DATA_W-1:0]    wr_data,
  input  logic [RD_ADDR_W-1:0] rd_addr,
  input  logic [DATA_W-1:0]    status,
  output cfg_t                 cfg,
  output logic [DATA_W-1:0]    rd_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (clear) begin
      cfg <= '0;
    end else if (wr_valid) begin
      if (32'(wr_addr) < 32'(A_BUCKET0) + MAX_PULSES) begin
        cfg.bucket[wr_addr[2:0]] <= wr_data[DELAY_W-1:0];
      end else if (wr_addr == A_NPULSE) begin
        cfg.npulse <= (wr_data > DATA_W'(MAX_PULSES)) ? 4'(MAX_PULSES) : wr_data[3:0];
      end else if (wr_addr == A_GUNTICK) begin
        cfg.gun_tick <= wr_data[LINE_W-1:0];
      end else if (wr_addr >= A_SLOW0 && 32'(wr_addr) < 32'(A_SLOW0) + 2*NSLOW) begin
        if (wr_addr[0]) cfg.slow_width[wr_addr[2:1]] <= wr_data;
        else            cfg.slow_delay[wr_addr[2:1]] <= wr_data;
      end
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr < RD_ADDR_W'(MAX_PULSES)) begin
      rd_data = DATA_W'(cfg.bucket[rd_addr[2:0]]);
    end else if (rd_addr == RD_ADDR_W'(A_NPULSE)) begin
      rd_data = DATA_W'(cfg.npulse);
    end else if (rd_addr == RD_ADDR_W'(A_GUNTICK)) begin
      rd_data = DATA_W'(cfg.gun_tick);
    end else if (rd_addr >= RD_ADDR_W'(A_SLOW0) && rd_addr < RD_ADDR_W'(A_SLOW0 + 2*NSLOW)) begin
      rd_data = rd_addr[0] ? cfg.slow_width[rd_addr[2:1]] : cfg.slow_delay[rd_addr[2:1]];
    end else if (rd_addr == RD_ADDR_W'(A_STATUS)) begin
      rd_data = status;
    end
  end

endmodule
