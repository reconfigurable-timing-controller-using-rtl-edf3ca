// serial_rx: receiver for the 24-bit serial code sent by the VME DIO board.
//
// The control system sends each setting as one 24-bit word on three lines:
// data, clock and strobe. Bits are shifted into a register on the rising edge
// of the serial clock, most significant bit first. After the last bit the
// sender raises the strobe. The strobe passes through a two-flip-flop
// synchroniser into the 26 kHz clock domain; its rising edge copies the shift
// register (which is quiet while the strobe is high) and issues a one-clock
// write of {address, value} to the register file.
//
// The three-line, 24-bit format follows the source description; bit order,
// edge, the address/value split (8 + 16 bits) and the rule that the serial
// clock stays idle while the strobe is high are this design's choices.
//
// Timing: wr_valid rises 2..3 clock periods after the strobe rises and lasts
// one period. The strobe must stay high for at least 3 clock periods.
module serial_rx #(
  parameter int unsigned WORD_W = rtc_pkg::WORD_W,
  parameter int unsigned ADDR_W = rtc_pkg::ADDR_W,
  parameter int unsigned DATA_W = rtc_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sdata,
  input  logic              sclk,
  input  logic              sstrobe,
  output logic              wr_valid,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data
);

  logic [WORD_W-1:0] shreg;
  logic              strobe_s, strobe_d;

  // Shift register in the serial-clock domain.
  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n) shreg <= '0;
    else        shreg <= {shreg[WORD_W-2:0], sdata};
  end

  sync2 u_sync_strobe (.clk(clk), .rst_n(rst_n), .d(sstrobe), .q(strobe_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_d <= 1'b0;
      wr_valid <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
    end else begin
      strobe_d <= strobe_s;
      wr_valid <= strobe_s & ~strobe_d;
      if (strobe_s & ~strobe_d) begin
        wr_addr <= shreg[WORD_W-1 -: ADDR_W];
        wr_data <= shreg[DATA_W-1:0];
      end
    end
  end

  // Sender rules: the word must be complete before the strobe, so the
  // serial clock stays idle while the strobe is high; writes are one clock.
  a_no_shift_in_strobe: assert property (@(posedge sclk) disable iff (!rst_n) !sstrobe);
  a_single_write:       assert property (@(posedge clk) disable iff (!rst_n) wr_valid |=> !wr_valid);

endmodule
