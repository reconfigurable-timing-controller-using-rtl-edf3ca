// rtc_pkg: types and constants shared by the timing-controller logic.
//
// The controller runs on the 26 kHz coincidence clock (508.58 MHz RF divided
// by 19488). A delay count for the external counter therefore needs 15 bits
// (0 .. 19487). Settings arrive as 24-bit serial words that this design splits
// into an 8-bit register address and a 16-bit value; the register map below is
// this design's choice. Up to 8 injection pulses per 1 Hz cycle and 60 AC-line
// periods per cycle follow the source description.
package rtc_pkg;

  localparam int unsigned WORD_W      = 24;   // serial code word
  localparam int unsigned ADDR_W      = 8;    // address field of a word
  localparam int unsigned DATA_W      = 16;   // value field of a word
  localparam int unsigned DELAY_W     = 15;   // counter delay count (< 19488)
  localparam int unsigned MAX_PULSES  = 8;    // pulses per injection cycle
  localparam int unsigned NSLOW       = 4;    // slow trigger channels
  localparam int unsigned CNT_W       = 16;   // clock count within a 1 s cycle
  localparam int unsigned LINE_W      = 6;    // line-tick index (0 .. 59)
  localparam int unsigned RD_ADDR_W   = 5;    // read-back address

  // Register map (word address field).
  localparam logic [ADDR_W-1:0] A_BUCKET0  = 8'd0;   // 0..7: delay of pulse k
  localparam logic [ADDR_W-1:0] A_NPULSE   = 8'd8;   // pulses per cycle, 0..8
  localparam logic [ADDR_W-1:0] A_GUNTICK  = 8'd9;   // line tick of pulse 0
  localparam logic [ADDR_W-1:0] A_SLOW0    = 8'd16;  // 16+2i delay, 17+2i width
  localparam logic [ADDR_W-1:0] A_STATUS   = 8'd31;  // read-only status word

  typedef logic [DELAY_W-1:0] delay_t;

  // All settings held by the register file.
  typedef struct packed {
    delay_t [MAX_PULSES-1:0]  bucket;     // delay count per pulse
    logic   [3:0]             npulse;     // number of pulses per cycle
    logic   [LINE_W-1:0]      gun_tick;   // first line tick that fires
    logic   [NSLOW-1:0][CNT_W-1:0] slow_delay;
    logic   [NSLOW-1:0][CNT_W-1:0] slow_width;
  } cfg_t;

endpackage
