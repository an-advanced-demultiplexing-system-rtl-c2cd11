// Shared types and constants of the multi-mode stimulator.
//
// Word format on the serial DATA line (one bit per clock, line idles high):
//   start bit 0, address a0..a6 (LSB first), magnitude m0..m6 (LSB first),
//   stop bits 0 then 1: 17 bit times per word.
// Address map (a6..a0):
//   0 P CCC DD   normal write; CCC channel, P = 0 amplitude, 1 pulse width
//   1 T 1 0 X DD write T2 (T = 0) or T3 (T = 1)
//   1 X 1 1 0 XX write the 3-b mode register (whole chip)
//   1 X 1 1 1 XX reset the whole chip
//   1 M 0 0 X DD fill the amplitude (M = 0) or pulse width (M = 1) RAM bank
//   1 X 0 1 X XX unused, ignored (this design's choice)
// DD = 11 addresses every DAC subsystem at once.
package stim_pkg;

  localparam int unsigned ADDR_W  = 7;   // address bits per word
  localparam int unsigned MAG_W   = 7;   // magnitude bits per word
  localparam int unsigned DSEL_W  = 2;   // DAC subsystem select field a1..a0
  localparam int unsigned CH_W    = 3;   // channel field a4..a2
  localparam int unsigned NUM_CH  = 8;   // channels (electrodes) per DAC
  localparam int unsigned TIMER_W = 7;   // timer and timer register width
  localparam int unsigned WORD_BITS = 1 + ADDR_W + MAG_W + 2;  // 17

  localparam logic [DSEL_W-1:0] DSEL_ALL = '1;  // broadcast to every DAC

  // Operating modes as coded in the mode register.
  typedef enum logic [2:0] {
    MODE_LOAD   = 3'b000,
    MODE_BASIC  = 3'b001,
    MODE_SINGLE = 3'b010,
    MODE_CONT   = 3'b110
  } mode_e;

  // A received word after decoding of its address.
  typedef enum logic [2:0] {
    CMD_NONE,       // unused special address
    CMD_NORMAL,     // channel write (amplitude or pulse width)
    CMD_TREG,       // timer register T2 / T3 write
    CMD_MODE,       // mode register write
    CMD_RESET,      // chip reset
    CMD_BANK_FILL   // write one value into a whole RAM bank
  } cmd_e;

  typedef struct packed {
    cmd_e              cmd;
    logic [DSEL_W-1:0] dsel;    // a1..a0
    logic [CH_W-1:0]   ch;      // a4..a2
    logic              sel_pw;  // a5: 1 = pulse width, 0 = amplitude (normal, fill);
                                //      1 = T3, 0 = T2 (timer register write)
    logic [MAG_W-1:0]  mag;     // magnitude field of the word
  } cmd_t;

endpackage
