// tdc_pkg: constants and record types shared by the tapped-delay-line TDC.
//
// The numbers follow the TDC described for a 400 MHz coarse clock: a 128-element
// carry chain whose first 127 taps are encoded into a 7-bit code, a calibrated
// fine time of 10 bits (LSB = 1/1024 of a clock period), a 32-bit coarse counter
// and 64 channels. The record layouts (event and DAQ word) are this design's own.
package tdc_pkg;

  localparam int CLK_PERIOD_PS = 2500;            // 400 MHz coarse clock
  localparam int N_TAPS        = 128;             // carry-chain length
  localparam int CODE_W        = 7;               // log2(127 + 1)
  localparam int FINE_W        = 10;              // calibrated fine time
  localparam int COARSE_W      = 32;              // coarse counter
  localparam int TS_W          = COARSE_W + FINE_W;
  localparam int N_CHANNELS    = 64;
  localparam int CH_W          = 6;               // channel number in a DAQ word
  localparam int LUT_DEPTH     = N_TAPS - 1;      // one entry per code 1..127

  // One measurement leaving a TDC channel.
  //   cal  : taken in calibration mode (input was the free oscillator)
  //   code : raw encoder output, number of carry elements traversed (1..127)
  //   ts   : calibrated timestamp in units of CLK_PERIOD/1024
  typedef struct packed {
    logic              cal;
    logic [CODE_W-1:0] code;
    logic [TS_W-1:0]   ts;
  } tdc_event_t;

  // One word handed to the processor by the DAQ block.
  typedef struct packed {
    logic              cal;
    logic [CH_W-1:0]   ch;
    logic [CODE_W-1:0] code;
    logic [TS_W-1:0]   ts;
  } daq_word_t;

endpackage
