// tdc_top: multi-channel auto-calibrating tapped-delay-line TDC.
//
// N_CH channels share one 400 MHz clock, one 32-bit coarse counter and one
// free-running oscillator. Each channel measures the arrival of the rising edge
// of its input with a 128-cell carry chain (fine time), converts the raw code to
// a calibrated fraction of the clock period through its own look-up table, and
// joins it with the coarse count. The DAQ block collects the events of all
// channels into one stream for the processor.
//
// Two modes, chosen by the processor with cal_req:
//   acquisition  inputs come from the hit_in pins; the processor keeps the
//                timestamps (ev_word.ts).
//   calibration  every delay line is fed by the free-running oscillator; the
//                processor histograms the raw codes of each channel (code
//                density test), turns the histogram into running sums of bin
//                widths and writes them into the channel's table through the
//                lut_* port, then returns to acquisition.
// The processor side (histogram, table computation, recalibration timer) is
// software and not part of this RTL; the clock comes from a PLL outside it.
//
// Timing: a hit sampled at clock edge k is in the DAQ FIFO after edge k+11 and
// visible on ev_valid/ev_word from then on. Timestamps are in units of
// 2.5 ns / 1024 on the coarse counter's time base.
module tdc_top #(
  parameter int N_CH       = tdc_pkg::N_CHANNELS,
  parameter int FIFO_DEPTH = 256,
  parameter int OSC_HIGH_PS = 85773,
  parameter int OSC_LOW_PS  = 85772,
  parameter int OSC_JITTER_PS = 400,
  // the oscillator period should exceed N_CH clock periods (see free_oscillator)
  // delay model of the carry chains (simulation only, see carry_chain)
  parameter int CHAIN_D_PS    = 24,
  parameter int CHAIN_LAB_PS  = 25,
  parameter int CHAIN_SKEW_PS = 8,
  // 1: behavioural chain timing model (simulation); 0: the adder itself (synthesis)
  parameter bit TIMING_MODEL = 1'b1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_CH-1:0]             hit_in,
  input  logic                        cal_req,
  input  logic                        lut_we,
  input  logic [tdc_pkg::CH_W-1:0]    lut_ch,
  input  logic [tdc_pkg::CODE_W-1:0]  lut_addr,
  input  logic [tdc_pkg::FINE_W-1:0]  lut_wdata,
  output logic                        ev_valid,
  input  logic                        ev_ready,
  output tdc_pkg::daq_word_t          ev_word,
  output logic                        cal_mode,
  output logic [31:0]                 drop_count,
  output logic [31:0]                 reject_count,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level
);
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  logic                osc;
  logic [N_CH-1:0]     line_in;
  logic [COARSE_W-1:0] count;
  logic [N_CH-1:0]     ch_valid;
  tdc_event_t          ch_event [N_CH];
  logic [N_CH-1:0]     ch_overflow;

  free_oscillator #(.HIGH_PS(OSC_HIGH_PS), .LOW_PS(OSC_LOW_PS), .JITTER_PS(OSC_JITTER_PS)) u_osc (
    .en (cal_req),
    .osc(osc)
  );

  coarse_counter u_count (.clk, .rst_n, .en(1'b1), .count);

  input_select #(.N_CH(N_CH)) u_in (
    .clk, .rst_n, .cal_req, .hit_in, .osc, .line_in, .cal_mode
  );

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    tdc_channel #(
      .SEED(i), .D_PS(CHAIN_D_PS), .LAB_PS(CHAIN_LAB_PS), .SKEW_PS(CHAIN_SKEW_PS),
      .TIMING_MODEL(TIMING_MODEL)
    ) u_ch (
      .clk, .rst_n,
      .line_in  (line_in[i]),
      .cal_mode (cal_mode),
      .count    (count),
      .lut_we   (lut_we && (32'(lut_ch) == i)),
      .lut_addr (lut_addr),
      .lut_wdata(lut_wdata),
      .out_valid(ch_valid[i]),
      .out_event(ch_event[i]),
      .overflow (ch_overflow[i])
    );
  end

  daq #(.N_CH(N_CH), .FIFO_DEPTH(FIFO_DEPTH)) u_daq (
    .clk, .rst_n,
    .in_valid    (ch_valid),
    .in_event    (ch_event),
    .in_overflow (ch_overflow),
    .out_valid   (ev_valid),
    .out_ready   (ev_ready),
    .out_word    (ev_word),
    .drop_count,
    .reject_count,
    .fifo_level
  );

endmodule
