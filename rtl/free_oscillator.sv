// free_oscillator: behavioural model of the free-running on-chip oscillator.
//
// This is a behavioural model, not synthesizable logic. On the FPGA the
// calibration source is a free-running oscillator that is asynchronous to the
// TDC clock; its edges land at random phases of the clock, which is what the
// statistical code-density calibration needs. The model toggles its output with
// a period of HIGH_PS + LOW_PS picoseconds while en is high and holds it low
// otherwise. Each half period is lengthened or shortened by a uniform random
// jitter of up to +-JITTER_PS/2, like the phase noise of a free-running ring
// oscillator; it keeps the phases of the oscillator edges against the clock
// random rather than a fixed sweep. The default mean period, 171545 ps (68.6
// clock periods; the fractional part is near the golden ratio, so successive
// edges spread evenly over the clock phase), is long enough for the
// DAQ to pass the 64 channels' calibration codes of one oscillator edge
// before the next one: if codes were dropped, which ones would depend on the
// hit phase and would bias the code-density histogram. Period, duty cycle and jitter are this
// design's choices; the oscillator's construction is not specified.
//
// Interface: en (enable, level), osc (oscillator output).
module free_oscillator #(
  parameter int HIGH_PS = 85773,
  parameter int LOW_PS  = 85772,
  parameter int JITTER_PS = 400     // peak-to-peak, uniform, per half period
) (
  input  logic en,
  output logic osc
);
  timeunit 1ps; timeprecision 1ps;

  function automatic int jitter();
    if (JITTER_PS == 0) return 0;
    return int'($urandom_range(32'(JITTER_PS))) - JITTER_PS / 2;
  endfunction

  initial osc = 1'b0;

  always begin
    if (en) begin
      osc = 1'b1;
      #(HIGH_PS + jitter());
      osc = 1'b0;
      #(LOW_PS + jitter());
    end else begin
      osc = 1'b0;
      @(en);
    end
  end

endmodule
