// input_select: chooses what drives the delay lines, hits or the oscillator.
//
// In acquisition the delay line of each channel is driven by its input pin; in
// calibration all of them are driven by the shared free-running oscillator so
// that the code-density test can be run. The mode request comes from the
// processor and is brought into the TDC clock domain by a two-flip-flop
// synchronizer; the synchronized mode steers the multiplexers and is handed to
// the channels so that every measurement is tagged with the mode it was taken
// in. The hit path itself is combinational (it must reach the carry chain with
// no sampling). A mode change takes effect two clock edges after cal_req.
//
// What follows the design: the redirection of the inputs to the oscillator
// during calibration. The synchronizer and the tag are this design's choices.
module input_select #(
  parameter int N_CH = tdc_pkg::N_CHANNELS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cal_req,   // asynchronous mode request, 1 = calibration
  input  logic [N_CH-1:0] hit_in,    // input pins
  input  logic            osc,       // free-running oscillator
  output logic [N_CH-1:0] line_in,   // delay-line inputs
  output logic            cal_mode   // synchronized mode
);
  timeunit 1ps; timeprecision 1ps;

  logic cal_meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal_meta <= 1'b0;
      cal_mode <= 1'b0;
    end else begin
      cal_meta <= cal_req;
      cal_mode <= cal_meta;
    end
  end

  assign line_in = cal_mode ? {N_CH{osc}} : hit_in;

endmodule
