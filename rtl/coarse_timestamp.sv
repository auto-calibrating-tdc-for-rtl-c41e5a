// coarse_timestamp: joins the coarse count and the calibrated fine time.
//
// The calibrated fine value says how long before the sampling clock edge the
// hit entered the delay line, in units of 1/2**FINE_W of a clock period. The
// coarse counter is shared and free running, so instead of carrying a copy of
// it down each channel's pipeline this stage takes the present count and
// subtracts the known pipeline latency LAT, recovering the count of the
// sampling edge. The timestamp of the hit is then
//     ts = {count - LAT, FINE_W'0} - fine
// (this design's choice of sign convention: later hits give larger ts).
//
// Timing: one register; the event leaves one cycle after in_valid. LAT must be
// the number of cycles from the sampling edge to the cycle in which this stage
// registers its output.
module coarse_timestamp #(
  parameter int COARSE_W = tdc_pkg::COARSE_W,
  parameter int FINE_W   = tdc_pkg::FINE_W,
  parameter int LAT      = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [COARSE_W-1:0]    count,
  input  logic                   in_valid,
  input  logic                   in_cal,
  input  logic [tdc_pkg::CODE_W-1:0] in_code,
  input  logic [FINE_W-1:0]      fine,
  output logic                   out_valid,
  output tdc_pkg::tdc_event_t    out_event
);
  timeunit 1ps; timeprecision 1ps;

  logic [COARSE_W-1:0]        edge_count;
  logic [COARSE_W+FINE_W-1:0] ts;

  assign edge_count = count - COARSE_W'(LAT);
  assign ts         = {edge_count, {FINE_W{1'b0}}} - {{COARSE_W{1'b0}}, fine};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    out_event.cal  <= in_cal;
    out_event.code <= in_code;
    out_event.ts   <= tdc_pkg::TS_W'(ts);
  end

endmodule
