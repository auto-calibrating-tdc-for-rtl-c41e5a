// tdc_channel: one complete TDC channel, from delay line to timestamp.
//
// Data path (fully pipelined, one new hit accepted every clock period):
//   delay_line       snapshot of the 128-cell carry chain, hit detection (1 cycle)
//   wallace_encoder  ones count of cells 0..126 -> 7-bit raw code (6 cycles)
//   calib_lut        raw code -> calibrated fine time, 10 bits (1 cycle)
//   coarse_timestamp shared coarse count minus latency, minus fine time (1 cycle)
// A hit whose rising edge reaches the carry chain before sampling edge k leaves
// the channel as out_valid/out_event right after edge k+9 (PIPE_LAT + 1). The
// event carries the raw code as well as the timestamp: in calibration mode the
// processor only needs the raw code, in acquisition mode the timestamp.
//
// cal_mode is registered next to the delay line's outputs (so the tag is the
// mode in the clock period after the sampling edge) and carried down the
// pipeline with the hit. The
// look-up table is written through the lut_* port. overflow pulses when a hit
// ran through the whole line before the sampling edge and was rejected.
module tdc_channel #(
  parameter int N_TAPS  = tdc_pkg::N_TAPS,
  parameter int SEED    = 0,
  parameter int D_PS    = 24,
  parameter int LAB_PS  = 25,
  parameter int SKEW_PS = 8,
  // 1: behavioural chain timing model (simulation); 0: the adder itself (synthesis)
  parameter bit TIMING_MODEL = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            line_in,
  input  logic                            cal_mode,
  input  logic [tdc_pkg::COARSE_W-1:0]    count,
  input  logic                            lut_we,
  input  logic [tdc_pkg::CODE_W-1:0]      lut_addr,
  input  logic [tdc_pkg::FINE_W-1:0]      lut_wdata,
  output logic                            out_valid,
  output tdc_pkg::tdc_event_t             out_event,
  output logic                            overflow
);
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  localparam int ENC_LAT  = CODE_W - 1;
  localparam int PIPE_LAT = 1 + ENC_LAT + 1;   // edge k -> coarse_timestamp input

  initial assert (N_TAPS == 2**CODE_W)
    else $error("tdc_channel: N_TAPS must equal 2**CODE_W");

  logic              hit;
  logic              cal_q;      // mode, aligned with the delay line's outputs
  logic [N_TAPS-2:0] therm;
  logic              enc_valid, enc_cal;
  logic [CODE_W-1:0] code;
  logic              lut_valid, lut_cal;
  logic [CODE_W-1:0] lut_code;
  logic [FINE_W-1:0] fine;

  delay_line #(
    .N_TAPS(N_TAPS), .D_PS(D_PS), .LAB_PS(LAB_PS), .SKEW_PS(SKEW_PS), .SEED(SEED),
    .TIMING_MODEL(TIMING_MODEL)
  ) u_line (
    .clk, .rst_n, .sig(line_in), .hit, .overflow, .therm
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cal_q <= 1'b0;
    else        cal_q <= cal_mode;
  end

  wallace_encoder #(.OUT_W(CODE_W), .SIDE_W(1)) u_enc (
    .clk, .rst_n,
    .in_valid (hit),
    .in_side  (cal_q),
    .therm    (therm),
    .out_valid(enc_valid),
    .out_side (enc_cal),
    .count    (code)
  );

  // codes 1..127 address entries 0..126
  calib_lut u_lut (
    .clk,
    .wr_en  (lut_we),
    .wr_addr(lut_addr),
    .wr_data(lut_wdata),
    .rd_en  (enc_valid),
    .rd_addr(code - 1'b1),
    .rd_data(fine)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lut_valid <= 1'b0;
    else        lut_valid <= enc_valid;
  end

  always_ff @(posedge clk) begin
    lut_cal  <= enc_cal;
    lut_code <= code;
  end

  coarse_timestamp #(.LAT(PIPE_LAT)) u_ts (
    .clk, .rst_n,
    .count,
    .in_valid (lut_valid),
    .in_cal   (lut_cal),
    .in_code  (lut_code),
    .fine     (fine),
    .out_valid,
    .out_event
  );

endmodule
