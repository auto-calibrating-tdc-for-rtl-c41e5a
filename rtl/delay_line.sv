// delay_line: carry-chain delay line, its sampling register and hit detection.
//
// The hit drives the carry-in of an N_TAPS-bit adder that adds all ones to all
// zeros (carry_chain, or its fast timing model carry_chain_model, chosen by
// TIMING_MODEL). At every rising clock edge the adder's sum is captured
// in a register, so each clock period yields a fresh snapshot in which the
// cells already traversed by the hit read 0. The snapshot is inverted here so
// that a 1 marks a traversed cell.
//
// Hit detection (this design's choice): a hit is reported for the clock period
// in which the first cell becomes traversed while it was not in the previous
// snapshot (a rising edge entered the line). The last cell is not passed on to
// the encoder; if it is already traversed in that snapshot the hit ran off the
// end of the line before the clock edge, its fine time cannot be determined and
// the hit is rejected (counted on overflow). A long input level is therefore
// reported once, and a new hit needs the input to have been low at one
// sampling edge: a dead time of one clock period.
//
// Timing: the snapshot is taken at edge k; hit, overflow and therm (cells
// 0..N_TAPS-2, 1 = traversed) are registered at edge k+1.
module delay_line #(
  parameter int N_TAPS  = tdc_pkg::N_TAPS,
  parameter int D_PS    = 24,
  parameter int LAB     = 20,
  parameter int LAB_PS  = 25,
  parameter int SKEW_PS = 8,
  parameter int SEED    = 0,
  // 1: time the line with the event-driven model carry_chain_model (fast,
  //    behavioural); 0: use the gate-level ripple adder carry_chain, which is
  //    what synthesis needs (it also simulates with the same delays, slowly)
  parameter bit TIMING_MODEL = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sig,
  output logic              hit,
  output logic              overflow,
  output logic [N_TAPS-2:0] therm
);
  timeunit 1ps; timeprecision 1ps;

  logic [N_TAPS-1:0] sum;
  logic [N_TAPS-1:0] snap;      // registered adder output
  logic              prev0;     // first cell traversed in the previous snapshot
  logic [N_TAPS-1:0] passed;

  if (TIMING_MODEL) begin : g_model
    carry_chain_model #(
      .N(N_TAPS), .D_PS(D_PS), .LAB(LAB), .LAB_PS(LAB_PS),
      .SKEW_PS(SKEW_PS), .SEED(SEED)
    ) u_chain (
      .cin (sig),
      .a   ({N_TAPS{1'b1}}),
      .b   ({N_TAPS{1'b0}}),
      .sum (sum)
    );
  end else begin : g_adder
    carry_chain #(
      .N(N_TAPS), .D_PS(D_PS), .LAB(LAB), .LAB_PS(LAB_PS),
      .SKEW_PS(SKEW_PS), .SEED(SEED)
    ) u_chain (
      .cin (sig),
      .a   ({N_TAPS{1'b1}}),
      .b   ({N_TAPS{1'b0}}),
      .sum (sum)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) snap <= '1;
    else        snap <= sum;
  end

  assign passed = ~snap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev0    <= 1'b0;
      hit      <= 1'b0;
      overflow <= 1'b0;
      therm    <= '0;
    end else begin
      prev0    <= passed[0];
      hit      <= passed[0] & ~prev0 & ~passed[N_TAPS-1];
      overflow <= passed[0] & ~prev0 &  passed[N_TAPS-1];
      therm    <= passed[N_TAPS-2:0];
    end
  end

endmodule
