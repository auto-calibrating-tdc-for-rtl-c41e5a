// carry_chain: the tapped delay line of the TDC, written as a ripple-carry adder.
//
// The TDC measures time with the carry chain of an N-bit adder that adds a vector
// of ones to a vector of zeros: the input hit is the adder's carry-in. While the
// carry ripples up the chain every sum bit it reaches falls from 1 to 0, so a
// snapshot of the sum is a thermometer code of how far the hit has travelled.
//
// Function: sum = a + b + cin (the carry out of the last cell is not used). Synthesis
// sees a plain ripple-carry adder; an FPGA tool maps it onto its dedicated carry
// logic. The delay annotations (#) are ignored by synthesis and exist only so
// that a simulation shows the propagation the TDC measures. They follow the delay
// model delta_i = d + c_i + p_i of the design:
//   D_PS      d   : carry delay of every cell
//   LAB_PS    p_i : extra delay each time the carry leaves a block of LAB cells
//                   (LAB = 20 on the target family, giving periodic wide bins)
//   SKEW_PS   c_i : a per-cell offset between carry arrival and the moment the
//                   sum bit is seen, standing for clock-distribution skew of the
//                   sampling flip-flops; it is a fixed pseudo-random value in
//                   0..SKEW_PS per cell, chosen by SEED, and is what makes bubbles
// The values of d, p_i and c_i are this design's choices (the average of about
// 25 ps per cell matches 99 active cells in a 2.5 ns clock period); the
// temperature term t(T) is not modelled. In simulation the delayed nets are
// only evaluated when an input changes, so a testbench toggles cin once before
// relying on the chain's outputs.
module carry_chain #(
  parameter int N       = 128,
  parameter int D_PS    = 24,
  parameter int LAB     = 20,
  parameter int LAB_PS  = 25,
  parameter int SKEW_PS = 8,
  parameter int SEED    = 0
) (
  input  logic         cin,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum
);
  timeunit 1ps; timeprecision 1ps;

  // Pseudo-random skew of cell i, 0..SKEW_PS.
  function automatic int cell_skew(int i);
    int unsigned h;
    h = 32'(i) * 32'd2654435761 + 32'(SEED) * 32'd40503 + 32'd12345;
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    return int'(h % 32'(SKEW_PS + 1));
  endfunction

  logic [N-1:0] c;    // carry into each cell
  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_cell
    localparam int CARRY_PS = D_PS + (((i + 1) % LAB == 0) ? LAB_PS : 0);
    localparam int SUM_PS   = cell_skew(i);
    if (i < N - 1) begin : g_carry
      assign #(CARRY_PS) c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
    assign #(SUM_PS)   sum[i] = a[i] ^ b[i] ^ c[i];
  end

endmodule
