// wallace_encoder: pipelined ones-counter that turns a thermometer code into
// a binary count, tolerant of bubbles.
//
// Instead of searching for the 1/0 transition, the encoder counts the ones of
// its 2**OUT_W - 1 input bits, so a bubble (a stray 0 or 1 near the transition)
// moves the result by at most its own size and no code goes missing. The count
// is built as a tree of full adders, following the structure of the design's
// Wallace-tree figure: a count of 2**m - 1 bits is the sum of two counts of
// 2**(m-1) - 1 bits plus one more input bit used as the carry-in of a ripple of
// m-1 full adders. Level 1 is a row of single full adders on bit triples,
// level 2 adds pairs of 2-bit results with a carry-in, and so on until level
// OUT_W-1 gives the OUT_W-bit count.
//
// Bit allocation (this design's choice): bits 0..2**(OUT_W-1)-1 feed level 1 in
// pairs; each following level j takes its carry-in bits from the next free
// slice of the input, starting at 2**OUT_W - 2**(OUT_W-j).
//
// Timing: a register after every level, so the count and the side band appear
// OUT_W-1 clock cycles after the input and a new input is accepted every cycle.
module wallace_encoder #(
  parameter int OUT_W  = tdc_pkg::CODE_W,
  parameter int SIDE_W = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [SIDE_W-1:0]   in_side,
  input  logic [2**OUT_W-2:0] therm,
  output logic                out_valid,
  output logic [SIDE_W-1:0]   out_side,
  output logic [OUT_W-1:0]    count
);
  timeunit 1ps; timeprecision 1ps;

  localparam int N_IN = 2**OUT_W - 1;
  localparam int LAT  = OUT_W - 1;

  for (genvar j = 1; j <= LAT; j++) begin : g_lvl
    localparam int NV  = 2**(OUT_W - 1 - j);           // partial counts at this level
    localparam int OFF = 2**OUT_W - 2**(OUT_W - j);    // first carry-in bit
    logic [j:0]        v [NV];                          // registered partial counts
    logic              vld;
    logic [SIDE_W-1:0] side;
    logic [N_IN-1:0]   rem_in;
    logic              vld_in;
    logic [SIDE_W-1:0] side_in;

    if (j == 1) begin : g_first
      assign rem_in  = therm;
      assign vld_in  = in_valid;
      assign side_in = in_side;
    end else begin : g_next
      assign rem_in  = g_lvl[j-1].g_rem.rem;
      assign vld_in  = g_lvl[j-1].vld;
      assign side_in = g_lvl[j-1].side;
    end

    for (genvar k = 0; k < NV; k++) begin : g_add
      logic [j-1:0] a, b;
      if (j == 1) begin : g_bits
        assign a = therm[2*k];
        assign b = therm[2*k+1];
      end else begin : g_counts
        assign a = g_lvl[j-1].v[2*k];
        assign b = g_lvl[j-1].v[2*k+1];
      end
      // ripple of j full adders: a + b + carry-in
      always_ff @(posedge clk) v[k] <= {1'b0, a} + {1'b0, b} + {{j{1'b0}}, rem_in[OFF+k]};
    end

    // input bits still to be used by later levels
    if (j < LAT) begin : g_rem
      logic [N_IN-1:0] rem;
      always_ff @(posedge clk) rem <= rem_in;
    end

    always_ff @(posedge clk) side <= side_in;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld <= 1'b0;
      else        vld <= vld_in;
    end
  end

  assign count     = g_lvl[LAT].v[0];
  assign out_valid = g_lvl[LAT].vld;
  assign out_side  = g_lvl[LAT].side;

endmodule
