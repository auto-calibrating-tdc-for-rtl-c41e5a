// carry_chain_model: behavioural timing model of the carry-chain delay line.
//
// This is a behavioural model, not synthesizable logic. It has the ports and
// the function of carry_chain (sum = a + b + cin, a ripple-carry adder whose
// carry propagation is the TDC's delay line) but simulates its timing with one
// process per input edge instead of one delayed net per cell, which runs about
// a hundred times faster. When cin changes, the process takes the new settled
// sum and writes each changed bit i at the moment the new carry reaches it:
//     arrival(i) + skew(i),   arrival(i) = sum over cells m < i of
//                             D_PS + (LAB_PS if cell m ends a LAB-cell block)
// Edges follow each other down the chain without overtaking (all edges see the
// same delays), so a pulse shorter than the line travels as a band of cells.
// The delay model and its default values are the same as carry_chain's (see
// there). a and b are meant to be static; a change of a or b is propagated the
// same way, which is exact only where the carry ripples from cell 0.
module carry_chain_model #(
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

  // same pseudo-random skew as carry_chain
  function automatic int cell_skew(int i);
    int unsigned h;
    h = 32'(i) * 32'd2654435761 + 32'(SEED) * 32'd40503 + 32'd12345;
    h = h ^ (h >> 15);
    h = h * 32'd2246822519;
    h = h ^ (h >> 13);
    return int'(h % 32'(SKEW_PS + 1));
  endfunction

  logic [N-1:0] s;    // present state of the sum bits
  int t_bit [N];      // time from a cin edge to the update of sum bit i
  int order [N];      // cells sorted by t_bit

  initial begin
    int t;
    t = 0;
    for (int i = 0; i < N; i++) begin
      t_bit[i] = t + cell_skew(i);
      order[i] = i;
      t += D_PS + (((i + 1) % LAB == 0) ? LAB_PS : 0);
    end
    for (int i = 1; i < N; i++)          // insertion sort by update time
      for (int j = i; j > 0 && t_bit[order[j]] < t_bit[order[j-1]]; j--) begin
        int x;
        x = order[j]; order[j] = order[j-1]; order[j-1] = x;
      end
    s = a + b + {{(N-1){1'b0}}, cin};
  end

  assign sum = s;

  // one call per input edge; writes the changed bits in order of arrival
  task automatic propagate(input logic [N-1:0] target);
    int now;
    now = 0;
    for (int k = 0; k < N; k++) begin
      if (t_bit[order[k]] > now) begin
        #(t_bit[order[k]] - now);
        now = t_bit[order[k]];
      end
      s[order[k]] = target[order[k]];
    end
  endtask

  always begin
    @(cin or a or b);
    fork
      propagate(a + b + {{(N-1){1'b0}}, cin});
    join_none
  end

endmodule
