// coarse_counter: free-running coarse time base shared by all TDC channels.
//
// A WIDTH-bit binary counter clocked by the 400 MHz TDC clock; it advances by
// one every period (2.5 ns) and wraps around. Every channel reads the same
// count, so all timestamps share one time base. Synchronous to clk, cleared by
// the active-low reset; en pauses it (held high in normal use).
module coarse_counter #(
  parameter int WIDTH = tdc_pkg::COARSE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] count
);
  timeunit 1ps; timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  count <= '0;
    else if (en) count <= count + 1'b1;
  end

endmodule
