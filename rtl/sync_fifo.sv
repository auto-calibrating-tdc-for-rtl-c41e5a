// sync_fifo: single-clock first-in first-out buffer (helper of the DAQ block).
//
// DEPTH entries of type T (DEPTH a power of two), written with push when not
// full and read with pop when not empty; a push to a full FIFO or a pop from an
// empty one is ignored. rd_data is the oldest entry (first-word fall-through).
// level counts the stored entries.
module sync_fifo #(
  parameter type T     = logic [7:0],
  parameter int  DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  T                         wr_data,
  input  logic                     pop,
  output T                         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   level
);
  timeunit 1ps; timeprecision 1ps;

  localparam int AW = $clog2(DEPTH);

  T              mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_push, do_pop;

  assign level   = wptr - rptr;
  assign full    = (level == (AW+1)'(DEPTH));
  assign empty   = (level == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

endmodule
