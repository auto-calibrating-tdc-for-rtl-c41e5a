// calib_lut: per-channel calibration look-up table, raw code -> fine time.
//
// Holds one FINE_W-bit entry for each of the DEPTH codes the encoder can
// produce for a valid hit (codes 1..127; 127 x 10 bits = 1270 bits, one small
// block RAM). Entry code-1 is the calibrated time of that code in units of
// 1/1024 of a clock period: the running sum of the bin widths measured by the
// code-density test, as computed by the processor.
//
// Interface: a write port loaded by the processor (wr_en, wr_addr, wr_data,
// synchronous) and a read port used by the data path (rd_en, rd_addr; rd_data
// is registered, one cycle of latency). A simple dual-port memory.
//
// Initial contents (this design's choice): until the processor loads a table,
// entry code-1 holds code * 2**FINE_W / 2**CODE_W, i.e. a line of equal bins
// spread over the whole period.
module calib_lut #(
  parameter int DEPTH  = tdc_pkg::LUT_DEPTH,
  parameter int ADDR_W = tdc_pkg::CODE_W,
  parameter int FINE_W = tdc_pkg::FINE_W
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [FINE_W-1:0] wr_data,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [FINE_W-1:0] rd_data
);
  timeunit 1ps; timeprecision 1ps;

  logic [FINE_W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      mem[i] = FINE_W'(((i + 1) * (2**FINE_W)) / (2**ADDR_W));
  end

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < DEPTH)) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= (32'(rd_addr) < DEPTH) ? mem[rd_addr] : '0;
  end

endmodule
