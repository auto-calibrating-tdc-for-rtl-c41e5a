// daq: collects the events of all TDC channels and hands them to the processor.
//
// Every channel can produce one event per clock period, but the link to the
// processor takes one word per cycle, so the block buffers and arbitrates:
//   - each channel owns a one-entry holding register; an event that arrives
//     while the register is still occupied (and not being drained) is dropped
//     and counted in drop_count;
//   - a round-robin arbiter moves one held event per cycle into a FIFO of
//     FIFO_DEPTH words, starting its search after the channel served last;
//     while the FIFO is full nothing is moved (back-pressure);
//   - the processor reads words from the FIFO with a valid/ready handshake.
// Each word carries the channel number, the mode tag, the raw code and the
// timestamp (tdc_pkg::daq_word_t). Hits rejected by the delay lines (overflow)
// are counted in reject_count.
//
// The design names this block only as the data path between the channels and
// the processor for both acquisition and calibration data; its buffering,
// arbitration and word format are this design's choices.
//
// Timing: an event is in a holding register one cycle after in_valid, and in
// the FIFO (visible at out_*) one cycle after it is granted.
module daq #(
  parameter int N_CH       = tdc_pkg::N_CHANNELS,
  parameter int FIFO_DEPTH = 256
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_CH-1:0]            in_valid,
  input  tdc_pkg::tdc_event_t        in_event [N_CH],
  input  logic [N_CH-1:0]            in_overflow,
  output logic                       out_valid,
  input  logic                       out_ready,
  output tdc_pkg::daq_word_t         out_word,
  output logic [31:0]                drop_count,
  output logic [31:0]                reject_count,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level
);
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  localparam int SEL_W = (N_CH > 1) ? $clog2(N_CH) : 1;

  initial assert (N_CH <= 2**CH_W) else $error("daq: N_CH exceeds the channel field");

  tdc_event_t       held [N_CH];
  logic [N_CH-1:0]  pending;
  logic [N_CH-1:0]  grant;
  logic [SEL_W-1:0] last, sel;
  logic             any;
  logic             fifo_full, fifo_empty;
  daq_word_t        fifo_in;
  logic [$clog2(N_CH+1)-1:0] n_drop, n_rej;

  // round-robin choice among pending channels, after the last one served
  always_comb begin
    logic             hi_any;
    logic [SEL_W-1:0] hi_sel, lo_sel;
    any    = 1'b0;
    hi_any = 1'b0;
    lo_sel = '0;
    hi_sel = '0;
    // lowest pending channel above the last one served, else lowest overall
    for (int i = N_CH - 1; i >= 0; i--) begin
      if (pending[i]) begin
        any    = 1'b1;
        lo_sel = SEL_W'(i);
        if (i > int'(last)) begin
          hi_any = 1'b1;
          hi_sel = SEL_W'(i);
        end
      end
    end
    sel   = hi_any ? hi_sel : lo_sel;
    grant = '0;
    if (any && !fifo_full) grant[sel] = 1'b1;
  end

  always_comb begin
    n_drop = '0;
    n_rej  = '0;
    for (int i = 0; i < N_CH; i++) begin
      if (in_valid[i] && pending[i] && !grant[i]) n_drop = n_drop + 1'b1;
      if (in_overflow[i])                         n_rej  = n_rej + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= '0;
      last         <= SEL_W'(N_CH - 1);
      drop_count   <= '0;
      reject_count <= '0;
    end else begin
      for (int i = 0; i < N_CH; i++) begin
        if (in_valid[i] && (!pending[i] || grant[i])) pending[i] <= 1'b1;
        else if (grant[i])                            pending[i] <= 1'b0;
      end
      if (|grant) last <= sel;
      drop_count   <= drop_count + 32'(n_drop);
      reject_count <= reject_count + 32'(n_rej);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < N_CH; i++)
      if (in_valid[i] && (!pending[i] || grant[i])) held[i] <= in_event[i];
  end

  assign fifo_in.cal  = held[sel].cal;
  assign fifo_in.ch   = CH_W'(sel);
  assign fifo_in.code = held[sel].code;
  assign fifo_in.ts   = held[sel].ts;

  sync_fifo #(.T(daq_word_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push   (|grant),
    .wr_data(fifo_in),
    .pop    (out_ready),
    .rd_data(out_word),
    .full   (fifo_full),
    .empty  (fifo_empty),
    .level  (fifo_level)
  );

  assign out_valid = !fifo_empty;

endmodule
