// cpu_model: behavioural model of the processor side of the TDC, for testbenches.
//
// It plays the two software tasks of the processor:
//   acquisition  reads every event word from the DAQ stream (ev_ready held high
//                unless stall is set) and keeps acquisition words in acq_q;
//   calibration  task calibrate(n): raises cal_req, histograms the raw codes of
//                each channel until every channel has n of them, drops cal_req,
//                turns each histogram into the table entry for code n,
//                    LUT[n] = round(1024 * (hits with code <= n) / all hits),
//                saturated at 1023 (the running sum of the bin widths in units of
//                1/1024 of a clock period), and writes the tables through the
//                lut_* port, one entry per clock cycle.
module cpu_model #(
  parameter int N_CH = 4
) (
  input  logic               clk,
  input  logic               ev_valid,
  output logic               ev_ready,
  input  tdc_pkg::daq_word_t ev_word,
  output logic               cal_req,
  output logic               lut_we,
  output logic [5:0]         lut_ch,
  output logic [6:0]         lut_addr,
  output logic [9:0]         lut_wdata
);
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;

  bit         stall = 0;
  int         hist [N_CH][128];
  int         n_cal [N_CH];
  daq_word_t  acq_q [$];
  int         n_cal_words = 0, n_acq_words = 0, n_lut_writes = 0, n_calibrations = 0;
  logic [9:0] lut_img [N_CH][127];

  initial begin
    cal_req = 1'b0; lut_we = 1'b0; lut_ch = '0; lut_addr = '0; lut_wdata = '0;
    for (int c = 0; c < N_CH; c++) begin
      n_cal[c] = 0;
      for (int k = 0; k < 128; k++) hist[c][k] = 0;
    end
  end

  assign ev_ready = !stall;

  always @(posedge clk) begin
    if (ev_valid && ev_ready) begin
      if (ev_word.cal) begin
        hist[ev_word.ch][ev_word.code]++;
        n_cal[ev_word.ch]++;
        n_cal_words++;
      end else begin
        acq_q.push_back(ev_word);
        n_acq_words++;
      end
    end
  end

  function automatic bit all_have(int n);
    for (int c = 0; c < N_CH; c++) if (n_cal[c] < n) return 0;
    return 1;
  endfunction

  task automatic calibrate(input int n);
    for (int c = 0; c < N_CH; c++) begin
      n_cal[c] = 0;
      for (int k = 0; k < 128; k++) hist[c][k] = 0;
    end
    @(negedge clk) cal_req = 1'b1;
    while (!all_have(n)) @(posedge clk);
    @(negedge clk) cal_req = 1'b0;
    repeat (40) @(posedge clk);          // let the pipelines and the FIFO drain
    for (int c = 0; c < N_CH; c++) begin
      longint total = 0, cum = 0;
      for (int k = 1; k < 128; k++) total += hist[c][k];
      for (int k = 1; k < 128; k++) begin
        longint v;
        cum += hist[c][k];
        v = (total == 0) ? 0 : (cum * 1024 + total / 2) / total;
        lut_img[c][k-1] = (v > 1023) ? 10'd1023 : 10'(v);
        @(negedge clk) begin
          lut_we = 1'b1; lut_ch = 6'(c); lut_addr = 7'(k - 1); lut_wdata = lut_img[c][k-1];
        end
        n_lut_writes++;
      end
    end
    @(negedge clk) lut_we = 1'b0;
    n_calibrations++;
  endtask

  // number of codes seen at least once on channel c in the last calibration
  function automatic int active_codes(int c);
    int n = 0;
    for (int k = 1; k < 128; k++) if (hist[c][k] > 0) n++;
    return n;
  endfunction

endmodule
