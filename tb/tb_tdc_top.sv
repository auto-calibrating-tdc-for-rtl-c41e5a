// tb_tdc_top: end-to-end test of the multi-channel TDC (4 channels, 64-word
// FIFO) with a processor model.
//   1. Calibration: the processor switches to calibration mode, the free
//      oscillator (14 ns period here) drives every delay line, the raw codes
//      are histogrammed and the tables are loaded (code-density test). The
//      read stream is stalled for a while so the FIFO fills and events are
//      dropped.
//   2. Accuracy sweep: a half-rate copy of the clock, delayed by 0 .. 13 x
//      182.482 ps, drives channel 0; channel 1 gets the same edges 730 ps
//      later, channels 2 and 3 other fixed offsets. Each timestamp is compared
//      with the true edge time, and the ch1 - ch0 difference with 730 ps.
//      The fine part of every timestamp must equal 1024 minus the table entry
//      the processor wrote for that channel and code.
//      The 14 delays of 182.482 ps over one clock period and the 730 ps gap
//      follow the measurements of the original design; 20 hits per delay
//      instead of 10,000 and the error bounds are this testbench's choice.
//   3. Rejection: a second, single-channel instance with a 1.28 ns line sees an
//      edge 2 ns before a sampling edge; the hit must be rejected.
// Every mechanism (mode switch both ways, table load, FIFO full, drop,
// several channels waiting at once, rejection) is counted and must occur.
module tb_tdc_top;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N = 4;
  localparam int PER_CH = 2500;
  localparam real LSB_PS = 2500.0 / 1024.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] hit_in = '0;
  logic cal_req, lut_we, ev_valid, ev_ready, cal_mode;
  logic [5:0] lut_ch; logic [6:0] lut_addr; logic [9:0] lut_wdata;
  daq_word_t ev_word;
  logic [31:0] drop_count, reject_count;
  logic [6:0] fifo_level;
  int checks = 0, failures = 0;
  int n_fifo_full = 0, n_multi_pending = 0, n_to_cal = 0, n_to_acq = 0;
  logic cal_mode_d = 1'b0;

  // fast single-channel instance for the rejection test
  logic hit_f = 1'b0, ev_valid_f, cal_mode_f;
  daq_word_t ev_word_f;
  logic [31:0] drop_f, reject_f;
  logic [8:0] level_f;

  always #1250 clk = ~clk;

  tdc_top #(.N_CH(N), .FIFO_DEPTH(64), .OSC_HIGH_PS(7023), .OSC_LOW_PS(7022)) dut (
    .clk, .rst_n, .hit_in, .cal_req, .lut_we, .lut_ch, .lut_addr, .lut_wdata,
    .ev_valid, .ev_ready, .ev_word, .cal_mode, .drop_count, .reject_count, .fifo_level);

  cpu_model #(.N_CH(N)) cpu (
    .clk, .ev_valid, .ev_ready, .ev_word, .cal_req, .lut_we, .lut_ch, .lut_addr, .lut_wdata);

  tdc_top #(.N_CH(1), .CHAIN_D_PS(10), .CHAIN_LAB_PS(0), .CHAIN_SKEW_PS(0)) dut_f (
    .clk, .rst_n, .hit_in(hit_f), .cal_req(1'b0), .lut_we(1'b0), .lut_ch('0), .lut_addr('0),
    .lut_wdata('0), .ev_valid(ev_valid_f), .ev_ready(1'b1), .ev_word(ev_word_f),
    .cal_mode(cal_mode_f), .drop_count(drop_f), .reject_count(reject_f), .fifo_level(level_f));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (fifo_level == 7'd64) n_fifo_full++;
    if ($countones(dut.u_daq.pending) > 1) n_multi_pending++;
    if (cal_mode && !cal_mode_d) n_to_cal++;
    if (!cal_mode && cal_mode_d) n_to_acq++;
    cal_mode_d <= cal_mode;
  end

  // reference: time of the clock edge after which the coarse count is ref_c
  time ref_t; longint ref_c;
  function automatic real true_ts(time t);   // in timestamp units
    return real'(ref_c) * 1024.0 + real'(t - ref_t) / LSB_PS;
  endfunction

  task automatic pulse(int ch, time at);
    fork
      begin
        #(at - $time) hit_in[ch] = 1'b1;
        #2600 hit_in[ch] = 1'b0;
      end
    join_none
  endtask

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time expq [N][$];
    time t0;
    real worst_mean = 0.0, worst_gap = 0.0, max_dnl = 0.0;
    // settle the carry chains while in reset
    hit_in = '1; hit_f = 1'b1;
    #5000 hit_in = '0; hit_f = 1'b0;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    @(posedge clk); #1 begin ref_t = $time - 1; ref_c = longint'(dut.u_count.count); end

    // ---- 1. calibration, with a read stall in the middle ----
    fork
      cpu.calibrate(PER_CH);
      begin
        repeat (3000) @(posedge clk);
        cpu.stall = 1;
        repeat (300) @(posedge clk);
        cpu.stall = 0;
      end
    join
    check(cpu.n_calibrations == 1 && cpu.n_lut_writes == N * 127, "tables loaded");
    check(!cal_mode, "back in acquisition mode");
    for (int c = 0; c < N; c++) begin
      automatic int act = cpu.active_codes(c);
      automatic real videal = 1024.0 / real'(act);
      $display("channel %0d: %0d active codes, table end %0d", c, act, cpu.lut_img[c][126]);
      check(act >= 90 && act <= 110, $sformatf("active codes %0d near 99", act));
      for (int k = 1; k < 126; k++) begin
        check(cpu.lut_img[c][k] >= cpu.lut_img[c][k-1], "table increases");
        if (cpu.hist[c][k] > 0 && cpu.hist[c][k+1] > 0 && cpu.hist[c][k+2] > 0 && cpu.hist[c][k-1] > 0) begin
          automatic real dnl = (real'(cpu.lut_img[c][k+1]) - real'(cpu.lut_img[c][k])) / videal - 1.0;
          if (dnl < 0) dnl = -dnl;
          if (dnl > max_dnl) max_dnl = dnl;
        end
      end
    end
    $display("max |DNL| over inner codes: %0.2f", max_dnl);

    // ---- 2. accuracy sweep ----
    cpu.acq_q.delete();
    @(posedge clk); t0 = $time + 5000;
    for (int m = 0; m < 14; m++) begin
      automatic time ph = time'(int'(real'(m) * 182.482 + 0.5));
      for (int r = 0; r < 20; r++) begin
        automatic time base = t0 + time'((m * 20 + r) * 6 * 2500) + ph;
        pulse(0, base);            expq[0].push_back(base);
        pulse(1, base + 730);      expq[1].push_back(base + 730);
        pulse(2, base + 1337);     expq[2].push_back(base + 1337);
        pulse(3, base + 4111);     expq[3].push_back(base + 4111);
      end
    end
    #(14 * 20 * 6 * 2500 + 60000);
    check(cpu.acq_q.size() == 14 * 20 * N, $sformatf("%0d acquisition words", cpu.acq_q.size()));
    begin
      real err [N][$];
      real sum_m;
      daq_word_t w;
      while (cpu.acq_q.size() > 0) begin
        w = cpu.acq_q.pop_front();
        // the fine part must come from this channel's own table
        check(w.ts[9:0] == 10'(11'd1024 - 11'(cpu.lut_img[w.ch][w.code - 1])),
              $sformatf("ch%0d code %0d fine part %0d", w.ch, w.code, w.ts[9:0]));
        if (expq[w.ch].size() > 0) err[w.ch].push_back((real'(w.ts) - true_ts(expq[w.ch].pop_front())) * LSB_PS);
      end
      for (int c = 0; c < N; c++) check(err[c].size() == 14 * 20, "one event per edge");
      for (int m = 0; m < 14 && err[0].size() == 280 && err[1].size() == 280; m++) begin
        sum_m = 0.0;
        for (int r = 0; r < 20; r++) begin
          automatic int i = m * 20 + r;
          automatic real gap = (err[1][i] - err[0][i]);
          for (int c = 0; c < N; c++)
            check(err[c][i] > -60.0 && err[c][i] < 25.0, $sformatf("ch%0d error %0.1f ps", c, err[c][i]));
          check(gap > -60.0 && gap < 60.0, $sformatf("730 ps gap measured with error %0.1f", gap));
          if ((gap < 0 ? -gap : gap) > worst_gap) worst_gap = (gap < 0 ? -gap : gap);
          sum_m += err[0][i];
        end
        if ((sum_m < 0 ? -sum_m : sum_m) / 20.0 > worst_mean) worst_mean = (sum_m < 0 ? -sum_m : sum_m) / 20.0;
        $display("delay %0d ps: mean error %0.1f ps", int'(real'(m) * 182.482 + 0.5), sum_m / 20.0);
      end
      $display("worst mean error %0.1f ps, worst 730 ps gap error %0.1f ps", worst_mean, worst_gap);
    end

    // ---- 3. rejection of an edge that ran off the end of the line ----
    @(posedge clk);
    #500 hit_f = 1'b1;                   // 2000 ps before the next edge
    #5000 hit_f = 1'b0;
    repeat (20) @(posedge clk);
    #1 check(reject_f == 1 && !ev_valid_f, "edge past the line rejected");

    // ---- mechanism counts ----
    $display("mode switches %0d/%0d, table writes %0d, FIFO full cycles %0d, drops %0d, multi-pending cycles %0d, rejects %0d",
             n_to_cal, n_to_acq, cpu.n_lut_writes, n_fifo_full, drop_count, n_multi_pending, reject_f);
    check(n_to_cal >= 1 && n_to_acq >= 1, "mode switch happened");
    check(cpu.n_lut_writes > 0, "table load happened");
    check(n_fifo_full > 0, "FIFO full (back-pressure) happened");
    check(drop_count > 0, "drop happened");
    check(n_multi_pending > 0, "arbitration between channels happened");
    check(reject_f > 0, "rejection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
