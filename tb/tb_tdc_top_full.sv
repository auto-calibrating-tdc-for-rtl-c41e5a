// tb_tdc_top_full: one complete operation of the TDC at its full size
// (64 channels, 256-word FIFO, all parameters at their defaults): power-up
// calibration of every channel from the free oscillator (code-density test,
// 4000 codes per channel), table load, then an acquisition in which all 64
// channels see rising edges at known, different phases. Every timestamp is
// compared with the true edge time.
module tb_tdc_top_full;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N = 64;
  localparam int PER_CH = 4000;
  localparam int ROUNDS = 8;
  localparam real LSB_PS = 2500.0 / 1024.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] hit_in = '0;
  logic cal_req, lut_we, ev_valid, ev_ready, cal_mode;
  logic [5:0] lut_ch; logic [6:0] lut_addr; logic [9:0] lut_wdata;
  daq_word_t ev_word;
  logic [31:0] drop_count, reject_count;
  logic [8:0] fifo_level;
  int checks = 0, failures = 0;

  always #1250 clk = ~clk;

  tdc_top dut (
    .clk, .rst_n, .hit_in, .cal_req, .lut_we, .lut_ch, .lut_addr, .lut_wdata,
    .ev_valid, .ev_ready, .ev_word, .cal_mode, .drop_count, .reject_count, .fifo_level);

  cpu_model #(.N_CH(N)) cpu (
    .clk, .ev_valid, .ev_ready, .ev_word, .cal_req, .lut_we, .lut_ch, .lut_addr, .lut_wdata);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  time ref_t; longint ref_c;
  function automatic real true_ts(time t);
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
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time expq [N][$];
    time t0;
    real worst = 0.0;
    int min_act = 128, max_act = 0;
    hit_in = '1;
    #5000 hit_in = '0;                    // settle the carry chains
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    @(posedge clk); #1 begin ref_t = $time - 1; ref_c = longint'(dut.u_count.count); end

    cpu.calibrate(PER_CH);
    check(cpu.n_lut_writes == N * 127, "all 64 tables loaded");
    check(drop_count == 0, "no calibration code dropped");
    for (int c = 0; c < N; c++) begin
      automatic int act = cpu.active_codes(c);
      if (act < min_act) min_act = act;
      if (act > max_act) max_act = act;
      check(act >= 90 && act <= 110, $sformatf("channel %0d: %0d active codes", c, act));
    end
    $display("active codes per channel: %0d .. %0d", min_act, max_act);

    cpu.acq_q.delete();
    @(posedge clk); t0 = $time + 5000;
    for (int r = 0; r < ROUNDS; r++)
      for (int c = 0; c < N; c++) begin
        automatic time at = t0 + time'(r * 100 * 2500) + time'(c * 331 + r * 97);
        pulse(c, at);
        expq[c].push_back(at);
      end
    #(ROUNDS * 100 * 2500 + 300000);
    check(cpu.acq_q.size() == ROUNDS * N, $sformatf("%0d acquisition words", cpu.acq_q.size()));
    while (cpu.acq_q.size() > 0) begin
      automatic daq_word_t w = cpu.acq_q.pop_front();
      if (expq[w.ch].size() > 0) begin
        automatic real err = (real'(w.ts) - true_ts(expq[w.ch].pop_front())) * LSB_PS;
        check(err > -60.0 && err < 25.0, $sformatf("ch%0d error %0.1f ps", w.ch, err));
        if ((err < 0 ? -err : err) > worst) worst = (err < 0 ? -err : err);
      end
    end
    $display("worst timestamp error over %0d hits: %0.1f ps", ROUNDS * N, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
