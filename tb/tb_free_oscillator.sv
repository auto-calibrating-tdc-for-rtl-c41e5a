// tb_free_oscillator: checks the oscillator model's period and duty cycle when
// enabled (exact without jitter, within bounds with it) and that its output
// stays low when disabled.
module tb_free_oscillator;
  timeunit 1ps; timeprecision 1ps;
  logic en = 1'b0, osc, osc_j;
  int checks = 0, failures = 0;

  free_oscillator #(.HIGH_PS(3960), .LOW_PS(3959), .JITTER_PS(0)) dut (.en, .osc);
  free_oscillator #(.HIGH_PS(3960), .LOW_PS(3959)) dut_j (.en, .osc(osc_j));
  int n_jit = 0, n_period_j = 0;
  time tj_prev = 0;
  real sum_j = 0.0;

  // jittered instance: every period within 7919 +- 400 ps, mean near 7919
  always @(posedge osc_j) begin
    if (tj_prev != 0) begin
      check($time - tj_prev >= 7519 && $time - tj_prev <= 8319, "jittered period in range");
      if ($time - tj_prev != 7919) n_jit++;
      sum_j += real'($time - tj_prev);
      n_period_j++;
    end
    tj_prev = $time;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t_rise, t_fall, t_prev;
    #20000 check(osc == 1'b0, "low while disabled");
    en = 1'b1;
    @(posedge osc) t_prev = $time;
    for (int i = 0; i < 20; i++) begin
      @(negedge osc) t_fall = $time;
      @(posedge osc) t_rise = $time;
      check(t_fall - t_prev == 3960, $sformatf("high time %0t", t_fall - t_prev));
      check(t_rise - t_prev == 7919, $sformatf("period %0t", t_rise - t_prev));
      t_prev = t_rise;
    end
    repeat (200) @(posedge osc);
    check(n_jit > 0, "jitter present");
    check(sum_j / n_period_j > 7869.0 && sum_j / n_period_j < 7969.0, "mean jittered period");
    en = 1'b0;
    #20000 check(osc == 1'b0, "low after disable");
    #20000 check(osc == 1'b0, "stays low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
