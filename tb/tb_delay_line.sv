// tb_delay_line: drives rising edges a known time before a sampling clock edge
// and checks the registered thermometer (exact, no skew), the hit flag, that a
// held level is reported once, and that a hit which ran through the whole line
// (on a faster line instance) is rejected as overflow. A copy built on the
// gate-level adder must match the timing-model line cycle by cycle.
module tb_delay_line;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 128;
  logic clk = 1'b0, rst_n = 1'b0, sig = 1'b0, sig_f = 1'b0;
  logic hit, overflow, hit_f, overflow_f, hit_g, overflow_g;
  logic [N-2:0] therm_g;
  logic [N-2:0] therm, therm_f;
  int checks = 0, failures = 0;
  int n_hit = 0, n_ovf = 0;

  always #1250 clk = ~clk;

  delay_line #(.SKEW_PS(0)) dut (.clk, .rst_n, .sig, .hit, .overflow, .therm);
  // the same line built from the gate-level adder must behave identically
  delay_line #(.SKEW_PS(0), .TIMING_MODEL(1'b0)) dut_g (
    .clk, .rst_n, .sig, .hit(hit_g), .overflow(overflow_g), .therm(therm_g));
  always @(posedge clk) begin
    #2;
    if (rst_n) check(hit_g == hit && overflow_g == overflow && therm_g == therm,
                     "gate-level adder line matches the timing model");
  end
  // fast line: 10 ps per cell, no block penalty -> 1.28 ns end to end
  delay_line #(.SKEW_PS(0), .D_PS(10), .LAB_PS(0)) dut_f (
    .clk, .rst_n, .sig(sig_f), .hit(hit_f), .overflow(overflow_f), .therm(therm_f));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int arrival(int i, int d, int lab);
    int t = 0;
    for (int m = 0; m < i; m++) t += d + (((m + 1) % 20 == 0) ? lab : 0);
    return t;
  endfunction

  // thermometer expected for an edge dt ps before the sampling edge
  function automatic logic [N-2:0] expect_therm(int dt, int d, int lab);
    logic [N-2:0] t = '0;
    for (int i = 0; i < N - 1; i++) t[i] = (arrival(i, d, lab) < dt);
    return t;
  endfunction

  function automatic bit near_arrival(int dt);
    for (int i = 0; i < N; i++) if (arrival(i, 24, 25) - dt < 3 && dt - arrival(i, 24, 25) < 3) return 1;
    return 0;
  endfunction

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // settle the carry chains (their nets only update on input changes)
    sig = 1'b1; sig_f = 1'b1;
    #5000 sig = 1'b0; sig_f = 1'b0;
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      int dt;
      do dt = (k == 0) ? 5 : $urandom_range(2495, 3); while (near_arrival(dt));
      @(posedge clk);
      #(2500 - dt) sig = 1'b1;                  // dt before the next edge (edge k)
      @(posedge clk);                           // snapshot
      @(posedge clk); #1;                       // registered outputs
      check(hit && !overflow, $sformatf("hit reported, dt=%0d", dt));
      check(therm == expect_therm(dt, 24, 25),
            $sformatf("thermometer dt=%0d ones=%0d", dt, $countones(therm)));
      if (hit) n_hit++;
      @(posedge clk); #1 check(!hit, "a held level is not reported again");
      sig = 1'b0;
      repeat (3) @(posedge clk);
      #1 check(!hit && !overflow, "quiet while low");
    end
    // fast line: 2000 ps is longer than the whole line -> rejected
    for (int k = 0; k < 10; k++) begin
      int dt;
      dt = (k % 2 == 0) ? 2000 : 995;
      @(posedge clk);
      #(2500 - dt) sig_f = 1'b1;
      @(posedge clk);
      @(posedge clk); #1;
      if (dt == 2000) begin
        check(overflow_f && !hit_f, "edge past the end of the line is rejected");
        if (overflow_f) n_ovf++;
      end else begin
        check(hit_f && !overflow_f && $countones(therm_f) == 100, "fast line code 100");
      end
      sig_f = 1'b0;
      repeat (3) @(posedge clk);
    end
    check(n_hit > 0 && n_ovf > 0, "both hit and overflow seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
