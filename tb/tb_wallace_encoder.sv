// tb_wallace_encoder: feeds a new vector every cycle (thermometer codes with
// bubbles and random vectors) to a 127-input and a 15-input encoder and checks
// that the ones count, valid and side band come out exactly OUT_W-1 cycles later.
module tb_wallace_encoder;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0;
  logic         v7 = 1'b0, v4 = 1'b0, ov7, ov4;
  logic [3:0]   s7 = '0, s4 = '0, os7, os4;
  logic [126:0] t7 = '0;
  logic [14:0]  t4 = '0;
  logic [6:0]   c7;
  logic [3:0]   c4;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [6:0] exp7 [int];  logic [3:0] es7 [int];  logic ev7 [int];
  logic [3:0] exp4 [int];  logic [3:0] es4 [int];  logic ev4 [int];

  always #1250 clk = ~clk;

  wallace_encoder #(.OUT_W(7), .SIDE_W(4)) dut7 (.clk, .rst_n, .in_valid(v7), .in_side(s7), .therm(t7),
                                                 .out_valid(ov7), .out_side(os7), .count(c7));
  wallace_encoder #(.OUT_W(4), .SIDE_W(4)) dut4 (.clk, .rst_n, .in_valid(v4), .in_side(s4), .therm(t4),
                                                 .out_valid(ov4), .out_side(os4), .count(c4));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [126:0] thermo(int n, int bubbles);
    logic [126:0] t = '0;
    for (int i = 0; i < n; i++) t[i] = 1'b1;
    for (int b = 0; b < bubbles; b++) begin      // flip bits near the transition
      int p = n - 3 + $urandom_range(5);
      if (p >= 0 && p < 127) t[p] = ~t[p];
    end
    return t;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus, applied after each edge; expected values indexed by cycle
  always @(posedge clk) begin
    cyc <= cyc + 1;
    #1;
    if (rst_n) begin
      case (cyc % 3)
        0: t7 = thermo($urandom_range(127), 0);
        1: t7 = thermo($urandom_range(127), $urandom_range(3));
        default: t7 = {$urandom, $urandom, $urandom, $urandom};
      endcase
      t4 = 15'($urandom);
      v7 = 1'($urandom); v4 = 1'($urandom);
      s7 = 4'($urandom); s4 = 4'($urandom);
      exp7[cyc] = 7'($countones(t7)); es7[cyc] = s7; ev7[cyc] = v7;
      exp4[cyc] = 4'($countones(t4)); es4[cyc] = s4; ev4[cyc] = v4;
    end
  end

  // checks: inputs applied in cycle c are registered by edge c+1 ... c+L
  always @(posedge clk) begin
    #2;
    if (rst_n && ev7.exists(cyc - 6)) begin
      check(ov7 == ev7[cyc-6], "valid 127-input, 6 cycles");
      if (ev7[cyc-6]) check(c7 == exp7[cyc-6] && os7 == es7[cyc-6],
                            $sformatf("count %0d exp %0d", c7, exp7[cyc-6]));
    end
    if (rst_n && ev4.exists(cyc - 3)) begin
      check(ov4 == ev4[cyc-3], "valid 15-input, 3 cycles");
      if (ev4[cyc-3]) check(c4 == exp4[cyc-3] && os4 == es4[cyc-3],
                            $sformatf("count15 %0d exp %0d", c4, exp4[cyc-3]));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    repeat (1000) @(posedge clk);
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
