// tb_tdc_channel: end-to-end test of one channel with an exact (skew-free)
// delay line. A rising edge is placed dt ps before a sampling edge k; the
// expected raw code is the number of cells 0..126 the carry reaches within dt
// (24 ps per cell, 25 ps extra per 20-cell block), the expected timestamp is
// count(k) * 1024 - LUT[code-1] with a table loaded through the write port,
// and the event must appear right after edge k+9. Hits follow each other as
// closely as the input rules allow (2 or 3 cycles apart); the mode tag rides
// along with each hit.
module tb_tdc_channel;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, line_in = 1'b0, cal_mode = 1'b0;
  logic [31:0] count = 32'hFFFF_FFF0;     // wraps during the test
  logic lut_we = 1'b0;
  logic [6:0] lut_addr = '0;
  logic [9:0] lut_wdata = '0;
  logic out_valid, overflow;
  tdc_event_t out_event;
  logic [9:0] lut_ref [127];
  int checks = 0, failures = 0, n_events = 0, n_close = 0;

  typedef struct { logic [31:0] c; int code; logic cal; } exp_t;
  exp_t expq [$];

  always #1250 clk = ~clk;
  always @(posedge clk) count <= count + 1;

  tdc_channel #(.SKEW_PS(0)) dut (.clk, .rst_n, .line_in, .cal_mode, .count, .lut_we, .lut_addr,
    .lut_wdata, .out_valid, .out_event, .overflow);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int arrival(int i);
    int t = 0;
    for (int m = 0; m < i; m++) t += 24 + (((m + 1) % 20 == 0) ? 25 : 0);
    return t;
  endfunction

  function automatic int code_of(int dt);
    int n = 0;
    for (int i = 0; i < 127; i++) if (arrival(i) < dt) n++;
    return n;
  endfunction

  function automatic bit near_arrival(int dt);
    for (int i = 0; i < 128; i++) if (arrival(i) - dt < 3 && dt - arrival(i) < 3) return 1;
    return 0;
  endfunction

  // monitor
  always @(posedge clk) begin
    #1;
    if (rst_n && out_valid) begin
      exp_t e;
      logic [41:0] ts;
      n_events++;
      check(expq.size() > 0, "event expected");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        ts = {e.c, 10'd0} - {32'd0, lut_ref[e.code-1]};
        check(count == e.c + 32'd9, $sformatf("latency: out at count %0d, sampled at %0d", count, e.c));
        check(int'(out_event.code) == e.code, $sformatf("code %0d exp %0d", out_event.code, e.code));
        check(out_event.ts == ts, $sformatf("ts %0d exp %0d", out_event.ts, ts));
        check(out_event.cal == e.cal, "mode tag");
      end
    end
    if (rst_n) check(!overflow, "no overflow on this line");
  end

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_dt;
    line_in = 1'b1;
    #5000 line_in = 1'b0;                 // settle the chain's nets
    // a calibrated-looking table: increasing steps of 5..12
    lut_ref[0] = 10'd7;
    for (int a = 1; a < 127; a++) lut_ref[a] = lut_ref[a-1] + 10'($urandom_range(12, 5));
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    for (int a = 0; a < 127; a++) begin
      @(negedge clk) begin lut_we = 1'b1; lut_addr = 7'(a); lut_wdata = lut_ref[a]; end
    end
    @(negedge clk) lut_we = 1'b0;
    repeat (4) @(posedge clk);
    last_dt = 2500;
    for (int h = 0; h < 300; h++) begin
      int dt, gap;
      exp_t e;
      do dt = (h == 0) ? 3 : (h == 1) ? 2497 : $urandom_range(2497, 3); while (near_arrival(dt));
      // earliest gap that keeps the input low for 3.4 ns (the line must empty)
      gap = (2 * 2500 - dt - 100 >= 3400) ? 2 : 3;
      if (gap == 2) n_close++;
      repeat (gap - 1) @(posedge clk);      // now at edge k-1
      #1;
      e.c = count + 1; e.code = code_of(dt); e.cal = 1'($urandom);
      cal_mode = e.cal;
      expq.push_back(e);
      #(2500 - dt - 1) line_in = 1'b1;
      @(posedge clk);                       // edge k: snapshot
      #100 line_in = 1'b0;
      last_dt = dt;
    end
    repeat (15) @(posedge clk);
    #10;
    check(n_events == 300 && expq.size() == 0, $sformatf("%0d events for 300 hits", n_events));
    check(n_close > 0, "hits two cycles apart occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
