// tb_coarse_timestamp: checks ts = (count - LAT) * 1024 - fine, the pass-through
// of tag and code, and the one-cycle latency.
module tb_coarse_timestamp;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_cal = 1'b0, out_valid;
  logic [31:0] count = '0;
  logic [6:0]  in_code = '0;
  logic [9:0]  fine = '0;
  tdc_event_t  out_event;
  int checks = 0, failures = 0;

  always #1250 clk = ~clk;

  coarse_timestamp #(.LAT(8)) dut (.clk, .rst_n, .count, .in_valid, .in_cal, .in_code, .fine,
                                   .out_valid, .out_event);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    @(posedge clk); #1 check(!out_valid, "idle after reset");
    for (int i = 0; i < 200; i++) begin
      longint unsigned exp_ts;
      logic [31:0] c; logic [9:0] f; logic [6:0] k; logic t;
      c = (i == 0) ? 32'd3 : $urandom; f = 10'($urandom); k = 7'($urandom); t = 1'($urandom);
      @(negedge clk) begin count = c; fine = f; in_code = k; in_cal = t; in_valid = 1'b1; end
      @(posedge clk); #1;
      exp_ts = ((longint'(c) - 8) * 1024 - longint'(f)) & ((64'd1 << 42) - 1);
      check(out_valid, "valid one cycle after input");
      check(out_event.ts == 42'(exp_ts), $sformatf("ts count=%0d fine=%0d got %0d exp %0d", c, f, out_event.ts, exp_ts));
      check(out_event.code == k && out_event.cal == t, "code and tag");
      @(negedge clk) in_valid = 1'b0;
      @(posedge clk); #1 check(!out_valid, "valid drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
