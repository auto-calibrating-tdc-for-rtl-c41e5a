// tb_input_select: checks the hit/oscillator multiplexer and the two-edge
// latency of the mode synchronizer.
module tb_input_select;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 8;
  logic clk = 1'b0, rst_n = 1'b0, cal_req = 1'b0, osc = 1'b0, cal_mode;
  logic [N-1:0] hit_in = '0, line_in;
  int checks = 0, failures = 0;

  always #1250 clk = ~clk;

  input_select #(.N_CH(N)) dut (.clk, .rst_n, .cal_req, .hit_in, .osc, .line_in, .cal_mode);

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
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    for (int i = 0; i < 20; i++) begin
      hit_in = N'($urandom); osc = 1'($urandom);
      #10 check(line_in == hit_in && !cal_mode, "acquisition: pins reach the lines");
    end
    @(negedge clk) cal_req = 1'b1;
    @(posedge clk); #10 check(!cal_mode, "not switched after one edge");
    @(posedge clk); #10 check(cal_mode, "switched after two edges");
    for (int i = 0; i < 20; i++) begin
      hit_in = N'($urandom); osc = 1'($urandom);
      #10 check(line_in == {N{osc}}, "calibration: oscillator reaches every line");
    end
    @(negedge clk) cal_req = 1'b0;
    repeat (2) @(posedge clk);
    #10 check(!cal_mode && line_in == hit_in, "back to acquisition");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
