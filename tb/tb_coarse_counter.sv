// tb_coarse_counter: checks the coarse counter counts one per clock, holds
// while disabled, clears on reset, and wraps (on a 4-bit instance).
module tb_coarse_counter;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;

  always #1250 clk = ~clk;

  coarse_counter dut (.clk, .rst_n, .en, .count);
  coarse_counter #(.WIDTH(4)) dut4 (.clk, .rst_n, .en, .count(count4));

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
    int unsigned start;
    repeat (3) @(posedge clk);
    #1 check(count == 0 && count4 == 0, "cleared by reset");
    rst_n = 1'b1;
    @(posedge clk); #1;
    start = count;
    for (int i = 1; i <= 40; i++) begin
      @(posedge clk); #1;
      check(count == start + 32'(i), $sformatf("count after %0d edges: %0d", i, count));
      check(count4 == 4'((start + 32'(i))), "4-bit instance wraps modulo 16");
    end
    en = 1'b0;
    start = count;
    repeat (5) @(posedge clk);
    #1 check(count == start, "holds while en is low");
    en = 1'b1;
    @(posedge clk); #1 check(count == start + 1, "resumes");
    rst_n = 1'b0; #1 check(count == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
