// tb_carry_chain: checks the carry chain as an adder (random operands, settled
// sum) and the timing of the carry front for a one-plus-zero add: with no
// sampling skew, sum bit i must fall exactly when the carry has crossed cells
// 0..i-1, i.e. after the sum of 24 ps per cell plus 25 ps per 20-cell block.
module tb_carry_chain;
  timeunit 1ps; timeprecision 1ps;
  localparam int N = 128;
  logic          cin_t = 1'b0, cin_f = 1'b0;
  logic [N-1:0]  sum_t, a_f = '0, b_f = '0, sum_f;
  int checks = 0, failures = 0;

  carry_chain #(.SKEW_PS(0)) dut_t (.cin(cin_t), .a({N{1'b1}}), .b({N{1'b0}}), .sum(sum_t));
  carry_chain #(.SEED(3))    dut_f (.cin(cin_f), .a(a_f), .b(b_f), .sum(sum_f));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int arrival(int i);   // carry arrival at cell i, ps
    int t = 0;
    for (int m = 0; m < i; m++) t += 24 + (((m + 1) % 20 == 0) ? 25 : 0);
    return t;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    // the chain's nets are only evaluated on input changes: settle them once
    cin_t = 1'b1; cin_f = 1'b1;
    #5000 cin_t = 1'b0; cin_f = 1'b0;
    #5000 check(sum_t == {N{1'b1}}, "all ones before the hit");
    t0 = $time;
    cin_t = 1'b1;
    #1 check(sum_t[0] == 1'b0 && sum_t[1] == 1'b1, "cell 0 follows the input at once");
    for (int i = 1; i < N; i++) begin
      #(t0 + arrival(i) - 1 - $time);
      check(sum_t[i] == 1'b1, $sformatf("cell %0d not yet reached at %0t", i, $time - t0));
      #2;
      check(sum_t[i] == 1'b0, $sformatf("cell %0d reached at %0t", i, $time - t0));
      check($countones(~sum_t) == i + 1, "thermometer has no gaps");
    end
    cin_t = 1'b0;
    #5000 check(sum_t == {N{1'b1}}, "line returns to all ones");

    // adder function with random operands and the default skewed instance
    for (int k = 0; k < 50; k++) begin
      logic [N:0] ref_sum;
      a_f   = {$urandom, $urandom, $urandom, $urandom};
      b_f   = {$urandom, $urandom, $urandom, $urandom};
      cin_f = 1'($urandom);
      #20000;
      ref_sum = {1'b0, a_f} + {1'b0, b_f} + {{N{1'b0}}, cin_f};
      check(sum_f == ref_sum[N-1:0], $sformatf("adder result %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
