// tb_calib_lut: checks the initial table, writes and registered reads of the
// calibration look-up table against a reference array.
module tb_calib_lut;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  logic [9:0] wr_data = '0, rd_data;
  logic [9:0] ref_mem [127];
  int checks = 0, failures = 0;

  always #1250 clk = ~clk;

  calib_lut dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input int a, output logic [9:0] d);
    @(negedge clk) begin rd_en = 1'b1; rd_addr = 7'(a); end
    @(negedge clk) rd_en = 1'b0;
    d = rd_data;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] d;
    // initial table: code c -> c * 1024 / 128 = 8c
    for (int a = 0; a < 127; a++) begin
      ref_mem[a] = 10'(8 * (a + 1));
      rd(a, d);
      check(d == ref_mem[a], $sformatf("initial entry %0d = %0d", a, d));
    end
    // a calibrated table, written as the processor would
    for (int a = 0; a < 127; a++) begin
      @(negedge clk) begin wr_en = 1'b1; wr_addr = 7'(a); wr_data = 10'($urandom); ref_mem[a] = wr_data; end
    end
    @(negedge clk) wr_en = 1'b0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(126);
      rd(a, d);
      check(d == ref_mem[a], $sformatf("entry %0d", a));
    end
    // read latency: data changes only at the edge after rd_en
    @(negedge clk) begin rd_en = 1'b1; rd_addr = 7'd5; end
    @(posedge clk); #1 check(rd_data == ref_mem[5], "one-cycle read latency");
    @(negedge clk) begin rd_addr = 7'd6; rd_en = 1'b0; end
    @(posedge clk); #1 check(rd_data == ref_mem[5], "output held without rd_en");
    // write and read the same entry back to back
    @(negedge clk) begin wr_en = 1'b1; wr_addr = 7'd9; wr_data = 10'h2a5; end
    @(negedge clk) wr_en = 1'b0;
    rd(9, d);
    check(d == 10'h2a5, "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
