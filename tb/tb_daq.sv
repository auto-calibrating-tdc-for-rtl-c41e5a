// tb_daq: checks the event collector on 4 channels with an 8-word FIFO:
// the latency of a single event, round-robin order when all channels are
// pending, back-pressure when the processor stops reading (nothing lost while
// the holding registers suffice), drops when a channel's holding register is
// still full, and, under random traffic, that every word read matches the
// channel's next surviving event and reads + drops = events sent.
module tb_daq;
  timeunit 1ps; timeprecision 1ps;
  import tdc_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in_valid = '0, in_overflow = '0;
  tdc_event_t   in_event [N];
  logic out_valid, out_ready = 1'b0;
  daq_word_t out_word;
  logic [31:0] drop_count, reject_count;
  logic [3:0]  fifo_level;
  int checks = 0, failures = 0;
  tdc_event_t sent [N][$];
  int n_sent = 0, n_read = 0, n_skip = 0, n_full = 0;

  always #1250 clk = ~clk;

  daq #(.N_CH(N), .FIFO_DEPTH(8)) dut (.clk, .rst_n, .in_valid, .in_event, .in_overflow,
    .out_valid, .out_ready, .out_word, .drop_count, .reject_count, .fifo_level);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic tdc_event_t rnd_event();
    tdc_event_t e;
    e.cal = 1'($urandom); e.code = 7'($urandom); e.ts = {10'($urandom), $urandom};
    return e;
  endfunction

  // scoreboard: a word must equal the oldest surviving event of its channel;
  // events before it on that channel were dropped
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      bit found;
      int c;
      tdc_event_t e;
      found = 0;
      c = int'(out_word.ch);
      while (sent[c].size() > 0 && !found) begin
        e = sent[c].pop_front();
        if (e.ts == out_word.ts && e.code == out_word.code && e.cal == out_word.cal) found = 1;
        else n_skip++;
      end
      check(found, $sformatf("word of channel %0d matches an event sent", c));
      n_read++;
    end
    if (fifo_level == 8) n_full++;
  end

  task automatic send(input logic [N-1:0] which);
    @(negedge clk);
    in_valid = which;
    for (int i = 0; i < N; i++) if (which[i]) begin
      in_event[i] = rnd_event(); sent[i].push_back(in_event[i]); n_sent++;
    end
    @(negedge clk) in_valid = '0;
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) in_event[i] = '0;
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    // 1. single event: held after edge 1, in the FIFO after edge 2
    send(4'b0100);
    check(!out_valid, "not yet visible one edge after input");
    @(posedge clk); #1 check(out_valid && out_word.ch == 2, "visible two edges after input");
    out_ready = 1'b1; @(posedge clk); #1 out_ready = 1'b0;
    check(!out_valid, "FIFO empty again");
    // 2. round robin: all four pending, last served was 2 -> 3,0,1,2
    send(4'b1111);
    repeat (5) @(posedge clk);
    #1 check(fifo_level == 4, "all four moved into the FIFO");
    for (int k = 0; k < 4; k++) begin
      check(out_word.ch == 6'((3 + k) % 4), $sformatf("round-robin order %0d: ch %0d", k, out_word.ch));
      out_ready = 1'b1; @(posedge clk); #1 out_ready = 1'b0;
    end
    // 3. back-pressure: 3 rounds of all channels with no reads = 12 events;
    //    spaced so the arbiter keeps up; 8 fit the FIFO, 4 wait in
    //    holding registers, none lost
    send(4'b1111); repeat (6) @(posedge clk);
    send(4'b1111); repeat (6) @(posedge clk);
    send(4'b1111); repeat (4) @(posedge clk);
    #1 check(fifo_level == 8 && drop_count == 0, "FIFO full, nothing dropped");
    // 4. one more event on every channel: holding registers full -> 4 drops
    send(4'b1111);
    #1 check(drop_count == 4, $sformatf("four drops counted (%0d)", drop_count));
    out_ready = 1'b1;
    repeat (20) @(posedge clk);
    #1 check(!out_valid && n_read == 17, $sformatf("drained, %0d read", n_read));
    // 5. overflow pulses are counted
    @(negedge clk) in_overflow = 4'b1011;
    @(negedge clk) in_overflow = 4'b0001;
    @(negedge clk) in_overflow = '0;
    #1 check(reject_count == 4, "rejected hits counted");
    // 6. random traffic with random read stalls
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      in_valid = '0;
      for (int i = 0; i < N; i++) if ($urandom_range(9) < 3) begin
        in_valid[i] = 1'b1; in_event[i] = rnd_event(); sent[i].push_back(in_event[i]); n_sent++;
      end
    end
    @(negedge clk) begin in_valid = '0; out_ready = 1'b1; end
    repeat (40) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) n_skip += sent[i].size();
    check(n_read + int'(drop_count) == n_sent, $sformatf("read %0d + dropped %0d = sent %0d", n_read, drop_count, n_sent));
    check(n_skip == int'(drop_count), "the missing events are exactly the dropped ones");
    check(n_full > 0 && drop_count > 0, "back-pressure and drops both occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
