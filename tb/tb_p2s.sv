// tb_p2s -- self-checking testbench of p2s.
//
// Phase 1: random words (1..16 bits) with random ser_ready stalls; the serial
// bits must equal the words' bits MSB first. Phase 2: with ser_ready held high,
// a run of words must leave at exactly one bit per clock with no gap.
module tb_p2s;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  logic clk = 0, reset_n = 0;
  logic [20:0] word_in = '0; logic word_valid = 0; logic word_ready;
  logic ser_out, ser_valid; logic ser_ready = 0;
  bit stall_en = 1;

  p2s dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bitq_t exp_q, got_q;
  int bits_out = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transfers are sampled after the falling edge, when the inputs have settled
  always @(negedge clk) begin
    ser_ready <= stall_en ? ($urandom_range(99) < 70) : 1'b1;
    #1;
    if (reset_n && ser_valid && ser_ready) begin got_q.push_back(ser_out); bits_out++; end
  end

  task automatic send(input int n);
    for (int i = 0; i < n; i++) begin
      int l; int unsigned v;
      l = $urandom_range(16, 1); v = $urandom & ((1 << l) - 1);
      word_in <= {5'(l), 16'(v)}; word_valid <= 1;
      #1;
      while (!word_ready) begin @(negedge clk); #1; end
      put(exp_q, v, l);
      @(negedge clk);
    end
    word_valid <= 0;
  endtask

  initial begin
    int total, t0, t1, b0;
    repeat (3) @(negedge clk);
    reset_n = 1;
    send(500);
    repeat (40) @(negedge clk);
    check(got_q == exp_q, "serial bits match words (with stalls)");
    // rate: one bit per clock
    stall_en = 0;
    repeat (3) @(negedge clk);
    b0 = bits_out; total = exp_q.size();
    t0 = $time;
    send(50);
    wait (bits_out - b0 == exp_q.size() - total);
    t1 = $time;
    @(negedge clk);
    check((t1 - t0) / 10 <= exp_q.size() - total + 1,
          $sformatf("%0d bits took %0d clocks", exp_q.size() - total, (t1 - t0) / 10));
    repeat (5) @(negedge clk);
    check(got_q == exp_q, "serial bits match words (no stalls)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(negedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
