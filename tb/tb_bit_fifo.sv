// tb_bit_fifo -- self-checking testbench of bit_fifo.
//
// Uses a 64-entry FIFO (the array size is a parameter; the full-size FIFO is
// exercised by the processor-level tests). Random writes and reads are checked
// against a queue model, including the one-clock read latency, full, empty and
// the level count, and the FIFO is run until full and until empty.
module tb_bit_fifo;
  localparam int DEPTH = 64;

  logic clk = 0, reset_n = 0;
  logic wr_en = 0, din = 0, full, rd_en = 0, dout, dout_valid, empty;
  logic [$clog2(DEPTH):0] level;

  bit_fifo #(.DEPTH(DEPTH), .WIDTH(1)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  bit model[$];
  bit pend_bit;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    reset_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int wp;
      // bias towards filling, then towards draining
      wp = ((cyc / 1000) % 2 == 0) ? 75 : 25;
      wr_en = ($urandom_range(99) < wp);
      din   = $urandom_range(1);
      rd_en = ($urandom_range(99) < 100 - wp);
      @(negedge clk);
      // effects of the rising edge just passed
      begin
        bit was_full, was_empty;
        was_full  = (model.size() == DEPTH);
        was_empty = (model.size() == 0);
        if (rd_en && !was_empty) begin
          pend_bit = model.pop_front();
          check(dout_valid && dout == pend_bit, "read data");
        end else begin
          check(!dout_valid, "no spurious dout_valid");
        end
        if (wr_en && !was_full) model.push_back(din);
        if (was_full) n_full++;
        if (was_empty) n_empty++;
      end
      check(level == ($clog2(DEPTH)+1)'(model.size()), $sformatf("level %0d exp %0d", level, model.size()));
      check(full == (model.size() == DEPTH) && empty == (model.size() == 0), "full/empty flags");
    end
    check(n_full > 0 && n_empty > 0, "reached full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(negedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
