// tb_store_coded_blk -- self-checking testbench of store_coded_blk.
//
// Offers random syntax elements of all four kinds (token with T1 signs, level
// including 28-bit escape codes, total_zeros, run_before), each held until
// elem_ready, while code_ready stalls at random. The bits of every element, as
// the encoder defines them, are queued independently and compared with the
// bits of the issued words; every word must hold 1..16 bits, and long elements
// must be split.
module tb_store_coded_blk;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  logic clk = 0, reset_n = 0;
  logic [1:0] no_of_T1s = '0; logic [2:0] T1s_sign = '0;
  logic [15:0] coeff_token = '0; logic [4:0] coeff_token_len = '0; logic coeff_token_T1_valid = 0;
  logic [3:0] no_of_prefix_bits = '0, no_of_suffix_bits = '0; logic [12:0] level_suffix = '0;
  logic level_data_valid = 0;
  logic [8:0] tot_zeros_code = '0; logic [3:0] tot_zeros_len = '0; logic tot_zeros_code_valid = 0;
  logic [10:0] zero_runs_code = '0; logic [3:0] zero_runs_len = '0; logic zero_runs_code_valid = 0;
  logic elem_ready;
  logic [20:0] code_out; logic code_valid_out; logic code_ready = 0;

  store_coded_blk dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_words = 0, n_split = 0;
  bitq_t exp_q, got_q;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transfers are sampled after the falling edge, when the inputs have settled
  always @(negedge clk) begin
    #1;
    if (reset_n && code_valid_out && code_ready) begin
      check(code_out[20:16] >= 5'd1 && code_out[20:16] <= 5'd16, "word length in 1..16");
      put(got_q, code_out[15:0], code_out[20:16]);
      n_words++;
    end
  end
  always @(negedge clk) code_ready <= ($urandom_range(99) < 60);

  initial begin
    int n_elem = 0;
    repeat (3) @(negedge clk);
    reset_n = 1;
    for (int e = 0; e < 2000; e++) begin
      int kind;
      kind = $urandom_range(3);
      coeff_token_T1_valid <= 0; level_data_valid <= 0; tot_zeros_code_valid <= 0; zero_runs_code_valid <= 0;
      case (kind)
        0: begin
          int l, t;
          l = $urandom_range(16, 1); t = $urandom_range(3);
          coeff_token_len <= 5'(l); coeff_token <= 16'($urandom & ((1 << l) - 1));
          no_of_T1s <= 2'(t); T1s_sign <= 3'($urandom & ((1 << t) - 1));
          coeff_token_T1_valid <= 1;
          if (l + t > 16) n_split++;
        end
        1: begin
          int p, sb;
          p = $urandom_range(15); sb = ($urandom_range(3) == 0) ? 12 : $urandom_range(6);
          no_of_prefix_bits <= 4'(p); no_of_suffix_bits <= 4'(sb);
          level_suffix <= 13'((1 << sb) | ($urandom & ((1 << sb) - 1)));
          level_data_valid <= 1;
          if (p + sb + 1 > 16) n_split++;
        end
        2: begin
          int l; l = $urandom_range(9, 1);
          tot_zeros_len <= 4'(l); tot_zeros_code <= 9'($urandom & ((1 << l) - 1));
          tot_zeros_code_valid <= 1;
        end
        default: begin
          int l; l = $urandom_range(11, 1);
          zero_runs_len <= 4'(l); zero_runs_code <= 11'($urandom & ((1 << l) - 1));
          zero_runs_code_valid <= 1;
        end
      endcase
      #1;
      while (!elem_ready) begin @(negedge clk); #1; end
      // element is taken at the next rising edge: record its bits
      if (coeff_token_T1_valid) begin put(exp_q, coeff_token, coeff_token_len); put(exp_q, T1s_sign, no_of_T1s); end
      if (level_data_valid) begin put(exp_q, 0, no_of_prefix_bits); put(exp_q, level_suffix, no_of_suffix_bits + 1); end
      if (tot_zeros_code_valid) put(exp_q, tot_zeros_code, tot_zeros_len);
      if (zero_runs_code_valid) put(exp_q, zero_runs_code, zero_runs_len);
      n_elem++;
      @(negedge clk);
      if ($urandom_range(4) == 0) begin
        coeff_token_T1_valid <= 0; level_data_valid <= 0; tot_zeros_code_valid <= 0; zero_runs_code_valid <= 0;
        @(negedge clk);
      end
    end
    coeff_token_T1_valid <= 0; level_data_valid <= 0; tot_zeros_code_valid <= 0; zero_runs_code_valid <= 0;
    repeat (100) @(negedge clk);
    check(got_q.size() == exp_q.size(), $sformatf("bit count %0d exp %0d", got_q.size(), exp_q.size()));
    check(got_q == exp_q, "bit stream matches the elements");
    check(n_words > n_elem, "long elements were split into two words");
    check(n_split > 0, "split cases offered");
    $display("elements %0d words %0d", n_elem, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(negedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
