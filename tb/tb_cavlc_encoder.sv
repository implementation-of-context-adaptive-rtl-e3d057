// tb_cavlc_encoder -- self-checking testbench of cavlc_encoder.
//
// Feeds zig-zag ordered blocks (the worked example of a 4x4 block first, then
// literal-checked empty blocks in each coeff_token table, then random blocks of
// several kinds) with random halt and random out_ready stalls, rebuilds the bit
// string of every block from the element outputs and compares it with the
// behavioural reference encoder of cavlc_ref_pkg, and for the first blocks with
// literal bit strings.
module tb_cavlc_encoder;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int NBLK = 400;

  logic clk = 0, reset_n = 0, halt = 0;
  logic [COEFF_W-1:0] coeff_in = '0;
  logic coeff_valid_in = 0;
  logic [4:0] nc_in = '0, tot_nz_in = '0;
  logic [BLK_W-1:0] blk_in = '0;
  logic enc_ready, out_ready = 0;
  logic [BLK_W-1:0] blk_out;
  logic [1:0] no_of_T1s; logic [2:0] T1s_sign;
  logic [15:0] coeff_token; logic [4:0] coeff_token_len; logic coeff_token_T1_valid;
  logic [3:0] no_of_prefix_bits, no_of_suffix_bits; logic [12:0] level_suffix; logic level_data_valid;
  logic [8:0] tot_zeros_code; logic [3:0] tot_zeros_len; logic tot_zeros_code_valid;
  logic [10:0] zero_runs_code; logic [3:0] zero_runs_len; logic zero_runs_code_valid;

  cavlc_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bitq_t exp_q [NBLK];
  bitq_t got_q [NBLK];
  int    blocks_seen = 0;
  int    n_escape = 0, n_halt = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic string bits2str(bitq_t q);
    string s = "";
    foreach (q[i]) s = {s, q[i] ? "1" : "0"};
    return s;
  endfunction

  // collect the elements the encoder issues
  always @(posedge clk) begin
    if (reset_n && out_ready) begin
      if (coeff_token_T1_valid) begin
        blocks_seen++;
        put(got_q[blocks_seen-1], coeff_token, coeff_token_len);
        put(got_q[blocks_seen-1], T1s_sign, no_of_T1s);
      end
      if (level_data_valid) begin
        put(got_q[blocks_seen-1], 0, no_of_prefix_bits);
        put(got_q[blocks_seen-1], level_suffix, no_of_suffix_bits + 1);
        if (no_of_prefix_bits == 4'd15) n_escape++;
      end
      if (tot_zeros_code_valid) put(got_q[blocks_seen-1], tot_zeros_code, tot_zeros_len);
      if (zero_runs_code_valid) put(got_q[blocks_seen-1], zero_runs_code, zero_runs_len);
    end
  end

  // random stalls
  always @(posedge clk) begin
    out_ready <= ($urandom_range(99) < 75);
    halt      <= ($urandom_range(99) < 5);
    if (halt) n_halt++;
  end

  task automatic send_block(input int c[16], input int nc);
    int nz = 0;
    foreach (c[k]) if (c[k] != 0) nz++;
    while (!enc_ready) @(posedge clk);
    for (int k = 0; k < 16; k++) begin
      coeff_in       <= COEFF_W'(c[k]);
      coeff_valid_in <= 1'b1;
      nc_in          <= 5'(nc);
      tot_nz_in      <= 5'(nz);
      @(posedge clk);
    end
    coeff_valid_in <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    int c[16];
    int ex[16] = '{0, 4, 0, 1, -1, -1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
    int lit_nc[4] = '{0, 2, 4, 8};
    string lit[4] = '{"1", "11", "1111", "000011"};
    string s;
    repeat (3) @(posedge clk);
    reset_n = 1;
    // worked example, table Num-VLC0
    exp_q[0] = ref_encode(ex, 0);
    check(bits2str(exp_q[0]) == "0000100011100010111101101", "reference encoder on the worked example");
    send_block(ex, 0);
    // empty blocks, one per coeff_token table
    for (int i = 0; i < 4; i++) begin
      c = '{default: 0};
      exp_q[1+i] = ref_encode(c, lit_nc[i]);
      send_block(c, lit_nc[i]);
    end
    for (int b = 5; b < NBLK; b++) begin
      int nc;
      rand_block(c, $urandom_range(4));
      nc = $urandom_range(16);
      exp_q[b] = ref_encode(c, nc);
      send_block(c, nc);
    end
    // drain
    repeat (200) @(posedge clk);
    check(blocks_seen == NBLK, $sformatf("blocks coded %0d of %0d", blocks_seen, NBLK));
    check(bits2str(got_q[0]) == "0000100011100010111101101",
          $sformatf("worked example gave %s", bits2str(got_q[0])));
    for (int i = 0; i < 4; i++)
      check(bits2str(got_q[1+i]) == lit[i], $sformatf("empty block nC=%0d gave %s", lit_nc[i], bits2str(got_q[1+i])));
    for (int b = 0; b < NBLK; b++)
      check(got_q[b] == exp_q[b], $sformatf("block %0d: got %s exp %s", b, bits2str(got_q[b]), bits2str(exp_q[b])));
    check(n_escape > 0, "escape-coded levels were exercised");
    $display("escape levels %0d, halt cycles %0d", n_escape, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
