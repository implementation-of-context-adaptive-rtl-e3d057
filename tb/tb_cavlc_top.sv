// tb_cavlc_top -- end-to-end testbench of the CAVLC processor.
//
// Sends NMB macroblocks (24 raster-order 4x4 blocks each) of random quantized
// coefficients: a picture 4 macroblocks wide and 2 high, then pic_start and
// one row of a second picture. Random halt, random gaps on the input, and a
// serial channel that reads the FIFO slowly in bursts, so that the small FIFO
// used here (FIFO_DEPTH = 512) fills and back-pressure reaches the input. The bit stream
// read from the channel is
//   * compared with the concatenated output of the reference encoder, and
//   * decoded with the reference CAVLC decoder (nC rebuilt from the decoded
//     blocks), giving back every coefficient of every block.
// It counts how often each mechanism of the design happened and fails if one
// never did: halt while coding, input back-pressure, FIFO full, both dram_nc
// banks full, every coeff_token table, more than three trailing +/-1, empty and
// full (16 non-zero) blocks, level escape codes, suffixLength reaching 6, and
// elements split over two parallel words.
module tb_cavlc_top;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int NMB   = 12;
  localparam int NBLK  = NMB * BLKS_PER_MB;
  localparam int DEPTH = 512;

  localparam int MBW = 4;   // picture width in macroblocks
  localparam int PIC2 = 8;   // macroblock at which a second picture starts
  logic clk = 0, reset_n = 0, halt = 0;
  logic [6:0] mb_width = 7'(MBW);
  logic pic_start = 0;
  logic [COEFF_W-1:0] coeff_in = '0;
  logic coeff_valid_in = 0, coeff_ready_out, overflow;
  logic [BLK_W-1:0] coded_blk_out;
  logic [20:0] code_out; logic code_valid_out;
  logic bs_rd_en = 0, bs_out, bs_out_valid, fifo_empty, fifo_full;
  logic [$clog2(DEPTH):0] fifo_level;

  cavlc_top #(.FIFO_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int zz_blocks [NBLK][16];
  bitq_t exp_q, got_q;
  bit    done_in = 0;

  // mechanism counters
  int n_halt = 0, n_in_stall = 0, n_fifo_full = 0, n_both_banks = 0, n_tab[4] = '{0,0,0,0};
  int n_t1_special = 0, n_empty = 0, n_full16 = 0, n_escape = 0, n_sl6 = 0, n_split = 0;

  always @(posedge clk) if (reset_n) begin
    if (halt && dut.u_encoder.state != dut.u_encoder.S_IDLE) n_halt++;
    if (fifo_full) n_fifo_full++;
    if (dut.u_dram_nc.full == 2'b11) n_both_banks++;
    if (dut.u_encoder.coeff_token_T1_valid && dut.u_encoder.out_ready) begin
      n_tab[nc_table(dut.u_encoder.w_nc)]++;
      if (32'(coeff_token_len) + 32'(dut.no_of_T1s) > 16) n_split++;
    end
    if (dut.level_data_valid && dut.elem_ready) begin
      if (dut.no_of_prefix_bits == 4'd15) n_escape++;
      if (32'(dut.no_of_prefix_bits) + 32'(dut.no_of_suffix_bits) + 1 > 16) n_split++;
    end
    if (dut.u_encoder.suffix_len == 3'd6) n_sl6++;
  end
  logic [4:0] coeff_token_len;
  assign coeff_token_len = dut.coeff_token_len;

  // halt and serial channel
  always @(negedge clk) begin
    halt <= ($urandom_range(99) < 3);
    // the channel reads in bursts: fast for a while, then pauses
    bs_rd_en <= (($time / 20000) % 3 != 0) && ($urandom_range(99) < 90);
    if (reset_n && bs_out_valid) got_q.push_back(bs_out);
  end

  initial begin
    int zz_r[16] = '{0,0,1,2,1,0,0,1,2,3,3,2,1,2,3,3};
    int zz_c[16] = '{0,1,0,0,1,2,3,2,1,0,1,2,3,3,2,3};
    mb_nz_t pic_e[$];
    int raster[16];
    // stimulus and expected stream
    for (int b = 0; b < NBLK; b++) begin
      int c[16], nz, kind, t1run, r;
      bitq_t q;
      int mb;
      mb_nz_t e;
      r = $urandom_range(99);
      kind = (r < 10) ? 0 : (r < 60) ? 1 : (r < 80) ? 4 : (r < 93) ? 2 : 3;
      rand_block(c, kind);
      if (b == 5) c = '{0, 4, 0, 1, -1, -1, 0, 1, 0, 0, 0, 0, 0, 0, 0, 0};  // more than 3 trailing ones
      zz_blocks[b] = c;
      nz = 0; foreach (c[i]) if (c[i] != 0) nz++;
      if (nz == 0) n_empty++;
      if (nz == 16) n_full16++;
      t1run = 0;
      for (int k = 15; k >= 0; k--) if (c[k] != 0) begin
        if (c[k] == 1 || c[k] == -1) t1run++; else break;
      end
      if (t1run > 3) n_t1_special++;
      if (b == PIC2 * 24) pic_e = {};
      mb = (b / 24) - ((b >= PIC2 * 24) ? PIC2 : 0);
      if (b % 24 == 0) begin e = '{default: 0}; pic_e.push_back(e); end
      q = ref_encode(c, ref_nc(pic_e, MBW, mb % MBW, mb / MBW, b % 24));
      e = pic_e[mb]; e[b % 24] = nz; pic_e[mb] = e;
      foreach (q[i]) exp_q.push_back(q[i]);
    end
    repeat (3) @(negedge clk);
    reset_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int k = 0; k < 16; k++) raster[zz_r[k]*4 + zz_c[k]] = zz_blocks[b][k];
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); #1;
        while (!coeff_ready_out) begin coeff_valid_in = 0; n_in_stall++; @(negedge clk); #1; end
        coeff_in = COEFF_W'(raster[i]);
        coeff_valid_in = 1;
        pic_start = (i == 0) && (b == 0 || b == PIC2 * 24);
        if ($urandom_range(19) == 0) begin @(negedge clk); coeff_valid_in = 0; end
      end
    end
    @(negedge clk); coeff_valid_in = 0;
    done_in = 1;
    // wait for the whole stream to come out of the channel
    begin
      // wait for the stream, or give up after a long time without progress
      int idle, last;
      idle = 0; last = -1;
      while ((got_q.size() < exp_q.size()) && idle < 20000) begin
        @(negedge clk);
        if (fifo_level != 0 || last != got_q.size()) idle = 0; else idle++;
        last = got_q.size();
      end
    end
    repeat (50) @(negedge clk);
    check(got_q.size() == exp_q.size(), $sformatf("stream length %0d exp %0d", got_q.size(), exp_q.size()));
    check(got_q == exp_q, "stream equals the reference encoder output");
    check(!overflow, "no input overflow");
    // decode the stream back into coefficients
    begin
      bitq_t q;
      int dec[16], bad;
      mb_nz_t pic_d[$];
      q = got_q; bad = 0;
      for (int b = 0; b < NBLK; b++) begin
        int nz, mb;
        mb_nz_t e;
        if (b == PIC2 * 24) pic_d = {};
        mb = (b / 24) - ((b >= PIC2 * 24) ? PIC2 : 0);
        if (b % 24 == 0) begin e = '{default: 0}; pic_d.push_back(e); end
        if (!ref_decode(q, ref_nc(pic_d, MBW, mb % MBW, mb / MBW, b % 24), dec)) begin bad++; break; end
        nz = 0; foreach (dec[i]) if (dec[i] != 0) nz++;
        e = pic_d[mb]; e[b % 24] = nz; pic_d[mb] = e;
        if (dec != zz_blocks[b]) bad++;
        checks++;
      end
      failures += bad;
      check(q.size() == 0, "no bits left after the last block");
      if (bad) $display("FAIL: %0d blocks decoded wrongly", bad);
    end
    $display("bits %0d for %0d blocks (%0d macroblocks), clocks %0t", got_q.size(), NBLK, NMB, $time / 10);
    $display("halt-in-coding %0d, input stalls %0d, fifo full %0d, both banks full %0d",
             n_halt, n_in_stall, n_fifo_full, n_both_banks);
    $display("tables %0d/%0d/%0d/%0d, T1>3 %0d, empty %0d, 16-coeff %0d, escape %0d, sl6 %0d, split %0d",
             n_tab[0], n_tab[1], n_tab[2], n_tab[3], n_t1_special, n_empty, n_full16, n_escape, n_sl6, n_split);
    check(n_halt > 0, "halt while coding");
    check(n_in_stall > 0, "input back-pressure");
    check(n_fifo_full > 0, "FIFO full");
    check(n_both_banks > 0, "both dram_nc banks full");
    foreach (n_tab[i]) check(n_tab[i] > 0, $sformatf("coeff_token table %0d used", i));
    check(n_t1_special > 0, "more than three trailing ones");
    check(n_empty > 0, "empty block");
    check(n_full16 > 0, "block with 16 non-zero coefficients");
    check(n_escape > 0, "level escape code");
    check(n_sl6 > 0, "suffixLength reached 6");
    check(n_split > 0, "element split over two words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
