// tb_cavlc_top_full -- one full 1024x768 4:2:0 frame through the CAVLC
// processor at its default sizes (128 Kbit FIFO).
//
// 3072 macroblocks of 24 blocks each are sent; the block contents are random
// with a mix weighted towards sparse blocks, as after quantization. The serial
// channel reads at about two bits in three clocks. Every bit read from the
// channel is compared on the fly with the reference encoder's stream, and the
// whole stream is then decoded back into coefficients with the reference
// decoder. Reported: bits per frame, clocks per frame, peak FIFO fill.
module tb_cavlc_top_full;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int NMB  = (1024 / 16) * (768 / 16);
  localparam int NBLK = NMB * BLKS_PER_MB;

  localparam int MBW = 64;   // picture width in macroblocks
  localparam int PIC2 = NMB; // one picture: no second pic_start
  logic clk = 0, reset_n = 0, halt = 0;
  logic [6:0] mb_width = 7'(MBW);
  logic pic_start = 0;
  logic [COEFF_W-1:0] coeff_in = '0;
  logic coeff_valid_in = 0, coeff_ready_out, overflow;
  logic [BLK_W-1:0] coded_blk_out;
  logic [20:0] code_out; logic code_valid_out;
  logic bs_rd_en = 0, bs_out, bs_out_valid, fifo_empty, fifo_full;
  logic [17:0] fifo_level;

  cavlc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bitq_t exp_q, all_q;
  int    n_mismatch = 0, n_got = 0, peak_level = 0;
  byte   zz_blocks [NBLK][16];   // levels kept small enough for a byte in this test

  always @(negedge clk) begin
    bs_rd_en <= ($urandom_range(2) != 0);
    if (reset_n && bs_out_valid) begin
      if (exp_q.size() == 0 || exp_q.pop_front() != bs_out) n_mismatch++;
      all_q.push_back(bs_out);
      n_got++;
    end
    if (int'(fifo_level) > peak_level) peak_level = int'(fifo_level);
  end

  initial begin
    int zz_r[16] = '{0,0,1,2,1,0,0,1,2,3,3,2,1,2,3,3};
    int zz_c[16] = '{0,1,0,0,1,2,3,2,1,0,1,2,3,3,2,3};
    mb_nz_t pic_e[$];
    int raster[16], total_bits;
    longint t_start, t_end;
    total_bits = 0;
    repeat (3) @(negedge clk);
    reset_n = 1;
    t_start = $time;
    for (int b = 0; b < NBLK; b++) begin
      int c[16], nz, r, kind;
      bitq_t q;
      int mb;
      mb_nz_t e;
      r = $urandom_range(99);
      kind = (r < 30) ? 0 : (r < 85) ? 1 : (r < 96) ? 4 : 2;
      rand_block(c, kind);
      foreach (c[k]) zz_blocks[b][k] = byte'(c[k]);
      nz = 0; foreach (c[i]) if (c[i] != 0) nz++;
      if (b == PIC2 * 24) pic_e = {};
      mb = (b / 24) - ((b >= PIC2 * 24) ? PIC2 : 0);
      if (b % 24 == 0) begin e = '{default: 0}; pic_e.push_back(e); end
      q = ref_encode(c, ref_nc(pic_e, MBW, mb % MBW, mb / MBW, b % 24));
      e = pic_e[mb]; e[b % 24] = nz; pic_e[mb] = e;
      foreach (q[i]) exp_q.push_back(q[i]);
      total_bits += q.size();
      for (int k = 0; k < 16; k++) raster[zz_r[k]*4 + zz_c[k]] = c[k];
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); #1;
        while (!coeff_ready_out) begin coeff_valid_in = 0; @(negedge clk); #1; end
        coeff_in = COEFF_W'(raster[i]);
        coeff_valid_in = 1;
        pic_start = (i == 0) && (b == 0 || b == PIC2 * 24);
      end
    end
    @(negedge clk); coeff_valid_in = 0;
    begin
      // wait for the stream, or give up after a long time without progress
      int idle, last;
      idle = 0; last = -1;
      while ((n_got < total_bits) && idle < 20000) begin
        @(negedge clk);
        if (fifo_level != 0 || last != n_got) idle = 0; else idle++;
        last = n_got;
      end
    end
    t_end = $time;
    repeat (50) @(negedge clk);
    check(n_got == total_bits, $sformatf("stream length %0d exp %0d", n_got, total_bits));
    check(n_mismatch == 0, $sformatf("%0d stream bits differ from the reference", n_mismatch));
    check(!overflow, "no input overflow");
    begin
      int dec[16], bad;
      mb_nz_t pic_d[$];
      bad = 0;
      for (int b = 0; b < NBLK; b++) begin
        int nz, mb;
        mb_nz_t e;
        if (b == PIC2 * 24) pic_d = {};
        mb = (b / 24) - ((b >= PIC2 * 24) ? PIC2 : 0);
        if (b % 24 == 0) begin e = '{default: 0}; pic_d.push_back(e); end
        if (!ref_decode(all_q, ref_nc(pic_d, MBW, mb % MBW, mb / MBW, b % 24), dec)) begin bad++; break; end
        nz = 0; foreach (dec[i]) if (dec[i] != 0) nz++;
        e = pic_d[mb]; e[b % 24] = nz; pic_d[mb] = e;
        foreach (dec[k]) if (dec[k] != int'(zz_blocks[b][k])) begin bad++; break; end
      end
      check(bad == 0, $sformatf("%0d blocks decoded wrongly", bad));
      check(all_q.size() == 0, "no bits left after the last block");
    end
    $display("frame 1024x768 4:2:0: %0d macroblocks, %0d bits, %0d clocks, peak FIFO fill %0d bits",
             NMB, total_bits, (t_end - t_start) / 10, peak_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
