// tb_dram_nc -- self-checking testbench of dram_nc.
//
// Writes random 4x4 blocks in raster order, with gaps: a picture of 2x2
// macroblocks and then, after pic_start, the first row of a second one. A
// consumer model raises enc_ready at random and halt pauses the read side.
// Each burst is checked against the zig-zag order written out as (row, column)
// pairs, its non-zero count, its block number and its nC from the reference
// neighbour rule (left and upper blocks, also across macroblock edges).
// Finally both banks are filled while the consumer refuses, and the overflow
// flag and coeff_ready_out are checked.
module tb_dram_nc;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int MBW  = 2;          // picture width in macroblocks
  localparam int PIC2 = 4;          // macroblock at which a second picture starts
  localparam int NBLK = 6 * 24;

  logic clk = 0, reset_n = 0, halt = 0;
  logic [6:0] mb_width = 7'(MBW);
  logic pic_start = 0;
  logic [COEFF_W-1:0] coeff_in = '0;
  logic coeff_valid_in = 0;
  logic coeff_ready_out, overflow;
  logic enc_ready = 0;
  logic [COEFF_W-1:0] coeff_out;
  logic coeff_valid_out;
  logic [4:0] nc_out, tot_nz_coeff_out;
  logic [BLK_W-1:0] coded_blk_out;

  dram_nc dut (.*);   // default MAX_MB_W
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // zig-zag scan as (row, column)
  int zz_r[16] = '{0,0,1,2,1,0,0,1,2,3,3,2,1,2,3,3};
  int zz_c[16] = '{0,1,0,0,1,2,3,2,1,0,1,2,3,3,2,3};

  int blocks[NBLK][16];   // raster order
  mb_nz_t pic[$];
  int exp_nc[NBLK];
  int n_rd = 0, n_halted_burst = 0;
  bit accept = 0;         // consumer is taking a burst
  bit stop_consumer = 0;

  // consumer: enc_ready when idle; takes 16 coefficients then is busy a while
  initial begin
    forever begin
      @(posedge clk);
      if (stop_consumer) begin enc_ready <= 0; continue; end
      if (!accept) begin
        enc_ready <= ($urandom_range(3) == 0);
      end
    end
  end

  // check bursts (sampled on the falling edge)
  initial begin
    int k;
    forever begin
      @(negedge clk);
      if (coeff_valid_out) begin
        int b, exp_nz;
        b = n_rd;
        accept = 1; enc_ready <= 0;
        k = 0;
        while (k < 16) begin
          if (coeff_valid_out) begin
            check(coeff_out == COEFF_W'(blocks[b][zz_r[k]*4 + zz_c[k]]),
                  $sformatf("block %0d scan %0d: %0d", b, k, $signed(coeff_out)));
            k++;
            if (k == 16) break;
          end else n_halted_burst++;
          @(negedge clk);
        end
        exp_nz = 0;
        foreach (blocks[b][i]) if (blocks[b][i] != 0) exp_nz++;
        check(tot_nz_coeff_out == 5'(exp_nz), $sformatf("block %0d nz %0d exp %0d", b, tot_nz_coeff_out, exp_nz));
        check(coded_blk_out == BLK_W'(b % 24), $sformatf("block %0d id %0d", b, coded_blk_out));
        check(nc_out == 5'(exp_nc[b]), $sformatf("block %0d nC %0d exp %0d", b, nc_out, exp_nc[b]));
        n_rd++;
        repeat ($urandom_range(3)) @(negedge clk);
        accept = 0;
      end
    end
  end

  always @(posedge clk) halt <= ($urandom_range(99) < 8);

  initial begin
    int kind;
    for (int b = 0; b < NBLK; b++) begin
      int zz[16], nz, mb;
      mb_nz_t e;
      kind = (b % 7 == 3) ? 0 : (b % 5 == 1) ? 2 : 1;
      rand_block(zz, kind);
      for (int i = 0; i < 16; i++) blocks[b][i] = zz[i];
      nz = 0;
      foreach (zz[i]) if (zz[i] != 0) nz++;
      if (b == PIC2 * 24) pic = {};
      mb = (b / 24) - ((b >= PIC2 * 24) ? PIC2 : 0);
      if (b % 24 == 0) begin e = '{default: 0}; pic.push_back(e); end
      exp_nc[b] = ref_nc(pic, MBW, mb % MBW, mb / MBW, b % 24);
      e = pic[mb]; e[b % 24] = nz; pic[mb] = e;
    end
    repeat (3) @(negedge clk);
    reset_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 16; i++) begin
        while (!coeff_ready_out) begin coeff_valid_in <= 0; @(negedge clk); end
        coeff_in <= COEFF_W'(blocks[b][i]);
        coeff_valid_in <= 1;
        pic_start <= (i == 0) && (b == 0 || b == PIC2 * 24);
        @(negedge clk);
        if ($urandom_range(9) == 0) begin coeff_valid_in <= 0; @(negedge clk); end
      end
    end
    coeff_valid_in <= 0;
    wait (n_rd == NBLK);
    check(!overflow, "no overflow in normal operation");
    check(n_halted_burst > 0, "halt paused a burst");
    // fill both banks with the consumer stopped, then offer one more
    stop_consumer = 1;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 32; i++) begin
      coeff_in <= COEFF_W'(i + 1); coeff_valid_in <= 1; @(negedge clk);
    end
    coeff_valid_in <= 0;
    @(negedge clk);
    check(!coeff_ready_out, "ready low with both banks full");
    check(!overflow, "no overflow before the extra write");
    coeff_valid_in <= 1; @(negedge clk); coeff_valid_in <= 0; @(negedge clk);
    check(overflow, "overflow flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
