// tb_cavlc_picture_qp -- a 512x512 4:2:0 picture coded at four quantizer
// settings, one picture after the other, through the CAVLC processor at its
// default sizes.
//
// The picture is generated here: a luma plane with gradients, a bright disc,
// a stripe pattern and a little noise, and two smooth chroma planes. Each 4x4
// block, level shifted by 128, goes through a behavioural model of the stage in
// front of the processor: the H.264 4x4 forward integer transform
//   W = Cf X Cf^T,  Cf = [1 1 1 1; 2 1 -1 -2; 1 -1 -1 1; 1 -2 2 -1]
// and the H.264 quantizer |Z| = (|W| * MF + 2^qbits / 3) >> qbits with
// qbits = 15 + QP / 6 and MF = 8192, 3355 or 5243 (QP mod 6 = 4, for the
// three coefficient position classes). QP is 16, 22, 28 and 34 (Qstep 4, 8,
// 16 and 32). There is no prediction: every block is coded on its own.
//
// The four pictures go in back to back, 32 macroblocks wide (mb_width = 32),
// with pic_start on the first coefficient of each, so nC restarts at the top
// of each picture. The serial channel reads two bits in three clocks. Every bit
// is compared on the fly with the reference encoder's stream, and the whole
// stream is decoded back into coefficients at the end. For each QP the number
// of bits and the compression (8-bit samples in, bits out) are reported.
module tb_cavlc_picture_qp;
  import cavlc_pkg::*;
  import cavlc_ref_pkg::*;

  localparam int W    = 512;             // luma width and height in pixels
  localparam int MBW  = W / 16;          // picture width in macroblocks
  localparam int NMB  = MBW * MBW;       // macroblocks per picture
  localparam int NPIC = 4;
  localparam int NBLK = NPIC * NMB * BLKS_PER_MB;
  localparam int QP [NPIC] = '{16, 22, 28, 34};

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

  byte unsigned y_pl [W][W];
  byte unsigned cb_pl [W/2][W/2];
  byte unsigned cr_pl [W/2][W/2];

  bitq_t exp_q, all_q;
  int    n_mismatch = 0, n_got = 0, n_fifo_full = 0;
  shortint zz_blocks [NBLK][16];

  always @(negedge clk) begin
    bs_rd_en <= ($urandom_range(2) != 0);
    if (reset_n && bs_out_valid) begin
      if (exp_q.size() == 0 || exp_q.pop_front() != bs_out) n_mismatch++;
      all_q.push_back(bs_out);
      n_got++;
    end
    if (fifo_full) n_fifo_full++;
  end

  function automatic int clip8(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  // transform and quantize one 4x4 block of samples; result in zig-zag order
  function automatic void tq(input int x[4][4], input int qp, output int zz[16]);
    int cf[4][4] = '{'{1, 1, 1, 1}, '{2, 1, -1, -2}, '{1, -1, -1, 1}, '{1, -2, 2, -1}};
    int t[4][4], w[4][4], z[4][4], mf, qbits, a;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 4; k++) t[i][j] += cf[i][k] * x[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        w[i][j] = 0;
        for (int k = 0; k < 4; k++) w[i][j] += t[i][k] * cf[j][k];
      end
    qbits = 15 + qp / 6;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        mf = (i % 2 == 0 && j % 2 == 0) ? 8192 : (i % 2 == 1 && j % 2 == 1) ? 3355 : 5243;
        a  = (w[i][j] < 0) ? -w[i][j] : w[i][j];
        a  = int'((longint'(a) * mf + (longint'(1) << qbits) / 3) >>> qbits);
        z[i][j] = (w[i][j] < 0) ? -a : a;
      end
    for (int k = 0; k < 16; k++) zz[k] = z[ZIGZAG[k] / 4][ZIGZAG[k] % 4];
  endfunction

  // block blk (0..23) of macroblock (mbx, mby), level shifted samples
  function automatic void fetch(input int mbx, input int mby, input int blk, output int x[4][4]);
    int px, py;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) begin
        if (blk < 16) begin
          px = mbx * 16 + 4 * (2 * ((blk >> 2) & 1) + (blk & 1)) + c;
          py = mby * 16 + 4 * (2 * ((blk >> 3) & 1) + ((blk >> 1) & 1)) + r;
          x[r][c] = int'(y_pl[py][px]) - 128;
        end else begin
          px = mbx * 8 + 4 * ((blk - 16) % 2) + c;
          py = mby * 8 + 4 * (((blk - 16) / 2) % 2) + r;
          x[r][c] = ((blk < 20) ? int'(cb_pl[py][px]) : int'(cr_pl[py][px])) - 128;
        end
      end
  endfunction

  initial begin
    int raster[16], bits_pic[NPIC], b;
    longint t_start, t_end;
    mb_nz_t pic_e[$];
    // the picture
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = 90 + x / 5 - y / 9 + int'($urandom_range(6)) - 3;
        if ((x - 300) * (x - 300) + (y - 220) * (y - 220) < 120 * 120) v += 70;
        if (y > 380 && ((x / 6) % 2 == 0)) v += 40;
        y_pl[y][x] = byte'(clip8(v));
      end
    for (int y = 0; y < W / 2; y++)
      for (int x = 0; x < W / 2; x++) begin
        cb_pl[y][x] = byte'(clip8(110 + x / 8 + int'($urandom_range(2)) - 1));
        cr_pl[y][x] = byte'(clip8(150 - y / 6));
      end
    repeat (3) @(negedge clk);
    reset_n = 1;
    t_start = $time;
    b = 0;
    for (int p = 0; p < NPIC; p++) begin
      bits_pic[p] = 0;
      pic_e = {};
      for (int mb = 0; mb < NMB; mb++) begin
        mb_nz_t e;
        e = '{default: 0};
        pic_e.push_back(e);
        for (int blk = 0; blk < BLKS_PER_MB; blk++) begin
          int x[4][4], c[16], nz;
          bitq_t q;
          fetch(mb % MBW, mb / MBW, blk, x);
          tq(x, QP[p], c);
          foreach (c[k]) zz_blocks[b][k] = shortint'(c[k]);
          nz = 0; foreach (c[k]) if (c[k] != 0) nz++;
          q = ref_encode(c, ref_nc(pic_e, MBW, mb % MBW, mb / MBW, blk));
          e = pic_e[mb]; e[blk] = nz; pic_e[mb] = e;
          foreach (q[i]) exp_q.push_back(q[i]);
          bits_pic[p] += q.size();
          for (int k = 0; k < 16; k++) raster[ZIGZAG[k]] = c[k];
          for (int i = 0; i < 16; i++) begin
            @(negedge clk); #1;
            while (!coeff_ready_out) begin coeff_valid_in = 0; @(negedge clk); #1; end
            coeff_in = COEFF_W'(raster[i]);
            coeff_valid_in = 1;
            pic_start = (i == 0) && (mb == 0) && (blk == 0);
          end
          b++;
        end
      end
    end
    @(negedge clk); coeff_valid_in = 0; pic_start = 0;
    begin
      // wait for the stream, or give up after a long time without progress
      int idle, last, total;
      total = 0; foreach (bits_pic[p]) total += bits_pic[p];
      idle = 0; last = -1;
      while ((n_got < total) && idle < 20000) begin
        @(negedge clk);
        if (fifo_level != 0 || last != n_got) idle = 0; else idle++;
        last = n_got;
      end
      t_end = $time;
      repeat (50) @(negedge clk);
      check(n_got == total, $sformatf("stream length %0d exp %0d", n_got, total));
    end
    check(n_mismatch == 0, $sformatf("%0d stream bits differ from the reference", n_mismatch));
    check(!overflow, "no input overflow");
    begin
      int dec[16], bad;
      mb_nz_t pic_d[$];
      bad = 0; b = 0;
      for (int p = 0; p < NPIC; p++) begin
        pic_d = {};
        for (int mb = 0; mb < NMB; mb++) begin
          mb_nz_t e;
          e = '{default: 0};
          pic_d.push_back(e);
          for (int blk = 0; blk < BLKS_PER_MB; blk++) begin
            int nz;
            if (!ref_decode(all_q, ref_nc(pic_d, MBW, mb % MBW, mb / MBW, blk), dec)) bad++;
            nz = 0; foreach (dec[k]) if (dec[k] != 0) nz++;
            e = pic_d[mb]; e[blk] = nz; pic_d[mb] = e;
            foreach (dec[k]) if (dec[k] != int'(zz_blocks[b][k])) begin bad++; break; end
            b++;
          end
        end
      end
      check(bad == 0, $sformatf("%0d blocks decoded wrongly", bad));
      check(all_q.size() == 0, "no bits left after the last block");
    end
    check(n_fifo_full > 0, "the FIFO filled at least once");
    for (int p = 0; p < NPIC; p++)
      $display("QP %0d: %0d bits, compression %0.2f", QP[p], bits_pic[p],
               real'(W * W * 3 / 2 * 8) / real'(bits_pic[p]));
    $display("%0d pictures of %0d macroblocks in %0d clocks, FIFO full for %0d clocks",
             NPIC, NMB, (t_end - t_start) / 10, n_fifo_full);
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
