// dram_nc -- double buffer ("dual RAM") that reorders quantized 4x4 blocks.
//
// Quantized coefficients arrive one per clock on coeff_in, in raster order
// (row by row) of each 4x4 block, qualified by coeff_valid_in. They are written
// into one of two 16-entry banks. When a bank is full it is handed to the read
// side, and the next block fills the other bank, so filling and coding overlap.
// The read side sends a full bank out in zig-zag order, one coefficient per
// clock on coeff_out with coeff_valid_out, as a burst of 16 that starts when the
// downstream encoder reports an empty capture buffer (enc_ready) and that pauses
// while halt is high.
//
// With every block the buffer gives
//   * tot_nz_coeff_out: the number of non-zero coefficients (counted while the
//     bank fills),
//   * coded_blk_out: the block's position in the 4:2:0 macroblock, 0..15 luma in
//     the H.264 coding order, 16..19 Cb, 20..23 Cr,
//   * nc_out: the coeff_token table context nC = (nA + nB + 1) >> 1 from the
//     non-zero counts of the left (nA) and upper (nB) blocks, or the one that is
//     available, or 0. Neighbours in the macroblock to the left and in the
//     macroblock above count too: the right column of the previous macroblock
//     and, per macroblock column, the bottom row of the row above are kept
//     (8 counts each: 4 luma, 2 Cb, 2 Cr; a line buffer of MAX_MB_W columns).
//     Blocks outside the picture are unavailable.
// These side outputs are stable from the first to the last coefficient of the
// burst. Blocks must arrive in the coding order above, 24 per macroblock, and
// macroblocks in raster order over a picture mb_width macroblocks wide
// (1..MAX_MB_W). pic_start, high with the first coefficient of a block, starts
// a new picture at macroblock (0, 0); reset does the same.
//
// Backpressure: coeff_ready_out is high while the bank being filled can take
// data. A coefficient offered while it is low is dropped and sets the sticky
// overflow flag. coeff_ready_out, overflow and enc_ready are additions of this
// design; the double buffer, the zig-zag read, the non-zero count and the
// outputs nc/tot_nz/coded_blk follow the block diagram. The picture width
// input, pic_start and the neighbour buffers are this design's means of giving
// the H.264 nC. Reset is asynchronous, active low.
module dram_nc
  import cavlc_pkg::*;
#(
  parameter int MAX_MB_W = 64   // widest picture in macroblocks (1024 pixels)
) (
  input  logic               clk,
  input  logic               reset_n,
  input  logic               halt,
  input  logic [$clog2(MAX_MB_W+1)-1:0] mb_width,  // picture width in macroblocks
  input  logic               pic_start,  // with the first coefficient of a picture
  input  logic [COEFF_W-1:0] coeff_in,
  input  logic               coeff_valid_in,
  output logic               coeff_ready_out,
  output logic               overflow,
  input  logic               enc_ready,
  output logic [COEFF_W-1:0] coeff_out,
  output logic               coeff_valid_out,
  output logic [4:0]         nc_out,
  output logic [4:0]         tot_nz_coeff_out,
  output logic [BLK_W-1:0]   coded_blk_out
);

  logic [COEFF_W-1:0] mem [2][NUM_COEFF];
  logic [1:0]         full;
  logic [4:0]         bank_nz  [2];
  logic [4:0]         bank_nc  [2];
  logic [BLK_W-1:0]   bank_blk [2];

  // write side
  logic             wb;        // bank being filled
  logic [3:0]       widx;
  logic [4:0]       wcount_nz;
  logic [BLK_W-1:0] blk_cnt;   // identity of the block being filled
  logic [4:0]       nz_tab [BLKS_PER_MB];
  logic [4:0]       nz_new;    // non-zero count of the block completing now
  logic [4:0]       nz_fin [BLKS_PER_MB];  // macroblock's counts including it

  // neighbour macroblocks: right column of the left one, bottom row of the
  // ones above (one entry per macroblock column). Entries 0..3 luma, 4..5 Cb,
  // 6..7 Cr, indexed by row (left) or column (above).
  localparam int MBW_W = $clog2(MAX_MB_W+1);
  logic [4:0]       left_nz  [8];
  logic [4:0]       above_nz [MAX_MB_W][8];
  logic [MBW_W-1:0] mb_x;      // macroblock column
  logic             mb_top;    // macroblock is in the first row of the picture
  logic             mb_last;   // block 23 of a macroblock completes now
  logic             wr_last;   // last coefficient of a block is written now
  logic             first_coeff;

  // read side
  logic       rb;
  logic       reading;
  logic [3:0] ridx;

  assign coeff_ready_out = !full[wb];

  // ---------------- nC of the block being filled ----------------
  logic [4:0] nc_fill;
  logic [1:0] nb_x, nb_y, nb_xm, nb_ym, nb_b;
  logic [4:0] nb_base, n_a, n_b;
  logic       av_a, av_b, nb_cr;
  logic [5:0] nb_sum;
  localparam int AB_W = (MAX_MB_W > 1) ? $clog2(MAX_MB_W) : 1;
  logic [AB_W-1:0]  ab_col;    // line-buffer column of this macroblock
  always_comb begin
    nb_x = '0; nb_y = '0; nb_xm = '0; nb_ym = '0; nb_b = '0; nb_base = '0; nb_cr = 1'b0;
    av_a = 1'b0; av_b = 1'b0; n_a = '0; n_b = '0;
    ab_col = AB_W'(mb_x);
    if (blk_cnt < 6'd16) begin
      // luma 4x4 block index -> column nb_x and row nb_y in the macroblock
      nb_x  = {blk_cnt[2], blk_cnt[0]};
      nb_y  = {blk_cnt[3], blk_cnt[1]};
      nb_xm = nb_x - 2'd1;
      nb_ym = nb_y - 2'd1;
      av_a  = (nb_x != 2'd0) || (mb_x != '0);
      av_b  = (nb_y != 2'd0) || !mb_top;
      n_a   = (nb_x != 2'd0) ? nz_tab[{1'b0, nb_y[1], nb_xm[1], nb_y[0], nb_xm[0]}]
                             : left_nz[3'(nb_y)];
      n_b   = (nb_y != 2'd0) ? nz_tab[{1'b0, nb_ym[1], nb_x[1], nb_ym[0], nb_x[0]}]
                             : above_nz[ab_col][3'(nb_x)];
    end else begin
      // chroma: 2x2 grid per component, Cb at 16..19, Cr at 20..23
      nb_cr   = (blk_cnt >= 6'd20);
      nb_base = nb_cr ? 5'd20 : 5'd16;
      nb_b    = 2'(blk_cnt - 6'(nb_base));
      av_a    = nb_b[0] || (mb_x != '0);
      av_b    = nb_b[1] || !mb_top;
      n_a     = nb_b[0] ? nz_tab[nb_base + 5'(nb_b) - 5'd1] : left_nz[{1'b1, nb_cr, nb_b[1]}];
      n_b     = nb_b[1] ? nz_tab[nb_base + 5'(nb_b) - 5'd2] : above_nz[ab_col][{1'b1, nb_cr, nb_b[0]}];
    end
    nb_sum = 6'(n_a) + 6'(n_b) + 6'd1;
    if (av_a && av_b)  nc_fill = 5'(nb_sum >> 1);
    else if (av_a)     nc_fill = n_a;
    else if (av_b)     nc_fill = n_b;
    else               nc_fill = 5'd0;
  end

  // counts of the macroblock, with the block that completes now
  assign nz_new = wcount_nz + 5'(coeff_in != '0);
  always_comb begin
    for (int i = 0; i < BLKS_PER_MB; i++) nz_fin[i] = nz_tab[i];
    nz_fin[5'(blk_cnt)] = nz_new;
  end

  assign mb_last     = wr_last && (blk_cnt == 6'(BLKS_PER_MB - 1));
  assign first_coeff = coeff_valid_in && !full[wb] && (widx == 4'd0);

  // edges kept for the next macroblocks (read only where available)
  always_ff @(posedge clk) begin
    if (mb_last) begin
      for (int r = 0; r < 4; r++) begin
        left_nz[3'(r)]      <= nz_fin[5'({r[1], 1'b1, r[0], 1'b1})];   // luma x=3, y=r
        above_nz[ab_col][3'(r)] <= nz_fin[5'({1'b1, r[1], 1'b1, r[0]})];  // luma y=3, x=r
      end
      for (int c = 0; c < 2; c++) begin
        for (int r = 0; r < 2; r++) begin
          left_nz[3'(4 + 2*c + r)]          <= nz_fin[5'(16 + 4*c + 2*r + 1)];  // chroma x=1, y=r
          above_nz[ab_col][3'(4 + 2*c + r)] <= nz_fin[5'(16 + 4*c + 2 + r)];    // chroma y=1, x=r
        end
      end
    end
  end

  // ---------------- write side ----------------
  assign wr_last = coeff_valid_in && !full[wb] && (widx == 4'd15);

  always_ff @(posedge clk) begin
    if (coeff_valid_in && !full[wb]) mem[wb][widx] <= coeff_in;
  end

  logic rd_done;  // read side releases bank rb this cycle

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      wb        <= 1'b0;
      widx      <= '0;
      wcount_nz <= '0;
      blk_cnt   <= '0;
      mb_x      <= '0;
      mb_top    <= 1'b1;
      full      <= '0;
      overflow  <= 1'b0;
      for (int i = 0; i < BLKS_PER_MB; i++) nz_tab[i] <= '0;
      for (int i = 0; i < 2; i++) begin
        bank_nz[i]  <= '0;
        bank_nc[i]  <= '0;
        bank_blk[i] <= '0;
      end
    end else begin
      if (coeff_valid_in && full[wb]) overflow <= 1'b1;
      if (coeff_valid_in && !full[wb]) begin
        widx <= widx + 4'd1;
        if (wr_last) begin
          bank_nz[wb]     <= nz_new;
          bank_nc[wb]     <= nc_fill;
          bank_blk[wb]    <= blk_cnt;
          nz_tab[5'(blk_cnt)] <= nz_new;
          wcount_nz       <= '0;
          blk_cnt         <= (blk_cnt == 6'(BLKS_PER_MB - 1)) ? '0 : blk_cnt + 6'd1;
          wb              <= !wb;
          if (mb_last) begin
            // next macroblock in raster order
            if (mb_x + MBW_W'(1) >= mb_width) begin
              mb_x   <= '0;
              mb_top <= 1'b0;
            end else begin
              mb_x <= mb_x + MBW_W'(1);
            end
          end
        end else begin
          wcount_nz <= wcount_nz + 5'(coeff_in != '0);
        end
        if (first_coeff && pic_start) begin
          // a new picture starts with this block
          blk_cnt <= '0;
          mb_x    <= '0;
          mb_top  <= 1'b1;
        end
      end
      // bank status: set by the write side, cleared by the read side
      for (int i = 0; i < 2; i++) begin
        if (wr_last && wb == 1'(i))       full[i] <= 1'b1;
        else if (rd_done && rb == 1'(i))  full[i] <= 1'b0;
      end
    end
  end

  // ---------------- read side (zig-zag) ----------------
  logic rd_start, rd_step;
  assign rd_start = !reading && full[rb] && enc_ready && !halt;
  assign rd_step  = rd_start || (reading && !halt);
  assign rd_done  = reading && !halt && (ridx == 4'd15);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      rb               <= 1'b0;
      reading          <= 1'b0;
      ridx             <= '0;
      coeff_out        <= '0;
      coeff_valid_out  <= 1'b0;
      nc_out           <= '0;
      tot_nz_coeff_out <= '0;
      coded_blk_out    <= '0;
    end else begin
      coeff_valid_out <= rd_step;
      if (rd_step) begin
        coeff_out <= mem[rb][ZIGZAG[ridx]];
        ridx      <= ridx + 4'd1;
      end
      if (rd_start) begin
        reading          <= 1'b1;
        nc_out           <= bank_nc[rb];
        tot_nz_coeff_out <= bank_nz[rb];
        coded_blk_out    <= bank_blk[rb];
      end
      if (rd_done) begin
        // last coefficient of the burst goes out now; ridx wraps to 0
        reading <= 1'b0;
        rb      <= !rb;
      end
    end
  end

endmodule
