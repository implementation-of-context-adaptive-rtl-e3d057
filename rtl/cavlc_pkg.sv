// cavlc_pkg -- types, sizes and code tables shared by the CAVLC encoder blocks.
//
// The CAVLC processor codes 4x4 blocks of quantized residual coefficients with
// the context adaptive variable length codes of H.264 (baseline entropy coding).
// This package holds:
//   * the coefficient and block-index widths (12-bit coefficients and a 6-bit
//     block identity, as on the block diagram of the processor),
//   * the 4x4 zig-zag (frame) scan,
//   * the three variable length coeff_token tables (0<=nC<2, 2<=nC<4, 4<=nC<8);
//     the nC>=8 table is the 6-bit fixed length code computed in coeff_token_vlc,
//   * the total_zeros tables for 4x4 blocks (TotalCoeff 1..15),
//   * the run_before tables (zerosLeft 1..6 and >6).
// The tables are those of the H.264 standard; each is indexed as noted and
// holds the code length and the code value (right-aligned, sent MSB first).
// The parallel code word issued by the processor, code_out[20:0], is a
// 5-bit length followed by a 16-bit right-aligned code (code_word_t); that split
// of the 21 bits is this design's own choice.
package cavlc_pkg;

  localparam int COEFF_W   = 12;   // quantized coefficient width, coeff_in[11:0]
  localparam int NUM_COEFF = 16;   // coefficients of a 4x4 block
  localparam int BLK_W     = 6;    // coded block identity, coded_blk_out[5:0]
  localparam int BLKS_PER_MB = 24; // 16 luma + 4 Cb + 4 Cr 4x4 blocks (4:2:0)
  localparam int CODE_BITS = 16;   // payload of one parallel code word
  localparam int LEN_W     = 5;    // length field of one parallel code word

  typedef logic signed [COEFF_W-1:0] coeff_t;

  // One parallel code word: 'len' bits, right-aligned in 'bits', MSB first.
  typedef struct packed {
    logic [LEN_W-1:0]     len;
    logic [CODE_BITS-1:0] bits;
  } code_word_t;

  // Zig-zag scan: ZIGZAG[k] is the raster position (row*4+col) of scan index k.
  localparam logic [3:0] ZIGZAG [NUM_COEFF] =
    '{4'd0, 4'd1, 4'd4, 4'd8, 4'd5, 4'd2, 4'd3, 4'd6,
      4'd9, 4'd12, 4'd13, 4'd10, 4'd7, 4'd11, 4'd14, 4'd15};

  // coeff_token tables, index TotalCoeff*4 + TrailingOnes, table 0..2.
  localparam logic [4:0] CT_LEN [3][68] = '{
    '{ 1, 0, 0, 0,  6, 2, 0, 0,  8, 6, 3, 0,  9, 8, 7, 5, 10, 9, 8, 6,
      11,10, 9, 7, 13,11,10, 8, 13,13,11, 9, 13,13,13,10, 14,14,13,11,
      14,14,14,13, 15,15,14,14, 15,15,15,14, 16,15,15,15, 16,16,16,15,
      16,16,16,16, 16,16,16,16},
    '{ 2, 0, 0, 0,  6, 2, 0, 0,  6, 5, 3, 0,  7, 6, 6, 4,  8, 6, 6, 4,
       8, 7, 7, 5,  9, 8, 8, 6, 11, 9, 9, 6, 11,11,11, 7, 12,11,11, 9,
      12,12,12,11, 12,12,12,11, 13,13,13,12, 13,13,13,13, 13,14,13,13,
      14,14,14,13, 14,14,14,14},
    '{ 4, 0, 0, 0,  6, 4, 0, 0,  6, 5, 4, 0,  6, 5, 5, 4,  7, 5, 5, 4,
       7, 5, 5, 4,  7, 6, 6, 4,  7, 6, 6, 4,  8, 7, 7, 5,  8, 8, 7, 6,
       9, 8, 8, 7,  9, 9, 8, 8,  9, 9, 9, 8, 10, 9, 9, 9, 10,10,10,10,
      10,10,10,10, 10,10,10,10}
  };
  localparam logic [3:0] CT_BITS [3][68] = '{
    '{ 1, 0, 0, 0,  5, 1, 0, 0,  7, 4, 1, 0,  7, 6, 5, 3,  7, 6, 5, 3,
       7, 6, 5, 4, 15, 6, 5, 4, 11,14, 5, 4,  8,10,13, 4, 15,14, 9, 4,
      11,10,13,12, 15,14, 9,12, 11,10,13, 8, 15, 1, 9,12, 11,14,13, 8,
       7,10, 9,12,  4, 6, 5, 8},
    '{ 3, 0, 0, 0, 11, 2, 0, 0,  7, 7, 3, 0,  7,10, 9, 5,  7, 6, 5, 4,
       4, 6, 5, 6,  7, 6, 5, 8, 15, 6, 5, 4, 11,14,13, 4, 15,10, 9, 4,
      11,14,13,12,  8,10, 9, 8, 15,14,13,12, 11,10, 9,12,  7,11, 6, 8,
       9, 8,10, 1,  7, 6, 5, 4},
    '{15, 0, 0, 0, 15,14, 0, 0, 11,15,13, 0,  8,12,14,12, 15,10,11,11,
      11, 8, 9,10,  9,14,13, 9,  8,10, 9, 8, 15,14,13,13, 11,14,10,12,
      15,10,13,12, 11,14, 9,12,  8,10,13, 8, 13, 7, 9,12,  9,12,11,10,
       5, 8, 7, 6,  1, 4, 3, 2}
  };

  // total_zeros tables for 4x4 blocks: [TotalCoeff-1][total_zeros].
  localparam logic [3:0] TZ_LEN [15][16] = '{
    '{1,3,3,4,4,5,5,6,6,7,7,8,8,9,9,9},
    '{3,3,3,3,3,4,4,4,4,5,5,6,6,6,6,0},
    '{4,3,3,3,4,4,3,3,4,5,5,6,5,6,0,0},
    '{5,3,4,4,3,3,3,4,3,4,5,5,5,0,0,0},
    '{4,4,4,3,3,3,3,3,4,5,4,5,0,0,0,0},
    '{6,5,3,3,3,3,3,3,4,3,6,0,0,0,0,0},
    '{6,5,3,3,3,2,3,4,3,6,0,0,0,0,0,0},
    '{6,4,5,3,2,2,3,3,6,0,0,0,0,0,0,0},
    '{6,6,4,2,2,3,2,5,0,0,0,0,0,0,0,0},
    '{5,5,3,2,2,2,4,0,0,0,0,0,0,0,0,0},
    '{4,4,3,3,1,3,0,0,0,0,0,0,0,0,0,0},
    '{4,4,2,1,3,0,0,0,0,0,0,0,0,0,0,0},
    '{3,3,1,2,0,0,0,0,0,0,0,0,0,0,0,0},
    '{2,2,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{1,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0}
  };
  localparam logic [2:0] TZ_BITS [15][16] = '{
    '{1,3,2,3,2,3,2,3,2,3,2,3,2,3,2,1},
    '{7,6,5,4,3,5,4,3,2,3,2,3,2,1,0,0},
    '{5,7,6,5,4,3,4,3,2,3,2,1,1,0,0,0},
    '{3,7,5,4,6,5,4,3,3,2,2,1,0,0,0,0},
    '{5,4,3,7,6,5,4,3,2,1,1,0,0,0,0,0},
    '{1,1,7,6,5,4,3,2,1,1,0,0,0,0,0,0},
    '{1,1,5,4,3,3,2,1,1,0,0,0,0,0,0,0},
    '{1,1,1,3,3,2,2,1,0,0,0,0,0,0,0,0},
    '{1,0,1,3,2,1,1,1,0,0,0,0,0,0,0,0},
    '{1,0,1,3,2,1,1,0,0,0,0,0,0,0,0,0},
    '{0,1,1,2,1,3,0,0,0,0,0,0,0,0,0,0},
    '{0,1,1,1,1,0,0,0,0,0,0,0,0,0,0,0},
    '{0,1,1,1,0,0,0,0,0,0,0,0,0,0,0,0},
    '{0,1,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0}
  };

  // run_before tables: [min(zerosLeft,7)-1][run_before].
  localparam logic [3:0] RB_LEN [7][15] = '{
    '{1,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{1,2,2,0,0,0,0,0,0,0,0,0,0,0,0},
    '{2,2,2,2,0,0,0,0,0,0,0,0,0,0,0},
    '{2,2,2,3,3,0,0,0,0,0,0,0,0,0,0},
    '{2,2,3,3,3,3,0,0,0,0,0,0,0,0,0},
    '{2,3,3,3,3,3,3,0,0,0,0,0,0,0,0},
    '{3,3,3,3,3,3,3,4,5,6,7,8,9,10,11}
  };
  localparam logic [2:0] RB_BITS [7][15] = '{
    '{1,0,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{1,1,0,0,0,0,0,0,0,0,0,0,0,0,0},
    '{3,2,1,0,0,0,0,0,0,0,0,0,0,0,0},
    '{3,2,1,1,0,0,0,0,0,0,0,0,0,0,0},
    '{3,2,3,2,1,0,0,0,0,0,0,0,0,0,0},
    '{3,0,1,3,2,5,4,0,0,0,0,0,0,0,0},
    '{7,6,5,4,3,2,1,1,1,1,1,1,1,1,1}
  };

  // Table selection from the context nC (Num-VLC0..2, then fixed length).
  function automatic logic [1:0] nc_table(input logic [4:0] nc);
    if (nc < 5'd2)      return 2'd0;
    else if (nc < 5'd4) return 2'd1;
    else if (nc < 5'd8) return 2'd2;
    else                return 2'd3;
  endfunction

  // coeff_token code for (TotalCoeff, TrailingOnes) in context nC.
  function automatic code_word_t coeff_token_vlc(input logic [4:0] nc,
                                                 input logic [4:0] tc,
                                                 input logic [1:0] t1);
    code_word_t w;
    logic [1:0] tab;
    logic [6:0] idx;
    tab = nc_table(nc);
    idx = {tc, t1};
    w = '0;
    if (tab == 2'd3) begin
      // 6-bit fixed length code: TotalCoeff-1 and TrailingOnes, 000011 for none
      w.len = 5'd6;
      if (tc == 5'd0) w.bits = 16'd3;
      else            w.bits = 16'({tc[3:0] - 4'd1, t1});
    end else begin
      w.len  = CT_LEN[tab][idx];
      w.bits = 16'(CT_BITS[tab][idx]);
    end
    return w;
  endfunction

  // total_zeros code of a 4x4 block with TotalCoeff tc (1..15).
  function automatic code_word_t total_zeros_vlc(input logic [4:0] tc,
                                                 input logic [3:0] tz);
    code_word_t w;
    w.len  = 5'(TZ_LEN[4'(tc - 5'd1)][tz]);
    w.bits = 16'(TZ_BITS[4'(tc - 5'd1)][tz]);
    return w;
  endfunction

  // run_before code with zerosLeft zl (>=1) and run rb.
  function automatic code_word_t run_before_vlc(input logic [3:0] zl,
                                                input logic [3:0] rb);
    code_word_t w;
    logic [2:0] row;
    row = (zl > 4'd7) ? 3'd6 : 3'(zl - 4'd1);
    w.len  = 5'(RB_LEN[row][rb]);
    w.bits = 16'(RB_BITS[row][rb]);
    return w;
  endfunction

endpackage
