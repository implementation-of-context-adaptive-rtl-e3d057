// cavlc_top -- CAVLC processor of an H.264 baseline video encoder.
//
// Quantized 4x4 coefficient blocks from the transform/quantization stage enter
// on coeff_in (raster order inside each block, 24 blocks per 4:2:0 macroblock
// in coding order: 16 luma, 4 Cb, 4 Cr; macroblocks in raster order over a
// picture mb_width macroblocks wide, at most MAX_MB_W; pic_start marks the
// first coefficient of a picture) and leave as the CAVLC bit stream on a
// serial channel. The chain follows the processor's block diagram:
//   dram_nc          double buffer, zig-zag reordering, non-zero count, nC
//   cavlc_encoder    coeff_token, T1 signs, levels, total_zeros, run_before
//   store_coded_blk  syntax elements -> parallel words code_out[20:0]
//   p2s              parallel to serial, one bit per clock
//   bit_fifo         128 Kbit FIFO in front of the serial channel
// Every stage has flow control, so a full FIFO stalls the serializer, which
// stalls the encoder, which stops dram_nc from reading, which finally drops
// coeff_ready_out to the quantizer. halt (for a future rate control) freezes
// dram_nc's read side and the encoder.
// Interface: the serial channel pulls bits with bs_rd_en and gets them on
// bs_out one clock later with bs_out_valid. coded_blk_out names the block
// (0..23 in the macroblock) whose syntax elements the encoder is issuing.
// code_out/code_valid_out show the parallel words ({length, right-aligned
// code}) as they are handed to the serializer. mb_width, pic_start,
// coeff_ready_out and overflow (a coefficient offered while not ready was
// dropped) are this design's additions to the diagram's ports.
// Reset is asynchronous, active low.
module cavlc_top
  import cavlc_pkg::*;
#(
  parameter int FIFO_DEPTH = 131072,
  parameter int MAX_MB_W   = 64      // widest picture in macroblocks (1024 pixels)
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
  output logic [BLK_W-1:0]   coded_blk_out,
  output logic [20:0]        code_out,
  output logic               code_valid_out,
  input  logic               bs_rd_en,
  output logic               bs_out,
  output logic               bs_out_valid,
  output logic               fifo_empty,
  output logic               fifo_full,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level
);

  // dram_nc -> encoder
  logic [COEFF_W-1:0] coeff_out_dram_nc;
  logic               coeff_val_out_dram_nc;
  logic [4:0]         nc_out_dram_nc;
  logic [4:0]         tot_nz_coeff_dram_nc;
  logic [BLK_W-1:0]   coded_blk_out_dram_nc;
  logic               enc_ready;

  // encoder -> store_coded_blk
  logic [1:0]  no_of_T1s;
  logic [2:0]  T1s_sign;
  logic [15:0] coeff_token;
  logic [4:0]  coeff_token_len;
  logic        coeff_token_T1_valid;
  logic [3:0]  no_of_prefix_bits, no_of_suffix_bits;
  logic [12:0] level_suffix;
  logic        level_data_valid;
  logic [8:0]  tot_zeros_code;
  logic [3:0]  tot_zeros_len;
  logic        tot_zeros_code_valid;
  logic [10:0] zero_runs_code;
  logic [3:0]  zero_runs_len;
  logic        zero_runs_code_valid;
  logic        elem_ready;

  // store_coded_blk -> p2s -> FIFO
  logic code_ready;
  logic ser_bit, ser_valid, ser_ready;

  dram_nc #(.MAX_MB_W(MAX_MB_W)) u_dram_nc (
    .clk, .reset_n, .halt, .mb_width, .pic_start,
    .coeff_in, .coeff_valid_in, .coeff_ready_out, .overflow,
    .enc_ready,
    .coeff_out        (coeff_out_dram_nc),
    .coeff_valid_out  (coeff_val_out_dram_nc),
    .nc_out           (nc_out_dram_nc),
    .tot_nz_coeff_out (tot_nz_coeff_dram_nc),
    .coded_blk_out    (coded_blk_out_dram_nc)
  );

  cavlc_encoder u_encoder (
    .clk, .reset_n, .halt,
    .coeff_in       (coeff_out_dram_nc),
    .coeff_valid_in (coeff_val_out_dram_nc),
    .nc_in          (nc_out_dram_nc),
    .tot_nz_in      (tot_nz_coeff_dram_nc),
    .blk_in         (coded_blk_out_dram_nc),
    .enc_ready,
    .out_ready      (elem_ready),
    .blk_out        (coded_blk_out),
    .no_of_T1s, .T1s_sign, .coeff_token, .coeff_token_len, .coeff_token_T1_valid,
    .no_of_prefix_bits, .no_of_suffix_bits, .level_suffix, .level_data_valid,
    .tot_zeros_code, .tot_zeros_len, .tot_zeros_code_valid,
    .zero_runs_code, .zero_runs_len, .zero_runs_code_valid
  );

  store_coded_blk u_store (
    .clk, .reset_n,
    .no_of_T1s, .T1s_sign, .coeff_token, .coeff_token_len, .coeff_token_T1_valid,
    .no_of_prefix_bits, .no_of_suffix_bits, .level_suffix, .level_data_valid,
    .tot_zeros_code, .tot_zeros_len, .tot_zeros_code_valid,
    .zero_runs_code, .zero_runs_len, .zero_runs_code_valid,
    .elem_ready,
    .code_out, .code_valid_out, .code_ready
  );

  p2s u_p2s (
    .clk, .reset_n,
    .word_in    (code_out),
    .word_valid (code_valid_out),
    .word_ready (code_ready),
    .ser_out    (ser_bit),
    .ser_valid,
    .ser_ready
  );

  bit_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(1)) u_fifo (
    .clk, .reset_n,
    .wr_en      (ser_valid),
    .din        (ser_bit),
    .full       (fifo_full),
    .rd_en      (bs_rd_en),
    .dout       (bs_out),
    .dout_valid (bs_out_valid),
    .empty      (fifo_empty),
    .level      (fifo_level)
  );

  assign ser_ready = !fifo_full;

endmodule
