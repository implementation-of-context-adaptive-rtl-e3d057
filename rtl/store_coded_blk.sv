// store_coded_blk -- turns the coded syntax elements of a block into parallel
// code words.
//
// The CAVLC encoder offers one syntax element at a time (coeff_token with the
// trailing-one signs, a level, total_zeros or a run_before), each with its own
// valid. This block stores the element as one or two code words and issues
// them in order on code_out[20:0] = {length[4:0], code[15:0]}: the code is
// right-aligned and its 'length' bits are sent MSB first.
//   * coeff_token and the T1 signs form one word when together they fit in 16
//     bits, else two (the token, then the signs).
//   * a level is its prefix zeros followed by level_suffix; when the whole
//     code exceeds 16 bits (escape codes of up to 28 bits) the prefix zeros go
//     in a word of their own.
//   * total_zeros and run_before are one word each.
// Handshakes: elem_ready tells the encoder an element can be taken this clock;
// a word is passed on when code_valid_out and code_ready are both high.
// Two words of storage are enough: a new element is taken when the store is
// empty or its last word leaves in the same clock. The 21-bit word layout and
// the splitting rule are this design's choices; the block's name, its role and
// the width of code_out follow the processor's block diagram. Reset is
// asynchronous, active low.
module store_coded_blk
  import cavlc_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  // from the CAVLC encoder
  input  logic [1:0]  no_of_T1s,
  input  logic [2:0]  T1s_sign,
  input  logic [15:0] coeff_token,
  input  logic [4:0]  coeff_token_len,
  input  logic        coeff_token_T1_valid,
  input  logic [3:0]  no_of_prefix_bits,
  input  logic [3:0]  no_of_suffix_bits,
  input  logic [12:0] level_suffix,
  input  logic        level_data_valid,
  input  logic [8:0]  tot_zeros_code,
  input  logic [3:0]  tot_zeros_len,
  input  logic        tot_zeros_code_valid,
  input  logic [10:0] zero_runs_code,
  input  logic [3:0]  zero_runs_len,
  input  logic        zero_runs_code_valid,
  output logic        elem_ready,
  // parallel code words
  output logic [20:0] code_out,
  output logic        code_valid_out,
  input  logic        code_ready
);

  code_word_t w0, w1;     // w0 is on the output, w1 waits behind it
  logic [1:0] cnt;        // number of stored words
  logic       pop;
  logic       take;

  assign code_out       = w0;
  assign code_valid_out = (cnt != 2'd0);
  assign pop            = code_valid_out && code_ready;
  assign elem_ready     = (cnt == 2'd0) || (cnt == 2'd1 && pop);

  logic elem_valid;
  assign elem_valid = coeff_token_T1_valid || level_data_valid ||
                      tot_zeros_code_valid || zero_runs_code_valid;
  assign take = elem_valid && elem_ready;

  // words of the element on the inputs
  code_word_t e0, e1;
  logic       e_two;
  always_comb begin
    logic [5:0] tot;
    e0 = '0; e1 = '0; e_two = 1'b0; tot = '0;
    if (coeff_token_T1_valid) begin
      tot = 6'(coeff_token_len) + 6'(no_of_T1s);
      if (tot <= 6'd16) begin
        e0.len  = 5'(tot);
        e0.bits = (coeff_token << no_of_T1s) | 16'(T1s_sign);
      end else begin
        e0.len  = coeff_token_len;
        e0.bits = coeff_token;
        e1.len  = 5'(no_of_T1s);
        e1.bits = 16'(T1s_sign);
        e_two   = 1'b1;
      end
    end else if (level_data_valid) begin
      tot = 6'(no_of_prefix_bits) + 6'(no_of_suffix_bits) + 6'd1;
      if (tot <= 6'd16) begin
        e0.len  = 5'(tot);
        e0.bits = 16'(level_suffix);
      end else begin
        e0.len  = 5'(no_of_prefix_bits);
        e0.bits = '0;
        e1.len  = 5'(no_of_suffix_bits) + 5'd1;
        e1.bits = 16'(level_suffix);
        e_two   = 1'b1;
      end
    end else if (tot_zeros_code_valid) begin
      e0.len  = 5'(tot_zeros_len);
      e0.bits = 16'(tot_zeros_code);
    end else begin
      e0.len  = 5'(zero_runs_len);
      e0.bits = 16'(zero_runs_code);
    end
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      w0  <= '0;
      w1  <= '0;
      cnt <= '0;
    end else begin
      if (take) begin
        // store is empty, or its single word leaves now
        w0  <= e0;
        w1  <= e1;
        cnt <= e_two ? 2'd2 : 2'd1;
      end else if (pop) begin
        w0  <= w1;
        cnt <= cnt - 2'd1;
      end
    end
  end

  // only one element is offered at a time
  a_one_elem: assert property (@(posedge clk) disable iff (!reset_n)
    $onehot0({coeff_token_T1_valid, level_data_valid, tot_zeros_code_valid, zero_runs_code_valid}));

endmodule
