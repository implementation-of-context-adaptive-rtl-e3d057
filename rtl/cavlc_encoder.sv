// cavlc_encoder -- context adaptive variable length coding of one 4x4 block.
//
// The encoder takes the 16 zig-zag ordered coefficients of a block (one per
// clock, coeff_valid_in) together with the block's context nC (nc_in) and its
// number of non-zero coefficients (tot_nz_in, TotalCoeff). It first captures
// the whole block, because every syntax element is coded from the highest
// frequency down. A captured block is copied to a working set; the analysis at
// that copy finds the non-zero coefficients in reverse scan order, the run of
// zeros below each, the trailing +/-1 count (T1s, at most 3) and total_zeros.
// While the working set is coded, the next block can be captured; enc_ready is
// high when the capture buffer is empty, which is when dram_nc may start a burst.
//
// Coding is a sequence of elements, one per clock at most, in bitstream order:
//   1. coeff_token (table Num-VLC0/1/2 or the 6-bit fixed code, chosen by nC)
//      with the T1s and their signs (+ = 0, - = 1, highest frequency first):
//      coeff_token, coeff_token_len, no_of_T1s, T1s_sign, coeff_token_T1_valid.
//      T1s_sign is right-aligned: its no_of_T1s low bits are sent MSB first.
//   2. one element per remaining non-zero level, highest frequency first, with
//      the level_prefix / level_suffix code of H.264 and the adaptive
//      suffixLength: no_of_prefix_bits zeros, then level_suffix, which is the
//      '1' ending the prefix followed by no_of_suffix_bits suffix bits
//      (level_data_valid).
//   3. total_zeros, when 0 < TotalCoeff < 16 (tot_zeros_code_valid).
//   4. run_before for each non-zero coefficient but the last, while zeros are
//      left (zero_runs_code_valid).
// A block with no non-zero coefficient codes its coeff_token only. An element
// stays on its outputs until out_ready is high (valid/ready handshake with
// store_coded_blk). halt freezes the coding: no element is offered while it is
// high. The element order, the tables and the adaptation rules follow the H.264
// CAVLC algorithm described for this processor; the capture/working split and
// the handshake are this design's choices. tot_zeros_code and zero_runs_code
// have the widths of the longest codes (9 and 11 bits); the code values of
// those tables are at most 7, so their upper bits are always 0.
// Reset is asynchronous, active low.
module cavlc_encoder
  import cavlc_pkg::*;
(
  input  logic               clk,
  input  logic               reset_n,
  input  logic               halt,
  input  logic [COEFF_W-1:0] coeff_in,
  input  logic               coeff_valid_in,
  input  logic [4:0]         nc_in,
  input  logic [4:0]         tot_nz_in,
  input  logic [BLK_W-1:0]   blk_in,
  output logic               enc_ready,
  input  logic               out_ready,
  output logic [BLK_W-1:0]   blk_out,
  output logic [1:0]         no_of_T1s,
  output logic [2:0]         T1s_sign,
  output logic [15:0]        coeff_token,
  output logic [4:0]         coeff_token_len,
  output logic               coeff_token_T1_valid,
  output logic [3:0]         no_of_prefix_bits,
  output logic [3:0]         no_of_suffix_bits,
  output logic [12:0]        level_suffix,
  output logic               level_data_valid,
  output logic [8:0]         tot_zeros_code,
  output logic [3:0]         tot_zeros_len,
  output logic               tot_zeros_code_valid,
  output logic [10:0]        zero_runs_code,
  output logic [3:0]         zero_runs_len,
  output logic               zero_runs_code_valid
);

  typedef enum logic [2:0] {S_IDLE, S_TOKEN, S_LEVEL, S_TZ, S_RUN} state_t;

  // ---------------- capture buffer ----------------
  coeff_t           cap [NUM_COEFF];
  logic [4:0]       cap_cnt;
  logic [4:0]       cap_nc, cap_tc;
  logic [BLK_W-1:0] cap_blk;
  logic             load;

  assign enc_ready = (cap_cnt == 5'd0);

  always_ff @(posedge clk) begin
    if (coeff_valid_in && cap_cnt < 5'd16) cap[cap_cnt[3:0]] <= coeff_t'(coeff_in);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      cap_cnt <= '0;
      cap_nc  <= '0;
      cap_tc  <= '0;
      cap_blk <= '0;
    end else begin
      if (coeff_valid_in && cap_cnt < 5'd16) begin
        cap_cnt <= cap_cnt + 5'd1;
        if (cap_cnt == 5'd0) begin
          cap_nc  <= nc_in;
          cap_tc  <= tot_nz_in;
          cap_blk <= blk_in;
        end
      end else if (load) begin
        cap_cnt <= '0;
      end
    end
  end

  // ---------------- block analysis (on the captured block) ----------------
  coeff_t     an_val [NUM_COEFF];  // non-zero values, highest frequency first
  logic [3:0] an_pos [NUM_COEFF];  // their scan positions
  logic [3:0] an_run [NUM_COEFF];  // zeros between each and the next lower one
  logic [4:0] an_tc;
  logic [1:0] an_t1;
  logic [3:0] an_tz;

  always_comb begin
    logic [4:0] n;
    logic       t1_open;
    n = '0;
    for (int i = 0; i < NUM_COEFF; i++) begin
      an_val[i] = '0;
      an_pos[i] = '0;
      an_run[i] = '0;
    end
    for (int k = NUM_COEFF - 1; k >= 0; k--) begin
      if (cap[k] != '0) begin
        an_val[n[3:0]] = cap[k];
        an_pos[n[3:0]] = 4'(k);
        n = n + 5'd1;
      end
    end
    an_tc = n;
    for (int i = 0; i < NUM_COEFF - 1; i++) begin
      if (5'(i + 1) < n) an_run[i] = an_pos[i] - an_pos[i+1] - 4'd1;
    end
    // trailing ones: consecutive +/-1 from the highest frequency, at most 3
    an_t1   = '0;
    t1_open = 1'b1;
    for (int i = 0; i < 3; i++) begin
      if (t1_open && 5'(i) < n && (an_val[i] == coeff_t'(1) || an_val[i] == coeff_t'(-1)))
        an_t1 = an_t1 + 2'd1;
      else
        t1_open = 1'b0;
    end
    an_tz = (n == 5'd0) ? 4'd0 : 4'(5'(an_pos[0]) + 5'd1 - n);
  end

  // ---------------- working set and coding FSM ----------------
  state_t     state;
  coeff_t     w_val [NUM_COEFF];
  logic [3:0] w_run [NUM_COEFF];
  logic [4:0] w_tc, w_nc;
  logic [1:0] w_t1;
  logic [3:0] w_tz;
  logic [3:0] k;            // element index into w_val / w_run
  logic [2:0] suffix_len;
  logic [3:0] zeros_left;
  logic [2:0] t1_signs;

  assign load = (cap_cnt == 5'd16) && (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (load) begin
      w_val <= an_val;
      w_run <= an_run;
    end
  end

  // current level: levelCode, prefix and suffix
  coeff_t      cur_lvl;
  logic [11:0] cur_abs;
  logic [12:0] lvl_code;
  logic [3:0]  lvl_prefix;
  logic [3:0]  lvl_sbits;
  logic [11:0] lvl_suf;
  logic [2:0]  next_sl;

  always_comb begin
    logic [2:0]  sl1;
    logic [12:0] lim;
    cur_lvl = w_val[k];
    cur_abs = cur_lvl[COEFF_W-1] ? 12'(-cur_lvl) : 12'(cur_lvl);
    lvl_code = cur_lvl[COEFF_W-1] ? 13'({1'b0, cur_abs, 1'b0} - 14'd1)
                                  : 13'({1'b0, cur_abs, 1'b0} - 14'd2);
    // the first level after fewer than 3 trailing ones cannot be +/-1
    if ({1'b0, k} == 5'(w_t1) && w_t1 != 2'd3) lvl_code = lvl_code - 13'd2;
    lim = 13'd15 << suffix_len;
    if (suffix_len == 3'd0) begin
      if (lvl_code < 13'd14) begin
        lvl_prefix = 4'(lvl_code); lvl_sbits = 4'd0;  lvl_suf = '0;
      end else if (lvl_code < 13'd30) begin
        lvl_prefix = 4'd14;        lvl_sbits = 4'd4;  lvl_suf = 12'(lvl_code - 13'd14);
      end else begin
        lvl_prefix = 4'd15;        lvl_sbits = 4'd12; lvl_suf = 12'(lvl_code - 13'd30);
      end
    end else begin
      if (lvl_code < lim) begin
        lvl_prefix = 4'(lvl_code >> suffix_len);
        lvl_sbits  = 4'(suffix_len);
        lvl_suf    = 12'(lvl_code & ((13'd1 << suffix_len) - 13'd1));
      end else begin
        lvl_prefix = 4'd15; lvl_sbits = 4'd12; lvl_suf = 12'(lvl_code - lim);
      end
    end
    // suffixLength adaptation
    sl1 = (suffix_len == 3'd0) ? 3'd1 : suffix_len;
    if ({1'b0, cur_abs} > (13'd3 << (sl1 - 3'd1)) && sl1 < 3'd6) next_sl = sl1 + 3'd1;
    else                                                          next_sl = sl1;
  end

  // element outputs
  code_word_t tok_w, tz_w, rb_w;
  always_comb begin
    tok_w = coeff_token_vlc(w_nc, w_tc, w_t1);
    tz_w  = total_zeros_vlc((w_tc == 5'd0) ? 5'd1 : w_tc, w_tz);
    rb_w  = run_before_vlc((zeros_left == 4'd0) ? 4'd1 : zeros_left, w_run[k]);
  end

  assign coeff_token_T1_valid = (state == S_TOKEN) && !halt;
  assign level_data_valid     = (state == S_LEVEL) && !halt;
  assign tot_zeros_code_valid = (state == S_TZ)    && !halt;
  assign zero_runs_code_valid = (state == S_RUN)   && !halt;

  assign coeff_token       = tok_w.bits;
  assign coeff_token_len   = tok_w.len;
  assign no_of_T1s         = w_t1;
  assign T1s_sign          = t1_signs;
  assign no_of_prefix_bits = lvl_prefix;
  assign no_of_suffix_bits = lvl_sbits;
  assign level_suffix      = (13'd1 << lvl_sbits) | 13'(lvl_suf);
  assign tot_zeros_code    = 9'(tz_w.bits);
  assign tot_zeros_len     = 4'(tz_w.len);
  assign zero_runs_code    = 11'(rb_w.bits);
  assign zero_runs_len     = 4'(rb_w.len);

  logic fire;
  assign fire = !halt && out_ready && (state != S_IDLE);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      state      <= S_IDLE;
      w_tc       <= '0;
      w_nc       <= '0;
      w_t1       <= '0;
      w_tz       <= '0;
      k          <= '0;
      suffix_len <= '0;
      zeros_left <= '0;
      t1_signs   <= '0;
      blk_out    <= '0;
    end else begin
      if (load) begin
        state    <= S_TOKEN;
        w_tc     <= cap_tc;
        w_nc     <= cap_nc;
        w_t1     <= an_t1;
        w_tz     <= an_tz;
        blk_out  <= cap_blk;
        // signs of the trailing ones, highest frequency in the MSB of the field
        case (an_t1)
          2'd1:    t1_signs <= {2'b00, an_val[0][COEFF_W-1]};
          2'd2:    t1_signs <= {1'b0, an_val[0][COEFF_W-1], an_val[1][COEFF_W-1]};
          2'd3:    t1_signs <= {an_val[0][COEFF_W-1], an_val[1][COEFF_W-1], an_val[2][COEFF_W-1]};
          default: t1_signs <= 3'b000;
        endcase
      end else if (fire) begin
        unique case (state)
          S_TOKEN: begin
            k          <= 4'(w_t1);
            suffix_len <= (w_tc > 5'd10 && w_t1 != 2'd3) ? 3'd1 : 3'd0;
            if (w_tc == 5'd0)                   state <= S_IDLE;
            else if (5'(w_t1) < w_tc)           state <= S_LEVEL;
            else if (w_tc == 5'd16)             state <= S_IDLE;
            else                                state <= S_TZ;
          end
          S_LEVEL: begin
            suffix_len <= next_sl;
            k          <= k + 4'd1;
            if (5'(k) + 5'd1 == w_tc)           state <= (w_tc == 5'd16) ? S_IDLE : S_TZ;
          end
          S_TZ: begin
            zeros_left <= w_tz;
            k          <= '0;
            if (w_tz == 4'd0 || w_tc == 5'd1)   state <= S_IDLE;
            else                                state <= S_RUN;
          end
          S_RUN: begin
            zeros_left <= zeros_left - w_run[k];
            k          <= k + 4'd1;
            if (zeros_left == w_run[k] || 5'(k) + 5'd2 == w_tc) state <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // TotalCoeff given by dram_nc must match the coefficients it delivered
  property p_tc_match;
    @(posedge clk) disable iff (!reset_n) load |-> (an_tc == cap_tc);
  endproperty
  a_tc_match: assert property (p_tc_match) else $error("tot_nz_in does not match the block");

endmodule
