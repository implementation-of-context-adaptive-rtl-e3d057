// p2s -- parallel to serial converter of the CAVLC processor.
//
// Takes one parallel code word {length[4:0], code[15:0]} (code right-aligned)
// and sends its 'length' bits one per clock, most significant first, on
// ser_out with ser_valid. A word is taken (word_valid && word_ready) while the
// converter is empty or is sending the last bit of the previous word, so
// back-to-back words leave without a gap. A bit leaves when ser_ready (the
// FIFO is not full) is high; otherwise the converter waits. One bit per clock
// is this design's choice; the diagram places the converter between
// store_coded_blk and the FIFO. Reset is asynchronous, active low.
module p2s
  import cavlc_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic [20:0] word_in,
  input  logic        word_valid,
  output logic        word_ready,
  output logic        ser_out,
  output logic        ser_valid,
  input  logic        ser_ready
);

  code_word_t       w;
  logic [15:0]      shreg;   // MSB is the next bit to send
  logic [LEN_W-1:0] left;    // bits still to send

  assign w          = code_word_t'(word_in);
  assign ser_out    = shreg[15];
  assign ser_valid  = (left != '0);
  assign word_ready = (left == '0) || (left == 5'd1 && ser_ready);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      shreg <= '0;
      left  <= '0;
    end else begin
      if (word_valid && word_ready) begin
        shreg <= w.bits << (5'd16 - w.len);
        left  <= w.len;
      end else if (ser_valid && ser_ready) begin
        shreg <= shreg << 1;
        left  <= left - 5'd1;
      end
    end
  end

  a_len: assert property (@(posedge clk) disable iff (!reset_n)
    word_valid |-> (w.len != '0 && w.len <= 5'd16));

endmodule
