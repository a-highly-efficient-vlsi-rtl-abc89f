// bitstream_fetcher: supplies the arithmetic decoder with upcoming bits.
//
// A 64-bit shift buffer holds the next unread bits of the slice data, oldest
// bit at the top. The decoder sees the top 16 bits (win_o) and reports how many
// it used each cycle (consume_i, at most 15); the buffer shifts by that amount.
// 32-bit words are taken from the bitstream memory side through a valid/ready
// handshake whenever at least 32 bit positions are free, so with one word per
// cycle the buffer keeps up with the 14 bits two bins can use at most.
// avail_o says the window is fully valid (at least 16 bits held); the decoder
// stalls while it is low. flush_i empties the buffer at the start of a slice.
//
// The architecture only names this unit. Its buffer size, the 32-bit word
// width and the handshake are this design's own choices.
module bitstream_fetcher (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        flush_i,
  input  logic        word_valid_i,
  input  logic [31:0] word_i,
  output logic        word_ready_o,
  output logic [15:0] win_o,
  output logic        avail_o,
  input  logic        consume_en_i,
  input  logic [3:0]  consume_i
);

  logic [63:0] buf_q, buf_d;
  logic [6:0]  cnt_q, cnt_d;

  assign word_ready_o = (cnt_q <= 7'd32) && !flush_i;
  assign win_o        = buf_q[63:48];
  assign avail_o      = (cnt_q >= 7'd16);

  always_comb begin
    buf_d = buf_q;
    cnt_d = cnt_q;
    if (consume_en_i) begin
      buf_d = buf_q << consume_i;
      cnt_d = cnt_q - 7'(consume_i);
    end
    if (word_valid_i && word_ready_o) begin
      buf_d = buf_d | ({word_i, 32'b0} >> cnt_d);
      cnt_d = cnt_d + 7'd32;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else if (flush_i) begin
      buf_q <= '0;
      cnt_q <= '0;
    end else begin
      buf_q <= buf_d;
      cnt_q <= cnt_d;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && !flush_i && consume_en_i) assert (consume_i <= cnt_q)
      else $error("bitstream_fetcher: consumed more bits than held");
  end

endmodule
