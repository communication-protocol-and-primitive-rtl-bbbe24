// list_checksum: running ListChecksum over a stream of list words.
//
// Each bit of the checksum is the cumulative XOR of the same bit of a subset
// of the list words. The subset is set by ChecksumWC: 0 turns checking off,
// 0xFFFFFFFF covers every word offered, and any other N covers the first N
// words. The XOR rule and the three ChecksumWC cases follow the protocol; the
// streaming form (one word per cycle) is this design's choice.
//
// Interface: pulse `start` (with `ckwc`) to clear the sum, then offer words
// with `in_valid`/`in_word` in list order, excluding the ListChecksum word
// itself. `sum` is valid the cycle after the last word; `enabled` is low when
// ChecksumWC is 0, in which case the caller should skip the comparison.
// `count` is the number of words offered since `start`.
module list_checksum
  import rod_msg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t ckwc,
  input  logic  in_valid,
  input  word_t in_word,
  output word_t sum,
  output logic  enabled,
  output word_t count
);

  word_t limit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum     <= '0;
      count   <= '0;
      limit_q <= '0;
    end else if (start) begin
      sum     <= '0;
      count   <= '0;
      limit_q <= ckwc;
    end else if (in_valid) begin
      count <= count + 1'b1;
      if (limit_q == CKWC_ALL || count < limit_q)
        sum <= sum ^ in_word;
    end
  end

  assign enabled = (limit_q != CKWC_OFF);

endmodule
