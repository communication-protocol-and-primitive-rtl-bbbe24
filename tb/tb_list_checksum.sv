// tb_list_checksum: self-checking test of the running ListChecksum.
// Streams random lists through the block under the three ChecksumWC cases
// (off, all words, first N words) and compares the sum with an XOR worked out
// here. Also checks that a word gap (in_valid low) does not disturb the sum.
module tb_list_checksum;
  import rod_msg_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  start = 0, in_valid = 0;
  word_t ckwc = '0, in_word = '0, sum, count;
  logic  enabled;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  list_checksum dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_list(input word_t wc, input int n);
    word_t exp = '0;
    @(negedge clk); start = 1; ckwc = wc;
    @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      word_t w = $urandom;
      if (wc == CKWC_ALL || word_t'(i) < wc) exp ^= w;
      in_valid = 1; in_word = w;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (sum !== exp) begin
      failures++; $display("FAIL wc=%0h n=%0d sum=%h exp=%h", wc, n, sum, exp);
    end
    checks++;
    if (enabled !== (wc != CKWC_OFF)) begin failures++; $display("FAIL enabled"); end
    checks++;
    if (count !== word_t'(n)) begin failures++; $display("FAIL count %0d", count); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int n;
      n = $urandom_range(1, 40);
      unique case (t % 3)
        0: run_list(CKWC_OFF, n);
        1: run_list(CKWC_ALL, n);
        default: run_list(word_t'($urandom_range(1, 45)), n);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
