// tb_msg_buffer: self-checking test of the circular text buffer.
// Runs the host read handshake (not-empty flag, read request, freeze,
// release) in both read modes, fills the buffer past its size in both
// overflow modes, writes while frozen, and resets it. Contents and
// descriptor words are compared with a queue model kept here.
module tb_msg_buffer;
  import rod_msg_pkg::*;
  localparam int DEPTH = 8;
  localparam int BASE  = 'h40;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, reset_buf = 0, rd_mode_we = 0, rd_mode_in = 0;
  logic ovf_mode_we = 0, ovf_mode_in = 0, read_request = 0;
  word_t wr_data = '0, h_rdata;
  logic not_empty, frozen, overflow;
  logic [3:0] h_addr = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  msg_buffer #(.DEPTH(DEPTH), .BASE(BASE)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic write_word(input word_t w);
    @(negedge clk); wr_en = 1; wr_data = w;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic host_read(input logic [3:0] a, output word_t d);
    @(negedge clk); h_addr = a;
    @(posedge clk); #1 d = h_rdata;
  endtask

  // freeze, read count words from ring index rd0, compare with exp[]
  task automatic read_buffer(input word_t exp[$], input int rd0, input logic exp_ovf);
    word_t d;
    check("not_empty before request", word_t'(not_empty), 1);
    @(negedge clk); read_request = 1;
    repeat (2) @(negedge clk);
    check("frozen", word_t'(frozen), 1);
    check("not_empty cleared", word_t'(not_empty), 0);
    host_read(4'h8, d); check("dataStart", d, BASE);
    host_read(4'h9, d); check("dataEnd", d, BASE + DEPTH - 1);
    host_read(4'ha, d); check("readPtr", d, word_t'(BASE + rd0));
    host_read(4'hf, d); check("count", d, word_t'(exp.size()));
    host_read(4'he, d); check("overflow flag", d, word_t'(exp_ovf));
    foreach (exp[i]) begin
      host_read(4'((rd0 + i) % DEPTH), d);
      check($sformatf("data %0d", i), d, exp[i]);
    end
  endtask

  task automatic release_buffer();
    @(negedge clk); read_request = 0;
    repeat (2) @(negedge clk);
    check("unfrozen", word_t'(frozen), 0);
    check("overflow cleared", word_t'(overflow), 0);
  endtask

  initial begin
    word_t q[$], d;
    int rd0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("empty after reset", word_t'(not_empty), 0);

    // 1. ring mode: five words, one write while frozen
    q = {};
    for (int i = 0; i < 5; i++) begin
      word_t w; w = $urandom; q.push_back(w); write_word(w);
    end
    @(negedge clk);
    read_buffer(q, 0, 0);
    write_word(32'hdead_0001);   // lost while frozen
    check("overflow on write while frozen", word_t'(overflow), 1);
    release_buffer();
    host_read(4'ha, d); check("RING readPtr = writePtr", d, BASE + 5);
    host_read(4'hb, d); check("RING writePtr", d, BASE + 5);
    check("empty after ring read", word_t'(not_empty), 0);

    // 2. ring wraps: six more words from index 5
    q = {};
    for (int i = 0; i < 6; i++) begin
      word_t w; w = $urandom; q.push_back(w); write_word(w);
    end
    @(negedge clk);
    read_buffer(q, 5, 0);
    release_buffer();

    // 3. linear mode
    @(negedge clk); rd_mode_we = 1; rd_mode_in = RD_LINBUFF;
    @(negedge clk); rd_mode_we = 0;
    host_read(4'hc, d); check("mode LINBUFF", d, 1);
    q = {};
    for (int i = 0; i < 3; i++) begin
      word_t w; w = $urandom; q.push_back(w); write_word(w);
    end
    @(negedge clk);
    read_buffer(q, 11 % DEPTH, 0);
    release_buffer();
    host_read(4'ha, d); check("LIN readPtr = BASE", d, BASE);
    host_read(4'hb, d); check("LIN writePtr = BASE", d, BASE);

    // 4. NOOVERWRITE: first DEPTH words kept
    q = {};
    for (int i = 0; i < DEPTH + 3; i++) begin
      word_t w; w = $urandom; if (i < DEPTH) q.push_back(w); write_word(w);
    end
    check("overflow NOOVERWRITE", word_t'(overflow), 1);
    @(negedge clk);
    read_buffer(q, 0, 1);
    release_buffer();

    // 5. OVERWRITE: last DEPTH words kept
    @(negedge clk); ovf_mode_we = 1; ovf_mode_in = OVF_OVERWR;
    @(negedge clk); ovf_mode_we = 0;
    host_read(4'hd, d); check("overwrite mode", d, 1);
    q = {};
    for (int i = 0; i < DEPTH + 3; i++) begin
      word_t w; w = $urandom; q.push_back(w); write_word(w);
    end
    while (q.size() > DEPTH) void'(q.pop_front());
    check("overflow OVERWRITE", word_t'(overflow), 1);
    @(negedge clk);
    read_buffer(q, 3, 1);
    release_buffer();

    // 6. reset
    write_word(32'h1234_5678);
    @(negedge clk);
    check("not empty before reset", word_t'(not_empty), 1);
    @(negedge clk); reset_buf = 1;
    @(negedge clk); reset_buf = 0;
    @(negedge clk);
    check("empty after reset_buf", word_t'(not_empty), 0);
    host_read(4'hf, d); check("count after reset_buf", d, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
