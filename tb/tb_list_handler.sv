// tb_list_handler: self-checking test of the PrimitiveList handshake and
// list processing. The test plays the host: it writes lists into a memory
// model, raises inListReady, waits for dspAck, checks outListReady and the
// reply, and drops inListReady. Status bits are watched every cycle (busy,
// executing, listIndex, primIndex) and error-buffer words and exceptions are
// collected. Covered: a good list with a reply, bad checksum, header/trailer
// length mismatch, a list longer than the buffer, a malformed primitive,
// abort between primitives, checksumWC off and first-N, and the reply
// checksum.
module tb_list_handler;
  import rod_msg_pkg::*;
  localparam int AW = 10, IN_WORDS = 256, OUT_BASE = 512, OUT_WORDS = 256;

  logic clk = 0, rst_n = 0;
  vme_cmd_t cmd = '0;
  handler_status_t hs;
  logic [AW-1:0] m_addr;
  logic m_we;
  word_t m_wdata, m_rdata;
  logic b_re, b_we, b_ack = 0;
  logic [19:0] b_addr;
  word_t b_wdata, b_rdata = '0;
  logic [2:0] buf_reset, buf_rd_mode_we, buf_ovf_mode_we;
  logic buf_mode_val, eb_wr, exc_push, cmd_ignored, ev_list_done, ev_prim_done;
  word_t eb_data;
  logic [7:0] exc_id;

  word_t mem [1024];
  word_t eb_log[$];
  logic [7:0] exc_log[$];
  int checks = 0, failures = 0;
  bit saw_executing;
  int prim_done_count;

  always #5 clk = ~clk;

  list_handler #(.AW(AW), .IN_BASE(0), .IN_WORDS(IN_WORDS), .OUT_BASE(OUT_BASE),
                 .OUT_WORDS(OUT_WORDS), .TIMEOUT_CYCLES(40)) dut (.*);

  always_ff @(posedge clk) begin
    if (m_we) mem[m_addr] <= m_wdata;
    m_rdata <= mem[m_addr];
    b_ack   <= b_re || b_we;
    b_rdata <= 32'h5A5A_0000 | 32'(b_addr);
    if (rst_n) begin
      if (eb_wr) eb_log.push_back(eb_data);
      if (exc_push) exc_log.push_back(exc_id);
      if (hs.executing) saw_executing = 1;
      if (ev_prim_done) prim_done_count++;
      if (hs.dsp_ack && !hs.busy) begin failures++; $display("FAIL dspAck without busy"); end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic word_t xsum(input word_t w[$], input int n, input word_t wc);
    word_t s = '0;
    for (int i = 0; i < n; i++) if (wc == CKWC_ALL || word_t'(i) < wc) s ^= w[i];
    return s;
  endfunction

  // list = header, primitives, trailer; checksum over all words before it
  function automatic void build(input word_t idx, input word_t prims[$], input int nprims,
                                input word_t wc, output word_t list[$]);
    int len = prims.size() + 5;
    list = {word_t'(len), idx, word_t'(nprims)};
    foreach (prims[i]) list.push_back(prims[i]);
    list.push_back(word_t'(len));
    list.push_back(xsum(list, len - 1, wc));
  endfunction

  task automatic send(input word_t list[$], output logic out_ready);
    foreach (list[i]) mem[i] = list[i];
    saw_executing = 0;
    @(negedge clk);
    check("dspAck low before send", word_t'(hs.dsp_ack), 0);
    cmd.in_list_ready = 1;
    @(negedge clk);
    while (!hs.dsp_ack) @(negedge clk);
    out_ready = hs.out_list_ready;
    cmd.in_list_ready = 0;
    @(negedge clk);
    while (hs.busy) @(negedge clk);
    check("outListReady cleared", word_t'(hs.out_list_ready), 0);
  endtask

  initial begin
    word_t p[$], l[$], r[$];
    logic ordy;
    int rl;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. good list: set ROD mode, echo
    p = {32'd4, 32'd1, PID_SET_ROD_MODE, MODE_RUN,
         32'd5, 32'd2, PID_ECHO, 32'hC0FF_EE00, 32'd0};
    build(32'h3, p, 2, CKWC_ALL, l);
    send(l, ordy);
    check("good: outListReady", word_t'(ordy), 1);
    check("good: listIndex", word_t'(hs.list_index), 3);
    check("good: primIndex of last", word_t'(hs.prim_index), 2);
    check("good: executed", word_t'(saw_executing), 1);
    check("good: two primitives", word_t'(prim_done_count), 2);
    check("good: rodMode", word_t'(hs.rod_mode), 1);
    check("good: no errors", word_t'(eb_log.size()), 0);
    rl = int'(mem[OUT_BASE]);
    check("reply length", word_t'(rl), 3 + 4 + 2);
    check("reply listIndex", mem[OUT_BASE + 1], 3);
    check("reply nprims", mem[OUT_BASE + 2], 1);
    check("reply echo data", mem[OUT_BASE + 6], 32'hC0FF_EE00);
    check("reply trailer length", mem[OUT_BASE + rl - 2], word_t'(rl));
    r = {};
    for (int i = 0; i < rl; i++) r.push_back(mem[OUT_BASE + i]);
    check("reply checksum", mem[OUT_BASE + rl - 1], xsum(r, rl - 1, CKWC_ALL));

    // 2. bad checksum
    prim_done_count = 0;
    p = {32'd4, 32'd1, PID_SET_ROD_MODE, MODE_COMMAND};
    build(32'h4, p, 1, CKWC_ALL, l);
    l[l.size() - 1] ^= 32'h0000_0100;
    send(l, ordy);
    check("badck: no reply", word_t'(ordy), 0);
    check("badck: not executed", word_t'(saw_executing), 0);
    check("badck: no primitive", word_t'(prim_done_count), 0);
    check("badck: error word", eb_log.pop_front(), {EB_BAD_CHECKSUM, 24'h4});
    check("badck: exception", word_t'(exc_log.pop_front()), ERR_BAD_CHECKSUM);
    check("badck: rodMode kept", word_t'(hs.rod_mode), 1);

    // 3. trailer length differs
    build(32'h5, p, 1, CKWC_ALL, l);
    l[l.size() - 2] = 32'd99;
    send(l, ordy);
    check("mismatch: error word", eb_log.pop_front(), {EB_LEN_MISMATCH, 24'h5});
    check("mismatch: not executed", word_t'(saw_executing), 0);

    // 4. too long for the input buffer
    build(32'h6, p, 1, CKWC_ALL, l);
    l[0] = word_t'(IN_WORDS + 1);
    send(l, ordy);
    check("overflow: error word", eb_log.pop_front(), {EB_LEN_BOUNDS, 24'h6});
    check("overflow: exception", word_t'(exc_log.pop_front()), ERR_IN_OVERFLOW);

    // 5. malformed primitive (length runs past trailer)
    p = {32'd40, 32'd1, PID_SET_ROD_MODE, MODE_COMMAND};
    build(32'h7, p, 1, CKWC_ALL, l);
    send(l, ordy);
    check("format: error word", eb_log.pop_front(), {EB_PRIM_FORMAT, 24'h1});
    check("format: rodMode kept", word_t'(hs.rod_mode), 1);

    // 6. abort between primitives
    prim_done_count = 0;
    p = {32'd4, 32'd11, PID_SET_ROD_MODE, MODE_COMMAND,
         32'd4, 32'd12, PID_SET_ROD_MODE, MODE_RUN,
         32'd4, 32'd13, PID_SET_ROD_MODE, MODE_COMMAND};
    build(32'h8, p, 3, CKWC_ALL, l);
    cmd.abort_list_execution = 1;
    send(l, ordy);
    cmd.abort_list_execution = 0;
    check("abort: primListAborted", word_t'(hs.prim_list_aborted), 1);
    check("abort: one primitive ran", word_t'(prim_done_count), 1);
    check("abort: primIndex", word_t'(hs.prim_index), 11);
    check("abort: rodMode from first", word_t'(hs.rod_mode), 0);

    // 7. checksumWC = first 6 words; damage a later word, still accepted
    p = {32'd4, 32'd21, PID_SET_IN_CKWC, 32'd6};
    build(32'h9, p, 1, CKWC_ALL, l);
    send(l, ordy);
    check("abort flag cleared by new list", word_t'(hs.prim_list_aborted), 0);
    p = {32'd4, 32'd22, PID_SET_ROD_MODE, MODE_RUN,
         32'd4, 32'd23, PID_SET_IN_CKWC, CKWC_OFF};
    build(32'hA, p, 2, 32'd6, l);
    send(l, ordy);
    check("firstN: accepted", word_t'(eb_log.size()), 0);
    check("firstN: executed", word_t'(hs.rod_mode), 1);
    // 8. checksum off: any checksum accepted
    p = {32'd4, 32'd24, PID_SET_ROD_MODE, MODE_COMMAND,
         32'd4, 32'd25, PID_SET_OUT_CKWC, 32'd3,
         32'd4, 32'd26, PID_SET_IN_CKWC, CKWC_ALL};
    build(32'hB, p, 3, CKWC_ALL, l);
    l[l.size() - 1] = 32'hDEAD_DEAD;
    send(l, ordy);
    check("off: accepted", word_t'(eb_log.size()), 0);
    check("off: executed", word_t'(hs.rod_mode), 0);
    // 9. reply checksum over first 3 words only
    p = {32'd5, 32'd27, PID_ECHO, 32'h0F0F_0F0F, 32'd0};
    build(32'hC, p, 1, CKWC_ALL, l);
    send(l, ordy);
    check("outck: reply ready", word_t'(ordy), 1);
    rl = int'(mem[OUT_BASE]);
    r = {};
    for (int i = 0; i < rl; i++) r.push_back(mem[OUT_BASE + i]);
    check("outck: checksum of first 3", mem[OUT_BASE + rl - 1], xsum(r, rl - 1, 32'd3));

    check("no stray exceptions", word_t'(exc_log.size()), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
