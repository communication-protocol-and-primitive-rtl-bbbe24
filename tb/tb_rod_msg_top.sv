// tb_rod_msg_top: end-to-end test of the ROD message path at full size (no
// parameter overrides). The test acts as the VME host. It loads
// PrimitiveLists through the HPI (HPIA, then HPID with autoincrement). It
// runs the list handshake through the RodStatus and VmeCommand registers:
// wait for dspAck low, set inListReady, poll for dspAck, note outListReady,
// clear inListReady, wait for busy to drop, then read the reply. It
// handles exceptions (irq, interruptID, clearException) and reads the text
// buffers with the notEmpty/readRequest handshake. Behind the register bus
// sit a model of the other ROD registers (`ext_*`) and four SlaveDsp models
// (slave_dsp_model) on the host-port bridge. The ext model never answers
// address 0x7f000, which produces the Timeout case.
//
// Every mechanism the design implements is counted: reply built, primitives
// executed, bad checksum, input and output buffer overflow, timeout, abort,
// queued exceptions, irq, commandIgnored, ROD mode switch, checksumWC change,
// text-buffer read in RINGBUFF and LINBUFF mode, text-buffer overflow in both
// overflow modes, SlaveDsp host-port access, ext register access, ROD
// Resources register access, status LED, DSPINT/HINT, a PrimitiveList passed
// on to a SlaveDsp with its reply brought back, and the downstream
// checksumWC (list checksum made again, bad reply dropped), and SlaveDsp
// hardware interrupts served while a list uses the register bus (logged words
// found in the error buffer, HINT cleared). The test fails if any count stays
// at zero. The reply is checked word by word, including its
// checksum.
module tb_rod_msg_top;
  import rod_msg_pkg::*;

  localparam int MSG_WORDS = 2048, TXT_DEPTH = 256, N_SLAVES = 4, TMO = 1024;
  localparam int OUT_BASE = MSG_WORDS / 2;
  localparam int ERR_BASE = 32'h1000, INF_BASE = ERR_BASE + 2 * TXT_DEPTH;

  logic clk = 0, rst_n = 0;
  logic [1:0] hpi_hcntrl = 0;
  logic hpi_strobe = 0, hpi_rnw = 1, hint_set = 0;
  logic [31:0] hpi_wdata = 0, hpi_rdata;
  logic hpi_rvalid, hpi_hint, dsp_int;
  logic [2:0] vme_addr = 0;
  logic vme_re = 0, vme_we = 0;
  logic [31:0] vme_wdata = 0, vme_rdata;
  logic vme_irq;
  board_status_t board;
  vme_cmd_t cmd;
  logic [7:0] status_led;
  logic inf_wr = 0, diag_wr = 0;
  logic [31:0] inf_data = 0, diag_data = 0;
  logic ext_re, ext_we, ext_ack;
  logic [19:0] ext_addr;
  logic [31:0] ext_wdata, ext_rdata;
  logic [N_SLAVES-1:0] s_hcs_n;
  logic [1:0] s_hcntrl;
  logic s_hhwil, s_hr_nw, s_hds_n, s_hd_oe;
  logic [15:0] s_hd_out;
  logic [15:0] s_hd_in [N_SLAVES];
  logic ev_list_done, ev_prim_done, slave_err;
  logic [2:0] buf_overflow;

  rod_msg_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_list, n_prim, n_reply, n_badck, n_inovf, n_outovf, n_timeout, n_abort,
      n_queue, n_irq, n_ignored, n_modesw, n_ckwc, n_ring, n_lin, n_ovf_drop,
      n_ovf_over, n_slave, n_ext, n_rr, n_led, n_hint, n_dspint, n_busy_seen,
      n_exec_seen, n_slave_list, n_ds_ckwc, n_sint;

  // ---------------- models ----------------
  word_t ext_mem [int];
  logic [2:0] ext_pipe;
  logic [19:0] ext_a_q;
  int slave_wr_cnt, slave_rd_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_pipe  <= '0;
      ext_ack   <= 1'b0;
      ext_rdata <= '0;
      ext_a_q   <= '0;
    end else begin
      ext_pipe <= {ext_pipe[1:0], (ext_re || ext_we) && ext_addr != 20'h7f000};
      if (ext_re || ext_we) ext_a_q <= ext_addr;
      if (ext_we && ext_addr != 20'h7f000) ext_mem[int'(ext_addr)] = ext_wdata;
      ext_ack   <= ext_pipe[1];
      ext_rdata <= ext_mem.exists(int'(ext_a_q)) ? ext_mem[int'(ext_a_q)] : 32'hE000_0000 | 32'(ext_a_q);
    end
  end

  // SlaveDsps behind their host ports; strobes are counted here as well
  int unsigned slv_lists [N_SLAVES], slv_perr [N_SLAVES];
  logic        slv_reply = 1'b1;
  logic        slv_raise [N_SLAVES];
  int unsigned slv_nint [N_SLAVES];
  logic [N_SLAVES-1:0] s_hint_n;
  initial for (int i = 0; i < N_SLAVES; i++) slv_raise[i] = 1'b0;
  for (genvar i = 0; i < N_SLAVES; i++) begin : g_slv
    slave_dsp_model u_slv (
      .clk, .rst_n, .hcs_n(s_hcs_n[i]), .hcntrl(s_hcntrl), .hhwil(s_hhwil), .hr_nw(s_hr_nw),
      .hds_n(s_hds_n), .hd_out(s_hd_out), .hd_oe(s_hd_oe), .hd_in(s_hd_in[i]),
      .reply_en(slv_reply), .ack_en(1'b1), .reply_extra(32'd3),
      .lists_done(slv_lists[i]), .proto_err(slv_perr[i]),
      .raise_int(slv_raise[i]), .err_words(32'd3), .hint_n(s_hint_n[i]),
      .ints_raised(slv_nint[i])
    );
  end
  logic hds_q;
  always_ff @(posedge clk) begin
    hds_q <= s_hds_n;
    if (!(&s_hcs_n) && !s_hds_n && hds_q) begin  // strobe start
      if (s_hd_oe) slave_wr_cnt++;
      else slave_rd_cnt++;
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    if (ev_list_done) n_list++;
    if (ev_prim_done) n_prim++;
    if (dsp_int) n_dspint++;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // ---------------- host access ----------------
  task automatic hpi_wr(input logic [1:0] hc, input word_t d);
    @(negedge clk);
    hpi_hcntrl = hc; hpi_rnw = 0; hpi_wdata = d; hpi_strobe = 1;
    @(negedge clk);
    hpi_strobe = 0;
  endtask
  task automatic hpi_rd(input logic [1:0] hc, output word_t d);
    @(negedge clk);
    hpi_hcntrl = hc; hpi_rnw = 1; hpi_strobe = 1;
    @(negedge clk);
    hpi_strobe = 0;
    while (!hpi_rvalid) @(negedge clk);
    d = hpi_rdata;
  endtask
  task automatic vme_wr(input logic [2:0] a, input word_t d);
    @(negedge clk);
    vme_addr = a; vme_wdata = d; vme_we = 1;
    @(negedge clk);
    vme_we = 0;
  endtask
  task automatic vme_rd(input logic [2:0] a, output word_t d);
    @(negedge clk);
    vme_addr = a; vme_re = 1;
    @(negedge clk);
    vme_re = 0;
    d = vme_rdata;
  endtask

  word_t c0 = '0;
  task automatic set_c0(input int bitn, input logic v);
    c0[bitn] = v;
    vme_wr(3'd3, c0);
  endtask

  function automatic word_t xsum(input word_t w[$], input int n, input word_t wc);
    word_t s = '0;
    for (int i = 0; i < n; i++) if (wc == CKWC_ALL || word_t'(i) < wc) s ^= w[i];
    return s;
  endfunction

  function automatic void build(input word_t idx, input word_t prims[$], input int nprims,
                                output word_t list[$]);
    int len = prims.size() + 5;
    list = {word_t'(len), idx, word_t'(nprims)};
    foreach (prims[i]) list.push_back(prims[i]);
    list.push_back(word_t'(len));
    list.push_back(xsum(list, len - 1, CKWC_ALL));
  endfunction

  // full handshake; returns outListReady and the reply words
  task automatic run_list(input word_t list[$], output logic ordy, output word_t reply[$]);
    word_t s0, d;
    int n, polls;
    do vme_rd(3'd0, s0); while (s0[S0_DSP_ACK]);
    hpi_wr(2'b01, 32'd0);
    foreach (list[i]) hpi_wr(2'b10, list[i]);
    set_c0(C0_IN_LIST_READY, 1);
    polls = 0;
    do begin
      vme_rd(3'd0, s0);
      if (s0[S0_BUSY]) n_busy_seen++;
      if (s0[S0_EXECUTING]) n_exec_seen++;
      polls++;
    end while (!s0[S0_DSP_ACK] && polls < 100000);
    ordy = s0[S0_OUT_LIST_READY];
    set_c0(C0_IN_LIST_READY, 0);
    do vme_rd(3'd0, s0); while (s0[S0_BUSY]);
    check("outListReady cleared after handshake", word_t'(s0[S0_OUT_LIST_READY]), 0);
    reply = {};
    if (ordy) begin
      n_reply++;
      hpi_wr(2'b01, word_t'(OUT_BASE));
      hpi_rd(2'b10, d);
      n = int'(d);
      reply.push_back(d);
      for (int i = 1; i < n && i < OUT_BASE; i++) begin hpi_rd(2'b10, d); reply.push_back(d); end
    end
  endtask

  task automatic check_reply(input string what, input word_t r[$], input word_t idx, input int nprims);
    int n = r.size();
    check({what, " reply length"}, word_t'(n), r[0]);
    check({what, " reply listIndex"}, r[1], idx);
    check({what, " reply primitive count"}, r[2], word_t'(nprims));
    check({what, " reply trailer"}, r[n - 2], word_t'(n));
    check({what, " reply checksum"}, r[n - 1], xsum(r, n - 1, CKWC_ALL));
  endtask

  // read a text buffer through the handshake; returns its words
  task automatic read_textbuf(input int base, input int rd_req_bit, input int ne_bit,
                              output word_t words[$], output word_t rp);
    word_t s0, cnt, d;
    vme_rd(3'd0, s0);
    check("buffer notEmpty before request", word_t'(s0[ne_bit]), 1);
    set_c0(rd_req_bit, 1);
    vme_rd(3'd0, s0);
    check("buffer notEmpty dropped while frozen", word_t'(s0[ne_bit]), 0);
    hpi_wr(2'b01, word_t'(base + TXT_DEPTH + 2)); hpi_rd(2'b11, rp);
    hpi_wr(2'b01, word_t'(base + TXT_DEPTH + 7)); hpi_rd(2'b11, cnt);
    words = {};
    for (int i = 0; i < int'(cnt); i++) begin
      hpi_wr(2'b01, rp - word_t'(base) + word_t'(i) >= word_t'(TXT_DEPTH)
                    ? rp + word_t'(i) - word_t'(TXT_DEPTH) : rp + word_t'(i));
      hpi_rd(2'b11, d);
      words.push_back(d);
    end
    set_c0(rd_req_bit, 0);
    vme_rd(3'd0, s0);
    check("buffer empty after read", word_t'(s0[ne_bit]), 0);
  endtask

  // retire the oldest exception, return the interruptID seen first
  task automatic take_exception(output word_t id);
    word_t s1;
    if (vme_irq) n_irq++;
    vme_rd(3'd1, s1);
    id = word_t'(s1[S1_INTERRUPT_ID +: 8]);
    check("interruptIssued set", word_t'(s1[S1_INT_ISSUED]), 1);
    check("irq dropped after status read", word_t'(vme_irq), 0);
    set_c0(C0_CLEAR_EXC, 1);
    set_c0(C0_CLEAR_EXC, 0);
  endtask

  initial begin
    word_t p[$], l[$], r[$], w[$], d, s0, s1, s2, id, wpa;
    logic ordy;
    int t0;
    board = board_status_t'($urandom);
    n_list = 0; n_prim = 0; n_reply = 0; n_badck = 0; n_inovf = 0; n_outovf = 0;
    n_timeout = 0; n_abort = 0; n_queue = 0; n_irq = 0; n_ignored = 0; n_modesw = 0;
    n_ckwc = 0; n_ring = 0; n_lin = 0; n_ovf_drop = 0; n_ovf_over = 0; n_slave = 0; n_slave_list = 0; n_ds_ckwc = 0;
    n_ext = 0; n_rr = 0; n_led = 0; n_hint = 0; n_dspint = 0; n_busy_seen = 0;
    n_exec_seen = 0; slave_wr_cnt = 0; slave_rd_cnt = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    set_c0(C0_ENABLE_INTS, 1);

    // board status visible to the host
    vme_rd(3'd2, s2);
    check("board status in RodStatusRegister2", s2[9:0], word_t'(board));

    // HPIC: DSPINT to the DSP, HINT back to the host
    hpi_wr(2'b00, 32'h2);
    @(negedge clk); hint_set = 1; @(negedge clk); hint_set = 0;
    hpi_rd(2'b00, d);
    if (d[2] && hpi_hint) n_hint++;
    hpi_wr(2'b00, 32'h4);
    check("HINT cleared by host", word_t'(hpi_hint), 0);

    // 1. list with several primitives: mode switch, echo both ways, register
    //    reads and writes on every bus target, CheckOutput
    vme_rd(3'd1, s1);
    check("rodMode starts in COMMAND", word_t'(s1[S1_ROD_MODE]), 0);
    p = {32'd4, 32'd1, PID_SET_ROD_MODE, MODE_RUN,
         32'd5, 32'd2, PID_ECHO, 32'h1234_5678, 32'd0,
         32'd5, 32'd3, PID_ECHO, 32'h9ABC_DEF0, 32'd2,
         // write two ext registers, read them back into the reply
         32'd10, 32'd4, PID_RW_REGISTER, RW_WRITE, 32'h2_0400, 32'd4, 32'd0, 32'd2,
                 32'hAAAA_0001, 32'hAAAA_0002,
         32'd8, 32'd5, PID_RW_REGISTER, RW_READ, 32'h2_0400, 32'd4, DATASTORE_APPEND, 32'd2,
         // SlaveDsp 2: write the low half of HPIA, read it back
         32'd9, 32'd6, PID_RW_REGISTER, RW_WRITE, 32'hC_8000, 32'd0, 32'd0, 32'd1, 32'h0000_0BEE,
         32'd8, 32'd7, PID_RW_REGISTER, RW_READ, 32'hC_8000, 32'd0, DATASTORE_APPEND, 32'd1,
         // status LED and RodStatusRegister0 from the ROD side
         32'd9, 32'd8, PID_RW_REGISTER, RW_WRITE, 32'h0_1070, 32'd0, 32'd0, 32'd1, 32'h0000_005A,
         32'd8, 32'd9, PID_RW_REGISTER, RW_READ, 32'h0_1000, 32'd0, DATASTORE_APPEND, 32'd1,
         32'd4, 32'd10, PID_CHECK_OUTPUT, 32'd0};
    build(32'h1, p, 10, l);
    run_list(l, ordy, r);
    check("list1 outListReady", word_t'(ordy), 1);
    if (ordy) begin
      check_reply("list1", r, 32'h1, 6);
      // echo 1 at word 3
      check("echo local prim length", r[3], 32'd4);
      check("echo local prim index", r[4], 32'd2);
      check("echo local prim id", r[5], PID_ECHO);
      check("echo local data", r[6], 32'h1234_5678);
      check("echo via register data", r[10], 32'h9ABC_DEF0);
      check("ext read prim length", r[11], 32'd5);
      check("ext read word 0", r[14], 32'hAAAA_0001);
      check("ext read word 1", r[15], 32'hAAAA_0002);
      check("slave read prim index", r[17], 32'd7);
      check("slave read data", r[19], 32'h0000_0BEE);
      check("status0 read shows busy and executing", r[23][3:2], 2'b11);
      check("status0 read shows last completed primIndex", r[23][27:8], 20'd8);
      check("checkoutput length", r[24], 32'd35);
      for (int i = 0; i < 32; i++) check("checkoutput walking one", r[27 + i], word_t'(1) << i);
      if (r[14] == 32'hAAAA_0001 && r[15] == 32'hAAAA_0002) n_ext++;
      if (r[19] == 32'h0000_0BEE) n_slave++;
      if (r[10] == 32'h9ABC_DEF0 && r[23][2]) n_rr++;
    end
    check("ext model holds written word", ext_mem[32'h2_0404], 32'hAAAA_0002);
    check("slave bus writes", word_t'(slave_wr_cnt), 1);
    check("slave bus reads", word_t'(slave_rd_cnt), 1);
    check("status LED", word_t'(status_led), 32'h5A);
    if (status_led == 8'h5A) n_led++;
    vme_rd(3'd1, s1);
    check("rodMode RUN", word_t'(s1[S1_ROD_MODE]), 1);
    vme_rd(3'd0, s0);
    check("listIndex", word_t'(s0[S0_LIST_INDEX +: 4]), 1);
    check("primIndex of last primitive", word_t'(s0[S0_PRIM_INDEX +: 20]), 10);

    // 2. back to COMMAND mode; unknown PrimitiveID -> commandIgnored
    p = {32'd4, 32'd1, PID_SET_ROD_MODE, MODE_COMMAND,
         32'd3, 32'd2, 32'h0000_7777};
    build(32'h2, p, 2, l);
    run_list(l, ordy, r);
    check("list2 has no reply", word_t'(ordy), 0);
    vme_rd(3'd1, s1);
    check("rodMode COMMAND", word_t'(s1[S1_ROD_MODE]), 0);
    if (!s1[S1_ROD_MODE]) n_modesw++;
    check("commandIgnored", word_t'(s1[S1_CMD_IGNORED]), 1);
    if (s1[S1_CMD_IGNORED]) n_ignored++;
    vme_rd(3'd1, s1);
    check("commandIgnored cleared on read", word_t'(s1[S1_CMD_IGNORED]), 0);

    // 3. error buffer read (RINGBUFF): holds the unknown-primitive word
    read_textbuf(ERR_BASE, C0_ERR_RD_REQ, S0_ERR_NOT_EMPTY, w, wpa);
    check("error buffer word count", word_t'(w.size()), 1);
    if (w.size() > 0) check("error buffer word", w[0], {EB_UNKNOWN_PRIM, 24'd2});
    check("first read starts at buffer start", wpa, word_t'(ERR_BASE));

    // 4. bad checksum and input overflow, queued behind each other
    p = {32'd4, 32'd1, PID_SET_ROD_MODE, MODE_RUN};
    build(32'h3, p, 1, l);
    l[l.size() - 1] ^= 32'h10;
    run_list(l, ordy, r);
    check("bad checksum: no reply", word_t'(ordy), 0);
    build(32'h4, p, 1, l);
    l[0] = word_t'(MSG_WORDS);  // more than the input buffer holds
    run_list(l, ordy, r);
    check("irq raised", word_t'(vme_irq), 1);
    take_exception(id);
    check("first exception: bad checksum", id, ERR_BAD_CHECKSUM);
    if (id == ERR_BAD_CHECKSUM) n_badck++;
    check("irq for queued exception", word_t'(vme_irq), 1);
    take_exception(id);
    check("second exception: input overflow", id, ERR_IN_OVERFLOW);
    if (id == ERR_IN_OVERFLOW) begin n_inovf++; n_queue++; end
    vme_rd(3'd1, s1);
    check("exception queue empty", word_t'(s1[S1_INTERRUPT_ID +: 8]), 0);
    check("rodMode untouched by rejected lists", word_t'(s1[S1_ROD_MODE]), 0);

    // 5. register access without acknowledge -> Timeout
    p = {32'd8, 32'd1, PID_RW_REGISTER, RW_READ, 32'h7_f000, 32'd0, DATASTORE_APPEND, 32'd1};
    build(32'h5, p, 1, l);
    t0 = n_exec_seen;
    run_list(l, ordy, r);
    take_exception(id);
    check("timeout exception", id, ERR_TIMEOUT);
    if (id == ERR_TIMEOUT) n_timeout++;

    // 6. reply larger than the output buffer -> Output buffer overflow
    p = {32'd8, 32'd1, PID_RW_REGISTER, RW_READ, 32'h0_100c, 32'd0, DATASTORE_APPEND,
         word_t'(OUT_BASE)};
    build(32'h6, p, 1, l);
    run_list(l, ordy, r);
    take_exception(id);
    check("output overflow exception", id, ERR_OUT_OVERFLOW);
    if (id == ERR_OUT_OVERFLOW) n_outovf++;

    // 7. abort: three primitives, only the first runs
    set_c0(C0_ABORT, 1);
    p = {32'd4, 32'd11, PID_SET_ROD_MODE, MODE_RUN,
         32'd4, 32'd12, PID_SET_ROD_MODE, MODE_COMMAND,
         32'd4, 32'd13, PID_SET_ROD_MODE, MODE_COMMAND};
    build(32'h7, p, 3, l);
    run_list(l, ordy, r);
    set_c0(C0_ABORT, 0);
    vme_rd(3'd0, s0);
    check("primListAborted", word_t'(s0[S0_ABORTED]), 1);
    check("aborted after first primitive", word_t'(s0[S0_PRIM_INDEX +: 20]), 11);
    vme_rd(3'd1, s1);
    check("first primitive ran", word_t'(s1[S1_ROD_MODE]), 1);
    if (s0[S0_ABORTED] && s1[S1_ROD_MODE]) begin n_abort++; n_modesw++; end

    // 8. checksumWC: check only the first 4 words; then a damaged later word passes
    p = {32'd4, 32'd1, PID_SET_IN_CKWC, 32'd4};
    build(32'h8, p, 1, l);
    run_list(l, ordy, r);
    p = {32'd4, 32'd1, PID_SET_ROD_MODE, MODE_COMMAND,
         32'd4, 32'd2, PID_SET_IN_CKWC, CKWC_ALL};
    build(32'h9, p, 2, l);
    l[l.size() - 1] = xsum(l, 4, CKWC_ALL);
    run_list(l, ordy, r);
    vme_rd(3'd1, s1);
    check("first-N checksum accepted", word_t'(s1[S1_ROD_MODE]), 0);
    check("no exception", word_t'(vme_irq), 0);
    if (!s1[S1_ROD_MODE] && !vme_irq) begin n_ckwc++; n_modesw++; end

    // 9. error buffer now holds timeout and output-overflow words; read it
    //    in LINBUFF mode
    p = {32'd5, 32'd1, PID_SET_BUFF_RD_MODE, BUF_ERROR, 32'(RD_LINBUFF)};
    build(32'hA, p, 1, l);
    run_list(l, ordy, r);
    read_textbuf(ERR_BASE, C0_ERR_RD_REQ, S0_ERR_NOT_EMPTY, w, wpa);
    check("error words", word_t'(w.size()), 4);
    if (w.size() == 4) begin
      check("bad checksum word", w[0], {EB_BAD_CHECKSUM, 24'd3});
      check("length word", w[1], {EB_LEN_BOUNDS, 24'd4});
      check("timeout word", w[2], {EB_TIMEOUT, 24'd1});
      check("output overflow word", w[3], {EB_OUT_OVERFLOW, 24'd1});
    end
    check("RINGBUFF: next read starts after the old data", wpa, word_t'(ERR_BASE + 1));
    if (w.size() == 4 && wpa == word_t'(ERR_BASE + 1)) n_ring++;
    // after a LINBUFF read the next data start at the buffer start again
    p = {32'd3, 32'd5, 32'h0000_7778};
    build(32'hD, p, 1, l);
    run_list(l, ordy, r);
    read_textbuf(ERR_BASE, C0_ERR_RD_REQ, S0_ERR_NOT_EMPTY, w, wpa);
    check("LINBUFF: next read starts at buffer start", wpa, word_t'(ERR_BASE));
    if (w.size() == 1) check("second unknown primitive word", w[0], {EB_UNKNOWN_PRIM, 24'd5});
    if (w.size() == 1 && wpa == word_t'(ERR_BASE)) n_lin++;

    // 10. information buffer overflow: NOOVERWRITE keeps the first words,
    //     OVERWRITE the last ones
    for (int i = 0; i < TXT_DEPTH + 3; i++) begin
      @(negedge clk); inf_wr = 1; inf_data = 32'h1000_0000 + i;
    end
    @(negedge clk); inf_wr = 0;
    check("info overflow flag", word_t'(buf_overflow[1]), 1);
    read_textbuf(INF_BASE, C0_INFO_RD_REQ, S0_INF_NOT_EMPTY, w, wpa);
    check("NOOVERWRITE count", word_t'(w.size()), word_t'(TXT_DEPTH));
    if (w.size() == TXT_DEPTH) begin
      check("NOOVERWRITE oldest kept", w[0], 32'h1000_0000);
      if (w[0] == 32'h1000_0000 && w[TXT_DEPTH - 1] == 32'h1000_0000 + TXT_DEPTH - 1) n_ovf_drop++;
    end
    check("overflow cleared by read", word_t'(buf_overflow[1]), 0);
    p = {32'd5, 32'd1, PID_SET_BUFF_OVF_MODE, BUF_INFO, 32'(OVF_OVERWR)};
    build(32'hB, p, 1, l);
    run_list(l, ordy, r);
    for (int i = 0; i < TXT_DEPTH + 3; i++) begin
      @(negedge clk); inf_wr = 1; inf_data = 32'h2000_0000 + i;
    end
    @(negedge clk); inf_wr = 0;
    read_textbuf(INF_BASE, C0_INFO_RD_REQ, S0_INF_NOT_EMPTY, w, wpa);
    check("OVERWRITE count", word_t'(w.size()), word_t'(TXT_DEPTH));
    if (w.size() == TXT_DEPTH) begin
      check("OVERWRITE oldest dropped", w[0], 32'h2000_0003);
      check("OVERWRITE newest kept", w[TXT_DEPTH - 1], 32'h2000_0000 + TXT_DEPTH + 2);
      if (w[0] == 32'h2000_0003) n_ovf_over++;
    end

    // 11. diagnostic buffer, emptied by "Reset buffer" before the host reads
    for (int i = 0; i < 5; i++) begin @(negedge clk); diag_wr = 1; diag_data = i; end
    @(negedge clk); diag_wr = 0;
    vme_rd(3'd0, s0);
    check("diag notEmpty", word_t'(s0[S0_DIAG_NOT_EMPTY]), 1);
    p = {32'd4, 32'd1, PID_RESET_BUFFER, BUF_DIAG};
    build(32'hC, p, 1, l);
    run_list(l, ordy, r);
    vme_rd(3'd0, s0);
    check("diag emptied by Reset buffer", word_t'(s0[S0_DIAG_NOT_EMPTY]), 0);

    // 12. a PrimitiveList passed on to SlaveDsp 1, and its reply brought back
    begin
      word_t sl[$], sp[$], x;
      int sn;
      sp = {32'd4, 32'd0, PID_ECHO, 32'h5151_0000 | 32'($urandom % 65536)};
      build(32'h3, sp, 1, sl);
      sn = sl.size();
      x = '0;
      foreach (sl[i]) x ^= sl[i];
      p = {word_t'(4 + sn), 32'd1, PID_SEND_SLAVE_LIST, 32'd1};
      foreach (sl[i]) p.push_back(sl[i]);
      build(32'hD, p, 1, l);
      run_list(l, ordy, r);
      check("slave list outListReady", word_t'(ordy), 1);
      check("slave list received once", slv_lists[1], 1);
      check("other slaves idle", slv_lists[0] + slv_lists[2] + slv_lists[3], 0);
      check("slave handshake order", slv_perr[1], 0);
      for (int i = 0; i < sn; i++) check("slave input word", g_slv[1].u_slv.mem[i], sl[i]);
      check("slave inListReady cleared", g_slv[1].u_slv.mem[32'h1000], 0);
      if (ordy) begin
        check_reply("slave list", r, 32'hD, 1);
        check("slave return prim length", r[3], 32'd16);
        check("slave return prim id", r[5], PID_SEND_SLAVE_LIST);
        check("slave reply length", r[6], 32'd13);
        check("slave reply listIndex", r[7], 32'h3);
        check("slave reply data 0", r[12], word_t'(sn));
        check("slave reply data 1", r[13], x);
        check("slave reply checksum", r[18], xsum(r[6:17], 12, CKWC_ALL));
        if (r[12] == word_t'(sn) && r[13] == x && slv_lists[1] == 1) n_slave_list++;
      end
    end

    // 13. downstream checksumWC for SlaveDsp 1: the list goes down with its
    // checksum made over the first 4 words; the reply is checked over its
    // first 2 words only, so it fails and is dropped with Bad checksum
    begin
      word_t sl[$], sp[$];
      int sn;
      sp = {32'd4, 32'd0, PID_ECHO, 32'h6161_0000 | 32'($urandom % 65536)};
      build(32'h4, sp, 1, sl);
      sn = sl.size();
      p = {32'd5, 32'd1, PID_SET_OUT_DS_CKWC, 32'd4, 32'd1,
           32'd5, 32'd2, PID_SET_IN_DS_CKWC, 32'd2, 32'd1,
           word_t'(4 + sn), 32'd3, PID_SEND_SLAVE_LIST, 32'd1};
      foreach (sl[i]) p.push_back(sl[i]);
      build(32'hE, p, 3, l);
      run_list(l, ordy, r);
      check("ds list received", slv_lists[1], 2);
      check("ds checksum over first 4 words", g_slv[1].u_slv.mem[sn - 1], xsum(sl, 4, 32'd4));
      check("ds bad reply: no return primitive", word_t'(ordy), 0);
      take_exception(id);
      check("ds bad reply exception", id, ERR_BAD_CHECKSUM);
      if (id == ERR_BAD_CHECKSUM && g_slv[1].u_slv.mem[sn - 1] == xsum(sl, 4, 32'd4))
        n_ds_ckwc++;
    end

    // 14. SlaveDsps 0 and 2 raise hardware interrupts while a list with a
    // register access runs: both share the register bus; the logged words
    // of each slave land in the error buffer after a header word
    begin
      word_t ew[$];
      int at;
      p = {32'd8, 32'd0, PID_RW_REGISTER, RW_READ, 32'h2_0400, 32'd4, DATASTORE_APPEND, 32'd2};
      @(negedge clk);
      slv_raise[0] = 1'b1; slv_raise[2] = 1'b1;
      @(negedge clk);
      slv_raise[0] = 1'b0; slv_raise[2] = 1'b0;
      build(32'h5, p, 1, l);
      run_list(l, ordy, r);
      while (s_hint_n != '1) @(negedge clk);
      repeat (50) @(negedge clk);
      check("interrupts raised", slv_nint[0] + slv_nint[2], 2);
      check("HINT cleared", word_t'(s_hint_n), word_t'({N_SLAVES{1'b1}}));
      read_textbuf(ERR_BASE, C0_ERR_RD_REQ, S0_ERR_NOT_EMPTY, ew, wpa);
      at = -1;
      foreach (ew[i]) if (at < 0 && ew[i] == errbuf_word(EB_SLAVE_INT, 24'd0)) at = i;
      check("slave interrupt words present", word_t'(at >= 0 && at + 8 <= ew.size()), 1);
      if (at >= 0 && at + 8 <= ew.size()) begin
        word_t e[$];
        e = {errbuf_word(EB_SLAVE_INT, 24'd0), 32'hE000_0000, 32'hE000_0001, 32'hE000_0002,
             errbuf_word(EB_SLAVE_INT, 24'd2), 32'hE000_0000, 32'hE000_0001, 32'hE000_0002};
        foreach (e[i]) check($sformatf("slave interrupt word %0d", i), ew[at + i], e[i]);
        if (ew[at + 3] == e[3] && ew[at + 7] == e[7] && s_hint_n == '1) n_sint++;
      end
    end

    // ---------------- mechanism summary ----------------
    if (n_busy_seen > 0 && n_exec_seen > 0) ; else begin
      failures++; $display("FAIL busy/executing never seen by host polls");
    end
    begin
      string names[$];
      int cnt[$];
      names = {"list_done", "primitive", "reply", "bad_checksum", "input_overflow",
                         "output_overflow", "timeout", "abort", "exception_queue", "irq",
                         "command_ignored", "rod_mode_switch", "checksum_wc", "ringbuff_read",
                         "linbuff_read", "overflow_nooverwrite", "overflow_overwrite",
                         "slave_hpi", "ext_register", "rr_register", "status_led", "hint",
                         "dspint", "slave_list", "downstream_checksum_wc", "slave_interrupt"};
      cnt = {n_list, n_prim, n_reply, n_badck, n_inovf, n_outovf, n_timeout, n_abort,
                    n_queue, n_irq, n_ignored, n_modesw, n_ckwc, n_ring, n_lin, n_ovf_drop,
                    n_ovf_over, n_slave, n_ext, n_rr, n_led, n_hint, n_dspint, n_slave_list, n_ds_ckwc, n_sint};
      foreach (names[i]) begin
        $display("mechanism %-22s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism %s never occurred", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
