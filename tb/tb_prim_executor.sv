// tb_prim_executor: self-checking test of the primitive executor.
// A message memory model (one cycle read latency) holds each primitive body;
// a register-bus model stores writes and acknowledges after a random delay,
// except in one address range that never answers. Every primitive the
// executor implements is run, with its effects, the return-data primitives
// in the reply area, the error reports and the timeout checked against
// values worked out here.
module tb_prim_executor;
  import rod_msg_pkg::*;
  localparam int AW = 10, OUT_BASE = 512, OUT_WORDS = 72, TMO = 50;
  localparam logic [AW-1:0] BODY = 10'd100;

  logic clk = 0, rst_n = 0;
  logic list_start = 0, start = 0;
  word_t pid = '0, pindex = '0, plen = '0;
  logic [AW-1:0] body_addr = BODY;
  logic done, active;
  logic [AW-1:0] out_wp, m_addr;
  word_t out_nprims, m_wdata, m_rdata;
  logic m_we;
  logic b_re, b_we, b_ack = 0;
  logic [19:0] b_addr;
  word_t b_wdata, b_rdata = '0;
  word_t in_ckwc, out_ckwc;
  logic rod_mode;
  logic [2:0] buf_reset, buf_rd_mode_we, buf_ovf_mode_we;
  logic buf_mode_val;
  logic eb_wr, exc_push, cmd_ignored;
  word_t eb_data;
  logic [7:0] exc_id;

  word_t mem [1024];
  word_t regs [logic [19:0]];
  int checks = 0, failures = 0;
  int n_eb = 0, n_exc = 0, n_ign = 0;
  word_t last_eb; logic [7:0] last_exc;
  logic [2:0] acc_reset, acc_rd, acc_ovf; logic last_val;

  always #5 clk = ~clk;

  prim_executor #(.AW(AW), .OUT_BASE(OUT_BASE), .OUT_WORDS(OUT_WORDS),
                  .TIMEOUT_CYCLES(TMO)) dut (.*);

  always_ff @(posedge clk) begin
    if (m_we) mem[m_addr] <= m_wdata;
    m_rdata <= mem[m_addr];
    if (rst_n) begin
      if (eb_wr) begin n_eb++; last_eb = eb_data; end
      if (exc_push) begin n_exc++; last_exc = exc_id; end
      if (cmd_ignored) n_ign++;
      acc_reset |= buf_reset; acc_rd |= buf_rd_mode_we; acc_ovf |= buf_ovf_mode_we;
      if (|buf_rd_mode_we || |buf_ovf_mode_we) last_val = buf_mode_val;
    end
  end

  // register bus model: random 1..4 cycle acknowledge, no answer at 0x7f000
  initial begin
    forever begin
      @(posedge clk);
      if ((b_re || b_we) && b_addr != 20'h7f000) begin
        logic [19:0] a; logic w; word_t d;
        a = b_addr; w = b_we; d = b_wdata;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        if (w) regs[a] = d;
        b_rdata <= regs.exists(a) ? regs[a] : 32'h0BAD_0000 | 32'(a);
        b_ack <= 1;
        @(posedge clk);
        b_ack <= 0;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic run(input word_t id, input word_t idx, input word_t body[$]);
    foreach (body[i]) mem[int'(BODY) + i] = body[i];
    acc_reset = 0; acc_rd = 0; acc_ovf = 0;
    @(negedge clk);
    pid = id; pindex = idx; plen = 32'(body.size() + 3); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic check_ret(input int at, input word_t idx, input word_t id, input word_t data[$]);
    check("ret length", mem[OUT_BASE + at], 32'(data.size() + 3));
    check("ret index", mem[OUT_BASE + at + 1], idx);
    check("ret id", mem[OUT_BASE + at + 2], id);
    foreach (data[i]) check($sformatf("ret data %0d", i), mem[OUT_BASE + at + 3 + i], data[i]);
  endtask

  initial begin
    word_t q[$];
    int e0, i0;
    for (int i = 0; i < 1024; i++) mem[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("default in ckwc", in_ckwc, CKWC_ALL);
    check("reply starts at 3", 32'(out_wp), 3);

    run(PID_SET_IN_CKWC, 1, '{32'h10});   check("in ckwc", in_ckwc, 32'h10);
    run(PID_SET_OUT_CKWC, 2, '{32'h0});   check("out ckwc", out_ckwc, 0);
    run(PID_SET_ROD_MODE, 3, '{MODE_RUN}); check("rod mode run", 32'(rod_mode), 1);
    run(PID_SET_ROD_MODE, 4, '{MODE_COMMAND}); check("rod mode command", 32'(rod_mode), 0);
    e0 = n_eb; i0 = n_ign;
    run(PID_SET_ROD_MODE, 5, '{32'd7});
    check("bad mode reported", 32'(n_eb - e0), 1);
    check("bad mode ignored", 32'(n_ign - i0), 1);
    check("bad mode code", last_eb, {EB_BAD_ATTRIBUTE, 24'd5});

    run(PID_RESET_BUFFER, 6, '{BUF_INFO}); check("reset info", 32'(acc_reset), 3'b010);
    run(PID_RESET_BUFFER, 7, '{BUF_ALL});  check("reset all", 32'(acc_reset), 3'b111);
    run(PID_SET_BUFF_RD_MODE, 8, '{BUF_DIAG, 32'd1});
    check("rd mode diag", 32'(acc_rd), 3'b100); check("rd mode value", 32'(last_val), 1);
    run(PID_SET_BUFF_OVF_MODE, 9, '{BUF_ERROR, 32'd0});
    check("ovf mode err", 32'(acc_ovf), 3'b001); check("ovf mode value", 32'(last_val), 0);
    e0 = n_eb;
    run(PID_SET_BUFF_OVF_MODE, 10, '{BUF_INPUT, 32'd0});
    check("ovf mode bad buffer", 32'(n_eb - e0), 1);

    // echo, here
    run(PID_ECHO, 11, '{32'hFEED_BEEF, 32'd0});
    check_ret(3, 11, PID_ECHO, '{32'hFEED_BEEF});
    check("wp after echo", 32'(out_wp), 7);
    check("nprims after echo", out_nprims, 1);
    // echo through the ROD Resources FPGA
    run(PID_ECHO, 12, '{32'h1234_ABCD, 32'd2});
    check_ret(7, 12, PID_ECHO, '{32'h1234_ABCD});
    check("echo wrote RESERVED_REG_0", regs[A_RESERVED_0], 32'h1234_ABCD);

    // register write, three words, increment 4
    run(PID_RW_REGISTER, 13, '{RW_WRITE, 32'h00400, 32'd4, DATASTORE_APPEND, 32'd3,
                               32'hA1, 32'hA2, 32'hA3});
    check("reg 0x400", regs[20'h400], 32'hA1);
    check("reg 0x404", regs[20'h404], 32'hA2);
    check("reg 0x408", regs[20'h408], 32'hA3);
    check("write returns nothing", out_nprims, 2);
    // register read appended
    run(PID_RW_REGISTER, 14, '{RW_READ, 32'h00400, 32'd4, DATASTORE_APPEND, 32'd3});
    check_ret(11, 14, PID_RW_REGISTER, '{32'hA1, 32'hA2, 32'hA3});
    check("wp after read", 32'(out_wp), 17);
    // register read to a given address
    run(PID_RW_REGISTER, 15, '{RW_READ, 32'h00404, 32'd4, 32'h300, 32'd2});
    check("placed len", mem[10'h300], 5);
    check("placed idx", mem[10'h301], 15);
    check("placed d0", mem[10'h303], 32'hA2);
    check("placed d1", mem[10'h304], 32'hA3);
    check("placed read not in reply", out_nprims, 3);

    // timeout
    e0 = n_exc;
    run(PID_RW_REGISTER, 16, '{RW_READ, 32'h7f000, 32'd0, DATASTORE_APPEND, 32'd1});
    check("timeout exception", 32'(n_exc - e0), 1);
    check("timeout id", 32'(last_exc), ERR_TIMEOUT);
    check("timeout not in reply", out_nprims, 3);

    // unknown primitive
    e0 = n_eb; i0 = n_ign;
    run(32'h0000_0777, 17, '{32'h0});
    check("unknown reported", 32'(n_eb - e0), 1);
    check("unknown code", last_eb, {EB_UNKNOWN_PRIM, 24'd17});
    check("unknown ignored", 32'(n_ign - i0), 1);

    // slave list with an illegal SlaveDsp number, and one longer than its body
    e0 = n_eb; i0 = n_ign;
    run(PID_SEND_SLAVE_LIST, 19, '{32'd4, 32'd2, 32'd0});
    check("slave number 4 ignored", 32'(n_ign - i0), 1);
    check("slave number code", last_eb, {EB_BAD_ATTRIBUTE, 24'd19});
    run(PID_SEND_SLAVE_LIST, 20, '{32'd1, 32'd3, 32'd0});
    check("slave list past body ignored", 32'(n_ign - i0), 2);
    check("slave list no reply", out_nprims, 3);
    run(PID_SET_IN_DS_CKWC, 21, '{32'd4, 32'd7});
    check("downstream checksumWC slave 7 ignored", 32'(n_ign - i0), 3);
    run(PID_SET_OUT_DS_CKWC, 22, '{32'd4, 32'd3});
    check("downstream checksumWC slave 3 accepted", 32'(n_ign - i0), 3);
    check("downstream checksumWC value", dut.ds_out_ckwc[3], 32'd4);

    // CheckOutput after a fresh list: 32 walking ones
    @(negedge clk); list_start = 1; @(negedge clk); list_start = 0;
    check("list start empties reply", 32'(out_wp), 3);
    run(PID_CHECK_OUTPUT, 18, '{32'd0});
    q = {};
    for (int i = 0; i < 32; i++) q.push_back(32'h1 << i);
    check_ret(3, 18, PID_CHECK_OUTPUT, q);
    check("wp after check output", 32'(out_wp), 38);
    // a second one does not fit 72 words: overflow
    e0 = n_exc;
    run(PID_CHECK_OUTPUT, 19, '{32'd0});
    check("output overflow exception", 32'(n_exc - e0), 1);
    check("output overflow id", 32'(last_exc), ERR_OUT_OVERFLOW);
    check("reply unchanged", 32'(out_wp), 38);
    // reset output buffer
    run(PID_RESET_BUFFER, 20, '{BUF_OUTPUT});
    check("reset output", 32'(out_wp), 3);
    check("reset output nprims", out_nprims, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
