// tb_slave_list_sender: self-checking test of the MasterDsp-to-SlaveDsp list
// transfer.
//
// The sender drives a slave_hpi_bridge whose four host ports go to
// slave_dsp_model instances; a small word memory with one cycle of read
// latency stands in for the message RAM. Each test writes a random slave
// PrimitiveList into the memory and starts the sender, then checks, against
// values the testbench works out itself:
//   - the list arrived word for word in the chosen slave's input buffer and
//     no other slave was touched;
//   - the slave saw the handshake in order (no inListReady while dspAck set)
//     and ended with its command and status words clear;
//   - with a reply, the reply list (length, copied ListIndex, data words and
//     XOR checksum) is in the memory at the output address, and nothing past
//     its end was written;
//   - without a reply, nothing was written;
//   - a reply longer than the room given ends with `overflow` and no write;
//   - the list's last word is the checksum made again with the downstream
//     checksumWC (all words, the first N, or left alone when off), and a
//     reply checked over the wrong number of words is flagged bad;
//   - a slave that never answers ends with `timeout` after the poll limit.
// A watchdog ends the run if the sender hangs.
module tb_slave_list_sender;
  import rod_msg_pkg::*;

  localparam int unsigned AW        = 11;
  localparam int unsigned MAX_POLLS = 64;
  localparam int unsigned OUT_AT    = 1024;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // sender
  logic          start = 1'b0;
  logic [1:0]    slave = '0;
  logic [AW-1:0] src_addr = '0, out_addr = '0;
  word_t         out_room = '0;
  word_t         ock = CKWC_ALL, ick = CKWC_ALL;
  logic          busy, done, tmo, ovf, got, badck;
  word_t         rlen;
  logic [AW-1:0] m_addr;
  logic          m_we;
  word_t         m_wdata, m_rdata;
  logic          b_re, b_we, b_ack;
  logic [19:0]   b_addr;
  word_t         b_wdata, b_rdata;

  slave_list_sender #(.AW(AW), .MAX_POLLS(MAX_POLLS)) dut (
    .clk, .rst_n, .start, .slave, .src_addr, .out_addr, .out_room,
    .out_ckwc(ock), .in_ckwc(ick),
    .busy, .done, .timeout(tmo), .overflow(ovf), .got_reply(got), .bad_checksum(badck),
    .reply_len(rlen),
    .m_addr, .m_we, .m_wdata, .m_rdata,
    .b_re, .b_we, .b_addr, .b_wdata, .b_rdata, .b_ack
  );

  // message RAM
  word_t ram [2**AW];
  int    ram_writes = 0;
  always_ff @(posedge clk) begin
    m_rdata <= ram[m_addr];
    if (m_we) begin
      ram[m_addr] <= m_wdata;
      ram_writes  <= ram_writes + 1;
    end
  end

  // bridge and slaves
  logic [15:0] br_rdata, hd_out;
  logic [3:0]  hcs_n;
  logic [1:0]  hcntrl;
  logic        hhwil, hr_nw, hds_n, hd_oe, br_ack, br_err, br_busy;
  logic [15:0] hd_in [4];

  slave_hpi_bridge #(.N_SLAVES(4)) u_br (
    .clk, .rst_n, .req(b_re | b_we), .we(b_we), .addr(b_addr), .wdata(b_wdata[15:0]),
    .rdata(br_rdata), .ack(br_ack), .err(br_err), .busy(br_busy),
    .hcs_n, .hcntrl, .hhwil, .hr_nw, .hds_n, .hd_out, .hd_oe, .hd_in
  );
  assign b_rdata = {16'h0, br_rdata};
  assign b_ack   = br_ack;

  logic        reply_en [4];
  logic        ack_en [4];
  int unsigned extra [4];
  int unsigned lists [4], perr [4];

  for (genvar i = 0; i < 4; i++) begin : g_slv
    slave_dsp_model u_slv (
      .clk, .rst_n, .hcs_n(hcs_n[i]), .hcntrl, .hhwil, .hr_nw, .hds_n, .hd_out, .hd_oe,
      .hd_in(hd_in[i]), .reply_en(reply_en[i]), .ack_en(ack_en[i]),
      .reply_extra(extra[i]), .lists_done(lists[i]), .proto_err(perr[i]),
      .raise_int(1'b0), .err_words(32'd0), .hint_n(), .ints_raised()
    );
  end

  task automatic check(string what, word_t got_v, word_t exp_v);
    checks++;
    if (got_v !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got_v, exp_v);
    end
  endtask

  // write a random list of `len` words at `at`; returns its words
  task automatic make_list(int unsigned at, int unsigned len, output word_t w [$]);
    w.delete();
    w.push_back(len);
    for (int i = 1; i < len; i++) w.push_back($urandom);
    for (int i = 0; i < len; i++) ram[at + i] = w[i];
  endtask

  task automatic run(int unsigned s, int unsigned at, word_t room);
    slave    = 2'(s);
    src_addr = AW'(at);
    out_addr = AW'(OUT_AT);
    out_room = room;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  int unsigned lists0 [4];

  // checksum the sender should put in the last word of a list
  function automatic word_t ds_sum(word_t w [$], word_t wc);
    word_t x = '0;
    for (int i = 0; i + 1 < w.size(); i++) if (wc == CKWC_ALL || i < wc) x ^= w[i];
    return x;
  endfunction

  task automatic one_transfer(int unsigned s, bit rep, int unsigned ext, word_t room,
                              bit expect_ovf, word_t o_wc = CKWC_ALL, word_t i_wc = CKWC_ALL,
                              bit expect_bad = 1'b0);
    word_t w [$];
    word_t x, ck, rl;
    int unsigned len, at, w0;
    len = 4 + $urandom % 40;
    at  = 8 + $urandom % 200;
    make_list(at, len, w);
    ock = o_wc; ick = i_wc;
    // what the slave should receive
    if (o_wc != CKWC_OFF) w[len - 1] = ds_sum(w, o_wc);
    for (int i = 0; i < 4; i++) begin
      reply_en[i] = rep; ack_en[i] = 1'b1; extra[i] = ext; lists0[i] = lists[i];
    end
    for (int i = 0; i < 80; i++) ram[OUT_AT + i] = 32'hDEAD_0000 + i;
    w0 = ram_writes;
    run(s, at, room);
    x = '0;
    foreach (w[i]) x ^= w[i];
    rl = 32'd10 + ext;
    check("timeout clear", word_t'(tmo), 0);
    check("overflow flag", word_t'(ovf), word_t'(expect_ovf));
    check("got_reply", word_t'(got), word_t'(rep && !expect_ovf));
    check("bad_checksum", word_t'(badck), word_t'(expect_bad));
    for (int i = 0; i < 4; i++)
      check($sformatf("slave %0d lists", i), lists[i] - lists0[i], (i == s) ? 1 : 0);
    for (int i = 0; i < len; i++)
      check($sformatf("slave in word %0d", i), g_slv_mem(s, i), w[i]);
    check("slave cmd cleared", g_slv_mem(s, 32'h1000), 0);
    @(negedge clk);
    check("slave status cleared", g_slv_mem(s, 32'h1001), 0);
    check("handshake order", perr[s], 0);
    if (rep && !expect_ovf) begin
      check("reply_len", rlen, rl);
      check("reply ListLength", ram[OUT_AT], rl);
      check("reply ListIndex", ram[OUT_AT + 1], w.size() > 1 ? w[1] : 0);
      check("reply data 0", ram[OUT_AT + 6], len);
      check("reply data 1", ram[OUT_AT + 7], x);
      for (int i = 0; i < ext; i++)
        check("reply pad", ram[OUT_AT + 8 + i], 32'hA500_0000 + i);
      ck = '0;
      for (int i = 0; i < rl - 1; i++) ck ^= ram[OUT_AT + i];
      check("reply checksum", ram[OUT_AT + rl - 1], ck);
      check("nothing past reply", ram[OUT_AT + rl], 32'hDEAD_0000 + rl);
      check("writes", ram_writes - w0, rl);
    end else begin
      check("no reply written", ram[OUT_AT], 32'hDEAD_0000);
      check("no writes", ram_writes - w0, 0);
    end
  endtask

  function automatic word_t g_slv_mem(int unsigned s, int unsigned a);
    unique case (s)
      0: return g_slv[0].u_slv.mem[a];
      1: return g_slv[1].u_slv.mem[a];
      2: return g_slv[2].u_slv.mem[a];
      default: return g_slv[3].u_slv.mem[a];
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 2**AW; i++) ram[i] = '0;
    for (int i = 0; i < 4; i++) begin
      reply_en[i] = 1'b1; ack_en[i] = 1'b1; extra[i] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // reply from each slave, random lengths
    for (int t = 0; t < 8; t++) one_transfer(t % 4, 1'b1, $urandom % 20, 32'd100, 1'b0);
    // no reply
    for (int t = 0; t < 3; t++) one_transfer($urandom % 4, 1'b0, 0, 32'd100, 1'b0);
    // reply does not fit
    one_transfer(1, 1'b1, 12, 32'd21, 1'b1);
    // reply exactly fits
    one_transfer(2, 1'b1, 11, 32'd21, 1'b0);
    // downstream checksumWC: list checksum made again over the first N words
    // or left alone when off; reply checked over all, off, or the first N
    one_transfer(0, 1'b1, 2, 32'd100, 1'b0, 32'd3, CKWC_ALL);
    one_transfer(1, 1'b1, 2, 32'd100, 1'b0, CKWC_OFF, CKWC_OFF);
    one_transfer(2, 1'b1, 2, 32'd100, 1'b0, 32'd100, 32'd100);
    one_transfer(3, 1'b1, 2, 32'd100, 1'b0, CKWC_ALL, 32'd2, 1'b1);

    // slave never answers: timeout after the poll limit
    for (int i = 0; i < 4; i++) ack_en[i] = 1'b0;
    ram[16] = 32'd5;
    run(3, 16, 32'd100);
    check("timeout", word_t'(tmo), 1);
    check("timeout no reply", word_t'(got), 0);
    // the slave still sees inListReady set: clear it by hand for the record
    check("timeout left inListReady", g_slv_mem(3, 32'h1000), 1);
    check("busy low after done", word_t'(busy), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
