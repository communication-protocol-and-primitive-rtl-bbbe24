// tb_slave_int_handler: self-checking test of the SlaveDsp hardware-interrupt
// service.
//
// The handler drives a slave_hpi_bridge whose four host ports go to
// slave_dsp_model instances. The test raises interrupts with a random number
// of logged words in random slaves, one at a time and several at once, and
// checks against what the testbench expects:
//   - the error buffer receives, per served slave in slave-number order, the
//     header word {EB_SLAVE_INT, slave} and then the slave's logged words,
//     cut at MAX_WORDS;
//   - every slave's HINT is cleared afterwards and the handler is idle;
//   - a slave logging zero words gives only the header word;
//   - slaves that did not interrupt see no HINT change.
// A watchdog ends the run if the handler hangs.
module tb_slave_int_handler;
  import rod_msg_pkg::*;

  localparam int unsigned MAX_WORDS = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]  hint_n;
  logic        busy, serviced, b_re, b_we, b_ack, eb_wr;
  logic [19:0] b_addr;
  word_t       b_wdata, b_rdata, eb_data;

  slave_int_handler #(.N_SLAVES(4), .MAX_WORDS(MAX_WORDS)) dut (
    .clk, .rst_n, .hint_n, .busy, .serviced,
    .b_re, .b_we, .b_addr, .b_wdata, .b_rdata, .b_ack, .eb_wr, .eb_data
  );

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

  logic        raise [4];
  int unsigned nw [4], nint [4], lists [4], perr [4];

  for (genvar i = 0; i < 4; i++) begin : g_slv
    slave_dsp_model u_slv (
      .clk, .rst_n, .hcs_n(hcs_n[i]), .hcntrl, .hhwil, .hr_nw, .hds_n, .hd_out, .hd_oe,
      .hd_in(hd_in[i]), .reply_en(1'b0), .ack_en(1'b0), .reply_extra(32'd0),
      .lists_done(lists[i]), .proto_err(perr[i]),
      .raise_int(raise[i]), .err_words(nw[i]), .hint_n(hint_n[i]), .ints_raised(nint[i])
    );
  end

  // error-buffer words as written
  word_t eb [$];
  always @(posedge clk) if (eb_wr) eb.push_back(eb_data);

  task automatic check(string what, word_t got_v, word_t exp_v);
    checks++;
    if (got_v !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got_v, exp_v);
    end
  endtask

  // raise interrupts in the slaves of `mask`, wait for the handler to finish,
  // check the error-buffer words
  task automatic burst(logic [3:0] mask);
    word_t exp [$];
    int unsigned cnt [4];
    eb.delete();
    for (int i = 0; i < 4; i++) begin
      nw[i]  = $urandom % 24;
      if ($urandom % 5 == 0) nw[i] = 0;
      cnt[i] = nint[i];
    end
    @(negedge clk);
    for (int i = 0; i < 4; i++) raise[i] = mask[i];
    @(negedge clk);
    for (int i = 0; i < 4; i++) raise[i] = 1'b0;
    for (int i = 0; i < 4; i++) begin
      if (mask[i]) begin
        exp.push_back(errbuf_word(EB_SLAVE_INT, 24'(i)));
        for (int k = 0; k < nw[i] && k < MAX_WORDS; k++)
          exp.push_back({8'hE0, 8'(cnt[i]), 16'(k)});
      end
    end
    repeat (3) @(negedge clk);
    while (busy || hint_n != 4'hF) @(negedge clk);
    repeat (3) @(negedge clk);
    check("eb word count", eb.size(), exp.size());
    for (int k = 0; k < exp.size() && k < eb.size(); k++)
      check($sformatf("eb word %0d", k), eb[k], exp[k]);
    check("all HINT clear", word_t'(hint_n), 4'hF);
    check("idle", word_t'(busy), 0);
    for (int i = 0; i < 4; i++)
      check($sformatf("slave %0d interrupts", i), nint[i] - cnt[i], mask[i] ? 1 : 0);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) begin raise[i] = 1'b0; nw[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check("no HINT after reset", word_t'(hint_n), 4'hF);
    check("idle after reset", word_t'(busy), 0);
    // one slave at a time
    for (int t = 0; t < 8; t++) burst(4'(1 << (t % 4)));
    // several at once, served lowest first
    for (int t = 0; t < 8; t++) burst(4'($urandom % 15 + 1));
    burst(4'hF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
