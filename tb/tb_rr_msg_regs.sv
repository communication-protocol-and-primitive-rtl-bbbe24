// tb_rr_msg_regs: self-checking test of the RodStatus / VmeCommand registers.
// Checks host write access (command registers only), the decoded command
// bits, the live status fields at their bit positions, the ROD-side read and
// write port with its one-cycle acknowledge, clear-on-read of the sticky bits
// and the exception queue (order, retire by clearException, overflow).
module tb_rr_msg_regs;
  import rod_msg_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] h_addr = '0;
  logic h_re = 0, h_we = 0;
  word_t h_wdata = '0, h_rdata;
  logic [19:0] r_addr = '0;
  logic r_re = 0, r_we = 0, r_ack;
  word_t r_wdata = '0, r_rdata;
  handler_status_t hs = '0;
  logic err_not_empty = 0, inf_not_empty = 0, diag_not_empty = 0;
  board_status_t board = '0;
  logic exc_push = 0, rod_error_set = 0, cmd_ignored_set = 0;
  logic [7:0] exc_id = '0;
  vme_cmd_t cmd;
  word_t cmd1;
  logic irq;
  logic [7:0] status_led;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rr_msg_regs #(.EXC_DEPTH(4)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic hread(input logic [2:0] a, output word_t d);
    @(negedge clk); h_addr = a; h_re = 1;
    @(negedge clk); h_re = 0; d = h_rdata;
  endtask
  task automatic hwrite(input logic [2:0] a, input word_t d);
    @(negedge clk); h_addr = a; h_we = 1; h_wdata = d;
    @(negedge clk); h_we = 0;
  endtask
  task automatic rread(input logic [19:0] a, output word_t d);
    @(negedge clk); r_addr = a; r_re = 1;
    @(negedge clk); r_re = 0;
    check("r_ack after read", word_t'(r_ack), 1);
    d = r_rdata;
  endtask
  task automatic rwrite(input logic [19:0] a, input word_t d);
    @(negedge clk); r_addr = a; r_we = 1; r_wdata = d;
    @(negedge clk); r_we = 0;
    check("r_ack after write", word_t'(r_ack), 1);
  endtask
  task automatic push(input logic [7:0] id);
    @(negedge clk); exc_push = 1; exc_id = id;
    @(negedge clk); exc_push = 0;
  endtask

  initial begin
    word_t d;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // command register: host writes, ROD reads
    hwrite(3'd3, 32'h0000_0001);           // inListReady
    check("cmd.in_list_ready", word_t'(cmd.in_list_ready), 1);
    check("cmd.abort", word_t'(cmd.abort_list_execution), 0);
    hwrite(3'd3, 32'h0000_0F16);           // bits 1,2,4,8,9,10,11
    check("abort bit1", word_t'(cmd.abort_list_execution), 1);
    check("errReq bit2", word_t'(cmd.err_buff_read_request), 1);
    check("infoReq bit3", word_t'(cmd.info_buff_read_request), 0);
    check("diagReq bit4", word_t'(cmd.diag_buff_read_request), 1);
    check("enableSlink bit8", word_t'(cmd.enable_slink), 1);
    check("enableInts bit10", word_t'(cmd.enable_interrupts), 1);
    hwrite(3'd3, 32'h0000_0400);           // only enableInterrupts
    hwrite(3'd4, 32'hCAFE_F00D);
    check("cmd1", cmd1, 32'hCAFE_F00D);
    hread(3'd3, d); check("host reads cmd0", d, 32'h0000_0400);
    rread(A_VME_CMND_1, d); check("ROD reads cmd1", d, 32'hCAFE_F00D);
    rread(A_VME_CMND_0, d); check("ROD reads cmd0", d, 32'h0000_0400);

    // status 0 fields
    hs.out_list_ready = 1; hs.dsp_ack = 0; hs.busy = 1; hs.executing = 1;
    hs.list_index = 4'hA; hs.prim_index = 20'h12345; hs.prim_list_aborted = 1;
    hs.nest_index = 8'h5C; hs.rod_mode = 1;
    err_not_empty = 1; diag_not_empty = 1;
    hread(3'd0, d);
    check("status0", d, 32'h1 | 32'h4 | 32'h8 | (32'hA << 4) | (32'h12345 << 8)
                        | (32'h1 << 28) | (32'h1 << 29) | (32'h1 << 31));
    rread(A_ROD_STATUS_0, d);
    check("ROD reads status0", d[7:0], 8'hAD);
    hwrite(3'd0, 32'hFFFF_FFFF);           // host may not write status
    hread(3'd0, d); check("status0 unchanged by host write", d[3:0], 4'hD);
    board.slink_down = 1; board.rod_reset = 1;
    hread(3'd2, d); check("status2 board bits", d, (32'h1 << 9) | (32'h1 << 4));

    // ROD-side scratch and LED registers
    rwrite(A_RESERVED_0, 32'h1357_9BDF);
    rwrite(A_RESERVED_4, 32'h0246_8ACE);
    rwrite(A_STATUS_LED, 32'h0000_01A5);
    rread(A_RESERVED_0, d); check("RESERVED_REG_0", d, 32'h1357_9BDF);
    rread(A_RESERVED_4, d); check("RESERVED_REG_4", d, 32'h0246_8ACE);
    check("status_led", word_t'(status_led), 32'hA5);
    rwrite(A_VME_CMND_0, 32'h0);           // read-only for the ROD
    check("cmd0 not writable from ROD", word_t'(cmd.enable_interrupts), 1);

    // exceptions
    hread(3'd1, d);
    check("no interrupt yet", word_t'(d[16]), 0);
    check("nestIndex/rodMode", {d[20], d[7:0]}, {1'b1, 8'h5C});
    check("interruptsEnabled mirrors cmd", word_t'(d[17]), 1);
    push(8'd2); push(8'd3); push(8'd1);
    check("irq raised", word_t'(irq), 1);
    hread(3'd1, d);
    check("interruptIssued", word_t'(d[16]), 1);
    check("interruptID head", word_t'(d[15:8]), 2);
    check("rodError", word_t'(d[18]), 1);
    hread(3'd1, d);
    check("interruptIssued cleared on read", word_t'(d[16]), 0);
    check("rodError cleared on read", word_t'(d[18]), 0);
    check("irq dropped", word_t'(irq), 0);
    hwrite(3'd3, 32'h0000_0C00);           // clearException + enableInterrupts
    hread(3'd1, d);
    check("next exception", word_t'(d[15:8]), 3);
    check("interruptIssued for next", word_t'(d[16]), 1);
    hwrite(3'd3, 32'h0000_0400);
    hwrite(3'd3, 32'h0000_0C00);
    hread(3'd1, d); check("third exception", word_t'(d[15:8]), 1);
    hwrite(3'd3, 32'h0000_0400);
    hwrite(3'd3, 32'h0000_0C00);
    hread(3'd1, d); check("queue empty", word_t'(d[15:8]), 0);
    hwrite(3'd3, 32'h0000_0400);
    // overflow of the 4-deep queue: the fifth is dropped
    for (int i = 0; i < 5; i++) push(8'(i + 10));
    for (int i = 0; i < 4; i++) begin
      hread(3'd1, d); check("queued order", word_t'(d[15:8]), word_t'(i + 10));
      hwrite(3'd3, 32'h0000_0C00);
      hwrite(3'd3, 32'h0000_0400);
    end
    hread(3'd1, d); check("fifth dropped", word_t'(d[15:8]), 0);

    // commandIgnored
    @(negedge clk); cmd_ignored_set = 1; @(negedge clk); cmd_ignored_set = 0;
    hread(3'd1, d); check("commandIgnored", word_t'(d[19]), 1);
    hread(3'd1, d); check("commandIgnored cleared", word_t'(d[19]), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
