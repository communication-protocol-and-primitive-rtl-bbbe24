// rr_msg_regs: the message-passing registers of the ROD Resources FPGA.
//
// The VME host and the MasterDsp coordinate through two small register sets.
// RodStatusRegister0-2 are written by the ROD side and only read by the host;
// VmeCommandRegister0-1 are written by the host and only read by the ROD.
// This block holds both sets and the few bits that need logic of their own:
//   - interruptIssued, rodError and commandIgnored are sticky and are cleared
//     when the host reads RodStatusRegister1;
//   - exceptions are queued (EXC_DEPTH entries) so that a second one cannot be
//     lost while the first is handled. interruptID shows the oldest queued
//     exception; a rising edge of the host's clearException bit retires it,
//     and interruptIssued is raised again whenever a new exception reaches the
//     head of the queue;
//   - interruptsEnabled mirrors the host's enableInterrupts bit, and `irq`
//     is interruptIssued gated by it.
// The fields that the list handler owns (outListReady, dspAck, busy,
// executing, listIndex, primIndex, nestIndex, primListAborted, rodMode) come
// in as a struct and are shown live; so are the buffer not-empty flags and
// the board status bits (S-link, EFB, router, resets).
//
// Host port: `h_addr` 0-2 selects RodStatusRegister0-2, 3-4
// VmeCommandRegister0-1; host writes reach only the command registers. Read
// data appear one cycle after `h_re`.
// ROD port: MasterDsp byte addresses 0x01000-0x0107f. The status and command
// registers read at the addresses of the ROD controller memory map; the five
// RESERVED_REG words and the 8-bit STATUS_LED register are read/write. The
// ROD port writes no status or command bit (those are owned by the handler
// and the host). Access completes in one cycle: `r_ack` and `r_rdata` follow
// `r_re`/`r_we` by one cycle.
//
// From the protocol: which side may write which register, the field list and
// widths, clear-on-read and the exception queue. Own choices: the bit
// positions (see rod_msg_pkg), the host offsets, the queue depth and the use of
// clearException as a retire strobe.
module rr_msg_regs
  import rod_msg_pkg::*;
#(
  parameter int unsigned EXC_DEPTH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // VME host side
  input  logic [2:0]      h_addr,
  input  logic            h_re,
  input  logic            h_we,
  input  word_t           h_wdata,
  output word_t           h_rdata,
  // MasterDsp / primitive side
  input  logic [19:0]     r_addr,
  input  logic            r_re,
  input  logic            r_we,
  input  word_t           r_wdata,
  output word_t           r_rdata,
  output logic            r_ack,
  // live status
  input  handler_status_t hs,
  input  logic            err_not_empty,
  input  logic            inf_not_empty,
  input  logic            diag_not_empty,
  input  board_status_t   board,
  // events
  input  logic            exc_push,
  input  logic [7:0]      exc_id,
  input  logic            rod_error_set,
  input  logic            cmd_ignored_set,
  // outputs
  output vme_cmd_t        cmd,
  output word_t           cmd1,
  output logic            irq,
  output logic [7:0]      status_led
);

  localparam int unsigned QW = $clog2(EXC_DEPTH);

  word_t      cmd0_q, cmd1_q;
  word_t      reserved_q [5];
  logic       int_issued, rod_error, cmd_ignored;
  logic [7:0] exc_q [EXC_DEPTH];
  logic [QW-1:0] exc_head, exc_tail;
  logic [QW:0]   exc_cnt;
  logic       clr_exc_d;

  assign cmd  = decode_cmd(cmd0_q);
  assign cmd1 = cmd1_q;

  wire exc_pop  = cmd.clear_exception && !clr_exc_d && exc_cnt != '0;
  wire exc_full = exc_cnt == (QW+1)'(EXC_DEPTH);
  wire exc_do_push = exc_push && (!exc_full || exc_pop);
  wire [7:0] interrupt_id = (exc_cnt != '0) ? exc_q[exc_head] : 8'h00;
  wire host_rd_s1 = h_re && h_addr == 3'd1;

  word_t s0, s1, s2;
  always_comb begin
    s0 = '0;
    s0[S0_OUT_LIST_READY] = hs.out_list_ready;
    s0[S0_DSP_ACK]        = hs.dsp_ack;
    s0[S0_BUSY]           = hs.busy;
    s0[S0_EXECUTING]      = hs.executing;
    s0[S0_LIST_INDEX +: 4]  = hs.list_index;
    s0[S0_PRIM_INDEX +: 20] = hs.prim_index;
    s0[S0_ABORTED]        = hs.prim_list_aborted;
    s0[S0_ERR_NOT_EMPTY]  = err_not_empty;
    s0[S0_INF_NOT_EMPTY]  = inf_not_empty;
    s0[S0_DIAG_NOT_EMPTY] = diag_not_empty;
    s1 = '0;
    s1[S1_NEST_INDEX +: 8]   = hs.nest_index;
    s1[S1_INTERRUPT_ID +: 8] = interrupt_id;
    s1[S1_INT_ISSUED]  = int_issued;
    s1[S1_INT_ENABLED] = cmd.enable_interrupts;
    s1[S1_ROD_ERROR]   = rod_error;
    s1[S1_CMD_IGNORED] = cmd_ignored;
    s1[S1_ROD_MODE]    = hs.rod_mode;
    s2 = word_t'(board);
  end

  assign irq = int_issued && cmd.enable_interrupts;

  // host and ROD writes, sticky bits, exception queue
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd0_q      <= '0;
      cmd1_q      <= '0;
      int_issued  <= 1'b0;
      rod_error   <= 1'b0;
      cmd_ignored <= 1'b0;
      exc_head    <= '0;
      exc_tail    <= '0;
      exc_cnt     <= '0;
      clr_exc_d   <= 1'b0;
      status_led  <= '0;
      for (int i = 0; i < 5; i++) reserved_q[i] <= '0;
    end else begin
      clr_exc_d <= cmd.clear_exception;
      if (h_we && h_addr == 3'd3) cmd0_q <= h_wdata;
      if (h_we && h_addr == 3'd4) cmd1_q <= h_wdata;

      if (r_we) begin
        unique case (r_addr)
          A_RESERVED_0: reserved_q[0] <= r_wdata;
          A_RESERVED_1: reserved_q[1] <= r_wdata;
          A_RESERVED_2: reserved_q[2] <= r_wdata;
          A_RESERVED_3: reserved_q[3] <= r_wdata;
          A_RESERVED_4: reserved_q[4] <= r_wdata;
          A_STATUS_LED: status_led    <= r_wdata[7:0];
          default: ;
        endcase
      end

      // exception queue
      if (exc_do_push) begin
        exc_q[exc_tail] <= exc_id;
        exc_tail <= exc_tail + 1'b1;
      end
      if (exc_pop) exc_head <= exc_head + 1'b1;
      exc_cnt <= exc_cnt + (QW+1)'(exc_do_push) - (QW+1)'(exc_pop);

      // sticky bits: a new event wins over the clearing read in the same cycle
      if ((exc_do_push && (exc_cnt == '0 || (exc_pop && exc_cnt == 1)))
          || (exc_pop && exc_cnt > 1))
        int_issued <= 1'b1;
      else if (host_rd_s1)
        int_issued <= 1'b0;

      if (rod_error_set || exc_push) rod_error <= 1'b1;
      else if (host_rd_s1)           rod_error <= 1'b0;

      if (cmd_ignored_set)  cmd_ignored <= 1'b1;
      else if (host_rd_s1)  cmd_ignored <= 1'b0;
    end
  end

  // read ports
  always_ff @(posedge clk) begin
    unique case (h_addr)
      3'd0: h_rdata <= s0;
      3'd1: h_rdata <= s1;
      3'd2: h_rdata <= s2;
      3'd3: h_rdata <= cmd0_q;
      3'd4: h_rdata <= cmd1_q;
      default: h_rdata <= '0;
    endcase
    unique case (r_addr)
      A_ROD_STATUS_0: r_rdata <= s0;
      A_ROD_STATUS_1: r_rdata <= s1;
      A_ROD_STATUS_2: r_rdata <= s2;
      A_VME_CMND_0:   r_rdata <= cmd0_q;
      A_VME_CMND_1:   r_rdata <= cmd1_q;
      A_RESERVED_0:   r_rdata <= reserved_q[0];
      A_RESERVED_1:   r_rdata <= reserved_q[1];
      A_RESERVED_2:   r_rdata <= reserved_q[2];
      A_RESERVED_3:   r_rdata <= reserved_q[3];
      A_RESERVED_4:   r_rdata <= reserved_q[4];
      A_STATUS_LED:   r_rdata <= word_t'(status_led);
      default:        r_rdata <= '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r_ack <= 1'b0;
    else        r_ack <= r_re || r_we;
  end

endmodule
