// rod_msg_top: message passing between a VME host and a ROD's MasterDsp.
//
// The host hands the ROD work as PrimitiveLists. It writes a list into the
// input message buffer through the host port (HPI), and coordinates with the
// ROD through the RodStatus and VmeCommand registers of the ROD Resources
// FPGA: inListReady from the host, dspAck and outListReady back. The list
// handler checks and executes the list, builds a reply in the output message
// buffer, and reports progress (busy, executing, listIndex, primIndex) and
// errors (error buffer, queued exceptions with interruptID, irq).
//
// Blocks:
//   u_hpi    host port: HPIC/HPIA/HPID, decodes the host's word addresses
//   u_ram    message RAM: input list at word 0, reply at word OUT_BASE
//   u_err, u_inf, u_diag  circular error/information/diagnostic buffers,
//            read by the host through the buffer handshake
//   u_regs   RodStatusRegister0-2 / VmeCommandRegister0-1
//   u_lh     list handler with its primitive executor
//   u_slv    bridge from the register bus to the SlaveDsp host ports
//   u_sint   service of SlaveDsp hardware interrupts (`s_hint_n`), which
//            shares the register bus and the error buffer with u_lh
//
// Host word address map (own choice): 0x0000-0x07ff message RAM;
// from 0x1000 the error, information and diagnostic buffers in windows of
// 2*TXT_DEPTH words each (0x1000, 0x1200, 0x1400 at the default size): data
// words from the window base, the buffer descriptor at base + TXT_DEPTH.
// Register bus (MasterDsp byte addresses from the ROD address map):
// 0x01000-0x010ff ROD Resources FPGA registers; 0x80000-0xfffff SlaveDsp
// host ports; everything else leaves on the `ext_*` port, which stands for
// the formatter, EFB, router and BOC registers held in other devices.
// The information and diagnostic buffers are written from outside
// (`inf_wr`, `diag_wr`), since what the DSP logs there is not defined by the
// protocol.
module rod_msg_top
  import rod_msg_pkg::*;
#(
  parameter int unsigned MSG_WORDS      = 2048,
  parameter int unsigned TXT_DEPTH      = 256,
  parameter int unsigned N_SLAVES       = 4,
  parameter int unsigned STROBE_CYCLES  = 4,
  parameter int unsigned TIMEOUT_CYCLES = 1024,
  parameter int unsigned EXC_DEPTH      = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // VME host: host port
  input  logic [1:0]    hpi_hcntrl,
  input  logic          hpi_strobe,
  input  logic          hpi_rnw,
  input  logic [31:0]   hpi_wdata,
  output logic [31:0]   hpi_rdata,
  output logic          hpi_rvalid,
  output logic          hpi_hint,
  output logic          dsp_int,
  input  logic          hint_set,
  // VME host: status / command registers
  input  logic [2:0]    vme_addr,
  input  logic          vme_re,
  input  logic          vme_we,
  input  logic [31:0]   vme_wdata,
  output logic [31:0]   vme_rdata,
  output logic          vme_irq,
  // board status in, commands out
  input  board_status_t board,
  output vme_cmd_t      cmd,
  output logic [7:0]    status_led,
  // information and diagnostic buffer writers
  input  logic          inf_wr,
  input  logic [31:0]   inf_data,
  input  logic          diag_wr,
  input  logic [31:0]   diag_data,
  // other ROD registers (formatters, EFB, router, BOC)
  output logic          ext_re,
  output logic          ext_we,
  output logic [19:0]   ext_addr,
  output logic [31:0]   ext_wdata,
  input  logic [31:0]   ext_rdata,
  input  logic          ext_ack,
  // SlaveDsp host ports
  output logic [N_SLAVES-1:0] s_hcs_n,
  output logic [1:0]    s_hcntrl,
  output logic          s_hhwil,
  output logic          s_hr_nw,
  output logic          s_hds_n,
  output logic [15:0]   s_hd_out,
  output logic          s_hd_oe,
  input  logic [15:0]   s_hd_in [N_SLAVES],
  input  logic [N_SLAVES-1:0] s_hint_n,  // SlaveDsp HINT, active low
  // monitoring strobes
  output logic          ev_list_done,
  output logic          ev_prim_done,
  output logic [2:0]    buf_overflow,   // error, info, diag
  output logic          slave_err       // access to an absent SlaveDsp
);

  localparam int unsigned AW       = $clog2(MSG_WORDS);
  localparam int unsigned HAW      = 16;
  localparam int unsigned TAW      = $clog2(TXT_DEPTH);
  localparam int unsigned ERR_BASE = 32'h1000;
  localparam int unsigned INF_BASE = ERR_BASE + 2 * TXT_DEPTH;
  localparam int unsigned DIA_BASE = INF_BASE + 2 * TXT_DEPTH;

  // ---------------- host port and host-side decode ----------------
  logic [HAW-1:0] hm_addr;
  logic           hm_we, hm_re;
  word_t          hm_wdata, hm_rdata, ram_a_rdata;
  word_t          err_h_rdata, inf_h_rdata, dia_h_rdata;
  logic [1:0]     hsel, hsel_q;

  hpi_port #(.AW(HAW)) u_hpi (
    .clk, .rst_n,
    .hcntrl(hpi_hcntrl), .h_strobe(hpi_strobe), .h_rnw(hpi_rnw),
    .h_wdata(hpi_wdata), .h_rdata(hpi_rdata), .h_rvalid(hpi_rvalid),
    .m_addr(hm_addr), .m_we(hm_we), .m_re(hm_re), .m_wdata(hm_wdata),
    .m_rdata(hm_rdata),
    .dsp_int, .hint_set, .hint(hpi_hint)
  );

  always_comb begin
    if (32'(hm_addr) < MSG_WORDS)                                   hsel = 2'd0;
    else if (32'(hm_addr) >= ERR_BASE && 32'(hm_addr) < INF_BASE)   hsel = 2'd1;
    else if (32'(hm_addr) >= INF_BASE && 32'(hm_addr) < DIA_BASE)   hsel = 2'd2;
    else if (32'(hm_addr) >= DIA_BASE && 32'(hm_addr) < DIA_BASE + 2 * TXT_DEPTH)
                                                                     hsel = 2'd3;
    else                                                             hsel = 2'd0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     hsel_q <= '0;
    else if (hm_re) hsel_q <= hsel;
  end

  always_comb begin
    unique case (hsel_q)
      2'd0:    hm_rdata = ram_a_rdata;
      2'd1:    hm_rdata = err_h_rdata;
      2'd2:    hm_rdata = inf_h_rdata;
      default: hm_rdata = dia_h_rdata;
    endcase
  end

  // ---------------- message RAM ----------------
  logic [AW-1:0] lh_m_addr;
  logic          lh_m_we;
  word_t         lh_m_wdata, lh_m_rdata;

  dp_ram #(.DEPTH(MSG_WORDS), .WIDTH(32)) u_ram (
    .clk,
    .a_addr(hm_addr[AW-1:0]), .a_we(hm_we && hsel == 2'd0), .a_wdata(hm_wdata),
    .a_rdata(ram_a_rdata),
    .b_addr(lh_m_addr), .b_we(lh_m_we), .b_wdata(lh_m_wdata),
    .b_rdata(lh_m_rdata)
  );

  // ---------------- registers ----------------
  handler_status_t hs;
  logic            err_ne, inf_ne, dia_ne;
  logic            exc_push, cmd_ignored, eb_wr, lh_eb_wr;
  logic [7:0]      exc_id;
  word_t           eb_data, lh_eb_data, cmd1_unused;
  logic            r_re, r_we, r_ack;
  word_t           r_rdata;

  // ---------------- list handler ----------------
  logic        b_re, b_we, b_ack;
  logic [19:0] b_addr;
  word_t       b_wdata, b_rdata;
  logic [2:0]  buf_reset, buf_rd_mode_we, buf_ovf_mode_we;
  logic        buf_mode_val;
  logic        lh_b_re, lh_b_we, lh_b_ack;
  logic [19:0] lh_b_addr;
  word_t       lh_b_wdata;

  list_handler #(
    .AW(AW), .IN_BASE(0), .IN_WORDS(MSG_WORDS / 2),
    .OUT_BASE(MSG_WORDS / 2), .OUT_WORDS(MSG_WORDS / 2),
    .TIMEOUT_CYCLES(TIMEOUT_CYCLES)
  ) u_lh (
    .clk, .rst_n, .cmd, .hs,
    .m_addr(lh_m_addr), .m_we(lh_m_we), .m_wdata(lh_m_wdata), .m_rdata(lh_m_rdata),
    .b_re(lh_b_re), .b_we(lh_b_we), .b_addr(lh_b_addr), .b_wdata(lh_b_wdata),
    .b_rdata, .b_ack(lh_b_ack),
    .buf_reset, .buf_rd_mode_we, .buf_ovf_mode_we, .buf_mode_val,
    .eb_wr(lh_eb_wr), .eb_data(lh_eb_data), .exc_push, .exc_id, .cmd_ignored,
    .ev_list_done, .ev_prim_done
  );

  // ---------------- SlaveDsp interrupt service ----------------
  logic        si_b_re, si_b_we, si_b_ack, si_eb_wr;
  logic [19:0] si_b_addr;
  word_t       si_b_wdata, si_eb_data;

  slave_int_handler #(.N_SLAVES(N_SLAVES), .TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_sint (
    .clk, .rst_n, .hint_n(s_hint_n), .busy(), .serviced(),  // status only, unused here
    .b_re(si_b_re), .b_we(si_b_we), .b_addr(si_b_addr), .b_wdata(si_b_wdata),
    .b_rdata, .b_ack(si_b_ack), .eb_wr(si_eb_wr), .eb_data(si_eb_data)
  );

  // ---------------- register bus arbiter ----------------
  // Both masters issue one request pulse and wait for their acknowledge.
  // A request is held in its master's slot until the bus is free; the list
  // handler's slot goes first. The granted access stays on b_* until the
  // target acknowledges it, or until TIMEOUT_CYCLES pass (a target that never
  // answers; the master has given up by then).
  localparam int unsigned ATW = $clog2(TIMEOUT_CYCLES + 2);
  logic           lh_pend, si_pend, lh_p_we, si_p_we, a_busy, a_own_si;
  logic [19:0]    lh_p_addr, si_p_addr;
  word_t          lh_p_wdata, si_p_wdata;
  logic [ATW-1:0] a_tmo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lh_pend <= 1'b0; lh_p_we <= 1'b0; lh_p_addr <= '0; lh_p_wdata <= '0;
      si_pend <= 1'b0; si_p_we <= 1'b0; si_p_addr <= '0; si_p_wdata <= '0;
      a_busy  <= 1'b0; a_own_si <= 1'b0; a_tmo <= '0;
      b_re    <= 1'b0; b_we <= 1'b0; b_addr <= '0; b_wdata <= '0;
    end else begin
      b_re <= 1'b0;
      b_we <= 1'b0;
      if (lh_b_re || lh_b_we) begin
        lh_pend <= 1'b1; lh_p_we <= lh_b_we; lh_p_addr <= lh_b_addr; lh_p_wdata <= lh_b_wdata;
      end
      if (si_b_re || si_b_we) begin
        si_pend <= 1'b1; si_p_we <= si_b_we; si_p_addr <= si_b_addr; si_p_wdata <= si_b_wdata;
      end
      if (a_busy) begin
        if (b_ack || a_tmo == '0) a_busy <= 1'b0;
        else                      a_tmo  <= a_tmo - 1'b1;
      end else if (lh_pend) begin
        lh_pend  <= 1'b0;
        a_busy   <= 1'b1;
        a_own_si <= 1'b0;
        a_tmo    <= ATW'(TIMEOUT_CYCLES);
        b_re     <= !lh_p_we; b_we <= lh_p_we; b_addr <= lh_p_addr; b_wdata <= lh_p_wdata;
      end else if (si_pend) begin
        si_pend  <= 1'b0;
        a_busy   <= 1'b1;
        a_own_si <= 1'b1;
        a_tmo    <= ATW'(TIMEOUT_CYCLES);
        b_re     <= !si_p_we; b_we <= si_p_we; b_addr <= si_p_addr; b_wdata <= si_p_wdata;
      end
    end
  end

  assign lh_b_ack = a_busy && b_ack && !a_own_si;
  assign si_b_ack = a_busy && b_ack && a_own_si;

  // error buffer: the list handler's words go first; an interrupt-service
  // word waits one slot (they come at least one bus access apart)
  logic  sie_pend;
  word_t sie_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sie_pend <= 1'b0;
      sie_q    <= '0;
    end else if (si_eb_wr) begin
      sie_pend <= 1'b1;
      sie_q    <= si_eb_data;
    end else if (!lh_eb_wr) begin
      sie_pend <= 1'b0;
    end
  end
  assign eb_wr   = lh_eb_wr || sie_pend;
  assign eb_data = lh_eb_wr ? lh_eb_data : sie_q;

  // ---------------- register bus decode ----------------
  typedef enum logic [1:0] {T_RR, T_SLAVE, T_EXT} target_e;
  target_e     tgt;
  logic        s_ack;
  logic [15:0] s_rdata;

  always_comb begin
    if (b_addr[19])                    tgt = T_SLAVE;
    else if (b_addr[19:8] == 12'h010)  tgt = T_RR;
    else                               tgt = T_EXT;
  end

  assign r_re = b_re && tgt == T_RR;
  assign r_we = b_we && tgt == T_RR;
  assign ext_re    = b_re && tgt == T_EXT;
  assign ext_we    = b_we && tgt == T_EXT;
  assign ext_addr  = b_addr;
  assign ext_wdata = b_wdata;

  always_comb begin
    unique case (tgt)
      T_RR:    begin b_ack = r_ack;   b_rdata = r_rdata;          end
      T_SLAVE: begin b_ack = s_ack;   b_rdata = word_t'(s_rdata); end
      default: begin b_ack = ext_ack; b_rdata = ext_rdata;        end
    endcase
  end

  rr_msg_regs #(.EXC_DEPTH(EXC_DEPTH)) u_regs (
    .clk, .rst_n,
    .h_addr(vme_addr), .h_re(vme_re), .h_we(vme_we), .h_wdata(vme_wdata),
    .h_rdata(vme_rdata),
    .r_addr(b_addr), .r_re, .r_we, .r_wdata(b_wdata), .r_rdata, .r_ack,
    .hs, .err_not_empty(err_ne), .inf_not_empty(inf_ne), .diag_not_empty(dia_ne),
    .board,
    .exc_push, .exc_id, .rod_error_set(1'b0), .cmd_ignored_set(cmd_ignored),
    .cmd, .cmd1(cmd1_unused), .irq(vme_irq), .status_led
  );

  slave_hpi_bridge #(.N_SLAVES(N_SLAVES), .STROBE_CYCLES(STROBE_CYCLES)) u_slv (
    .clk, .rst_n,
    .req((b_re || b_we) && tgt == T_SLAVE), .we(b_we), .addr(b_addr),
    .wdata(b_wdata[15:0]), .rdata(s_rdata), .ack(s_ack), .err(slave_err),
    .busy(),         // the executor waits for ack, busy is not needed
    .hcs_n(s_hcs_n), .hcntrl(s_hcntrl), .hhwil(s_hhwil), .hr_nw(s_hr_nw),
    .hds_n(s_hds_n), .hd_out(s_hd_out), .hd_oe(s_hd_oe), .hd_in(s_hd_in)
  );

  // ---------------- text buffers ----------------
  wire [TAW:0] err_ha = hm_addr[TAW:0];
  logic        err_frozen, inf_frozen, dia_frozen;

  // the host reads a text buffer only while it is frozen
  a_err_read_frozen: assert property (@(posedge clk) disable iff (!rst_n)
    (hm_re && hsel == 2'd1) |-> err_frozen);
  a_inf_read_frozen: assert property (@(posedge clk) disable iff (!rst_n)
    (hm_re && hsel == 2'd2) |-> inf_frozen);
  a_dia_read_frozen: assert property (@(posedge clk) disable iff (!rst_n)
    (hm_re && hsel == 2'd3) |-> dia_frozen);

  msg_buffer #(.DEPTH(TXT_DEPTH), .BASE(ERR_BASE)) u_err (
    .clk, .rst_n, .wr_en(eb_wr), .wr_data(eb_data),
    .reset_buf(buf_reset[0]), .rd_mode_we(buf_rd_mode_we[0]), .rd_mode_in(buf_mode_val),
    .ovf_mode_we(buf_ovf_mode_we[0]), .ovf_mode_in(buf_mode_val),
    .read_request(cmd.err_buff_read_request), .not_empty(err_ne),
    .frozen(err_frozen), .overflow(buf_overflow[0]), .h_addr(err_ha), .h_rdata(err_h_rdata)
  );

  msg_buffer #(.DEPTH(TXT_DEPTH), .BASE(INF_BASE)) u_inf (
    .clk, .rst_n, .wr_en(inf_wr), .wr_data(inf_data),
    .reset_buf(buf_reset[1]), .rd_mode_we(buf_rd_mode_we[1]), .rd_mode_in(buf_mode_val),
    .ovf_mode_we(buf_ovf_mode_we[1]), .ovf_mode_in(buf_mode_val),
    .read_request(cmd.info_buff_read_request), .not_empty(inf_ne),
    .frozen(inf_frozen), .overflow(buf_overflow[1]), .h_addr(err_ha), .h_rdata(inf_h_rdata)
  );

  msg_buffer #(.DEPTH(TXT_DEPTH), .BASE(DIA_BASE)) u_diag (
    .clk, .rst_n, .wr_en(diag_wr), .wr_data(diag_data),
    .reset_buf(buf_reset[2]), .rd_mode_we(buf_rd_mode_we[2]), .rd_mode_in(buf_mode_val),
    .ovf_mode_we(buf_ovf_mode_we[2]), .ovf_mode_in(buf_mode_val),
    .read_request(cmd.diag_buff_read_request), .not_empty(dia_ne),
    .frozen(dia_frozen), .overflow(buf_overflow[2]), .h_addr(err_ha), .h_rdata(dia_h_rdata)
  );

endmodule
