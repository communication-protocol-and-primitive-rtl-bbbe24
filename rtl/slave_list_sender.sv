// slave_list_sender: the MasterDsp side of passing a PrimitiveList to a
// SlaveDsp ("Send primitive list to a SlaveDsp").
//
// The slave list sits in the message RAM, embedded in a MasterDsp primitive;
// its first word is its ListLength. The sender copies it into the slave's
// input list buffer and runs the same handshake the host runs with the
// MasterDsp, this time with the slave's registers, through the slave's host
// port (HPI):
//   1. write HPIC, then HPIA = SLV_IN_BASE;
//   2. stream the ListLength words into HPID with autoincrement;
//   3. point HPIA at the SlaveStatusRegister and poll until dspAck = 0;
//   4. set inListReady in the MasterCmdRegister;
//   5. poll the SlaveStatusRegister until dspAck = 1 and keep outListReady;
//   6. clear inListReady;
//   7. if outListReady was 1, write HPIC again, set HPIA = SLV_OUT_BASE,
//      read the reply length from its first word and copy the whole reply
//      list into the message RAM at `out_addr`, provided it fits in
//      `out_room` words.
// The MasterDsp does not go on with its own list until the slave has given
// dspAck, so the primitive ends only after step 7.
//
// Checksums on the way down and up use their own checksumWC (0 off,
// 0xFFFFFFFF all words, N the first N words), set per slave by primitives
// 10 and 11. Unless it is off, the last word of the list sent is replaced by
// the XOR of the words it covers; the reply's last word is checked the same
// way and a mismatch is flagged with `bad_checksum`.
//
// Each 32-bit word crosses the 16-bit HPI as two accesses, HHWIL = 0 with
// bits 15:0 first, then HHWIL = 1 with bits 31:16; HPIC is written with
// HWOB = 1 in both halves to select that order. The accesses go out on the
// register bus at the SlaveDsp's host-port addresses (0x80000 + n * 0x20000,
// EA[16:15] = HCNTRL, EA[2] = HHWIL) and are carried by slave_hpi_bridge.
// Every access must be acknowledged within TIMEOUT_CYCLES, and each poll loop
// gives up after MAX_POLLS reads; either ends the primitive with `timeout`.
//
// From the protocol: the handshake order (it mirrors the host-MasterDsp
// procedure and the Master-Slave sequence diagram), the embedded list and
// its length in the first word, waiting for dspAck, and the slave addresses
// and HCNTRL/HHWIL mapping. Own choices: the slave buffer and register
// addresses (parameters), the bit positions in the slave registers (the same
// as RodStatusRegister0 and VmeCommandRegister0: outListReady 0, dspAck 1;
// inListReady 0), the half-word order, the poll limit and copying the slave's
// reply list unchanged into the MasterDsp reply.
//
// Only bits 15:0 of the register-bus data carry HPI data: read bits 31:16
// are not used and write bits 31:16 are always zero, as are address bits 14:3
// and 1:0, which the host-port map leaves free. Lint and synthesis report
// these as unused inputs and constant outputs; they stand because the
// register bus is 32 bits wide for all its other targets.
//
// Timing: one bus access at a time; a memory read has one cycle of latency.
// A word costs two bus accesses; with slave_hpi_bridge at STROBE_CYCLES = 4
// that is roughly 16 to 20 cycles per word sent or fetched.
module slave_list_sender
  import rod_msg_pkg::*;
#(
  parameter int unsigned AW             = 11,
  parameter word_t       SLV_IN_BASE    = 32'h0000_0000,
  parameter word_t       SLV_OUT_BASE   = 32'h0000_0800,
  parameter word_t       SLV_CMD_ADDR   = 32'h0000_1000,
  parameter word_t       SLV_STAT_ADDR  = 32'h0000_1001,
  parameter int unsigned TIMEOUT_CYCLES = 1024,
  parameter int unsigned MAX_POLLS      = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  // command
  input  logic          start,
  input  logic [1:0]    slave,      // SlaveDsp number
  input  logic [AW-1:0] src_addr,   // first word (ListLength) of the slave list
  input  logic [AW-1:0] out_addr,   // where the slave's reply goes
  input  word_t         out_room,   // words available there
  input  word_t         out_ckwc,   // checksumWC of the list sent to the slave
  input  word_t         in_ckwc,    // checksumWC of the slave's reply list
  output logic          busy,
  output logic          done,       // one-cycle pulse
  output logic          timeout,    // with done: no acknowledge or no dspAck
  output logic          overflow,   // with done: the reply did not fit
  output logic          got_reply,  // with done: reply copied
  output logic          bad_checksum, // with got_reply: reply checksum wrong
  output word_t         reply_len,  // its length in words
  // message RAM port
  output logic [AW-1:0] m_addr,
  output logic          m_we,
  output word_t         m_wdata,
  input  word_t         m_rdata,
  // register bus
  output logic          b_re,
  output logic          b_we,
  output logic [19:0]   b_addr,
  output word_t         b_wdata,
  input  word_t         b_rdata,
  input  logic          b_ack
);

  typedef enum logic [4:0] {
    L_IDLE, L_HPIC, L_HPIA_IN, L_LEN, L_LEN_W, L_SEND_RD, L_SEND_W, L_SEND,
    L_P0_A, L_P0_R, L_SET_A, L_SET_W, L_P1_A, L_P1_R, L_CLR_A, L_CLR_W,
    L_GET_C, L_GET_A, L_GET_LEN, L_GET, L_OP, L_OP_W, L_DONE
  } lstate_e;

  localparam logic [1:0] HC_HPIC = 2'b00, HC_HPIA = 2'b01, HC_HPID_INC = 2'b10,
                         HC_HPID = 2'b11;
  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);
  localparam int unsigned PW = $clog2(MAX_POLLS + 1);

  lstate_e       st, ret_st;     // ret_st: where a finished HPI word access returns
  logic [1:0]    slv_q;
  logic [AW-1:0] src_q, dst_q;
  word_t         room_q, len_q, k;
  // one 32-bit HPI access = two half-word bus accesses
  logic          op_we, half;
  logic [1:0]    op_hc;
  word_t         op_wdata, op_rdata;
  logic [TW-1:0] tmo;
  logic [PW-1:0] polls;
  logic          ordy_q;
  word_t         ock_q, ick_q;   // checksumWC, sent list and reply
  word_t         xs;             // running XOR

  wire word_t rd_word = {b_rdata[15:0], op_rdata[15:0]};  // complete word at the 2nd ack

  assign busy = (st != L_IDLE);

  always_comb begin
    m_addr  = src_q + AW'(k);
    m_we    = 1'b0;
    m_wdata = rd_word;
    if (st == L_OP_W && b_ack && half && !op_we && (ret_st == L_GET_LEN || ret_st == L_GET)) begin
      m_addr = (ret_st == L_GET_LEN) ? dst_q : dst_q + AW'(k);
      m_we   = (ret_st == L_GET) || (rd_word <= room_q && rd_word != 0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= L_IDLE;
      ret_st    <= L_IDLE;
      slv_q     <= '0;
      src_q     <= '0;
      dst_q     <= '0;
      room_q    <= '0;
      len_q     <= '0;
      k         <= '0;
      op_we     <= 1'b0;
      half      <= 1'b0;
      op_hc     <= '0;
      op_wdata  <= '0;
      op_rdata  <= '0;
      tmo       <= '0;
      polls     <= '0;
      ordy_q    <= 1'b0;
      ock_q     <= '0;
      ick_q     <= '0;
      xs        <= '0;
      bad_checksum <= 1'b0;
      done      <= 1'b0;
      timeout   <= 1'b0;
      overflow  <= 1'b0;
      got_reply <= 1'b0;
      reply_len <= '0;
      b_re      <= 1'b0;
      b_we      <= 1'b0;
      b_addr    <= '0;
      b_wdata   <= '0;
    end else begin
      done <= 1'b0;
      b_re <= 1'b0;
      b_we <= 1'b0;
      unique case (st)
        L_IDLE: if (start) begin
          slv_q     <= slave;
          src_q     <= src_addr;
          dst_q     <= out_addr;
          room_q    <= out_room;
          ock_q     <= out_ckwc;
          ick_q     <= in_ckwc;
          xs        <= '0;
          bad_checksum <= 1'b0;
          timeout   <= 1'b0;
          overflow  <= 1'b0;
          got_reply <= 1'b0;
          reply_len <= '0;
          k         <= '0;
          st        <= L_HPIC;
        end

        // ---- load the list ----
        L_HPIC: begin
          op_we <= 1'b1; op_hc <= HC_HPIC; op_wdata <= 32'h0001_0001;
          ret_st <= L_HPIA_IN; st <= L_OP;
        end
        L_HPIA_IN: begin
          op_we <= 1'b1; op_hc <= HC_HPIA; op_wdata <= SLV_IN_BASE;
          ret_st <= L_LEN; st <= L_OP;
        end
        L_LEN:   st <= L_LEN_W;        // m_addr = src_q + 0
        L_LEN_W: begin
          len_q <= m_rdata;
          st    <= (m_rdata == 0) ? L_P0_A : L_SEND_RD;
        end
        L_SEND_RD: st <= L_SEND_W;     // m_addr = src_q + k
        L_SEND_W: begin
          // the last word is the list checksum, made again here with the
          // downstream checksumWC unless checking is off
          op_we <= 1'b1; op_hc <= HC_HPID_INC;
          op_wdata <= (k + 1 == len_q && ock_q != CKWC_OFF) ? xs : m_rdata;
          if (k + 1 != len_q && (ock_q == CKWC_ALL || k < ock_q)) xs <= xs ^ m_rdata;
          ret_st <= L_SEND; st <= L_OP;
        end
        L_SEND: begin
          k  <= k + 1'b1;
          st <= (k + 1 == len_q) ? L_P0_A : L_SEND_RD;
        end

        // ---- handshake ----
        L_P0_A: begin
          polls <= '0;
          op_we <= 1'b1; op_hc <= HC_HPIA; op_wdata <= SLV_STAT_ADDR;
          ret_st <= L_P0_R; st <= L_OP;
        end
        L_P0_R: begin
          if (polls != '0 && !op_rdata[S0_DSP_ACK]) begin
            st <= L_SET_A;
          end else if (polls == PW'(MAX_POLLS)) begin
            timeout <= 1'b1;
            st      <= L_DONE;
          end else begin
            polls <= polls + 1'b1;
            op_we <= 1'b0; op_hc <= HC_HPID;
            ret_st <= L_P0_R; st <= L_OP;
          end
        end
        L_SET_A: begin
          op_we <= 1'b1; op_hc <= HC_HPIA; op_wdata <= SLV_CMD_ADDR;
          ret_st <= L_SET_W; st <= L_OP;
        end
        L_SET_W: begin
          op_we <= 1'b1; op_hc <= HC_HPID; op_wdata <= word_t'(1) << C0_IN_LIST_READY;
          ret_st <= L_P1_A; st <= L_OP;
        end
        L_P1_A: begin
          polls <= '0;
          op_we <= 1'b1; op_hc <= HC_HPIA; op_wdata <= SLV_STAT_ADDR;
          ret_st <= L_P1_R; st <= L_OP;
        end
        L_P1_R: begin
          if (polls != '0 && op_rdata[S0_DSP_ACK]) begin
            ordy_q <= op_rdata[S0_OUT_LIST_READY];
            st     <= L_CLR_A;
          end else if (polls == PW'(MAX_POLLS)) begin
            timeout <= 1'b1;
            st      <= L_DONE;
          end else begin
            polls <= polls + 1'b1;
            op_we <= 1'b0; op_hc <= HC_HPID;
            ret_st <= L_P1_R; st <= L_OP;
          end
        end
        L_CLR_A: begin
          op_we <= 1'b1; op_hc <= HC_HPIA; op_wdata <= SLV_CMD_ADDR;
          ret_st <= L_CLR_W; st <= L_OP;
        end
        L_CLR_W: begin
          op_we <= 1'b1; op_hc <= HC_HPID; op_wdata <= '0;
          ret_st <= ordy_q ? L_GET_C : L_DONE; st <= L_OP;
        end

        // ---- fetch the reply ----
        L_GET_C: begin
          op_we <= 1'b1; op_hc <= HC_HPIC; op_wdata <= 32'h0001_0001;
          ret_st <= L_GET_A; st <= L_OP;
        end
        L_GET_A: begin
          k     <= '0;
          xs    <= '0;
          op_we <= 1'b1; op_hc <= HC_HPIA; op_wdata <= SLV_OUT_BASE;
          ret_st <= L_GET_LEN; st <= L_OP;
        end
        L_GET_LEN: begin
          if (k == 0) begin
            // issue the read of the length word
            k     <= 32'd1;
            op_we <= 1'b0; op_hc <= HC_HPID_INC;
            ret_st <= L_GET_LEN; st <= L_OP;
          end else begin
            len_q <= op_rdata;
            xs    <= (ick_q != CKWC_OFF) ? op_rdata : '0;
            if (op_rdata > room_q || op_rdata == 0) begin
              overflow <= (op_rdata != 0);
              st       <= L_DONE;
            end else if (op_rdata == 32'd1) begin
              got_reply <= 1'b1; reply_len <= 32'd1;
              st <= L_DONE;
            end else begin
              op_we <= 1'b0; op_hc <= HC_HPID_INC;
              ret_st <= L_GET; st <= L_OP;
            end
          end
        end
        L_GET: begin
          // a word has just been stored at dst_q + k
          k <= k + 1'b1;
          if (k + 1 == len_q) begin
            got_reply    <= 1'b1;
            reply_len    <= len_q;
            bad_checksum <= (ick_q != CKWC_OFF) && (op_rdata != xs);
            st           <= L_DONE;
          end else begin
            if (ick_q == CKWC_ALL || k < ick_q) xs <= xs ^ op_rdata;
            op_we <= 1'b0; op_hc <= HC_HPID_INC;
            ret_st <= L_GET; st <= L_OP;
          end
        end

        // ---- one 32-bit HPI access: two half-word bus accesses ----
        L_OP: begin
          b_addr  <= {1'b1, slv_q, op_hc, 12'b0, half, 2'b00};
          b_wdata <= half ? word_t'(op_wdata[31:16]) : word_t'(op_wdata[15:0]);
          b_we    <= op_we;
          b_re    <= !op_we;
          tmo     <= TW'(TIMEOUT_CYCLES);
          st      <= L_OP_W;
        end
        L_OP_W: begin
          if (b_ack) begin
            if (!half) begin
              op_rdata[15:0] <= b_rdata[15:0];
              half <= 1'b1;
              st   <= L_OP;
            end else begin
              op_rdata <= rd_word;
              half <= 1'b0;
              st   <= ret_st;
            end
          end else if (tmo == '0) begin
            half    <= 1'b0;
            timeout <= 1'b1;
            st      <= L_DONE;
          end else begin
            tmo <= tmo - 1'b1;
          end
        end

        L_DONE: begin
          done <= 1'b1;
          st   <= L_IDLE;
        end

        default: st <= L_IDLE;
      endcase
    end
  end

endmodule
