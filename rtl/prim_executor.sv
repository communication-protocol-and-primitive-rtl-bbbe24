// prim_executor: carries out one primitive of a PrimitiveList.
//
// The list handler starts it with the primitive's header fields and the
// address of its body in the message memory, and waits for `done`. The
// executor reads the attribute words, acts, and, for primitives that return
// data, writes a return-data primitive [length, PrimitiveIndex, PrimitiveID,
// data...] either appended to the reply area of the output message buffer or
// at an address the primitive gives.
//
// Primitives carried out here (attribute order and codes follow the
// protocol's primitive list):
//   Reset buffer            buffer name: -1 all, 2 output, 4 error, 5 info,
//                           6 diagnostic (1 input and 3 configuration hold no
//                           state here and are accepted)
//   Set Buffer Read Mode    buffer 4/5/6, mode 0 RINGBUFF / 1 LINBUFF
//   Set Buffer Overflow Mode buffer 4/5/6, mode 0 NOOVERWRITE / 1 OVERWRITE
//   Set input / output upstream checksumWC
//   Set ROD mode            1 COMMAND, 2 RUN
//   Write or read register  mode (1 read, 2 write), destination byte address,
//                           addressIncrement (bytes), dataStore (0xffffffff =
//                           append to the reply), dataLength, data...
//   CheckOutput             destination 0 or 2: returns a known message of 32
//                           walking-one words, so that every data line is
//                           seen high alone once
//   Echo                    data, destination: 0/1 bounce here, 2 bounce
//                           through RESERVED_REG_0 of the ROD Resources FPGA
//   Send primitive list to a SlaveDsp
//                           SlaveDsp number (0-3), then the whole slave
//                           PrimitiveList; slave_list_sender passes it on
//                           through the slave's host port and waits for the
//                           slave's dspAck. A slave reply list is returned
//                           unchanged as the data of a return primitive; one
//                           whose checksum is wrong is dropped with a Bad
//                           checksum exception.
//   Set output / input downstream checksumWC
//                           checksumWC, SlaveDsp number: the checksumWC used
//                           for lists sent to that slave and for its replies
// Any other PrimitiveID, or missing or illegal attributes, is reported as an
// error-buffer word and a commandIgnored pulse, and the primitive is skipped.
// A register access that is not acknowledged within TIMEOUT_CYCLES ends the
// primitive with a Timeout exception; a reply that would not fit the output
// buffer raises the Output buffer overflow exception and is not written.
//
// Own choices: the PrimitiveID numbering (rod_msg_pkg), the walking-one
// message, the error-buffer word format, the timeout length, reading the
// Echo destination 1 (SDRAM) like 0, and the reply layout in the output buffer
// (a three-word reply header, return primitives from word 3, room kept for a
// two-word trailer).
//
// Timing: memory reads have one cycle of latency; each attribute word costs
// two cycles. Register accesses take one bus request and wait for `b_ack`.
// During a slave list transfer the sender owns the memory port and the
// register bus.
module prim_executor
  import rod_msg_pkg::*;
#(
  parameter int unsigned AW             = 11,
  parameter int unsigned OUT_BASE       = 1024,
  parameter int unsigned OUT_WORDS      = 1024,
  parameter int unsigned TIMEOUT_CYCLES = 1024
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the list handler
  input  logic          list_start,   // new list: empty the reply area
  input  logic          start,
  input  word_t         pid,
  input  word_t         pindex,
  input  word_t         plen,
  input  logic [AW-1:0] body_addr,
  output logic          done,
  output logic          active,
  output logic [AW-1:0] out_wp,       // next free reply word (buffer-relative)
  output word_t         out_nprims,   // return primitives in the reply
  // message memory
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
  input  logic          b_ack,
  // configuration
  output word_t         in_ckwc,
  output word_t         out_ckwc,
  output logic          rod_mode,
  output logic [2:0]    buf_reset,    // error, info, diag
  output logic [2:0]    buf_rd_mode_we,
  output logic [2:0]    buf_ovf_mode_we,
  output logic          buf_mode_val,
  // reporting
  output logic          eb_wr,
  output word_t         eb_data,
  output logic          exc_push,
  output logic [7:0]    exc_id,
  output logic          cmd_ignored
);

  typedef enum logic [3:0] {
    X_IDLE, X_FETCH, X_FETCH_W, X_DISPATCH, X_RET_HDR, X_PATTERN,
    X_RW_MEM, X_RW_MEM_W, X_BUS, X_BUS_WAIT, X_SLAVE, X_DONE
  } xstate_e;

  localparam int unsigned NATTR = 5;
  localparam int unsigned TW    = $clog2(TIMEOUT_CYCLES + 1);

  xstate_e       st;
  word_t         pid_q, pindex_q, blen_q;
  logic [AW-1:0] body_q;
  word_t         attr [NATTR];
  logic [2:0]    fidx;
  logic [2:0]    nfetch;
  // return-data primitive being written
  logic [AW-1:0] wptr;        // absolute memory address of next reply word
  logic [1:0]    hdr_i;
  word_t         ret_len;     // data words in the return primitive
  logic          ret_append;
  word_t         k;           // data word counter
  logic          is_read;     // current bus access is a read
  word_t         data_q;
  logic          xb_re, xb_we;   // executor's own register-bus request
  logic [19:0]   xb_addr;
  word_t         xb_wdata;
  // SlaveDsp list transfer
  logic          s_start, s_done, s_timeout, s_overflow, s_got, s_bad;
  word_t         ds_out_ckwc [4];  // downstream checksumWC per SlaveDsp: list sent
  word_t         ds_in_ckwc [4];   // and reply received
  word_t         s_len, s_room;
  logic [AW-1:0] s_m_addr;
  logic          s_m_we;
  word_t         s_m_wdata;
  logic          s_b_re, s_b_we;
  logic [19:0]   s_b_addr;
  word_t         s_b_wdata;
  logic [TW-1:0] tmo;

  function automatic logic [1:0] buf_sel(word_t b, output logic ok);
    ok = 1'b1;
    unique case (b)
      BUF_ERROR: return 2'd0;
      BUF_INFO:  return 2'd1;
      BUF_DIAG:  return 2'd2;
      default: begin ok = 1'b0; return 2'd0; end
    endcase
  endfunction

  // decoded attributes used by the dispatch step
  logic       ok;    // attr[0] names a text buffer
  logic [1:0] b;     // which one
  logic       bad;   // data-returning primitive with illegal attributes
  word_t      len;   // data words it returns

  always_comb begin
    b   = buf_sel(attr[0], ok);
    bad = 1'b0;
    len = 32'd1;
    if (pid_q == PID_CHECK_OUTPUT) begin
      len = 32'd32;
      bad = !(attr[0] == 32'd0 || attr[0] == 32'd2);
    end else if (pid_q == PID_ECHO) begin
      bad = attr[1] > 32'd2;
    end else begin
      len = attr[4];
      bad = !(attr[0] == RW_READ || attr[0] == RW_WRITE)
            || (attr[0] == RW_WRITE && blen_q < 32'(NATTR) + attr[4]);
    end
  end

  // number of attribute words each primitive needs at least
  function automatic word_t need_attrs(word_t id);
    unique case (id)
      PID_RESET_BUFFER, PID_SET_IN_CKWC, PID_SET_OUT_CKWC,
      PID_SET_ROD_MODE, PID_CHECK_OUTPUT:            return 32'd1;
      PID_SET_BUFF_RD_MODE, PID_SET_BUFF_OVF_MODE,
      PID_ECHO, PID_SEND_SLAVE_LIST,
      PID_SET_OUT_DS_CKWC, PID_SET_IN_DS_CKWC:       return 32'd2;
      PID_RW_REGISTER:                               return 32'd5;
      default:                                       return 32'd0;
    endcase
  endfunction

  assign active = (st != X_IDLE);

  // memory port
  always_comb begin
    m_addr  = wptr;
    m_we    = 1'b0;
    m_wdata = '0;
    unique case (st)
      X_FETCH:  m_addr = body_q + AW'(fidx);
      X_RW_MEM: m_addr = body_q + AW'(NATTR) + AW'(k);
      X_RET_HDR: begin
        m_we = 1'b1;
        unique case (hdr_i)
          2'd0:    m_wdata = ret_len + 32'(PRIM_HDR_WORDS);
          2'd1:    m_wdata = pindex_q;
          default: m_wdata = pid_q;
        endcase
      end
      X_PATTERN: begin
        m_we    = 1'b1;
        m_wdata = (pid_q == PID_ECHO) ? attr[0] : word_t'(1) << k[4:0];
      end
      default: ;
    endcase
    // a finished register read or echo writes its data word
    if (st == X_BUS_WAIT && b_ack && is_read) begin
      m_we    = 1'b1;
      m_wdata = b_rdata;
    end
    // the slave list transfer owns the port while it runs
    if (st == X_SLAVE) begin
      m_addr  = s_m_addr;
      m_we    = s_m_we;
      m_wdata = s_m_wdata;
    end
  end

  // register bus: the slave list transfer or the executor's own accesses
  assign b_re    = (st == X_SLAVE) ? s_b_re    : xb_re;
  assign b_we    = (st == X_SLAVE) ? s_b_we    : xb_we;
  assign b_addr  = (st == X_SLAVE) ? s_b_addr  : xb_addr;
  assign b_wdata = (st == X_SLAVE) ? s_b_wdata : xb_wdata;

  // reply words left for a slave's reply list behind its return header
  assign s_room = (32'(out_wp) + 32'(PRIM_HDR_WORDS + LIST_TRL_WORDS) >= 32'(OUT_WORDS)) ? '0
                  : 32'(OUT_WORDS) - 32'(out_wp) - 32'(PRIM_HDR_WORDS + LIST_TRL_WORDS);

  slave_list_sender #(.AW(AW), .TIMEOUT_CYCLES(TIMEOUT_CYCLES)) u_slv_list (
    .clk, .rst_n,
    .start(s_start), .slave(attr[0][1:0]), .src_addr(body_q + AW'(1)),
    .out_addr(AW'(OUT_BASE) + out_wp + AW'(PRIM_HDR_WORDS)), .out_room(s_room),
    .out_ckwc(ds_out_ckwc[attr[0][1:0]]), .in_ckwc(ds_in_ckwc[attr[0][1:0]]),
    .bad_checksum(s_bad),
    .busy(), .done(s_done), .timeout(s_timeout), .overflow(s_overflow),
    .got_reply(s_got), .reply_len(s_len),
    .m_addr(s_m_addr), .m_we(s_m_we), .m_wdata(s_m_wdata), .m_rdata,
    .b_re(s_b_re), .b_we(s_b_we), .b_addr(s_b_addr), .b_wdata(s_b_wdata), .b_rdata, .b_ack
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st              <= X_IDLE;
      done            <= 1'b0;
      out_wp          <= AW'(LIST_HDR_WORDS);
      out_nprims      <= '0;
      in_ckwc         <= CKWC_ALL;
      out_ckwc        <= CKWC_ALL;
      for (int i = 0; i < 4; i++) begin
        ds_out_ckwc[i] <= CKWC_ALL;
        ds_in_ckwc[i]  <= CKWC_ALL;
      end
      rod_mode        <= 1'b0;
      buf_reset       <= '0;
      buf_rd_mode_we  <= '0;
      buf_ovf_mode_we <= '0;
      buf_mode_val    <= 1'b0;
      eb_wr           <= 1'b0;
      eb_data         <= '0;
      exc_push        <= 1'b0;
      exc_id          <= '0;
      cmd_ignored     <= 1'b0;
      xb_re            <= 1'b0;
      xb_we            <= 1'b0;
      xb_addr          <= '0;
      xb_wdata         <= '0;
      s_start          <= 1'b0;
      pid_q           <= '0;
      pindex_q        <= '0;
      blen_q          <= '0;
      body_q          <= '0;
      fidx            <= '0;
      nfetch          <= '0;
      wptr            <= '0;
      hdr_i           <= '0;
      ret_len         <= '0;
      ret_append      <= 1'b0;
      k               <= '0;
      is_read         <= 1'b0;
      data_q          <= '0;
      tmo             <= '0;
      for (int i = 0; i < NATTR; i++) attr[i] <= '0;
    end else begin
      done            <= 1'b0;
      buf_reset       <= '0;
      buf_rd_mode_we  <= '0;
      buf_ovf_mode_we <= '0;
      eb_wr           <= 1'b0;
      exc_push        <= 1'b0;
      cmd_ignored     <= 1'b0;
      xb_re            <= 1'b0;
      xb_we            <= 1'b0;
      s_start          <= 1'b0;

      if (list_start) begin
        out_wp     <= AW'(LIST_HDR_WORDS);
        out_nprims <= '0;
      end

      unique case (st)
        X_IDLE: if (start) begin
          pid_q    <= pid;
          pindex_q <= pindex;
          blen_q   <= plen - 32'(PRIM_HDR_WORDS);
          body_q   <= body_addr;
          fidx     <= '0;
          nfetch   <= (plen - 32'(PRIM_HDR_WORDS) > 32'(NATTR)) ? 3'(NATTR)
                      : 3'(plen - 32'(PRIM_HDR_WORDS));
          st       <= (plen > 32'(PRIM_HDR_WORDS)) ? X_FETCH : X_DISPATCH;
        end

        X_FETCH:   st <= X_FETCH_W;
        X_FETCH_W: begin
          attr[fidx] <= m_rdata;
          fidx       <= fidx + 1'b1;
          st         <= (fidx + 1'b1 == nfetch) ? X_DISPATCH : X_FETCH;
        end

        X_DISPATCH: begin
          st <= X_DONE;
          if (need_attrs(pid_q) == 0) begin
            eb_wr       <= 1'b1;
            eb_data     <= errbuf_word(EB_UNKNOWN_PRIM, pindex_q[23:0]);
            cmd_ignored <= 1'b1;
          end else if (blen_q < need_attrs(pid_q)) begin
            eb_wr       <= 1'b1;
            eb_data     <= errbuf_word(EB_BAD_ATTRIBUTE, pindex_q[23:0]);
            cmd_ignored <= 1'b1;
          end else begin
            unique case (pid_q)
              PID_RESET_BUFFER: begin
                if (attr[0] == BUF_ALL) begin
                  buf_reset  <= 3'b111;
                  out_wp     <= AW'(LIST_HDR_WORDS);
                  out_nprims <= '0;
                end else if (attr[0] == BUF_OUTPUT) begin
                  out_wp     <= AW'(LIST_HDR_WORDS);
                  out_nprims <= '0;
                end else if (ok) begin
                  buf_reset[b] <= 1'b1;
                end else if (attr[0] != BUF_INPUT && attr[0] != BUF_CONFIG) begin
                  eb_wr       <= 1'b1;
                  eb_data     <= errbuf_word(EB_BAD_ATTRIBUTE, pindex_q[23:0]);
                  cmd_ignored <= 1'b1;
                end
              end
              PID_SET_BUFF_RD_MODE, PID_SET_BUFF_OVF_MODE: begin
                if (ok && attr[1] <= 32'd1) begin
                  buf_mode_val <= attr[1][0];
                  if (pid_q == PID_SET_BUFF_RD_MODE) buf_rd_mode_we[b]  <= 1'b1;
                  else                               buf_ovf_mode_we[b] <= 1'b1;
                end else begin
                  eb_wr       <= 1'b1;
                  eb_data     <= errbuf_word(EB_BAD_ATTRIBUTE, pindex_q[23:0]);
                  cmd_ignored <= 1'b1;
                end
              end
              PID_SET_IN_CKWC:  in_ckwc  <= attr[0];
              PID_SET_OUT_CKWC: out_ckwc <= attr[0];
              PID_SET_OUT_DS_CKWC, PID_SET_IN_DS_CKWC: begin
                // attr[0]: checksumWC, attr[1]: SlaveDsp number
                if (attr[1] > 32'd3) begin
                  eb_wr       <= 1'b1;
                  eb_data     <= errbuf_word(EB_BAD_ATTRIBUTE, pindex_q[23:0]);
                  cmd_ignored <= 1'b1;
                end else if (pid_q == PID_SET_OUT_DS_CKWC) begin
                  ds_out_ckwc[attr[1][1:0]] <= attr[0];
                end else begin
                  ds_in_ckwc[attr[1][1:0]] <= attr[0];
                end
              end
              PID_SET_ROD_MODE: begin
                if (attr[0] == MODE_COMMAND)  rod_mode <= 1'b0;
                else if (attr[0] == MODE_RUN) rod_mode <= 1'b1;
                else begin
                  eb_wr       <= 1'b1;
                  eb_data     <= errbuf_word(EB_BAD_ATTRIBUTE, pindex_q[23:0]);
                  cmd_ignored <= 1'b1;
                end
              end
              PID_CHECK_OUTPUT, PID_ECHO, PID_RW_REGISTER: begin
                if (bad) begin
                  eb_wr       <= 1'b1;
                  eb_data     <= errbuf_word(EB_BAD_ATTRIBUTE, pindex_q[23:0]);
                  cmd_ignored <= 1'b1;
                end else if (pid_q == PID_RW_REGISTER && attr[0] == RW_WRITE) begin
                  k       <= '0;
                  ret_len <= attr[4];
                  st      <= (attr[4] == 0) ? X_DONE : X_RW_MEM;
                end else begin
                  ret_len    <= len;
                  ret_append <= (pid_q != PID_RW_REGISTER)
                                || attr[3] == DATASTORE_APPEND;
                  hdr_i      <= '0;
                  k          <= '0;
                  if (pid_q != PID_RW_REGISTER || attr[3] == DATASTORE_APPEND) begin
                    if (32'(out_wp) + len + 32'(PRIM_HDR_WORDS + LIST_TRL_WORDS)
                        > 32'(OUT_WORDS)) begin
                      eb_wr    <= 1'b1;
                      eb_data  <= errbuf_word(EB_OUT_OVERFLOW, pindex_q[23:0]);
                      exc_push <= 1'b1;
                      exc_id   <= ERR_OUT_OVERFLOW;
                      ret_append <= 1'b0;
                    end else begin
                      wptr <= AW'(OUT_BASE) + out_wp;
                      st   <= X_RET_HDR;
                    end
                  end else begin
                    wptr <= attr[3][AW-1:0];
                    st   <= X_RET_HDR;
                  end
                end
              end
              PID_SEND_SLAVE_LIST: begin
                // attr[0]: SlaveDsp number; the slave list follows, attr[1]
                // being its ListLength
                if (attr[0] > 32'd3 || attr[1] == 0 || blen_q < 32'd1 + attr[1]) begin
                  eb_wr       <= 1'b1;
                  eb_data     <= errbuf_word(EB_BAD_ATTRIBUTE, pindex_q[23:0]);
                  cmd_ignored <= 1'b1;
                end else begin
                  s_start <= 1'b1;
                  wptr    <= AW'(OUT_BASE) + out_wp;
                  st      <= X_SLAVE;
                end
              end
              default: ;
            endcase
          end
        end

        // SlaveDsp list transfer: the slave's reply list, if any, has been
        // copied behind the return header, which is written last
        X_SLAVE: if (s_done) begin
          hdr_i <= '0;
          st    <= X_DONE;
          if (s_timeout) begin
            eb_wr    <= 1'b1;
            eb_data  <= errbuf_word(EB_TIMEOUT, pindex_q[23:0]);
            exc_push <= 1'b1;
            exc_id   <= ERR_TIMEOUT;
          end else if (s_overflow) begin
            eb_wr    <= 1'b1;
            eb_data  <= errbuf_word(EB_OUT_OVERFLOW, pindex_q[23:0]);
            exc_push <= 1'b1;
            exc_id   <= ERR_OUT_OVERFLOW;
          end else if (s_got && s_bad) begin
            // the slave's reply is dropped
            eb_wr    <= 1'b1;
            eb_data  <= errbuf_word(EB_BAD_CHECKSUM, pindex_q[23:0]);
            exc_push <= 1'b1;
            exc_id   <= ERR_BAD_CHECKSUM;
          end else if (s_got) begin
            ret_len    <= s_len;
            ret_append <= 1'b1;
            st         <= X_RET_HDR;
          end
        end

        X_RET_HDR: begin
          wptr  <= wptr + 1'b1;
          hdr_i <= hdr_i + 1'b1;
          if (hdr_i == 2'd2) begin
            if (pid_q == PID_SEND_SLAVE_LIST) begin
              st <= X_DONE;
            end else if (pid_q == PID_CHECK_OUTPUT
                || (pid_q == PID_ECHO && attr[1] != 32'd2)) begin
              st <= X_PATTERN;
            end else if (ret_len == 0) begin
              st <= X_DONE;
            end else begin
              st <= X_BUS;
            end
          end
        end

        X_PATTERN: begin
          wptr <= wptr + 1'b1;
          k    <= k + 1'b1;
          if (k == ret_len - 1) st <= X_DONE;
        end

        // write primitive: fetch the next data word from the body
        X_RW_MEM:   st <= X_RW_MEM_W;
        X_RW_MEM_W: begin
          data_q <= m_rdata;
          st     <= X_BUS;
        end

        X_BUS: begin
          tmo <= TW'(TIMEOUT_CYCLES);
          if (pid_q == PID_ECHO) begin
            // bounce: write RESERVED_REG_0, then read it back
            xb_addr <= A_RESERVED_0;
            if (k == 0) begin
              xb_we <= 1'b1; xb_wdata <= attr[0]; is_read <= 1'b0;
            end else begin
              xb_re <= 1'b1; is_read <= 1'b1;
            end
          end else begin
            xb_addr <= attr[1][19:0] + 20'(k * attr[2]);
            if (attr[0] == RW_WRITE) begin
              xb_we <= 1'b1; xb_wdata <= data_q; is_read <= 1'b0;
            end else begin
              xb_re <= 1'b1; is_read <= 1'b1;
            end
          end
          st <= X_BUS_WAIT;
        end

        X_BUS_WAIT: begin
          if (b_ack) begin
            if (is_read) wptr <= wptr + 1'b1;
            k <= k + 1'b1;
            if (pid_q == PID_ECHO)
              st <= (k == 0) ? X_BUS : X_DONE;
            else if (k + 1 == ret_len)
              st <= X_DONE;
            else
              st <= (attr[0] == RW_WRITE) ? X_RW_MEM : X_BUS;
          end else if (tmo == '0) begin
            eb_wr    <= 1'b1;
            eb_data  <= errbuf_word(EB_TIMEOUT, pindex_q[23:0]);
            exc_push <= 1'b1;
            exc_id   <= ERR_TIMEOUT;
            st       <= X_DONE;
            ret_append <= 1'b0;  // incomplete reply is not counted
          end else begin
            tmo <= tmo - 1'b1;
          end
        end

        X_DONE: begin
          done <= 1'b1;
          st   <= X_IDLE;
          if (ret_append && (pid_q == PID_CHECK_OUTPUT || pid_q == PID_ECHO
                             || pid_q == PID_SEND_SLAVE_LIST
                             || (pid_q == PID_RW_REGISTER && attr[0] == RW_READ))) begin
            out_wp     <= out_wp + AW'(ret_len) + AW'(PRIM_HDR_WORDS);
            out_nprims <= out_nprims + 1'b1;
          end
          ret_append <= 1'b0;
        end

        default: st <= X_IDLE;
      endcase
    end
  end

endmodule
