// list_handler: the receiving side of the PrimitiveList handshake.
//
// The host writes a PrimitiveList into the input message buffer, waits for
// dspAck = 0 and raises inListReady. This block then works through the
// procedure the protocol gives for the MasterDsp:
//   1. set busy;
//   2. read ListLength, ListIndex and NumberOfPrimitives from the header and
//      ListLength and ListChecksum from the trailer;
//   3. check that ListLength is within bounds (at least the five framing
//      words, at most the buffer) and that both copies agree, and recompute
//      the checksum over the list words before ListChecksum (subset chosen by
//      the input checksumWC); on any failure write the error buffer and go to
//      step 8. A list too long for the buffer raises the "Input buffer
//      overflow" exception, a checksum mismatch "Bad Checksum";
//   4. show ListIndex in the status register and set executing;
//   5. run the primitives one after another through prim_executor, waiting
//      for each to finish, and after each one show its PrimitiveIndex. Between
//      primitives abortListExecution is checked; if set, the rest of the list
//      is skipped and primListAborted is raised;
//   6. clear executing;
//   7. if any primitive returned data, complete the reply in the output
//      buffer: word 0 reply length, word 1 ListIndex, word 2 number of return
//      primitives, then the return primitives, then the reply length again and
//      the checksum over the words before it (output checksumWC), and set
//      outListReady;
//   8. set dspAck (outListReady is already valid, never later than dspAck);
//   9. wait for the host to drop inListReady, then clear outListReady, dspAck
//      and busy.
// A primitive whose PrimitiveLength is below three words or runs past the
// trailer ends execution with a format error in the error buffer.
//
// Memory: one port into the message RAM (one cycle read latency), shared with
// the executor while a primitive runs. The input list starts at IN_BASE, the
// reply at OUT_BASE.
//
// The order of the steps, the checks and the status bits follow the protocol.
// Own choices: doing the list work in hardware rather than DSP software, the
// error-buffer word format, clearing outListReady together with dspAck (as in
// the sequence diagram), and not supporting nested lists (nestIndex stays 0).
module list_handler
  import rod_msg_pkg::*;
#(
  parameter int unsigned AW             = 11,
  parameter int unsigned IN_BASE        = 0,
  parameter int unsigned IN_WORDS       = 1024,
  parameter int unsigned OUT_BASE       = 1024,
  parameter int unsigned OUT_WORDS      = 1024,
  parameter int unsigned TIMEOUT_CYCLES = 1024
) (
  input  logic            clk,
  input  logic            rst_n,
  input  vme_cmd_t        cmd,
  output handler_status_t hs,
  // message RAM
  output logic [AW-1:0]   m_addr,
  output logic            m_we,
  output word_t           m_wdata,
  input  word_t           m_rdata,
  // register bus (from the executor)
  output logic            b_re,
  output logic            b_we,
  output logic [19:0]     b_addr,
  output word_t           b_wdata,
  input  word_t           b_rdata,
  input  logic            b_ack,
  // text buffer control
  output logic [2:0]      buf_reset,
  output logic [2:0]      buf_rd_mode_we,
  output logic [2:0]      buf_ovf_mode_we,
  output logic            buf_mode_val,
  // reporting
  output logic            eb_wr,
  output word_t           eb_data,
  output logic            exc_push,
  output logic [7:0]      exc_id,
  output logic            cmd_ignored,
  // event strobes for monitoring
  output logic            ev_list_done,
  output logic            ev_prim_done
);

  typedef enum logic [4:0] {
    H_IDLE, H_HDR, H_HDR_W, H_TRL, H_TRL_W, H_CHECK, H_CKSUM, H_CKSUM_END,
    H_VERIFY, H_PHDR, H_PHDR_W, H_EXEC, H_EXEC_WAIT, H_END, H_WRAP_HDR,
    H_WRAP_CK, H_WRAP_CK_END, H_WRAP_TRL, H_ACK, H_RELEASE
  } hstate_e;

  hstate_e       st;
  word_t         list_len, list_idx, num_prims, trl_len, host_checksum;
  word_t         plen, pidx, pid;
  word_t         p;          // word offset of current primitive in the list
  word_t         kprim;      // primitives executed
  logic [1:0]    wi;         // word counter for header reads/writes
  word_t         ci;         // checksum read counter
  logic          ck_valid_q;

  // checksum engine, shared by the input check and the reply
  logic  ck_start;
  word_t ck_wc, ck_sum;
  logic  ck_enabled;

  // executor
  logic          x_start, x_done, x_active, x_list_start;
  logic [AW-1:0] x_out_wp, x_m_addr;
  word_t         x_out_nprims, x_m_wdata, in_ckwc, out_ckwc;
  logic          x_m_we, x_rod_mode;
  logic          x_eb_wr, x_exc_push, h_eb_wr, h_exc_push;
  word_t         x_eb_data, h_eb_data;
  logic [7:0]    x_exc_id, h_exc_id;

  word_t h_m_addr, h_m_wdata;
  logic  h_m_we;

  prim_executor #(
    .AW(AW), .OUT_BASE(OUT_BASE), .OUT_WORDS(OUT_WORDS),
    .TIMEOUT_CYCLES(TIMEOUT_CYCLES)
  ) u_exec (
    .clk, .rst_n,
    .list_start(x_list_start), .start(x_start),
    .pid, .pindex(pidx), .plen,
    .body_addr(AW'(IN_BASE) + AW'(p) + AW'(PRIM_HDR_WORDS)),
    .done(x_done), .active(x_active),
    .out_wp(x_out_wp), .out_nprims(x_out_nprims),
    .m_addr(x_m_addr), .m_we(x_m_we), .m_wdata(x_m_wdata), .m_rdata,
    .b_re, .b_we, .b_addr, .b_wdata, .b_rdata, .b_ack,
    .in_ckwc, .out_ckwc, .rod_mode(x_rod_mode),
    .buf_reset, .buf_rd_mode_we, .buf_ovf_mode_we, .buf_mode_val,
    .eb_wr(x_eb_wr), .eb_data(x_eb_data),
    .exc_push(x_exc_push), .exc_id(x_exc_id),
    .cmd_ignored
  );

  list_checksum u_ck (
    .clk, .rst_n,
    .start(ck_start), .ckwc(ck_wc),
    .in_valid(ck_valid_q), .in_word(m_rdata),
    .sum(ck_sum), .enabled(ck_enabled), .count()
  );

  assign m_addr  = x_active ? x_m_addr  : h_m_addr[AW-1:0];
  assign m_we    = x_active ? x_m_we    : h_m_we;
  assign m_wdata = x_active ? x_m_wdata : h_m_wdata;

  // the two reporters never act in the same cycle; the executor wins if so
  assign eb_wr    = x_eb_wr || h_eb_wr;
  assign eb_data  = x_eb_wr ? x_eb_data : h_eb_data;
  assign exc_push = x_exc_push || h_exc_push;
  assign exc_id   = x_exc_push ? x_exc_id : h_exc_id;

  assign hs.rod_mode   = x_rod_mode;
  assign hs.nest_index = '0;

  wire word_t reply_len = word_t'(x_out_wp) + 32'(LIST_TRL_WORDS);

  // handler memory port
  always_comb begin
    h_m_addr  = word_t'(IN_BASE);
    h_m_we    = 1'b0;
    h_m_wdata = '0;
    unique case (st)
      H_HDR:   h_m_addr = word_t'(IN_BASE) + 32'(wi);
      H_TRL:   h_m_addr = word_t'(IN_BASE) + list_len - 32'(LIST_TRL_WORDS) + 32'(wi);
      H_CKSUM: h_m_addr = word_t'(IN_BASE) + ci;
      H_PHDR:  h_m_addr = word_t'(IN_BASE) + p + 32'(wi);
      H_WRAP_HDR: begin
        h_m_addr = word_t'(OUT_BASE) + 32'(wi);
        h_m_we   = 1'b1;
        unique case (wi)
          2'd0:    h_m_wdata = reply_len;
          2'd1:    h_m_wdata = list_idx;
          2'd2:    h_m_wdata = x_out_nprims;
          default: begin  // trailer ListLength, so the checksum covers it
            h_m_addr  = word_t'(OUT_BASE) + word_t'(x_out_wp);
            h_m_wdata = reply_len;
          end
        endcase
      end
      H_WRAP_CK: h_m_addr = word_t'(OUT_BASE) + ci;
      H_WRAP_TRL: begin
        h_m_addr  = word_t'(OUT_BASE) + word_t'(x_out_wp) + 32'd1;
        h_m_we    = 1'b1;
        h_m_wdata = ck_sum;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st            <= H_IDLE;
      hs.out_list_ready    <= 1'b0;
      hs.dsp_ack           <= 1'b0;
      hs.busy              <= 1'b0;
      hs.executing         <= 1'b0;
      hs.list_index        <= '0;
      hs.prim_index        <= '0;
      hs.prim_list_aborted <= 1'b0;
      list_len      <= '0;
      list_idx      <= '0;
      num_prims     <= '0;
      trl_len       <= '0;
      host_checksum <= '0;
      plen          <= '0;
      pidx          <= '0;
      pid           <= '0;
      p             <= '0;
      kprim         <= '0;
      wi            <= '0;
      ci            <= '0;
      ck_valid_q    <= 1'b0;
      ck_start      <= 1'b0;
      ck_wc         <= '0;
      x_start       <= 1'b0;
      x_list_start  <= 1'b0;
      h_eb_wr       <= 1'b0;
      h_eb_data     <= '0;
      h_exc_push    <= 1'b0;
      h_exc_id      <= '0;
      ev_list_done  <= 1'b0;
      ev_prim_done  <= 1'b0;
    end else begin
      ck_start     <= 1'b0;
      ck_valid_q   <= 1'b0;
      x_start      <= 1'b0;
      x_list_start <= 1'b0;
      h_eb_wr      <= 1'b0;
      h_exc_push   <= 1'b0;
      ev_list_done <= 1'b0;
      ev_prim_done <= 1'b0;

      unique case (st)
        H_IDLE: if (cmd.in_list_ready && !hs.dsp_ack) begin
          hs.busy              <= 1'b1;
          hs.prim_list_aborted <= 1'b0;
          hs.out_list_ready    <= 1'b0;
          x_list_start <= 1'b1;
          wi <= '0;
          st <= H_HDR;
        end

        H_HDR: st <= H_HDR_W;
        H_HDR_W: begin
          unique case (wi)
            2'd0:    list_len  <= m_rdata;
            2'd1:    list_idx  <= m_rdata;
            default: num_prims <= m_rdata;
          endcase
          wi <= wi + 1'b1;
          if (wi == 2'd2) begin
            st <= H_CHECK;
          end else begin
            st <= H_HDR;
          end
        end

        H_CHECK: begin
          wi <= '0;
          if (list_len < 32'(LIST_MIN_WORDS) || list_len > 32'(IN_WORDS)) begin
            h_eb_wr   <= 1'b1;
            h_eb_data <= errbuf_word(EB_LEN_BOUNDS, list_idx[23:0]);
            if (list_len > 32'(IN_WORDS)) begin
              h_exc_push <= 1'b1;
              h_exc_id   <= ERR_IN_OVERFLOW;
            end
            st <= H_ACK;
          end else begin
            st <= H_TRL;
          end
        end

        H_TRL: st <= H_TRL_W;
        H_TRL_W: begin
          wi <= wi + 1'b1;
          if (wi == 2'd0) begin
            trl_len <= m_rdata;
            st <= H_TRL;
          end else begin
            host_checksum <= m_rdata;
            if (trl_len != list_len) begin
              h_eb_wr    <= 1'b1;
              h_eb_data  <= errbuf_word(EB_LEN_MISMATCH, list_idx[23:0]);
                st <= H_ACK;
            end else begin
              ck_start <= 1'b1;
              ck_wc    <= in_ckwc;
              ci       <= '0;
              st       <= H_CKSUM;
            end
          end
        end

        // stream the words before ListChecksum through the checksum engine
        H_CKSUM: begin
          ck_valid_q <= 1'b1;
          ci <= ci + 1'b1;
          if (ci == list_len - 32'd2) st <= H_CKSUM_END;
        end
        H_CKSUM_END: st <= H_VERIFY;   // last word enters the sum here

        H_VERIFY: begin
          if (ck_enabled && ck_sum != host_checksum) begin
            h_eb_wr    <= 1'b1;
            h_eb_data  <= errbuf_word(EB_BAD_CHECKSUM, list_idx[23:0]);
            h_exc_push <= 1'b1;
            h_exc_id   <= ERR_BAD_CHECKSUM;
            st <= H_ACK;
          end else begin
            hs.list_index <= list_idx[3:0];
            hs.executing  <= 1'b1;
            p     <= 32'(LIST_HDR_WORDS);
            kprim <= '0;
            wi    <= '0;
            st    <= H_PHDR;
          end
        end

        H_PHDR: begin
          if (kprim == num_prims) begin
            st <= H_END;
          end else if (p + 32'(PRIM_HDR_WORDS) > list_len - 32'(LIST_TRL_WORDS)) begin
            h_eb_wr   <= 1'b1;
            h_eb_data <= errbuf_word(EB_PRIM_FORMAT, list_idx[23:0]);
            st <= H_END;
          end else begin
            st <= H_PHDR_W;
          end
        end
        H_PHDR_W: begin
          unique case (wi)
            2'd0:    plen <= m_rdata;
            2'd1:    pidx <= m_rdata;
            default: pid  <= m_rdata;
          endcase
          wi <= wi + 1'b1;
          st <= (wi == 2'd2) ? H_EXEC : H_PHDR;
        end

        H_EXEC: begin
          wi <= '0;
          if (plen < 32'(PRIM_HDR_WORDS)
              || p + plen > list_len - 32'(LIST_TRL_WORDS)) begin
            h_eb_wr   <= 1'b1;
            h_eb_data <= errbuf_word(EB_PRIM_FORMAT, pidx[23:0]);
            st <= H_END;
          end else begin
            x_start <= 1'b1;
            st <= H_EXEC_WAIT;
          end
        end

        H_EXEC_WAIT: if (x_done) begin
          hs.prim_index <= pidx[19:0];
          ev_prim_done  <= 1'b1;
          p     <= p + plen;
          kprim <= kprim + 1'b1;
          if (cmd.abort_list_execution) begin
            hs.prim_list_aborted <= 1'b1;
            st <= H_END;
          end else begin
            st <= H_PHDR;
          end
        end

        H_END: begin
          hs.executing <= 1'b0;
          wi <= '0;
          st <= (x_out_nprims != 0) ? H_WRAP_HDR : H_ACK;
        end

        H_WRAP_HDR: begin
          wi <= wi + 1'b1;
          if (wi == 2'd3) begin
            ck_start <= 1'b1;
            ck_wc    <= out_ckwc;
            ci       <= '0;
            st       <= H_WRAP_CK;
          end
        end
        H_WRAP_CK: begin
          ck_valid_q <= 1'b1;
          ci <= ci + 1'b1;
          if (ci == word_t'(x_out_wp)) st <= H_WRAP_CK_END;
        end
        H_WRAP_CK_END: begin
          wi <= '0;
          st <= H_WRAP_TRL;
        end
        H_WRAP_TRL: begin
          hs.out_list_ready <= 1'b1;
          st <= H_ACK;
        end

        H_ACK: begin
          hs.dsp_ack   <= 1'b1;
          hs.executing <= 1'b0;
          st <= H_RELEASE;
        end

        H_RELEASE: if (!cmd.in_list_ready) begin
          hs.out_list_ready <= 1'b0;
          hs.dsp_ack        <= 1'b0;
          hs.busy           <= 1'b0;
          ev_list_done      <= 1'b1;
          st <= H_IDLE;
        end

        default: st <= H_IDLE;
      endcase
    end
  end

  // outListReady is never raised after dspAck within one list
  a_outrdy_before_ack: assert property (@(posedge clk) disable iff (!rst_n)
    (hs.dsp_ack && $past(hs.dsp_ack)) |-> (hs.out_list_ready == $past(hs.out_list_ready)));
  // dspAck only rises while busy
  a_ack_busy: assert property (@(posedge clk) disable iff (!rst_n)
    hs.dsp_ack |-> hs.busy);

endmodule
