// slave_int_handler: the MasterDsp's service of a SlaveDsp hardware
// interrupt.
//
// A SlaveDsp that takes a hardware interrupt logs status data in its error
// buffer and sets HINT in its HPIC, which reaches the MasterDsp as an
// external interrupt (`hint_n`, active low, one line per slave). The
// handler then, for the lowest-numbered slave asking:
//   1. writes HPIC, then HPIA = SLV_ERR_ADDR;
//   2. reads the first word, the number of data words N, then
//      min(N, MAX_WORDS) data words, with autoincrement;
//   3. writes HPIC with the HINT bit set, which clears HINT.
// It passes what it fetched to the MasterDsp error buffer: a header word
// {EB_SLAVE_INT, slave number} and then the data words, one `eb_wr` pulse
// each.
//
// The step order (write HPIC, write HPIA, get errData, clear HINT) follows
// the protocol's hardware-interrupt sequence. Own choices: the error-buffer
// address in the slave and its count word, the MAX_WORDS limit, the header
// word and copying the data into the MasterDsp error buffer. As in
// slave_list_sender, each 32-bit word is two half-word accesses (HHWIL 0
// first) at the SlaveDsp host-port addresses, and only bits 15:0 of the bus
// data are used, so address bits 14:3 and 1:0 and write bits 31:16 are
// constant zero and read bits 31:16 are unused. An access not acknowledged
// within TIMEOUT_CYCLES abandons the service.
//
// Timing: one bus request pulse at a time, then wait for `b_ack`; the
// requests go through the top's bus arbiter, which may delay the acknowledge.
module slave_int_handler
  import rod_msg_pkg::*;
#(
  parameter int unsigned N_SLAVES       = 4,
  parameter word_t       SLV_ERR_ADDR   = 32'h0000_1800,
  parameter int unsigned MAX_WORDS      = 16,
  parameter int unsigned TIMEOUT_CYCLES = 1024
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_SLAVES-1:0] hint_n,
  output logic                busy,
  output logic                serviced,   // pulse: one interrupt served
  // register bus
  output logic                b_re,
  output logic                b_we,
  output logic [19:0]         b_addr,
  output word_t               b_wdata,
  input  word_t               b_rdata,
  input  logic                b_ack,
  // error buffer
  output logic                eb_wr,
  output word_t               eb_data
);

  typedef enum logic [3:0] {
    I_IDLE, I_HPIC, I_HPIA, I_CNT, I_CNT_W, I_DATA, I_DATA_W, I_CLR, I_OP, I_OP_W,
    I_DONE
  } istate_e;

  localparam logic [1:0] HC_HPIC = 2'b00, HC_HPIA = 2'b01, HC_HPID_INC = 2'b10;
  localparam int unsigned TW = $clog2(TIMEOUT_CYCLES + 1);

  istate_e       st, ret_st;
  logic [1:0]    slv_q;
  word_t         n_q, k;
  logic          op_we, half;
  logic [1:0]    op_hc;
  word_t         op_wdata, op_rdata;
  logic [TW-1:0] tmo;
  logic          found;
  logic [1:0]    pick;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int i = N_SLAVES - 1; i >= 0; i--) begin
      if (!hint_n[i]) begin
        found = 1'b1;
        pick  = 2'(i);
      end
    end
  end

  assign busy = (st != I_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= I_IDLE;
      ret_st   <= I_IDLE;
      slv_q    <= '0;
      n_q      <= '0;
      k        <= '0;
      op_we    <= 1'b0;
      half     <= 1'b0;
      op_hc    <= '0;
      op_wdata <= '0;
      op_rdata <= '0;
      tmo      <= '0;
      serviced <= 1'b0;
      b_re     <= 1'b0;
      b_we     <= 1'b0;
      b_addr   <= '0;
      b_wdata  <= '0;
      eb_wr    <= 1'b0;
      eb_data  <= '0;
    end else begin
      b_re     <= 1'b0;
      b_we     <= 1'b0;
      eb_wr    <= 1'b0;
      serviced <= 1'b0;
      unique case (st)
        I_IDLE: if (found) begin
          slv_q   <= pick;
          eb_wr   <= 1'b1;
          eb_data <= errbuf_word(EB_SLAVE_INT, 24'(pick));
          st      <= I_HPIC;
        end
        I_HPIC: begin
          op_we <= 1'b1; op_hc <= HC_HPIC; op_wdata <= 32'h0001_0001;
          ret_st <= I_HPIA; st <= I_OP;
        end
        I_HPIA: begin
          op_we <= 1'b1; op_hc <= HC_HPIA; op_wdata <= SLV_ERR_ADDR;
          ret_st <= I_CNT; st <= I_OP;
        end
        I_CNT: begin
          op_we <= 1'b0; op_hc <= HC_HPID_INC;
          ret_st <= I_CNT_W; st <= I_OP;
        end
        I_CNT_W: begin
          n_q <= (op_rdata > 32'(MAX_WORDS)) ? 32'(MAX_WORDS) : op_rdata;
          k   <= '0;
          st  <= (op_rdata == 0) ? I_CLR : I_DATA;
        end
        I_DATA: begin
          op_we <= 1'b0; op_hc <= HC_HPID_INC;
          ret_st <= I_DATA_W; st <= I_OP;
        end
        I_DATA_W: begin
          eb_wr   <= 1'b1;
          eb_data <= op_rdata;
          k       <= k + 1'b1;
          st      <= (k + 1 == n_q) ? I_CLR : I_DATA;
        end
        I_CLR: begin
          // HINT (bit 2) written as 1 clears it; HWOB stays set
          op_we <= 1'b1; op_hc <= HC_HPIC; op_wdata <= 32'h0005_0005;
          ret_st <= I_DONE; st <= I_OP;
        end

        // one 32-bit HPI access as two half-word bus accesses
        I_OP: begin
          b_addr  <= {1'b1, slv_q, op_hc, 12'b0, half, 2'b00};
          b_wdata <= half ? word_t'(op_wdata[31:16]) : word_t'(op_wdata[15:0]);
          b_we    <= op_we;
          b_re    <= !op_we;
          tmo     <= TW'(TIMEOUT_CYCLES);
          st      <= I_OP_W;
        end
        I_OP_W: begin
          if (b_ack) begin
            if (!half) begin
              op_rdata[15:0] <= b_rdata[15:0];
              half <= 1'b1;
              st   <= I_OP;
            end else begin
              op_rdata <= {b_rdata[15:0], op_rdata[15:0]};
              half <= 1'b0;
              st   <= ret_st;
            end
          end else if (tmo == '0) begin
            half <= 1'b0;
            st   <= I_DONE;
          end else begin
            tmo <= tmo - 1'b1;
          end
        end

        I_DONE: begin
          serviced <= 1'b1;
          st       <= I_IDLE;
        end
        default: st <= I_IDLE;
      endcase
    end
  end

endmodule
