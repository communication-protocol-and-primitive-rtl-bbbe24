// slave_dsp_model: behavioural model of one SlaveDsp as seen through its host
// port, for testbenches only (the SlaveDsp is a bought-in processor running
// its own program; it is not part of the RTL).
//
// Host port: HCNTRL selects HPIC (00), HPIA (01), HPID with autoincrement
// (10) or HPID (11); HHWIL selects the half word, 0 = bits 15:0, 1 = bits
// 31:16. An access is taken at the falling edge of the data strobe while the
// chip select is low: a write stores its half word at once, a read is served
// combinationally from the addressed word. HPIA holds a word address into the
// model's memory (MEM_WORDS words) and, for HCNTRL = 10, steps by one when
// the strobe of a high-half access ends.
//
// Program: the same message handshake as on the MasterDsp, with the command
// word at CMD_ADDR (inListReady = bit 0) and the status word at STAT_ADDR
// (outListReady = bit 0, dspAck = bit 1). When inListReady is seen with
// dspAck clear, the model waits FW_DELAY cycles, reads the PrimitiveList at
// IN_BASE and, if `reply_en`, writes a reply PrimitiveList at OUT_BASE:
//   [ListLength, ListIndex (copied), NumPrims = 1,
//    PrimitiveLength, PrimitiveIndex = 0, PrimitiveID = 0x10D,
//    input ListLength, XOR of all input list words, 0xA5000000 + i for
//    i < reply_extra,
//    ListLength, XOR checksum of all words before it].
// It then sets outListReady (= reply_en) and dspAck, waits for inListReady
// to drop and clears both. With `ack_en` low the program never answers.
// `proto_err` counts host actions that break the handshake: setting
// inListReady while dspAck is still set.
//
// Hardware interrupt: a `raise_int` pulse logs status data at ERR_ADDR,
// [N = err_words, then {8'hE0, interrupt count, word number} for each word],
// and sets HINT (HPIC bit 2), seen outside as `hint_n` low. A host write of
// the low HPIC half with bit 2 set clears HINT; writing 0 there leaves it.
//
// Timing: driven by the port strobes; the program runs on `clk`.
module slave_dsp_model #(
  parameter int unsigned MEM_WORDS = 8192,
  parameter int unsigned IN_BASE   = 32'h0000,
  parameter int unsigned OUT_BASE  = 32'h0800,
  parameter int unsigned CMD_ADDR  = 32'h1000,
  parameter int unsigned STAT_ADDR = 32'h1001,
  parameter int unsigned ERR_ADDR  = 32'h1800,
  parameter int unsigned FW_DELAY  = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hcs_n,
  input  logic [1:0]  hcntrl,
  input  logic        hhwil,
  input  logic        hr_nw,
  input  logic        hds_n,
  input  logic [15:0] hd_out,
  input  logic        hd_oe,
  output logic [15:0] hd_in,
  // test controls and observations
  input  logic        reply_en,
  input  logic        ack_en,
  input  int unsigned reply_extra,
  output int unsigned lists_done,
  output int unsigned proto_err,
  input  logic        raise_int,
  input  int unsigned err_words,
  output logic        hint_n,
  output int unsigned ints_raised
);

  logic [31:0] mem [MEM_WORDS];
  logic [31:0] hpic, hpia;
  logic        hds_q, cs_q;
  logic [1:0]  hc_q;
  logic        hw_q;

  typedef enum logic [1:0] {F_IDLE, F_WORK, F_WAIT_CLR} fw_e;
  fw_e         fst;
  int unsigned dly;

  wire  [31:0] cur = (hcntrl == 2'b00) ? hpic
                   : (hcntrl == 2'b01) ? hpia
                   : mem[hpia % MEM_WORDS];
  assign hd_in = hhwil ? cur[31:16] : cur[15:0];
  assign hint_n = ~hpic[2];

  wire cmd_rdy = mem[CMD_ADDR][0];
  wire ackd    = mem[STAT_ADDR][1];

  function automatic logic [31:0] put_half(logic [31:0] w, logic hi, logic [15:0] h);
    return hi ? {h, w[15:0]} : {w[31:16], h};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MEM_WORDS; i++) mem[i] <= '0;
      hpic       <= '0;
      hpia       <= '0;
      hds_q      <= 1'b1;
      cs_q       <= 1'b0;
      hc_q       <= '0;
      hw_q       <= 1'b0;
      fst        <= F_IDLE;
      dly        <= 0;
      lists_done <= 0;
      proto_err  <= 0;
      ints_raised <= 0;
    end else begin
      hds_q <= hds_n;
      // host port
      if (!hcs_n && !hds_n && hds_q) begin          // strobe starts
        cs_q <= 1'b1;
        hc_q <= hcntrl;
        hw_q <= hhwil;
        if (!hr_nw && hd_oe) begin
          unique case (hcntrl)
            2'b00: hpic <= hhwil ? put_half(hpic, 1'b1, hd_out)
                                 : {hpic[31:16], hd_out[15:3], hpic[2] & ~hd_out[2], hd_out[1:0]};
            2'b01: hpia <= put_half(hpia, hhwil, hd_out);
            default: begin
              mem[hpia % MEM_WORDS] <= put_half(mem[hpia % MEM_WORDS], hhwil, hd_out);
              if (hpia % MEM_WORDS == CMD_ADDR && !hhwil && hd_out[0] && !cmd_rdy && ackd)
                proto_err <= proto_err + 1;
            end
          endcase
        end
      end else if (cs_q && hds_n && !hds_q) begin   // strobe ends
        cs_q <= 1'b0;
        if (hc_q == 2'b10 && hw_q) hpia <= hpia + 1;
      end

      // hardware interrupt
      if (raise_int) begin
        mem[ERR_ADDR] <= err_words;
        for (int i = 0; i < err_words && i < 64; i++)
          mem[ERR_ADDR + 1 + i] <= {8'hE0, 8'(ints_raised), 16'(i)};
        hpic[2]     <= 1'b1;
        ints_raised <= ints_raised + 1;
      end

      // program
      unique case (fst)
        F_IDLE: if (cmd_rdy && !ackd && ack_en) begin
          dly <= FW_DELAY;
          fst <= F_WORK;
        end
        F_WORK: begin
          if (dly != 0) begin
            dly <= dly - 1;
          end else begin
            logic [31:0] ll, x, rl, ck;
            ll = mem[IN_BASE];
            x  = '0;
            for (int i = 0; i < ll && i < MEM_WORDS / 2; i++) x ^= mem[IN_BASE + i];
            if (reply_en) begin
              rl = 32'd10 + reply_extra;
              mem[OUT_BASE + 0] <= rl;
              mem[OUT_BASE + 1] <= mem[IN_BASE + 1];
              mem[OUT_BASE + 2] <= 32'd1;
              mem[OUT_BASE + 3] <= 32'd5 + reply_extra;
              mem[OUT_BASE + 4] <= 32'd0;
              mem[OUT_BASE + 5] <= 32'h0000_010D;
              mem[OUT_BASE + 6] <= ll;
              mem[OUT_BASE + 7] <= x;
              ck = rl ^ mem[IN_BASE + 1] ^ 32'd1 ^ (32'd5 + reply_extra) ^ 32'h0000_010D
                   ^ ll ^ x;
              for (int i = 0; i < reply_extra; i++) begin
                mem[OUT_BASE + 8 + i] <= 32'hA500_0000 + i;
                ck ^= 32'hA500_0000 + i;
              end
              mem[OUT_BASE + 8 + reply_extra] <= rl;
              ck ^= rl;
              mem[OUT_BASE + 9 + reply_extra] <= ck;
            end
            mem[STAT_ADDR] <= {30'd0, 1'b1, reply_en};
            lists_done     <= lists_done + 1;
            fst            <= F_WAIT_CLR;
          end
        end
        F_WAIT_CLR: if (!cmd_rdy) begin
          mem[STAT_ADDR] <= '0;
          fst            <= F_IDLE;
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

endmodule
