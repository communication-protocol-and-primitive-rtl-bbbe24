// msg_buffer: one of the ROD's circular text buffers (error, information or
// diagnostic) together with the handshake by which the host reads it.
//
// How it works. Words written on `wr_en` go into a ring of DEPTH words. When
// the ring is full the overflow mode decides: NOOVERWRITE drops the new word,
// OVERWRITE replaces the oldest one; both set the `overflow` flag. The host
// read handshake follows the protocol:
//   1. while the buffer holds data and `read_request` is low, `not_empty` is
//      raised (it goes to the xxxBuffNotEmpty bit of RodStatusRegister);
//   2. the host answers with `read_request` = 1 (xxxBuffReadRequest);
//   3. the buffer freezes and drops `not_empty`; the host may now read the
//      descriptor and the contents through the `h_*` port;
//   4. when the host lowers `read_request` the pointers are updated by the read
//      mode (RINGBUFF: readPtr := writePtr; LINBUFF: readPtr := writePtr :=
//      start of buffer) and `overflow` is cleared.
// `reset_buf` empties the buffer (primitive "Reset buffer"); the two mode
// inputs are loaded by the "Set Buffer Read Mode" and "Set Buffer Overflow
// Mode" primitives.
//
// Host port: `h_addr` with its top bit clear reads data word `h_addr` of the
// ring; with the top bit set it reads descriptor word h_addr[2:0], in the order
// of the buffer structure: 0 dataStart, 1 dataEnd, 2 readPtr, 3 writePtr,
// 4 mode, 5 overwrite, 6 overflow (7 reads the word count). Addresses in the
// descriptor are host word addresses, BASE + ring index. Read data appear one
// cycle after the address.
//
// Own choices: words written while frozen are discarded and flag overflow
// (the protocol lets the writer hold them back, which a hardware FIFO without
// a second store cannot do); writePtr is reported as the address the next word
// will go to, so that the RINGBUFF rule empties the buffer; reset state is
// empty, RINGBUFF, NOOVERWRITE.
module msg_buffer
  import rod_msg_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned BASE  = 0,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // writer
  input  logic        wr_en,
  input  word_t       wr_data,
  // configuration from primitives
  input  logic        reset_buf,
  input  logic        rd_mode_we,
  input  logic        rd_mode_in,
  input  logic        ovf_mode_we,
  input  logic        ovf_mode_in,
  // read handshake
  input  logic        read_request,
  output logic        not_empty,
  output logic        frozen,
  output logic        overflow,
  // host read port
  input  logic [AW:0] h_addr,
  output word_t       h_rdata
);

  word_t         mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  logic          rd_mode, ovf_mode;

  wire full = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      frozen    <= 1'b0;
      not_empty <= 1'b0;
      rd_mode   <= RD_RINGBUFF;
      ovf_mode  <= OVF_NOOVERWR;
    end else begin
      if (rd_mode_we)  rd_mode  <= rd_mode_in;
      if (ovf_mode_we) ovf_mode <= ovf_mode_in;

      if (reset_buf) begin
        rd_ptr    <= '0;
        wr_ptr    <= '0;
        count     <= '0;
        overflow  <= 1'b0;
        frozen    <= 1'b0;
        not_empty <= 1'b0;
      end else if (frozen) begin
        if (wr_en) overflow <= 1'b1;
        if (!read_request) begin
          frozen   <= 1'b0;
          overflow <= 1'b0;
          count    <= '0;
          if (rd_mode == RD_LINBUFF) begin
            rd_ptr <= '0;
            wr_ptr <= '0;
          end else begin
            rd_ptr <= wr_ptr;
          end
        end
      end else begin
        if (wr_en) begin
          if (!full) begin
            wr_ptr <= wr_ptr + 1'b1;
            count  <= count + 1'b1;
          end else begin
            overflow <= 1'b1;
            if (ovf_mode == OVF_OVERWR) begin
              wr_ptr <= wr_ptr + 1'b1;
              rd_ptr <= rd_ptr + 1'b1;
            end
          end
        end
        if (read_request && not_empty) begin
          frozen    <= 1'b1;
          not_empty <= 1'b0;
        end else if (!read_request && (count != '0 || wr_en)) begin
          not_empty <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !frozen && !reset_buf && (!full || ovf_mode == OVF_OVERWR))
      mem[wr_ptr] <= wr_data;
  end

  // host read port
  always_ff @(posedge clk) begin
    if (!h_addr[AW]) begin
      h_rdata <= mem[h_addr[AW-1:0]];
    end else begin
      unique case (h_addr[2:0])
        3'd0: h_rdata <= word_t'(BASE);
        3'd1: h_rdata <= word_t'(BASE + DEPTH - 1);
        3'd2: h_rdata <= word_t'(BASE) + word_t'(rd_ptr);
        3'd3: h_rdata <= word_t'(BASE) + word_t'(wr_ptr);
        3'd4: h_rdata <= word_t'(rd_mode);
        3'd5: h_rdata <= word_t'(ovf_mode);
        3'd6: h_rdata <= word_t'(overflow);
        default: h_rdata <= word_t'(count);
      endcase
    end
  end

endmodule
