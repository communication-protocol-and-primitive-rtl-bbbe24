// rod_msg_pkg: types and constants shared by the ROD message-passing logic.
//
// A PrimitiveList travels from the VME host to the MasterDsp as a block of
// 32-bit words: a three-word ListHeader (ListLength, ListIndex,
// NumberOfPrimitives), the primitives, and a two-word ListTrailer (ListLength
// again, ListChecksum). Each primitive starts with a three-word header
// (PrimitiveLength, PrimitiveIndex, PrimitiveID) followed by its body.
// The word layout, the field widths of the status register (listIndex 4 bits,
// primIndex 20, nestIndex 8, interruptID 8), the attribute codes of the
// primitives and the four message-system error codes follow the protocol
// definition. The bit positions of the register fields, the numeric
// PrimitiveID values and the address offsets of the buffer windows are this
// design's own choices: the protocol leaves them to a separate header file.
package rod_msg_pkg;

  localparam int unsigned WORD_W = 32;
  typedef logic [WORD_W-1:0] word_t;

  // List framing
  localparam int unsigned LIST_HDR_WORDS  = 3;
  localparam int unsigned LIST_TRL_WORDS  = 2;
  localparam int unsigned PRIM_HDR_WORDS  = 3;
  localparam int unsigned LIST_MIN_WORDS  = LIST_HDR_WORDS + LIST_TRL_WORDS;

  // ChecksumWC codes (common primitives 8 and 9)
  localparam word_t CKWC_OFF = 32'h0000_0000;
  localparam word_t CKWC_ALL = 32'hFFFF_FFFF;

  // Message system error conditions, reported in interruptID
  typedef enum logic [7:0] {
    ERR_NONE         = 8'd0,
    ERR_TIMEOUT      = 8'd1,
    ERR_BAD_CHECKSUM = 8'd2,
    ERR_IN_OVERFLOW  = 8'd3,
    ERR_OUT_OVERFLOW = 8'd4
  } msg_err_e;

  // Codes written into the error buffer (this design's own encoding):
  // bits 31:24 = kind, 23:0 = detail (list index or primitive index).
  typedef enum logic [7:0] {
    EB_BAD_CHECKSUM  = 8'h01,
    EB_LEN_BOUNDS    = 8'h02,
    EB_LEN_MISMATCH  = 8'h03,
    EB_PRIM_FORMAT   = 8'h04,
    EB_UNKNOWN_PRIM  = 8'h05,
    EB_TIMEOUT       = 8'h06,
    EB_OUT_OVERFLOW  = 8'h07,
    EB_BAD_ATTRIBUTE = 8'h08,
    EB_SLAVE_INT     = 8'h09
  } errbuf_code_e;

  // PrimitiveID values (own numbering: common primitive k -> k,
  // MasterDsp primitive k -> 0x100 + k).
  localparam word_t PID_RESET_BUFFER      = 32'h0000_0005;
  localparam word_t PID_SET_BUFF_RD_MODE  = 32'h0000_0006;
  localparam word_t PID_SET_BUFF_OVF_MODE = 32'h0000_0007;
  localparam word_t PID_SET_IN_CKWC       = 32'h0000_0008;
  localparam word_t PID_SET_OUT_CKWC      = 32'h0000_0009;
  localparam word_t PID_SET_ROD_MODE      = 32'h0000_0101;
  localparam word_t PID_RW_REGISTER       = 32'h0000_0102;
  localparam word_t PID_SEND_SLAVE_LIST   = 32'h0000_0108;
  localparam word_t PID_SET_OUT_DS_CKWC   = 32'h0000_010A;
  localparam word_t PID_SET_IN_DS_CKWC    = 32'h0000_010B;
  localparam word_t PID_CHECK_OUTPUT      = 32'h0000_010C;
  localparam word_t PID_ECHO              = 32'h0000_010D;

  // Buffer names (common primitives 5-7)
  localparam word_t BUF_ALL    = 32'hFFFF_FFFF;
  localparam word_t BUF_INPUT  = 32'd1;
  localparam word_t BUF_OUTPUT = 32'd2;
  localparam word_t BUF_CONFIG = 32'd3;
  localparam word_t BUF_ERROR  = 32'd4;
  localparam word_t BUF_INFO   = 32'd5;
  localparam word_t BUF_DIAG   = 32'd6;

  // Buffer read mode / overflow mode
  localparam logic RD_RINGBUFF  = 1'b0;  // readPtr := writePtr after read
  localparam logic RD_LINBUFF   = 1'b1;  // readPtr, writePtr := BASE after read
  localparam logic OVF_NOOVERWR = 1'b0;  // drop new data on overflow
  localparam logic OVF_OVERWR   = 1'b1;  // overwrite oldest data on overflow

  // ROD mode (MasterDsp primitive 1)
  localparam word_t MODE_COMMAND = 32'd1;
  localparam word_t MODE_RUN     = 32'd2;

  // Register read/write primitive mode
  localparam word_t RW_READ  = 32'd1;
  localparam word_t RW_WRITE = 32'd2;
  localparam word_t DATASTORE_APPEND = 32'hFFFF_FFFF;

  // MasterDsp (byte) addresses of the ROD Resources FPGA registers
  localparam logic [19:0] A_ROD_STATUS_0 = 20'h01000;
  localparam logic [19:0] A_ROD_STATUS_1 = 20'h01004;
  localparam logic [19:0] A_ROD_STATUS_2 = 20'h01008;
  localparam logic [19:0] A_RESERVED_0   = 20'h0100c;
  localparam logic [19:0] A_RESERVED_1   = 20'h01010;
  localparam logic [19:0] A_VME_CMND_0   = 20'h01020;
  localparam logic [19:0] A_VME_CMND_1   = 20'h01024;
  localparam logic [19:0] A_RESERVED_2   = 20'h01028;
  localparam logic [19:0] A_RESERVED_3   = 20'h0102c;
  localparam logic [19:0] A_RESERVED_4   = 20'h01030;
  localparam logic [19:0] A_STATUS_LED   = 20'h01070;

  // Fields the list handler and executor own in RodStatusRegister
  typedef struct packed {
    logic        out_list_ready;
    logic        dsp_ack;
    logic        busy;
    logic        executing;
    logic [3:0]  list_index;
    logic [19:0] prim_index;
    logic [7:0]  nest_index;
    logic        prim_list_aborted;
    logic        rod_mode;          // 0 command, 1 data taking
  } handler_status_t;

  // ROD status bits that come from elsewhere on the board
  typedef struct packed {
    logic rod_reset;
    logic readout_reset;
    logic slink_initialized;
    logic rod_busy;
    logic slink_xoff;
    logic slink_down;
    logic slink_on_off;
    logic slink_test;
    logic efb_stop_output;
    logic router_stop_output;
  } board_status_t;

  // Decoded VmeCommandRegister bits
  typedef struct packed {
    logic in_list_ready;
    logic abort_list_execution;
    logic err_buff_read_request;
    logic info_buff_read_request;
    logic diag_buff_read_request;
    logic reset_rod;
    logic reset_readout;
    logic initialize_slink;
    logic enable_slink;
    logic test_slink;
    logic enable_interrupts;
    logic clear_exception;
  } vme_cmd_t;

  // Bit positions: RodStatusRegister0
  localparam int unsigned S0_OUT_LIST_READY = 0;
  localparam int unsigned S0_DSP_ACK        = 1;
  localparam int unsigned S0_BUSY           = 2;
  localparam int unsigned S0_EXECUTING      = 3;
  localparam int unsigned S0_LIST_INDEX     = 4;   // [7:4]
  localparam int unsigned S0_PRIM_INDEX     = 8;   // [27:8]
  localparam int unsigned S0_ABORTED        = 28;
  localparam int unsigned S0_ERR_NOT_EMPTY  = 29;
  localparam int unsigned S0_INF_NOT_EMPTY  = 30;
  localparam int unsigned S0_DIAG_NOT_EMPTY = 31;
  // RodStatusRegister1
  localparam int unsigned S1_NEST_INDEX     = 0;   // [7:0]
  localparam int unsigned S1_INTERRUPT_ID   = 8;   // [15:8]
  localparam int unsigned S1_INT_ISSUED     = 16;
  localparam int unsigned S1_INT_ENABLED    = 17;
  localparam int unsigned S1_ROD_ERROR      = 18;
  localparam int unsigned S1_CMD_IGNORED    = 19;
  localparam int unsigned S1_ROD_MODE       = 20;
  // RodStatusRegister2 holds board_status_t in bits [9:0], rod_reset in bit 9.

  // VmeCommandRegister0 bit positions (VmeCommandRegister1 is free for
  // software use)
  localparam int unsigned C0_IN_LIST_READY  = 0;
  localparam int unsigned C0_ABORT          = 1;
  localparam int unsigned C0_ERR_RD_REQ     = 2;
  localparam int unsigned C0_INFO_RD_REQ    = 3;
  localparam int unsigned C0_DIAG_RD_REQ    = 4;
  localparam int unsigned C0_RESET_ROD      = 5;
  localparam int unsigned C0_RESET_READOUT  = 6;
  localparam int unsigned C0_INIT_SLINK     = 7;
  localparam int unsigned C0_ENABLE_SLINK   = 8;
  localparam int unsigned C0_TEST_SLINK     = 9;
  localparam int unsigned C0_ENABLE_INTS    = 10;
  localparam int unsigned C0_CLEAR_EXC      = 11;

  function automatic vme_cmd_t decode_cmd(word_t c0);
    vme_cmd_t c;
    c.in_list_ready          = c0[C0_IN_LIST_READY];
    c.abort_list_execution   = c0[C0_ABORT];
    c.err_buff_read_request  = c0[C0_ERR_RD_REQ];
    c.info_buff_read_request = c0[C0_INFO_RD_REQ];
    c.diag_buff_read_request = c0[C0_DIAG_RD_REQ];
    c.reset_rod              = c0[C0_RESET_ROD];
    c.reset_readout          = c0[C0_RESET_READOUT];
    c.initialize_slink       = c0[C0_INIT_SLINK];
    c.enable_slink           = c0[C0_ENABLE_SLINK];
    c.test_slink             = c0[C0_TEST_SLINK];
    c.enable_interrupts      = c0[C0_ENABLE_INTS];
    c.clear_exception        = c0[C0_CLEAR_EXC];
    return c;
  endfunction

  function automatic word_t errbuf_word(errbuf_code_e code, logic [23:0] detail);
    return {code, detail};
  endfunction

endpackage
