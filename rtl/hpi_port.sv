// hpi_port: the host port through which the VME host reaches the
// MasterDsp's memory.
//
// The host passes a PrimitiveList by writing the buffer's base address to
// HPIA and then streaming the words into HPID with autoincrement, and fetches
// a reply the same way. HCNTRL[1:0] picks one of four host registers, in the
// order of the ROD address map (EA[16:15] drive HCNTRL):
//   00 HPIC   control: bit 1 DSPINT (writing 1 interrupts the DSP),
//                       bit 2 HINT (set by the DSP side, writing 1 clears it)
//   01 HPIA   word address
//   10 HPID   data, HPIA incremented after the access
//   11 HPID   data, HPIA unchanged
// Timing: one access per cycle when `h_strobe` is high, direction by `h_rnw`.
// Read data return on `h_rdata` with `h_rvalid` one cycle later. Memory
// accesses leave on the `m_*` port in the strobe cycle; the memory answers one
// cycle later.
//
// The register set, its selection by HCNTRL and the autoincrement come from
// the protocol and the address map. Own choices: a 32-bit data path (the
// half-word select HHWIL is not used on this link), word addressing, and the
// HPIC bit positions of DSPINT and HINT.
module hpi_port #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    hcntrl,
  input  logic          h_strobe,
  input  logic          h_rnw,
  input  logic [31:0]   h_wdata,
  output logic [31:0]   h_rdata,
  output logic          h_rvalid,
  // to the DSP memory map
  output logic [AW-1:0] m_addr,
  output logic          m_we,
  output logic          m_re,
  output logic [31:0]   m_wdata,
  input  logic [31:0]   m_rdata,
  // interrupts
  output logic          dsp_int,
  input  logic          hint_set,
  output logic          hint
);

  typedef enum logic [1:0] {
    HC_HPIC = 2'b00, HC_HPIA = 2'b01, HC_HPID_INC = 2'b10, HC_HPID = 2'b11
  } hcntrl_e;

  hcntrl_e       sel;
  logic [AW-1:0] hpia;
  logic          rd_mem_q;
  logic [31:0]   rd_reg_q;

  assign sel = hcntrl_e'(hcntrl);

  wire data_acc = h_strobe && (sel == HC_HPID_INC || sel == HC_HPID);

  assign m_addr  = hpia;
  assign m_we    = data_acc && !h_rnw;
  assign m_re    = data_acc && h_rnw;
  assign m_wdata = h_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hpia     <= '0;
      hint     <= 1'b0;
      dsp_int  <= 1'b0;
      h_rvalid <= 1'b0;
      rd_mem_q <= 1'b0;
      rd_reg_q <= '0;
    end else begin
      dsp_int  <= 1'b0;
      h_rvalid <= h_strobe && h_rnw;
      rd_mem_q <= data_acc && h_rnw;
      if (hint_set) hint <= 1'b1;
      if (h_strobe) begin
        unique case (sel)
          HC_HPIC: begin
            if (!h_rnw) begin
              dsp_int <= h_wdata[1];
              if (h_wdata[2] && !hint_set) hint <= 1'b0;
            end
            rd_reg_q <= {29'b0, hint, 2'b0};
          end
          HC_HPIA: begin
            if (!h_rnw) hpia <= h_wdata[AW-1:0];
            rd_reg_q <= 32'(hpia);
          end
          HC_HPID_INC: hpia <= hpia + 1'b1;
          HC_HPID: ;
        endcase
      end
    end
  end

  assign h_rdata = rd_mem_q ? m_rdata : rd_reg_q;

endmodule
