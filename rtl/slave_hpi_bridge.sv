// slave_hpi_bridge: maps MasterDsp external-memory accesses onto the host
// ports of the SlaveDsps.
//
// In the ROD address map the upper half of the MasterDsp's CE0 space, byte
// addresses 0x80000-0xfffff, is the four SlaveDsp host ports. Address bits
// 18:17 choose the SlaveDsp (0x80000 DSP0, 0xa0000 DSP1, 0xc0000 DSP2, 0xe0000
// DSP3), bits 16:15 drive the slave's HCNTRL[1:0] (HPIC, HPIA, HPID with
// autoincrement, HPID), and bit 2 drives HHWIL, the half-word select. Data are
// 16 bits wide. These assignments are taken from the address map.
//
// Timing (own choice, the slave handshake is not specified): an access
// (`req` with `we` for a write) is accepted when the bridge is idle and the
// address is in range. The bridge drives the selected slave's chip select
// `hcs_n` and the address lines for one setup cycle, then holds the data
// strobe `hds_n` low for STROBE_CYCLES cycles, samples the slave's data in the
// last strobe cycle, releases the strobe and pulses `ack` with `rdata`.
// An access out of range is acknowledged in the next cycle with zero data and
// `err` set. N_SLAVES may be 2 or 4 (two slaves are fitted in the basic
// board); accesses to an absent slave end with `err`.
module slave_hpi_bridge #(
  parameter int unsigned N_SLAVES      = 4,
  parameter int unsigned STROBE_CYCLES = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  // MasterDsp side
  input  logic                req,
  input  logic                we,
  input  logic [19:0]         addr,
  input  logic [15:0]         wdata,
  output logic [15:0]         rdata,
  output logic                ack,
  output logic                err,
  output logic                busy,
  // SlaveDsp host ports
  output logic [N_SLAVES-1:0] hcs_n,
  output logic [1:0]          hcntrl,
  output logic                hhwil,
  output logic                hr_nw,
  output logic                hds_n,
  output logic [15:0]         hd_out,
  output logic                hd_oe,
  input  logic [15:0]         hd_in [N_SLAVES]
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_STROBE, S_DONE} state_e;

  localparam int unsigned CW = $clog2(STROBE_CYCLES + 1);

  state_e        state;
  logic [1:0]    slave_q;
  logic [CW-1:0] cnt;

  wire       in_range = addr[19];
  wire [1:0] sel      = addr[18:17];
  wire       present  = 32'(sel) < N_SLAVES;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      slave_q <= '0;
      cnt     <= '0;
      hcntrl  <= '0;
      hhwil   <= 1'b0;
      hr_nw   <= 1'b1;
      hd_out  <= '0;
      rdata   <= '0;
      ack     <= 1'b0;
      err     <= 1'b0;
    end else begin
      ack <= 1'b0;
      err <= 1'b0;
      unique case (state)
        S_IDLE: if (req) begin
          if (in_range && present) begin
            slave_q <= sel;
            hcntrl  <= addr[16:15];
            hhwil   <= addr[2];
            hr_nw   <= !we;
            hd_out  <= wdata;
            state   <= S_SETUP;
          end else begin
            rdata <= '0;
            ack   <= 1'b1;
            err   <= 1'b1;
          end
        end
        S_SETUP: begin
          cnt   <= CW'(STROBE_CYCLES - 1);
          state <= S_STROBE;
        end
        S_STROBE: begin
          if (cnt == '0) begin
            if (hr_nw) rdata <= hd_in[slave_q];
            else       rdata <= '0;
            state <= S_DONE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_DONE: begin
          ack   <= 1'b1;
          hr_nw <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  always_comb begin
    hcs_n = '1;
    if (state != S_IDLE) hcs_n[slave_q] = 1'b0;
  end

  assign hds_n = (state != S_STROBE);
  assign hd_oe = (state == S_SETUP || state == S_STROBE) && !hr_nw;
  assign busy  = (state != S_IDLE);

endmodule
