// dp_ram: true dual-port word memory holding the input and output message
// buffers.
//
// On the board these buffers live in the MasterDsp's SDRAM and the host
// reaches them through the DSP's host port; here they are an on-chip memory
// with one port for the host side and one for the message handler. Each port
// writes on the clock edge when `we` is high and returns the word at `addr`
// one cycle after the address is presented. A read and a write of the same
// word on different ports in the same cycle return the old word; two writes
// to the same word in one cycle leave port B's data. The size is this
// design's choice.
module dp_ram #(
  parameter int unsigned DEPTH  = 2048,
  parameter int unsigned WIDTH  = 32,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    a_addr,
  input  logic             a_we,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic [AW-1:0]    b_addr,
  input  logic             b_we,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
