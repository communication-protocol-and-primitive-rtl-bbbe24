// tb_hpi_port: self-checking test of the host port.
// A memory model with one cycle of read latency sits on the memory side. The
// test loads HPIA, streams words in through HPID with autoincrement, reads
// them back the same way, uses HPID without increment, reads HPIA back, and
// exercises the DSPINT and HINT bits of HPIC.
module tb_hpi_port;
  localparam int AW = 8;
  logic clk = 0, rst_n = 0;
  logic [1:0] hcntrl = 0;
  logic h_strobe = 0, h_rnw = 1;
  logic [31:0] h_wdata = 0, h_rdata, m_wdata, m_rdata;
  logic h_rvalid;
  logic [AW-1:0] m_addr;
  logic m_we, m_re, dsp_int, hint_set = 0, hint;
  logic [31:0] mem [2**AW];
  int checks = 0, failures = 0;
  int dsp_int_count = 0;

  always #5 clk = ~clk;

  hpi_port #(.AW(AW)) dut (.*);

  always_ff @(posedge clk) begin
    if (m_we) mem[m_addr] <= m_wdata;
    m_rdata <= mem[m_addr];
    if (rst_n && dsp_int) dsp_int_count++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic hw(input logic [1:0] c, input logic [31:0] d);
    @(negedge clk); hcntrl = c; h_strobe = 1; h_rnw = 0; h_wdata = d;
    @(negedge clk); h_strobe = 0;
  endtask
  task automatic hr(input logic [1:0] c, output logic [31:0] d);
    @(negedge clk); hcntrl = c; h_strobe = 1; h_rnw = 1;
    @(negedge clk); h_strobe = 0;
    check("rvalid", 32'(h_rvalid), 1);
    d = h_rdata;
  endtask

  initial begin
    logic [31:0] d, w [16];
    for (int i = 0; i < 2**AW; i++) mem[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    hw(2'b01, 32'h20);                      // HPIA = 0x20
    hr(2'b01, d); check("HPIA readback", d, 32'h20);
    for (int i = 0; i < 16; i++) begin
      w[i] = $urandom; hw(2'b10, w[i]);     // HPID with autoincrement
    end
    for (int i = 0; i < 16; i++) check($sformatf("mem[%0d]", 32 + i), mem[32 + i], w[i]);
    hr(2'b01, d); check("HPIA after 16 increments", d, 32'h30);
    hw(2'b01, 32'h20);
    for (int i = 0; i < 16; i++) begin
      hr(2'b10, d); check($sformatf("read back %0d", i), d, w[i]);
    end
    hw(2'b01, 32'h25);
    hw(2'b11, 32'hA5A5_0001);               // HPID, no increment
    hw(2'b11, 32'hA5A5_0002);
    check("fixed HPID overwrites", mem[8'h25], 32'hA5A5_0002);
    check("neighbour untouched", mem[8'h26], w[6]);
    hr(2'b11, d); check("fixed HPID read", d, 32'hA5A5_0002);
    hr(2'b01, d); check("HPIA unchanged", d, 32'h25);
    // HPIC
    hw(2'b00, 32'h2);                       // DSPINT
    @(negedge clk);
    check("DSPINT pulses once", 32'(dsp_int_count), 1);
    @(negedge clk); hint_set = 1; @(negedge clk); hint_set = 0;
    check("HINT set", 32'(hint), 1);
    hr(2'b00, d); check("HPIC shows HINT", d, 32'h4);
    hw(2'b00, 32'h4);                       // write 1 clears HINT
    check("HINT cleared", 32'(hint), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
