// tb_slave_hpi_bridge: self-checking test of the SlaveDsp host-port bridge.
// Each of four modelled slaves holds HPIC/HPIA/HPID registers and latches a
// write at the rising edge of its data strobe. The test checks the decode of
// address bits 18:17 (slave), 16:15 (HCNTRL) and 2 (HHWIL), the chip selects,
// the strobe width, the access time, read data, and the error for addresses
// out of range.
module tb_slave_hpi_bridge;
  localparam int N = 4, SC = 3;
  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  logic [19:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic ack, err, busy;
  logic [N-1:0] hcs_n;
  logic [1:0] hcntrl;
  logic hhwil, hr_nw, hds_n, hd_oe;
  logic [15:0] hd_out;
  logic [15:0] hd_in [N];
  logic [15:0] sreg [N][4];
  logic [1:0]  last_hhwil [N];
  int checks = 0, failures = 0, strobe_len = 0, max_strobe = 0;

  always #5 clk = ~clk;

  slave_hpi_bridge #(.N_SLAVES(N), .STROBE_CYCLES(SC)) dut (.*);

  // slave models
  always_comb for (int s = 0; s < N; s++) hd_in[s] = sreg[s][hcntrl] ^ 16'(s << 12);
  always_ff @(posedge clk) begin
    if (!hds_n) strobe_len <= strobe_len + 1;
    else begin
      if (strobe_len > max_strobe) max_strobe <= strobe_len;
      strobe_len <= 0;
    end
    for (int s = 0; s < N; s++)
      if (!hcs_n[s] && !hds_n && !hr_nw && hd_oe) begin
        sreg[s][hcntrl] <= hd_out;
        last_hhwil[s] <= {1'b0, hhwil};
      end
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

  task automatic access(input logic w, input logic [19:0] a, input logic [15:0] d,
                        output logic [15:0] q, output logic e, output int cycles);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d;
    @(negedge clk); req = 0;
    cycles = 1;
    while (!ack) begin @(negedge clk); cycles++; end
    q = rdata; e = err;
  endtask

  initial begin
    logic [15:0] q; logic e; int cyc;
    for (int s = 0; s < N; s++) for (int r = 0; r < 4; r++) sreg[s][r] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("idle chip selects", 32'(hcs_n), 32'hF);
    // write each register of each slave: base 0x80000 + s*0x20000 + r*0x8000
    for (int s = 0; s < N; s++)
      for (int r = 0; r < 4; r++) begin
        access(1, 20'h80000 + 20'(s) * 20'h20000 + 20'(r) * 20'h08000 + 20'(r[0] * 4),
               16'(s * 16 + r + 16'h100), q, e, cyc);
        check("write no error", 32'(e), 0);
        check("write access time", 32'(cyc), 32'(SC + 3));
        check("slave register written", 32'(sreg[s][r]), 32'(s * 16 + r + 16'h100));
        check("HHWIL from address bit 2", 32'(last_hhwil[s]), 32'(r[0]));
      end
    check("strobe width", 32'(max_strobe), SC);
    // read back
    for (int s = 0; s < N; s++)
      for (int r = 0; r < 4; r++) begin
        access(0, 20'h80000 + 20'(s) * 20'h20000 + 20'(r) * 20'h08000, 16'h0, q, e, cyc);
        check("read data", 32'(q), 32'((s * 16 + r + 16'h100) ^ (s << 12)));
      end
    // out of range
    access(0, 20'h01000, 16'h0, q, e, cyc);
    check("out of range error", 32'(e), 1);
    check("out of range quick", 32'(cyc), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
