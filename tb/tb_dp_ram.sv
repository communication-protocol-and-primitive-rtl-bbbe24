// tb_dp_ram: self-checking test of the dual-port message RAM.
// Writes random words through both ports, reads them back through the other
// port one cycle later, and checks the write-collision rule (port B wins).
module tb_dp_ram;
  localparam int DEPTH = 64;
  logic clk = 0;
  logic [5:0]  a_addr = 0, b_addr = 0;
  logic        a_we = 0, b_we = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dp_ram #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_we = 1; a_addr = 6'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    // read through B
    for (int i = 0; i < DEPTH; i++) begin
      b_addr = 6'(i); @(posedge clk); #1;
      checks++;
      if (b_rdata !== model[i]) begin failures++; $display("FAIL B rd %0d", i); end
    end
    // random traffic on both ports
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      a_we = $urandom_range(0, 1); b_we = $urandom_range(0, 1);
      a_wdata = $urandom; b_wdata = $urandom;
      begin
        logic [31:0] ea, eb;
        ea = model[a_addr];
        eb = model[b_addr];
        @(posedge clk); #1;
        checks += 2;
        if (a_rdata !== ea) begin failures++; $display("FAIL A old data"); end
        if (b_rdata !== eb) begin failures++; $display("FAIL B old data"); end
        if (a_we) model[a_addr] = a_wdata;
        if (b_we) model[b_addr] = b_wdata;
      end
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      a_addr = 6'(i); @(posedge clk); #1;
      checks++;
      if (a_rdata !== model[i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
