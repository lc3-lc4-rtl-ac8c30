// tb_lc4_mem: writes random words to random addresses of the full 64K x 16
// memory, checks that a write lands on the clock edge (not before), and
// reads everything back through the combinational read port.
// The 64K x 16 size follows the notes; the test pattern is this testbench's.
module tb_lc4_mem;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [15:0] raddr = 0, rdata, waddr = 0, wdata = 0;
  logic [15:0] addrs [256];
  logic [15:0] model [logic [15:0]];

  lc4_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      addrs[i] = (i == 0) ? 16'hFFFF : 16'($urandom);
      waddr = addrs[i]; wdata = 16'($urandom); we = 1;
      raddr = waddr;
      model[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[waddr]) begin failures++; $display("FAIL write %h", waddr); end
      @(negedge clk);
    end
    // a word must not change while we = 0
    we = 0; waddr = addrs[3]; wdata = ~model[addrs[3]];
    @(posedge clk); #1; raddr = addrs[3]; #1;
    checks++; if (rdata !== model[addrs[3]]) failures++;
    for (int i = 0; i < 256; i++) begin
      raddr = addrs[i]; #1;
      checks++;
      if (rdata !== model[addrs[i]]) begin failures++; $display("FAIL read %h", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
