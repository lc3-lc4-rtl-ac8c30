// tb_lc3_memory: the slow unified memory at its default access time of 10
// cycles.  Checks that ready (R) rises in exactly the 10th cycle of every
// access and not before, that a write takes effect only on its ready cycle,
// that back-to-back accesses each take 10 cycles, and that the load and
// debug ports reach the same words.
// The 10-cycle access follows the LC3 clock of one tenth of a memory
// access; the exact ready timing checked is this design's choice.
module tb_lc3_memory;
  localparam int WAIT = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, we = 0, ready, ld_we = 0;
  logic [15:0] addr = 0, wdata = 0, rdata, ld_addr = 0, ld_data = 0, dbg_addr = 0, dbg_data;
  logic [15:0] model [logic [15:0]];

  lc3_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one access; returns the number of cycles until ready
  task automatic access(input logic w, input logic [15:0] a, input logic [15:0] d, output int cycles);
    cycles = 0;
    en = 1; we = w; addr = a; wdata = d;
    forever begin
      #1;
      cycles++;
      if (ready) break;
      if (w) begin
        // not yet written
        dbg_addr = a; #1;
        if (model.exists(a) && dbg_data !== model[a]) begin failures++; $display("FAIL early write"); end
      end
      @(posedge clk);
      if (cycles > 50) break;
    end
    if (w) model[a] = d;
    else begin
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read %h=%h exp %h", a, rdata, model[a]); end
    end
    @(posedge clk);
    #1 en = 0; we = 0;
  endtask

  initial begin
    int c;
    logic [15:0] a;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // load port
    for (int i = 0; i < 16; i++) begin
      ld_we = 1; ld_addr = 16'h3000 + 16'(i); ld_data = 16'($urandom);
      model[ld_addr] = ld_data;
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int i = 0; i < 16; i++) begin
      access(1'b0, 16'h3000 + 16'(i), 16'h0, c);
      checks++; if (c != WAIT) begin failures++; $display("FAIL latency %0d", c); end
    end
    for (int n = 0; n < 40; n++) begin
      a = (n == 0) ? 16'hFFFF : 16'($urandom);
      access(1'b1, a, 16'($urandom), c);
      checks++; if (c != WAIT) begin failures++; $display("FAIL write latency %0d", c); end
      access(1'b0, a, 16'h0, c);
      checks++; if (c != WAIT) begin failures++; $display("FAIL read latency %0d", c); end
      dbg_addr = a; #1;
      checks++; if (dbg_data !== model[a]) begin failures++; $display("FAIL dbg %h", a); end
    end
    // back-to-back accesses with en held high
    en = 1; we = 0; addr = 16'h3000; c = 0;
    for (int k = 0; k < 3 * WAIT; k++) begin
      #1; if (ready) c++;
      @(posedge clk);
    end
    #1 en = 0;
    checks++; if (c != 3) begin failures++; $display("FAIL back-to-back ready count %0d", c); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
