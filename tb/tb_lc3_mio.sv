// tb_lc3_mio: address decoding of the memory-IO bus with a small memory
// stand-in that answers after 3 cycles.  Checks that memory addresses go to
// the memory and device addresses do not, that a device access is ready at
// once, the keyboard status/data handshake (strobe sets KBSR[15], reading
// KBDR returns the character and clears it), DSR mirroring the display's
// ready line, and that a write to DDR emits the character for one cycle.
// The device addresses and handshakes checked are this design's choice
// (the standard LC-3 ones).
module tb_lc3_mio;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic mio_en = 0, r_w = 0, r, mem_en, mem_we, mem_ready;
  logic [15:0] mar = 0, mdr = 0, rdata, mem_rdata;
  logic kbd_strobe = 0, disp_ready = 0, disp_valid;
  logic [7:0] kbd_char = 0, disp_char;
  int mcount = 0;

  lc3_mio dut (.*);

  always #5 clk = ~clk;

  // memory stand-in: data = ~address, ready in the 3rd cycle
  assign mem_rdata = ~mar;
  assign mem_ready = mem_en && (mcount == 2);
  always_ff @(posedge clk) mcount <= (!mem_en || mem_ready) ? 0 : mcount + 1;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // a read access; returns data and cycles
  task automatic rd(input logic [15:0] a, output logic [15:0] d, output int cyc);
    mio_en = 1; r_w = 0; mar = a; cyc = 0;
    do begin #1; cyc++; if (!r) @(posedge clk); end while (!r && cyc < 20);
    d = rdata;
    @(posedge clk); #1 mio_en = 0;
  endtask

  initial begin
    logic [15:0] d;
    int c;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    rd(16'h3000, d, c);
    chk(d == 16'hCFFF && c == 3, "memory read");
    mio_en = 1; mar = 16'h3001; #1; chk(mem_en == 1, "mem_en for memory address");
    mar = ADDR_KBSR; #1; chk(mem_en == 0 && r == 1, "device decode");
    mio_en = 0; #1;
    rd(ADDR_KBSR, d, c);
    chk(d == 16'h0000 && c == 1, "KBSR empty");
    @(negedge clk); kbd_strobe = 1; kbd_char = 8'h41; @(negedge clk); kbd_strobe = 0;
    rd(ADDR_KBSR, d, c);
    chk(d == 16'h8000, "KBSR ready after key");
    rd(ADDR_KBDR, d, c);
    chk(d == 16'h0041, "KBDR char");
    rd(ADDR_KBSR, d, c);
    chk(d == 16'h0000, "KBSR cleared by KBDR read");
    disp_ready = 1;
    rd(ADDR_DSR, d, c);
    chk(d == 16'h8000, "DSR ready");
    disp_ready = 0;
    rd(ADDR_DSR, d, c);
    chk(d == 16'h0000, "DSR busy");
    // write to DDR
    @(negedge clk);
    mio_en = 1; r_w = 1; mar = ADDR_DDR; mdr = 16'h005A; #1;
    chk(r == 1 && mem_en == 0, "DDR write ready");
    @(posedge clk); #1 mio_en = 0; r_w = 0;
    chk(disp_valid == 1 && disp_char == 8'h5A, "display output");
    @(posedge clk); #1;
    chk(disp_valid == 0, "display pulse one cycle");
    // write to memory passes we through
    mio_en = 1; r_w = 1; mar = 16'h4000; #1;
    chk(mem_en && mem_we, "memory write");
    mio_en = 0; r_w = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
