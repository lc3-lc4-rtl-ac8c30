// tb_lc3_addr_unit: random bases and IR words through every ADDR1MUX /
// ADDR2MUX / MARMUX setting, compared with an integer computation, plus the
// worked examples: x201A + SEXT(x0AF) = x20C9 and x4A1D + SEXT(x1CC) = x49E9.
// The two sums are the notes' worked examples; the random stimulus is this
// testbench's own.
module tb_lc3_addr_unit;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] pc, sr1, ir, addr_sum, marmux_out;
  logic addr1mux, marmux;
  logic [1:0] addr2mux;

  lc3_addr_unit dut (.*);

  function automatic int sx(int v, int w);
    return (v >= (1 << (w - 1))) ? v - (1 << w) : v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int base, off;
    logic [15:0] e;
    pc = 16'h201A; sr1 = 16'h0; ir = 16'b0010_011_010101111; addr1mux = A1_PC;
    addr2mux = A2_OFF9; marmux = 1'b1; #1;
    checks++; if (addr_sum !== 16'h20C9 || marmux_out !== 16'h20C9) failures++;
    pc = 16'h4A1D; ir = {4'b1010, 3'd3, 9'h1CC}; #1;
    checks++; if (addr_sum !== 16'h49E9) failures++;
    for (int n = 0; n < 4000; n++) begin
      pc = 16'($urandom); sr1 = 16'($urandom); ir = 16'($urandom);
      addr1mux = 1'($urandom); addr2mux = 2'($urandom); marmux = 1'($urandom); #1;
      base = addr1mux ? int'(sr1) : int'(pc);
      case (addr2mux)
        2'b00: off = 0;
        2'b01: off = sx(int'(ir[5:0]), 6);
        2'b10: off = sx(int'(ir[8:0]), 9);
        default: off = sx(int'(ir[10:0]), 11);
      endcase
      e = 16'(base + off);
      checks++;
      if (addr_sum !== e) begin failures++; $display("FAIL sum %h exp %h", addr_sum, e); end
      checks++;
      if (marmux_out !== (marmux ? e : 16'(ir[7:0]))) begin failures++; $display("FAIL marmux"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
