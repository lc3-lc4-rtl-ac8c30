// tb_lc3_cpu: the LC3 processor against an instruction-set reference model.
// The whole 64K memory is filled with random words starting at x3000, so
// the processor executes a random instruction stream that exercises every
// opcode, addressing mode and branch condition.  This is repeated in
// EPISODES short runs from reset, each on new random memory.  A test-bench memory
// answers each access after LAT cycles.  At every return to state 18 the
// model executes the same instruction on its own copy of memory and the
// test compares PC, PSR, all eight registers and the word a store wrote,
// and checks that the instruction took the expected number of cycles
// (non-memory states + LAT per memory state).  Every opcode must occur.
module tb_lc3_cpu;
  import lc3_pkg::*;
  localparam int LAT    = 3;
  localparam int NINSTR   = 40;
  localparam int EPISODES = 150;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic mio_en, r_w, r;
  logic [15:0] mar, mdr, rdata, pc, ir, psr;
  state_e state;
  logic [15:0] mem  [65536];
  logic [15:0] rmem [65536];   // reference copy
  logic [15:0] rreg [8];
  logic [15:0] rpc, rpsr;
  int cnt = 0;
  int opcount [16];

  lc3_cpu dut (.*);

  always #5 clk = ~clk;

  // test-bench memory with LAT-cycle access time
  assign rdata = mem[mar];
  assign r     = mio_en && (cnt == LAT - 1);
  always_ff @(posedge clk) begin
    cnt <= (!mio_en || r) ? 0 : cnt + 1;
    if (r && r_w) mem[mar] <= mdr;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] sx(logic [15:0] v, int w);
    logic [15:0] m = 16'hFFFF << w;
    return v[w-1] ? (v | m) : (v & ~m);
  endfunction

  function automatic void setcc(logic [15:0] v);
    rpsr[2:0] = v[15] ? 3'b100 : (v == 0) ? 3'b010 : 3'b001;
  endfunction

  // execute one instruction in the reference model; returns the expected
  // cycle count and the address written (or -1)
  function automatic int step(output int waddr);
    logic [15:0] i, a, v;
    logic [2:0] d, s1;
    int cyc;
    i = rmem[rpc];
    rpc = rpc + 1;
    d = i[11:9]; s1 = i[8:6];
    waddr = -1;
    opcount[i[15:12]]++;
    case (i[15:12])
      4'b0001: begin v = rreg[s1] + (i[5] ? sx(i, 5) : rreg[i[2:0]]); rreg[d] = v; setcc(v); cyc = 4 + LAT; end
      4'b0101: begin v = rreg[s1] & (i[5] ? sx(i, 5) : rreg[i[2:0]]); rreg[d] = v; setcc(v); cyc = 4 + LAT; end
      4'b1001: begin v = ~rreg[s1]; rreg[d] = v; setcc(v); cyc = 4 + LAT; end
      4'b0010: begin v = rmem[rpc + sx(i, 9)]; rreg[d] = v; setcc(v); cyc = 5 + 2 * LAT; end
      4'b1010: begin v = rmem[rmem[rpc + sx(i, 9)]]; rreg[d] = v; setcc(v); cyc = 6 + 3 * LAT; end
      4'b0110: begin v = rmem[rreg[s1] + sx(i, 6)]; rreg[d] = v; setcc(v); cyc = 5 + 2 * LAT; end
      4'b1110: begin rreg[d] = rpc + sx(i, 9); cyc = 4 + LAT; end
      4'b0011: begin a = rpc + sx(i, 9); rmem[a] = rreg[d]; waddr = int'(a); cyc = 5 + 2 * LAT; end
      4'b1011: begin a = rmem[rpc + sx(i, 9)]; rmem[a] = rreg[d]; waddr = int'(a); cyc = 6 + 3 * LAT; end
      4'b0111: begin a = rreg[s1] + sx(i, 6); rmem[a] = rreg[d]; waddr = int'(a); cyc = 5 + 2 * LAT; end
      4'b0000: begin
        if ((i[11] & rpsr[2]) | (i[10] & rpsr[1]) | (i[9] & rpsr[0])) begin
          rpc = rpc + sx(i, 9); cyc = 5 + LAT;
        end else cyc = 4 + LAT;
      end
      4'b1100: begin rpc = rreg[s1]; cyc = 4 + LAT; end
      4'b0100: begin
        a = rpc;
        rpc = i[11] ? rpc + sx(i, 11) : rreg[s1];
        rreg[7] = a; cyc = 5 + LAT;
      end
      4'b1111: begin rreg[7] = rpc; rpc = rmem[{8'h00, i[7:0]}]; cyc = 5 + 2 * LAT; end
      4'b1000: begin
        rpc = rmem[rreg[6]]; rpsr = rmem[rreg[6] + 1]; rreg[6] = rreg[6] + 2;
        cyc = 8 + 3 * LAT;
      end
      default: cyc = 4 + LAT;   // reserved opcode
    endcase
    return cyc;
  endfunction

  initial begin
    int ncyc, exp_cyc, wa;
    for (int k = 0; k < 16; k++) opcount[k] = 0;
    // EPISODES runs from reset, each on freshly randomised memory, so that
    // the random program cannot settle into one short loop
    for (int ep = 0; ep < EPISODES && failures <= 20; ep++) begin
      rst = 1;
      for (int k = 0; k < 65536; k++) begin
        mem[k] = 16'($urandom);
        rmem[k] = mem[k];
      end
      for (int k = 0; k < 8; k++) rreg[k] = 16'h0000;
      rpc = 16'h3000; rpsr = 16'h0002;
      repeat (3) @(posedge clk);
      #1 rst = 0;
      checks++; if (pc !== 16'h3000 || state !== S_FETCH) begin failures++; $display("FAIL reset state"); end
      for (int n = 0; n < NINSTR; n++) begin
        ncyc = 0;
        do begin @(posedge clk); #1; ncyc++; end while (state != S_FETCH && ncyc < 200);
        exp_cyc = step(wa);
        checks++;
        if (ncyc != exp_cyc) begin
          failures++;
          $display("FAIL instr %0d ir=%h cycles %0d expected %0d", n, ir, ncyc, exp_cyc);
        end
        checks++;
        if (pc !== rpc || psr !== rpsr) begin
          failures++;
          $display("FAIL instr %0d ir=%h pc=%h exp %h psr=%h exp %h", n, ir, pc, rpc, psr, rpsr);
        end
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (dut.u_rf.regs[k] !== rreg[k]) begin
            failures++;
            $display("FAIL instr %0d ir=%h R%0d=%h exp %h", n, ir, k, dut.u_rf.regs[k], rreg[k]);
          end
        end
        if (wa >= 0) begin
          checks++;
          if (mem[wa] !== rmem[wa]) begin failures++; $display("FAIL store M[%h]=%h exp %h", wa, mem[wa], rmem[wa]); end
        end
        if (failures > 20) break;
      end
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (opcount[k] == 0) begin failures++; $display("FAIL opcode %b never executed", 4'(k)); end
    end
    $display("opcode counts: %p", opcount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
