// tb_lc4_cpu: the LC4 single-cycle processor against an instruction-set
// reference model.  First the worked example runs: LEA / LIM / ALU ADD /
// LDR reproduce a PC-relative load (x021B: LEA R1 ... R7 <- D_MEM[x0218]),
// then LIM / ADD / LDR emulate LC3's LDR and LEA / LIM / ADD its LEA.
// Then the whole 64K I_MEM is loaded with random LC4 instructions and the
// test compares PC, all registers and every D_MEM store with the model after
// each clock cycle; one instruction must retire per cycle.  Every
// instruction and both branch outcomes must occur.
// The example program follows the notes; the reference model is this
// testbench's own reading of the LC4 instruction summary.
module tb_lc4_cpu;
  import lc4_pkg::*;
  localparam int NCYC = 20000;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, imem_we = 0;
  logic [15:0] imem_waddr = 0, imem_wdata = 0, pc, ir;
  logic [15:0] rim [65536];
  logic [15:0] rdm [65536];
  logic [15:0] rreg [8];
  logic [15:0] rpc;
  int opcount [8];   // ALU LIM LDR STR LEA BRR-taken BRR-not other

  lc4_cpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] alu(logic [15:0] a, logic [15:0] b, logic [2:0] f);
    case (f)
      3'd0: return a + b;
      3'd1: return a - b;
      3'd2: return a & b;
      3'd3: return a | b;
      3'd4: return ~a;
      3'd5: return ~(a | b);
      3'd6: return a + 1;
      default: return a - 1;
    endcase
  endfunction

  function automatic int step();
    logic [15:0] i = rim[rpc];
    int wa = -1;
    logic [15:0] npc = rpc + 1;
    case (i[15:12])
      4'b0000: begin rreg[i[5:3]] = alu(rreg[i[11:9]], rreg[i[8:6]], i[2:0]); opcount[0]++; end
      4'b0001: begin rreg[i[11:9]] = {{7{i[8]}}, i[8:0]}; opcount[1]++; end
      4'b0010: begin rreg[i[11:9]] = rdm[rreg[i[8:6]]]; opcount[2]++; end
      4'b0011: begin rdm[rreg[i[8:6]]] = rreg[i[11:9]]; wa = int'(rreg[i[8:6]]); opcount[3]++; end
      4'b1000: begin rreg[i[11:9]] = rpc + 1; opcount[4]++; end
      4'b0100: begin
        if (rreg[i[11:9]][15]) begin npc = rreg[i[8:6]]; opcount[5]++; end
        else opcount[6]++;
      end
      default: opcount[7]++;
    endcase
    rpc = npc;
    return wa;
  endfunction

  task automatic load(input logic [15:0] a, input logic [15:0] w);
    @(negedge clk);
    imem_we = 1; imem_waddr = a; imem_wdata = w;
    rim[a] = w;
    @(negedge clk);
    imem_we = 0;
  endtask

  task automatic compare(input int n, input int wa);
    checks++;
    if (pc !== rpc) begin failures++; $display("FAIL cycle %0d pc=%h exp %h", n, pc, rpc); end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (dut.u_rf.regs[k] !== rreg[k]) begin
        failures++; $display("FAIL cycle %0d R%0d=%h exp %h", n, k, dut.u_rf.regs[k], rreg[k]);
      end
    end
    if (wa >= 0) begin
      checks++;
      if (dut.u_dmem.mem[wa] !== rdm[wa]) begin failures++; $display("FAIL store %h", wa); end
    end
  endtask

  initial begin
    int wa;
    for (int k = 0; k < 65536; k++) begin
      rdm[k] = 16'($urandom);
      dut.u_dmem.mem[k] = rdm[k];
    end
    for (int k = 0; k < 8; k++) begin rreg[k] = 16'h0; opcount[k] = 0; end
    // example program: PC-relative load of x1234 at x0218 into R7
    rdm[16'h0218] = 16'h1234; dut.u_dmem.mem[16'h0218] = 16'h1234;
    for (int k = 0; k < 16'h021B; k++) load(16'(k), 16'h1000);  // LIM R0, 0 (filler)
    load(16'h021B, {4'b1000, 3'd1, 9'h000});                  // LEA R1
    load(16'h021C, {4'b0001, 3'd2, 9'h1FC});                  // LIM R2 -x4
    load(16'h021D, {4'b0000, 3'd1, 3'd2, 3'd3, 3'd0});        // ALU SR1 SR2 DR3 ADD
    load(16'h021E, {4'b0010, 3'd7, 3'd3, 6'h00});             // LDR DR7 AR3
    // LC3 LDR R4, R2, x23 and LEA R2, x23 emulated the same way
    rdm[16'h001F] = 16'hBEEF; dut.u_dmem.mem[16'h001F] = 16'hBEEF;
    load(16'h021F, {4'b0001, 3'd3, 9'h023});                  // LIM DR3 x23
    load(16'h0220, {4'b0000, 3'd2, 3'd3, 3'd2, 3'd0});        // ALU SR2 SR3 DR2 ADD
    load(16'h0221, {4'b0010, 3'd4, 3'd2, 6'h00});             // LDR DR4 AR2
    load(16'h0222, {4'b1000, 3'd2, 9'h000});                  // LEA DR2
    load(16'h0223, {4'b0001, 3'd3, 9'h023});                  // LIM DR3 x23
    load(16'h0224, {4'b0000, 3'd2, 3'd3, 3'd2, 3'd0});        // ALU SR2 SR3 DR2 ADD
    rpc = 16'h0000;
    @(negedge clk); rst = 0;
    while (rpc != 16'h021F) begin
      wa = step();
      @(posedge clk); #1;
      compare(0, wa);
    end
    checks++; if (dut.u_rf.regs[1] !== 16'h021C) begin failures++; $display("FAIL LEA R1"); end
    checks++; if (dut.u_rf.regs[2] !== 16'hFFFC) begin failures++; $display("FAIL LIM R2"); end
    checks++; if (dut.u_rf.regs[3] !== 16'h0218) begin failures++; $display("FAIL ADD R3"); end
    checks++; if (dut.u_rf.regs[7] !== 16'h1234) begin failures++; $display("FAIL LDR R7"); end
    while (rpc != 16'h0225) begin
      wa = step();
      @(posedge clk); #1;
      compare(0, wa);
    end
    checks++; if (dut.u_rf.regs[4] !== 16'hBEEF) begin failures++; $display("FAIL emulated LDR R4"); end
    checks++; if (dut.u_rf.regs[2] !== 16'h0246) begin failures++; $display("FAIL emulated LEA R2"); end
    // random program over all of I_MEM
    rst = 1;
    for (int k = 0; k < 65536; k++) begin
      logic [15:0] w;
      int sel;
      w = 16'($urandom);
      sel = int'($urandom_range(0, 6));
      case (sel)
        0: w[15:12] = 4'b0000;
        1: w[15:12] = 4'b0001;
        2: w[15:12] = 4'b0010;
        3: w[15:12] = 4'b0011;
        4: w[15:12] = 4'b1000;
        5: w[15:12] = 4'b0100;
        default: ;   // any opcode, including unused ones
      endcase
      load(16'(k), w);
    end
    @(posedge clk); #1;
    for (int k = 0; k < 8; k++) rreg[k] = 16'h0;
    rpc = 16'h0000;
    @(negedge clk); rst = 0;
    for (int n = 0; n < NCYC; n++) begin
      wa = step();
      @(posedge clk); #1;
      compare(n, wa);
      if (failures > 20) break;
    end
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (opcount[k] == 0) begin failures++; $display("FAIL instruction class %0d never executed", k); end
    end
    $display("counts ALU LIM LDR STR LEA BRRtaken BRRnot other: %p", opcount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
