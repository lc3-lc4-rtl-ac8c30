// tb_lc3_system: the LC3 system at its default sizes (64K memory, 10-cycle
// memory access) running the worked examples of the LC3 notes, chained by
// jumps:
//   x0400  NOT R3, R5 (R5 = xCAF0 -> x350F) ; R2 <- R0 - R1 as NOT R1 ;
//          ADD R1,R1,#1 ; ADD R2,R0,R1 ; both results stored with ST
//   x021B  LD  R7, #-4      R7 <- M[x0218] = x1234
//   x2019  LD  R2, x0AF     R2 <- M[x20C9] = x0005
//   x4A1C  LDI R3, x1CC     R3 <- M[M[x49E9]] = M[xFFFF] = x0005
//   x0300  R6 <- 5 ; LDR R1, R6, #13 (R1 <- M[x0012] = xABCD) ; NOT R4, R1 ;
//          STR R4, R6, #1 (M[x0006] <- x5432)
//   x0200  LEA R5, #-3      R5 <- x01FE
// Each hop is LD R0,#1 ; JMP R0 ; .fill target.  The test checks the final
// registers and condition codes, that every instruction took its expected
// number of cycles, and counts the memory wait cycles.  The first cycles
// are traced as: time, controller state, non-zero control signals,
// non-zero multiplexer selects.
module tb_lc3_system;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;
  localparam int L = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic ld_we = 0, kbd_strobe = 0, disp_ready = 1, disp_valid;
  logic [15:0] ld_addr = 0, ld_data = 0, dbg_addr = 0, dbg_data, pc, ir, psr;
  logic [7:0] kbd_char = 0, disp_char;
  state_e state;
  int waits = 0;

  lc3_system dut (.*);

  always #5 clk = ~clk;
  // per-cycle trace of the first cycles: time, controller state, non-zero
  // control signals and non-zero multiplexer selects
  int tcyc = 0;
  always @(posedge clk) if (!rst) begin
    ctrl_t c;
    string sig, mux;
    c = dut.u_cpu.c;
    sig = ""; mux = "";
    if (c.ld_mar) sig = {sig, " LD_MAR"};
    if (c.ld_mdr) sig = {sig, " LD_MDR"};
    if (c.ld_ir)  sig = {sig, " LD_IR"};
    if (c.ld_ben) sig = {sig, " LD_BEN"};
    if (c.ld_reg) sig = {sig, " LD_REG"};
    if (c.ld_cc)  sig = {sig, " LD_CC"};
    if (c.ld_pc)  sig = {sig, " LD_PC"};
    if (c.gate_pc)     sig = {sig, " GatePC"};
    if (c.gate_mdr)    sig = {sig, " GateMDR"};
    if (c.gate_alu)    sig = {sig, " GateALU"};
    if (c.gate_marmux) sig = {sig, " GateMARMUX"};
    if (c.ld_psr)  sig = {sig, " LD_PSR"};
    if (c.gate_sp) sig = {sig, " GateSP"};
    if (c.mio_en) sig = {sig, " MIO_EN"};
    if (c.r_w)    sig = {sig, " R_W"};
    if (c.pcmux != 0)    mux = {mux, $sformatf(" PCMUX=%b", c.pcmux)};
    if (c.addr1mux != 0) mux = {mux, " ADDR1MUX=1"};
    if (c.addr2mux != 0) mux = {mux, $sformatf(" ADDR2MUX=%b", c.addr2mux)};
    if (c.drmux != 0)    mux = {mux, $sformatf(" DRMUX=%b", c.drmux)};
    if (c.sr1mux != 0)   mux = {mux, $sformatf(" SR1MUX=%b", c.sr1mux)};
    if (c.marmux != 0)   mux = {mux, " MARMUX=1"};
    if (c.aluk != 0)     mux = {mux, $sformatf(" ALUK=%b", c.aluk)};
    tcyc++;
    if (tcyc <= 13)
      $display("----- ( %0d ) -----((( %0d )))----[%s ]----[%s ]-----", tcyc, int'(state), sig, mux);
  end

  always @(posedge clk) if (!rst && (state == S_FETCH_RD || state == S_LD_RD) && !dut.r) waits++;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input logic [15:0] a, input logic [15:0] w);
    @(negedge clk);
    ld_we = 1; ld_addr = a; ld_data = w;
    @(negedge clk);
    ld_we = 0;
  endtask

  // jump from address a to target using R0
  task automatic hop(input logic [15:0] a, input logic [15:0] target);
    put(a, ld(0, 1));
    put(a + 1, jmp(0));
    put(a + 2, target);
  endtask

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n, ncyc, ninstr;
    logic [15:0] cur_ir, old_pc;
    hop(16'h3000, 16'h0400);
    // NOT R3, R5 with R5 = xCAF0, and R2 <- R0 - R1 by two's complement
    put(16'h0400, ld(5, 16'h1F));       // R5 <- M[x0420]
    put(16'h0401, not_(3, 5));
    put(16'h0402, ld(0, 16'h1E));       // R0 <- A = M[x0421]
    put(16'h0403, ld(1, 16'h1E));       // R1 <- B = M[x0422]
    put(16'h0404, not_(1, 1));
    put(16'h0405, add_i(1, 1, 1));
    put(16'h0406, add_r(2, 0, 1));
    put(16'h0407, st(3, 16'h1B));       // M[x0423] <- R3
    put(16'h0408, st(2, 16'h1B));       // M[x0424] <- R2
    put(16'h0420, 16'hCAF0); put(16'h0421, 16'd100); put(16'h0422, 16'd37);
    put(16'h0423, 16'h0000); put(16'h0424, 16'h0000);
    hop(16'h0409, 16'h021B);
    put(16'h0218, 16'h1234); put(16'h0219, 16'h5678); put(16'h021A, 16'h9ABC);
    put(16'h021B, ld(7, -4));
    hop(16'h021C, 16'h2019);
    put(16'h2019, ld(2, 9'h0AF));
    put(16'h20C9, 16'h0005);
    hop(16'h201A, 16'h4A1C);
    put(16'h4A1C, ldi(3, 9'h1CC));
    put(16'h49E9, 16'hFFFF);
    put(16'hFFFF, 16'h0005);
    hop(16'h4A1D, 16'h0300);
    put(16'h0300, and_i(6, 6, 0));
    put(16'h0301, add_i(6, 6, 5));
    put(16'h0302, ldr(1, 6, 13));
    put(16'h0012, 16'hABCD);
    put(16'h0303, not_(4, 1));
    put(16'h0304, str(4, 6, 1));        // M[x0006] <- R4
    put(16'h0006, 16'h0000);
    hop(16'h0305, 16'h0200);
    put(16'h0200, lea(5, -3));
    put(16'h0201, br(7, -1));           // halt: BRnzp to itself
    dbg_addr = 16'h0200; #1;
    chk(dbg_data == 16'b1110_101_111111101, "LEA encoding as printed");
    @(negedge clk) rst = 0;
    // run, checking the cycle count of every instruction
    ninstr = 0;
    while (ninstr < 40) begin
      ncyc = 0;
      old_pc = pc;
      do begin @(posedge clk); #1; ncyc++; end while (state != S_FETCH && ncyc < 200);
      cur_ir = ir;
      ninstr++;
      chk(ncyc == cycles(cur_ir, cur_ir[15:12] == 4'b0000 && pc != old_pc + 1, L), "instruction cycle count");
      if (cur_ir == br(7, -1)) break;
    end
    chk(pc == 16'h0201, "halted at x0201");
    chk(dut.u_cpu.u_rf.regs[7] == 16'h1234, "LD R7 #-4 at x021B");
    chk(dut.u_cpu.u_rf.regs[2] == 16'h0005, "LD R2 x0AF at x2019");
    chk(dut.u_cpu.u_rf.regs[3] == 16'h0005, "LDI R3 x1CC at x4A1C");
    chk(dut.u_cpu.u_rf.regs[6] == 16'h0005, "R6 pointer");
    chk(dut.u_cpu.u_rf.regs[1] == 16'hABCD, "LDR R1 R6 #13");
    chk(dut.u_cpu.u_rf.regs[4] == 16'h5432, "NOT R4 R1");
    chk(dut.u_cpu.u_rf.regs[5] == 16'h01FE, "LEA R5 #-3 at x0200");
    chk(psr[2:0] == 3'b001, "CC positive");
    dbg_addr = 16'h0006; #1;
    chk(dbg_data == 16'h5432, "STR R4 R6 #1 stored through the memory-IO bus");
    dbg_addr = 16'h0423; #1;
    chk(dbg_data == 16'h350F, "NOT R3 R5: xCAF0 -> x350F");
    dbg_addr = 16'h0424; #1;
    chk(dbg_data == 16'd63, "R2 <- R0 - R1 via NOT, ADD #1, ADD");
    chk(waits > 0, "memory wait cycles occurred");
    $display("instructions %0d, memory wait cycles %0d", ninstr, waits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
