// tb_lc_top: end-to-end test of the whole design at its default sizes.
// LC3 program (x3000): arithmetic with A - B = A + (NOT B + 1), LD, LDI,
// LDR, LEA, ST, STR, STI, a keyboard polling loop on KBSR, a display
// polling loop on DSR, output through DDR, JSR/RET, TRAP x25 (vector at
// x0025) and RTI from a stack built in memory, then taken and not-taken
// branches and a halt loop.  LC4 program: stores five numbers into D_MEM,
// then sums them in a loop closed by BRR and stores the sum.
// Both run at once on the same clock.  The test checks results, the cycle
// count of every LC3 instruction and the LC4's one-instruction-per-cycle
// timing, and counts how often each mechanism happened (memory wait, each
// controller state, keyboard and display polling, display output, branch
// taken / not taken, every LC4 instruction, BRR taken / not taken); a
// mechanism that never happened is a failure.
// The programs are this testbench's own; the mechanisms counted are the
// ones the notes name for each machine.
module tb_lc_top;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;
  localparam int L = 10;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic lc3_rst = 1, lc3_ld_we = 0, lc3_kbd_strobe = 0, lc3_disp_ready = 0, lc3_disp_valid;
  logic [15:0] lc3_ld_addr = 0, lc3_ld_data = 0, lc3_dbg_addr = 0, lc3_dbg_data;
  logic [15:0] lc3_pc, lc3_ir, lc3_psr;
  logic [7:0] lc3_kbd_char = 0, lc3_disp_char;
  state_e lc3_state;
  logic lc3_int = 0, lc3_int_window;
  logic lc4_rst = 1, lc4_imem_we = 0;
  logic [15:0] lc4_imem_waddr = 0, lc4_imem_wdata = 0, lc4_pc, lc4_ir;

  lc_top dut (.*);

  always #5 clk = ~clk;

  // ---------------- mechanism counters ----------------
  int mem_wait = 0, kb_poll = 0, dsr_poll = 0, disp_out = 0, br_taken = 0, br_not = 0;
  int state_visits [64];
  int int_windows = 0;
  int all_states [$] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15, 16, 18, 21, 22,
                         23, 24, 25, 26, 27, 28, 29, 30, 31, 32, 33, 34, 35, 36, 38, 39, 40, 42};
  int lc4_ops [16];
  int lc4_brr_taken = 0, lc4_brr_not = 0;
  logic [7:0] disp_last = 0;
  logic [15:0] lc3_prev_pc = 0;

  always @(posedge clk) begin
    if (!lc3_rst) begin
      state_visits[int'(lc3_state)]++;
      if (lc3_int_window) int_windows++;
      if (dut.u_lc3.mio_en && !dut.u_lc3.r) mem_wait++;
      if (lc3_state == S_BR_EVAL) begin
        if (dut.u_lc3.u_cpu.ben) br_taken++; else br_not++;
      end
      if (lc3_disp_valid) begin disp_out++; disp_last = lc3_disp_char; end
    end
    if (!lc4_rst) begin
      lc4_ops[lc4_ir[15:12]]++;
      if (lc4_ir[15:12] == 4'b0100) begin
        if (dut.u_lc4.out1[15]) lc4_brr_taken++; else lc4_brr_not++;
      end
    end
  end

  // a key arrives while the program is polling the keyboard
  initial begin
    wait (kb_poll == 4);
    @(negedge clk) lc3_kbd_strobe = 1; lc3_kbd_char = 8'h4B;
    @(negedge clk) lc3_kbd_strobe = 0;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put3(input logic [15:0] a, input logic [15:0] w);
    @(negedge clk);
    lc3_ld_we = 1; lc3_ld_addr = a; lc3_ld_data = w;
    @(negedge clk);
    lc3_ld_we = 0;
  endtask

  task automatic put4(input logic [15:0] a, input logic [15:0] w);
    @(negedge clk);
    lc4_imem_we = 1; lc4_imem_waddr = a; lc4_imem_wdata = w;
    @(negedge clk);
    lc4_imem_we = 0;
  endtask

  // LC4 encoders
  function automatic logic [15:0] c4_alu(int s1, int s2, int dr, int f);
    return {4'b0000, 3'(s1), 3'(s2), 3'(dr), 3'(f)};
  endfunction
  function automatic logic [15:0] c4_lim(int dr, int imm);
    return {4'b0001, 3'(dr), 9'(imm)};
  endfunction
  function automatic logic [15:0] c4_ldr(int dr, int ar);
    return {4'b0010, 3'(dr), 3'(ar), 6'b000000};
  endfunction
  function automatic logic [15:0] c4_str(int sr, int ar);
    return {4'b0011, 3'(sr), 3'(ar), 6'b000000};
  endfunction
  function automatic logic [15:0] c4_lea(int dr);
    return {4'b1000, 3'(dr), 9'b000000000};
  endfunction
  function automatic logic [15:0] c4_brr(int cr, int ar);
    return {4'b0100, 3'(cr), 3'(ar), 6'b000000};
  endfunction

  task automatic load_lc3();
    put3(16'h3000, and_i(0, 0, 0));
    put3(16'h3001, add_i(0, 0, 9));
    put3(16'h3002, and_i(1, 1, 0));
    put3(16'h3003, add_i(1, 1, 4));
    put3(16'h3004, not_(1, 1));
    put3(16'h3005, add_i(1, 1, 1));
    put3(16'h3006, add_r(2, 0, 1));            // R2 = 9 - 4
    put3(16'h3007, ld(7, 16'h3100 - 16'h3008));
    put3(16'h3008, ldi(3, 16'h3101 - 16'h3009));
    put3(16'h3009, and_i(6, 6, 0));
    put3(16'h300A, add_i(6, 6, 5));
    put3(16'h300B, ldr(1, 6, 13));
    put3(16'h300C, lea(5, -3));
    put3(16'h300D, st(2, 16'h3102 - 16'h300E));
    put3(16'h300E, str(7, 6, 0));
    put3(16'h300F, sti(0, 16'h3103 - 16'h3010));
    put3(16'h3010, ldi(4, 16'h3104 - 16'h3011));   // poll KBSR
    put3(16'h3011, br(3, -2));
    put3(16'h3012, ldi(4, 16'h3105 - 16'h3013));   // read KBDR
    put3(16'h3013, ldi(6, 16'h3106 - 16'h3014));   // poll DSR
    put3(16'h3014, br(3, -2));
    put3(16'h3015, sti(4, 16'h3107 - 16'h3016));   // write DDR
    put3(16'h3016, jsr(16'h3200 - 16'h3017));
    put3(16'h3017, trap(8'h25));
    put3(16'h3018, lea(6, 16'h3108 - 16'h3019));
    put3(16'h3019, rti());
    put3(16'h3100, 16'h1234); put3(16'h3101, 16'h4000); put3(16'h3102, 16'h0000);
    put3(16'h3103, 16'h4001); put3(16'h3104, ADDR_KBSR); put3(16'h3105, ADDR_KBDR);
    put3(16'h3106, ADDR_DSR); put3(16'h3107, ADDR_DDR); put3(16'h3108, 16'h3400);
    put3(16'h3109, 16'h0001);
    put3(16'h4000, 16'h0005); put3(16'h4001, 16'h0000);
    put3(16'h0005, 16'h0000); put3(16'h0012, 16'hABCD); put3(16'h0025, 16'h3300);
    put3(16'h3200, add_i(0, 0, 1));
    put3(16'h3201, jmp(7));                     // RET
    put3(16'h3300, add_i(2, 2, 2));
    put3(16'h3301, 16'hD000);                   // reserved opcode: no effect
    put3(16'h3302, jmp(7));
    put3(16'h3400, br(4, 2));                   // BRn: not taken
    put3(16'h3401, br(1, 1));                   // BRp: taken
    put3(16'h3402, add_i(0, 0, 15));            // skipped
    put3(16'h3403, br(7, -1));                  // halt
  endtask

  task automatic load_lc4();
    int a = 0;
    int vals [5] = '{3, 7, -2, 100, 11};
    put4(16'(a++), c4_lim(3, 16'h10));
    for (int k = 0; k < 5; k++) begin
      put4(16'(a++), c4_lim(5, vals[k]));
      put4(16'(a++), c4_str(5, 3));
      put4(16'(a++), c4_alu(3, 3, 3, 6));        // INC R3
    end
    put4(16'(a++), c4_lim(1, -5));               // loop counter
    put4(16'(a++), c4_lim(2, 0));                // sum
    put4(16'(a++), c4_lim(3, 16'h10));           // pointer
    put4(16'(a++), c4_lea(4));                   // R4 <- loop head (20)
    put4(16'(a++), c4_ldr(5, 3));                // 20
    put4(16'(a++), c4_alu(2, 5, 2, 0));          // R2 <- R2 + R5
    put4(16'(a++), c4_alu(3, 3, 3, 6));          // INC R3
    put4(16'(a++), c4_alu(1, 1, 1, 6));          // INC R1
    put4(16'(a++), c4_brr(1, 4));                // loop while R1 < 0
    put4(16'(a++), c4_str(2, 3));                // D_MEM[x15] <- sum
    put4(16'(a++), c4_lim(6, -1));
    put4(16'(a++), c4_lea(7));                   // R7 <- 28
    put4(16'(a++), c4_brr(6, 7));                // 28: halt
  endtask

  initial begin
    int ncyc, n3, lc4_cycles;
    bit lc4_halted, dev;
    logic [15:0] old_pc, cur_ir;
    for (int k = 0; k < 64; k++) state_visits[k] = 0;
    int_windows = 0;
    for (int k = 0; k < 16; k++) lc4_ops[k] = 0;
    load_lc3();
    load_lc4();
    @(negedge clk);
    lc3_rst = 0; lc4_rst = 0;
    n3 = 0; lc4_cycles = 0; lc4_halted = 0;
    while (n3 < 300) begin
      ncyc = 0;
      old_pc = lc3_pc;
      do begin
        @(posedge clk); #1; ncyc++;
        if (!lc4_halted) begin
          lc4_cycles++;
          if (lc4_pc == 16'd28) lc4_halted = 1;
        end
        if (lc3_state == S_FETCH) break;
      end while (ncyc < 300);
      cur_ir = lc3_ir;
      n3++;
      if (old_pc == 16'h3010) kb_poll++;
      if (old_pc == 16'h3013) dsr_poll++;
      if (dsr_poll == 3) lc3_disp_ready = 1;
      // the second access of these LDI/STI goes to a device register,
      // which answers in one cycle instead of L
      dev = (old_pc == 16'h3010 || old_pc == 16'h3012 || old_pc == 16'h3013 || old_pc == 16'h3015);
      chk(ncyc == cycles(cur_ir, cur_ir[15:12] == 4'b0000 && lc3_pc != old_pc + 1, L) - (dev ? L - 1 : 0),
          $sformatf("LC3 cycle count of %h at %h", cur_ir, old_pc));
      if (cur_ir == br(7, -1)) break;
    end
    // LC3 results
    chk(lc3_pc == 16'h3403, "LC3 halted at x3403");
    chk(dut.u_lc3.u_cpu.u_rf.regs[0] == 16'd10, "R0 = A + 1 (JSR)");
    chk(dut.u_lc3.u_cpu.u_rf.regs[1] == 16'hABCD, "R1 LDR");
    chk(dut.u_lc3.u_cpu.u_rf.regs[2] == 16'd7, "R2 = A - B + 2 (TRAP)");
    chk(dut.u_lc3.u_cpu.u_rf.regs[3] == 16'd5, "R3 LDI");
    chk(dut.u_lc3.u_cpu.u_rf.regs[4] == 16'h004B, "R4 keyboard");
    chk(dut.u_lc3.u_cpu.u_rf.regs[5] == 16'h300A, "R5 LEA");
    chk(dut.u_lc3.u_cpu.u_rf.regs[6] == 16'h310A, "R6 after RTI");
    chk(dut.u_lc3.u_cpu.u_rf.regs[7] == 16'h3018, "R7 TRAP return");
    chk(lc3_psr == 16'h0001, "PSR restored by RTI");
    lc3_dbg_addr = 16'h3102; #1; chk(lc3_dbg_data == 16'd5, "ST");
    lc3_dbg_addr = 16'h0005; #1; chk(lc3_dbg_data == 16'h1234, "STR");
    lc3_dbg_addr = 16'h4001; #1; chk(lc3_dbg_data == 16'd9, "STI");
    chk(disp_out == 1 && disp_last == 8'h4B, "display echoed the key");
    // LC4 results
    chk(lc4_halted && lc4_cycles == 48, $sformatf("LC4 reached halt in %0d cycles (48)", lc4_cycles));
    chk(dut.u_lc4.u_rf.regs[2] == 16'd119, "LC4 sum");
    chk(dut.u_lc4.u_dmem.mem[16'h15] == 16'd119, "LC4 sum stored");
    chk(dut.u_lc4.u_dmem.mem[16'h12] == 16'hFFFE, "LC4 negative LIM stored");
    // mechanisms
    chk(mem_wait > 0, "memory wait");
    chk(kb_poll > 2, "keyboard polling");
    chk(dsr_poll > 1, "display polling");
    chk(br_taken > 0 && br_not > 0, "branch taken and not taken");
    chk(int_windows > 0 && int_windows == state_visits[S_FETCH], "interrupt test window once per fetch");
    // every controller state except 20 (JSRR, exercised by the processor test)
    foreach (all_states[k])
      chk(state_visits[all_states[k]] > 0, $sformatf("state %0d visited", all_states[k]));
    chk(lc4_ops[0] > 0 && lc4_ops[1] > 0 && lc4_ops[2] > 0 && lc4_ops[3] > 0 &&
        lc4_ops[8] > 0 && lc4_ops[4] > 0, "every LC4 instruction");
    chk(lc4_brr_taken > 0 && lc4_brr_not > 0, "BRR taken and not taken");
    $display("LC3: %0d instructions, %0d wait cycles, %0d keyboard polls, %0d display polls, %0d/%0d branches taken/not",
             n3, mem_wait, kb_poll, dsr_poll, br_taken, br_not);
    $display("LC4: %0d cycles, BRR taken %0d not %0d", lc4_cycles, lc4_brr_taken, lc4_brr_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
