// tb_lc3_puzzle: a position-independent, self-modifying LC3 program.
// Layout at origin P:  P: BR +2 ; P+1: A ; P+2: B ; P+3: instr_0 ;
// P+4: instr_1 ; ...  The program adds A to the opcode field of instr_0 and
// B to the opcode field of instr_1 (all other bits unchanged) using only
// PC-relative and register-relative addressing:
//   instr_0: LEA R0, #-3          R0 <- address of A
//   instr_1: LDR R1, R0, #0       R1 <- A
//            LDR R2, R0, #2       R2 <- instr_0
//            12 x ADD R1,R1,R1    R1 <- A << 12
//            ADD R2,R2,R1 ; STR R2,R0,#2
//            ... the same for B and instr_1 ...
//            halt (BRnzp #-1)
// The same image is run from P = x1234 (the PC of the puzzle's figure)
// and from P = x4000 on the full-size LC3 system, and both modified words
// are compared with the expected values.
// The puzzle is from the notes; this solution is this testbench's own.
module tb_lc3_puzzle;
  import lc3_pkg::*;
  import lc3_asm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic ld_we = 0, kbd_strobe = 0, disp_ready = 1, disp_valid;
  logic [15:0] ld_addr = 0, ld_data = 0, dbg_addr = 0, dbg_data, pc, ir, psr;
  logic [7:0] kbd_char = 0, disp_char;
  state_e state;
  logic [15:0] prog [$];

  lc3_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    #80000000;
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

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic build(input logic [15:0] a_val, input logic [15:0] b_val);
    prog = {};
    prog.push_back(br(7, 2));
    prog.push_back(a_val);
    prog.push_back(b_val);
    prog.push_back(lea(0, -3));
    prog.push_back(ldr(1, 0, 0));
    prog.push_back(ldr(2, 0, 2));
    repeat (12) prog.push_back(add_r(1, 1, 1));
    prog.push_back(add_r(2, 2, 1));
    prog.push_back(str(2, 0, 2));
    prog.push_back(ldr(1, 0, 1));
    prog.push_back(ldr(2, 0, 3));
    repeat (12) prog.push_back(add_r(1, 1, 1));
    prog.push_back(add_r(2, 2, 1));
    prog.push_back(str(2, 0, 3));
    prog.push_back(br(7, -1));
  endtask

  task automatic run_at(input logic [15:0] origin, input logic [15:0] a_val, input logic [15:0] b_val);
    logic [15:0] i0, i1;
    int guard = 0;
    rst = 1;
    build(a_val, b_val);
    i0 = prog[3]; i1 = prog[4];
    foreach (prog[k]) put(origin + 16'(k), prog[k]);
    // jump from the reset address x3000 to the origin
    put(16'h3000, ld(0, 1));
    put(16'h3001, jmp(0));
    put(16'h3002, origin);
    @(negedge clk) rst = 0;
    while (!(state == S_FETCH && pc == origin + 16'(prog.size() - 1) && ir == br(7, -1)) && guard < 20000) begin
      @(posedge clk); #1; guard++;
    end
    chk(guard < 20000, "program reached its halt loop");
    dbg_addr = origin + 3; #1;
    chk(dbg_data == {4'(i0[15:12] + a_val[3:0]), i0[11:0]}, $sformatf("instr_0 at %h = %h", dbg_addr, dbg_data));
    dbg_addr = origin + 4; #1;
    chk(dbg_data == {4'(i1[15:12] + b_val[3:0]), i1[11:0]}, $sformatf("instr_1 at %h = %h", dbg_addr, dbg_data));
    dbg_addr = origin + 1; #1;
    chk(dbg_data == a_val, "A unchanged");
  endtask

  initial begin
    run_at(16'h1234, 16'd3, 16'd5);
    run_at(16'h4000, 16'd9, 16'd14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
