// tb_lc3_control: walks the controller through every opcode and compares the
// visited state numbers with the expected sequences (18, 33, 35, 32, then
// the execute states).  The memory ready line R answers after a random
// 1..4 cycles, so each memory state must repeat until R = 1.  The control
// signals printed in the state-by-state notes are checked in the states
// they belong to (18, 33, 35, 1, 9, 2, 25, 27, 16, 14).
module tb_lc3_control;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [3:0] opcode = 0;
  logic ir11 = 0, ben = 0, r;
  state_e state;
  ctrl_t ctrl;
  int wait_left = 0, waits = 0;

  lc3_control dut (.*);

  always #5 clk = ~clk;

  // memory stand-in: ready after a random number of cycles
  assign r = ctrl.mio_en && (wait_left == 0);
  always_ff @(posedge clk) begin
    if (!ctrl.mio_en || r) wait_left <= int'($urandom_range(0, 3));
    else begin wait_left <= wait_left - 1; waits++; end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (state %0d)", what, state); end
  endtask

  // check the control word of the current state
  task automatic chk_ctrl();
    case (state)
      S_FETCH:    chk(ctrl.ld_mar && ctrl.gate_pc && ctrl.ld_pc && ctrl.pcmux == 2'b00 && !ctrl.mio_en, "ctrl 18");
      S_FETCH_RD: chk(ctrl.ld_mdr && ctrl.mio_en && !ctrl.r_w && !ctrl.ld_reg, "ctrl 33");
      S_FETCH_IR: chk(ctrl.ld_ir && !ctrl.ld_mar && !ctrl.mio_en, "ctrl 35");
      S_ADD:      chk(ctrl.gate_alu && ctrl.ld_reg && ctrl.ld_cc && ctrl.aluk == ALU_ADD, "ctrl 1");
      S_NOT:      chk(ctrl.gate_alu && ctrl.ld_reg && ctrl.ld_cc && ctrl.aluk == ALU_NOT, "ctrl 9");
      S_LD_ADDR:  chk(ctrl.gate_marmux && ctrl.ld_mar && ctrl.addr1mux == 1'b0 && ctrl.addr2mux == 2'b10, "ctrl 2");
      S_LD_RD:    chk(ctrl.ld_mdr && ctrl.mio_en && !ctrl.r_w, "ctrl 25");
      S_LD_WB:    chk(ctrl.gate_mdr && ctrl.ld_reg && ctrl.ld_cc, "ctrl 27");
      S_ST_MEM:   chk(ctrl.mio_en && ctrl.r_w && !ctrl.ld_reg, "ctrl 16");
      S_LEA:      chk(ctrl.gate_marmux && ctrl.ld_reg && !ctrl.ld_cc && ctrl.addr2mux == 2'b10, "ctrl 14");
      default: ;
    endcase
  endtask

  // run one instruction from state 18 and compare the distinct states visited
  task automatic run(input logic [3:0] op, input logic i11, input logic b, input int exp[$]);
    int got[$];
    int guard = 0;
    opcode = op; ir11 = i11; ben = b;
    chk(state == S_FETCH, "instruction starts in 18");
    got.push_back(int'(state));
    chk_ctrl();
    @(posedge clk); #1;
    while (state != S_FETCH && guard < 200) begin
      chk_ctrl();
      if (got[$] != int'(state)) got.push_back(int'(state));
      @(posedge clk); #1;
      guard++;
    end
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL op=%b sequence %p expected %p", op, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      run(4'b0001, 0, 0, '{18, 33, 35, 32, 1});
      run(4'b0101, 0, 0, '{18, 33, 35, 32, 5});
      run(4'b1001, 0, 0, '{18, 33, 35, 32, 9});
      run(4'b0010, 0, 0, '{18, 33, 35, 32, 2, 25, 27});
      run(4'b1010, 0, 0, '{18, 33, 35, 32, 10, 24, 26, 25, 27});
      run(4'b0110, 0, 0, '{18, 33, 35, 32, 6, 25, 27});
      run(4'b0011, 0, 0, '{18, 33, 35, 32, 3, 23, 16});
      run(4'b1011, 0, 0, '{18, 33, 35, 32, 11, 29, 31, 23, 16});
      run(4'b0111, 0, 0, '{18, 33, 35, 32, 7, 23, 16});
      run(4'b1110, 0, 0, '{18, 33, 35, 32, 14});
      run(4'b0000, 0, 1, '{18, 33, 35, 32, 0, 22});
      run(4'b0000, 0, 0, '{18, 33, 35, 32, 0});
      run(4'b1100, 0, 0, '{18, 33, 35, 32, 12});
      run(4'b0100, 1, 0, '{18, 33, 35, 32, 4, 21});
      run(4'b0100, 0, 0, '{18, 33, 35, 32, 4, 20});
      run(4'b1111, 0, 0, '{18, 33, 35, 32, 15, 28, 30});
      run(4'b1000, 0, 0, '{18, 33, 35, 32, 8, 36, 38, 39, 40, 42, 34});
      run(4'b1101, 0, 0, '{18, 33, 35, 32, 13});
    end
    chk(waits > 0, "memory wait states occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
