// lc3_control: the LC3 multi-cycle controller.  A Moore state machine whose
// states carry the numbers of the LC-3 state diagram; each state performs
// one register transfer and emits the control word (load enables, bus
// gates, multiplexer selects, ALUK, MIO_EN, R_W) for it.
//   fetch   : 18 MAR<-PC, PC<-PC+1 ; 33 MDR<-M (loops while R=0) ; 35 IR<-MDR
//   decode  : 32 loads BEN and branches to state IR[15:12]
//   execute : 1 ADD, 5 AND, 9 NOT ; 2/25/27 LD ; 10/24/26/25/27 LDI ;
//             6/25/27 LDR ; 3/23/16 ST ; 11/29/31/23/16 STI ; 7/23/16 STR ;
//             14 LEA ; 0/22 BR ; 12 JMP ; 4/21 JSR ; 4/20 JSRR ;
//             (21 and 20 write R7 <- PC and load the new PC together)
//             15/28/30 TRAP ; 8/36/38/39/40/42/34 RTI
// Every memory state stays put until the memory-IO bus returns R = 1.
// The fetch, decode, operate, LD, LDI, LDR and LEA sequences follow the
// state diagrams this design is based on; the store, branch, jump, TRAP and
// RTI sequences follow the classic LC-3 controller.  Interrupts and the
// privilege checks of RTI are not implemented: state 18 always proceeds to
// 33, RTI never traps, and the reserved opcode 1101 does nothing.
// Timing: the state register updates on the rising clock edge; the control
// word depends on the current state only.
module lc3_control
  import lc3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  opcode,   // IR[15:12]
  input  logic        ir11,     // IR[11]: JSR (1) or JSRR (0)
  input  logic        ben,
  input  logic        r,        // memory ready
  output state_e      state,
  output ctrl_t       ctrl
);
  state_e next;

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else     state <= next;
  end

  always_comb begin
    ctrl = '0;
    next = state;
    unique case (state)
      S_FETCH: begin
        ctrl.ld_mar = 1'b1; ctrl.gate_pc = 1'b1;
        ctrl.ld_pc = 1'b1;  ctrl.pcmux = PC_INC;
        next = S_FETCH_RD;
      end
      S_FETCH_RD, S_LD_RD, S_LDI_RD1, S_STI_RD1, S_RTI_RD1, S_RTI_RD2: begin
        ctrl.ld_mdr = 1'b1; ctrl.mio_en = 1'b1; ctrl.r_w = 1'b0;
        if (r) begin
          unique case (state)
            S_FETCH_RD: next = S_FETCH_IR;
            S_LD_RD:    next = S_LD_WB;
            S_LDI_RD1:  next = S_LDI_PTR;
            S_STI_RD1:  next = S_STI_PTR;
            S_RTI_RD1:  next = S_RTI_PC;
            default:    next = S_RTI_PSR;
          endcase
        end
      end
      S_FETCH_IR: begin
        ctrl.gate_mdr = 1'b1; ctrl.ld_ir = 1'b1;
        next = S_DECODE;
      end
      S_DECODE: begin
        ctrl.ld_ben = 1'b1;
        next = state_e'({2'b00, opcode});
      end
      S_ADD, S_AND, S_NOT: begin
        ctrl.sr1mux = SR1_IR8_6; ctrl.drmux = DR_IR11_9;
        ctrl.aluk = (state == S_ADD) ? ALU_ADD : (state == S_AND) ? ALU_AND : ALU_NOT;
        ctrl.gate_alu = 1'b1; ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1;
        next = S_FETCH;
      end
      S_LD_ADDR, S_ST_ADDR, S_LDI_ADDR, S_STI_ADDR: begin
        ctrl.addr1mux = A1_PC; ctrl.addr2mux = A2_OFF9; ctrl.marmux = 1'b1;
        ctrl.gate_marmux = 1'b1; ctrl.ld_mar = 1'b1;
        unique case (state)
          S_LD_ADDR:  next = S_LD_RD;
          S_ST_ADDR:  next = S_ST_DATA;
          S_LDI_ADDR: next = S_LDI_RD1;
          default:    next = S_STI_RD1;
        endcase
      end
      S_LDR_ADDR, S_STR_ADDR: begin
        ctrl.sr1mux = SR1_IR8_6; ctrl.addr1mux = A1_SR1; ctrl.addr2mux = A2_OFF6;
        ctrl.marmux = 1'b1; ctrl.gate_marmux = 1'b1; ctrl.ld_mar = 1'b1;
        next = (state == S_LDR_ADDR) ? S_LD_RD : S_ST_DATA;
      end
      S_LD_WB: begin
        ctrl.gate_mdr = 1'b1; ctrl.ld_reg = 1'b1; ctrl.ld_cc = 1'b1;
        ctrl.drmux = DR_IR11_9;
        next = S_FETCH;
      end
      S_LDI_PTR, S_STI_PTR: begin
        ctrl.gate_mdr = 1'b1; ctrl.ld_mar = 1'b1;
        next = (state == S_LDI_PTR) ? S_LD_RD : S_ST_DATA;
      end
      S_ST_DATA: begin
        ctrl.sr1mux = SR1_IR11_9; ctrl.aluk = ALU_PASS; ctrl.gate_alu = 1'b1;
        ctrl.ld_mdr = 1'b1;
        next = S_ST_MEM;
      end
      S_ST_MEM: begin
        ctrl.mio_en = 1'b1; ctrl.r_w = 1'b1;
        if (r) next = S_FETCH;
      end
      S_LEA: begin
        ctrl.addr1mux = A1_PC; ctrl.addr2mux = A2_OFF9; ctrl.marmux = 1'b1;
        ctrl.gate_marmux = 1'b1; ctrl.ld_reg = 1'b1; ctrl.drmux = DR_IR11_9;
        next = S_FETCH;
      end
      S_BR_EVAL: next = ben ? S_BR_TAKE : S_FETCH;
      S_BR_TAKE: begin
        ctrl.addr1mux = A1_PC; ctrl.addr2mux = A2_OFF9;
        ctrl.pcmux = PC_ADDR; ctrl.ld_pc = 1'b1;
        next = S_FETCH;
      end
      S_JMP: begin
        ctrl.sr1mux = SR1_IR8_6; ctrl.addr1mux = A1_SR1; ctrl.addr2mux = A2_ZERO;
        ctrl.pcmux = PC_ADDR; ctrl.ld_pc = 1'b1;
        next = S_FETCH;
      end
      S_JSR: next = ir11 ? S_JSR11 : S_JSRR;
      // R7 <- PC and PC <- target in the same state, so JSRR R7 reads the
      // old R7 as its base
      S_JSR11, S_JSRR: begin
        ctrl.gate_pc = 1'b1; ctrl.ld_reg = 1'b1; ctrl.drmux = DR_R7;
        ctrl.sr1mux = SR1_IR8_6;
        ctrl.addr1mux = (state == S_JSR11) ? A1_PC : A1_SR1;
        ctrl.addr2mux = (state == S_JSR11) ? A2_OFF11 : A2_ZERO;
        ctrl.pcmux = PC_ADDR; ctrl.ld_pc = 1'b1;
        next = S_FETCH;
      end
      S_TRAP: begin
        ctrl.marmux = 1'b0; ctrl.gate_marmux = 1'b1; ctrl.ld_mar = 1'b1;
        next = S_TRAP_RD;
      end
      S_TRAP_RD: begin
        ctrl.ld_mdr = 1'b1; ctrl.mio_en = 1'b1; ctrl.r_w = 1'b0;
        ctrl.gate_pc = 1'b1; ctrl.ld_reg = 1'b1; ctrl.drmux = DR_R7;
        if (r) next = S_TRAP_PC;
      end
      S_TRAP_PC, S_RTI_PC: begin
        ctrl.gate_mdr = 1'b1; ctrl.pcmux = PC_BUS; ctrl.ld_pc = 1'b1;
        next = (state == S_TRAP_PC) ? S_FETCH : S_RTI_SP1;
      end
      S_RTI: begin
        ctrl.sr1mux = SR1_R6; ctrl.addr1mux = A1_SR1; ctrl.addr2mux = A2_ZERO;
        ctrl.marmux = 1'b1; ctrl.gate_marmux = 1'b1; ctrl.ld_mar = 1'b1;
        next = S_RTI_RD1;
      end
      S_RTI_SP1, S_RTI_SP2: begin
        ctrl.sr1mux = SR1_R6; ctrl.gate_sp = 1'b1;
        ctrl.ld_reg = 1'b1; ctrl.drmux = DR_R6;
        ctrl.ld_mar = (state == S_RTI_SP1);
        next = (state == S_RTI_SP1) ? S_RTI_RD2 : S_FETCH;
      end
      S_RTI_PSR: begin
        ctrl.gate_mdr = 1'b1; ctrl.ld_psr = 1'b1;
        next = S_RTI_SP2;
      end
      default: next = S_FETCH;   // reserved opcode 1101 and unused codes
    endcase
  end
endmodule
