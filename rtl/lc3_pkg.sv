// lc3_pkg: shared types and constants of the LC3 multi-cycle processor.
// Holds the 4-bit opcodes, the controller state numbers (the state numbering
// follows the classic LC-3 state machine, e.g. 18 = fetch, 32 = decode), the
// encodings of the datapath multiplexer selects, and the control word that the
// controller hands to the datapath each cycle.  Memory-mapped device
// addresses for the keyboard and display are also defined here.
package lc3_pkg;

  typedef enum logic [3:0] {
    OP_BR   = 4'b0000,
    OP_ADD  = 4'b0001,
    OP_LD   = 4'b0010,
    OP_ST   = 4'b0011,
    OP_JSR  = 4'b0100,
    OP_AND  = 4'b0101,
    OP_LDR  = 4'b0110,
    OP_STR  = 4'b0111,
    OP_RTI  = 4'b1000,
    OP_NOT  = 4'b1001,
    OP_LDI  = 4'b1010,
    OP_STI  = 4'b1011,
    OP_JMP  = 4'b1100,
    OP_RES  = 4'b1101,
    OP_LEA  = 4'b1110,
    OP_TRAP = 4'b1111
  } opcode_e;

  // Controller states, numbered as in the LC-3 state diagram.
  typedef enum logic [5:0] {
    S_BR_EVAL = 6'd0,   // [BEN] branch test
    S_ADD     = 6'd1,
    S_LD_ADDR = 6'd2,
    S_ST_ADDR = 6'd3,
    S_JSR     = 6'd4,   // branch on IR[11]
    S_AND     = 6'd5,
    S_LDR_ADDR= 6'd6,
    S_STR_ADDR= 6'd7,
    S_RTI     = 6'd8,   // MAR <- R6
    S_NOT     = 6'd9,
    S_LDI_ADDR= 6'd10,
    S_STI_ADDR= 6'd11,
    S_JMP     = 6'd12,
    S_RES     = 6'd13,  // reserved opcode: no operation
    S_LEA     = 6'd14,
    S_TRAP    = 6'd15,  // MAR <- ZEXT(IR[7:0])
    S_ST_MEM  = 6'd16,  // M[MAR] <- MDR
    S_FETCH   = 6'd18,  // MAR <- PC, PC <- PC+1
    S_JSRR    = 6'd20,  // R7 <- PC, PC <- BaseR
    S_JSR11   = 6'd21,  // R7 <- PC, PC <- PC + off11
    S_BR_TAKE = 6'd22,  // PC <- PC + off9
    S_ST_DATA = 6'd23,  // MDR <- SR
    S_LDI_RD1 = 6'd24,  // MDR <- M (pointer)
    S_LD_RD   = 6'd25,  // MDR <- M
    S_LDI_PTR = 6'd26,  // MAR <- MDR
    S_LD_WB   = 6'd27,  // DR <- MDR, CC
    S_TRAP_RD = 6'd28,  // MDR <- M, R7 <- PC
    S_STI_RD1 = 6'd29,  // MDR <- M (pointer)
    S_TRAP_PC = 6'd30,  // PC <- MDR
    S_STI_PTR = 6'd31,  // MAR <- MDR
    S_DECODE  = 6'd32,
    S_FETCH_RD= 6'd33,  // MDR <- M
    S_RTI_SP2 = 6'd34,  // R6 <- R6+1
    S_FETCH_IR= 6'd35,  // IR <- MDR
    S_RTI_RD1 = 6'd36,  // MDR <- M (PC)
    S_RTI_PC  = 6'd38,  // PC <- MDR
    S_RTI_SP1 = 6'd39,  // MAR, R6 <- R6+1
    S_RTI_RD2 = 6'd40,  // MDR <- M (PSR)
    S_RTI_PSR = 6'd42   // PSR <- MDR
  } state_e;

  // SR1MUX / DRMUX selects (register number sources).
  localparam logic [1:0] SR1_IR11_9 = 2'b00;
  localparam logic [1:0] SR1_IR8_6  = 2'b01;
  localparam logic [1:0] SR1_R6     = 2'b10;
  localparam logic [1:0] DR_IR11_9  = 2'b00;
  localparam logic [1:0] DR_R7      = 2'b01;
  localparam logic [1:0] DR_R6      = 2'b10;

  // PCMUX selects.
  localparam logic [1:0] PC_INC  = 2'b00;
  localparam logic [1:0] PC_BUS  = 2'b01;
  localparam logic [1:0] PC_ADDR = 2'b10;

  // ADDR1MUX / ADDR2MUX selects.
  localparam logic       A1_PC    = 1'b0;
  localparam logic       A1_SR1   = 1'b1;
  localparam logic [1:0] A2_ZERO  = 2'b00;
  localparam logic [1:0] A2_OFF6  = 2'b01;
  localparam logic [1:0] A2_OFF9  = 2'b10;
  localparam logic [1:0] A2_OFF11 = 2'b11;

  // ALUK function codes.
  typedef enum logic [1:0] {
    ALU_ADD  = 2'b00,
    ALU_AND  = 2'b01,
    ALU_NOT  = 2'b10,
    ALU_PASS = 2'b11
  } aluk_e;

  // Control word produced by the controller in every state.
  typedef struct packed {
    logic       ld_mar;
    logic       ld_mdr;
    logic       ld_ir;
    logic       ld_ben;
    logic       ld_reg;
    logic       ld_cc;
    logic       ld_pc;
    logic       ld_psr;
    logic       gate_pc;
    logic       gate_mdr;
    logic       gate_alu;
    logic       gate_marmux;
    logic       gate_sp;     // R6 + 1 onto the bus (stack pop)
    logic [1:0] pcmux;
    logic [1:0] drmux;
    logic [1:0] sr1mux;
    logic       addr1mux;
    logic [1:0] addr2mux;
    logic       marmux;      // 0: ZEXT(IR[7:0]), 1: address adder
    aluk_e      aluk;
    logic       mio_en;
    logic       r_w;         // 1 = write
  } ctrl_t;

  // Memory-mapped device registers.
  localparam logic [15:0] ADDR_KBSR = 16'hFE00;
  localparam logic [15:0] ADDR_KBDR = 16'hFE02;
  localparam logic [15:0] ADDR_DSR  = 16'hFE04;
  localparam logic [15:0] ADDR_DDR  = 16'hFE06;

endpackage
