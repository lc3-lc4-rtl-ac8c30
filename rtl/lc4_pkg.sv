// lc4_pkg: shared types and constants of the LC4 single-cycle processor.
// The opcode occupies IR[15:12]; ALU, LIM, LDR and LEA use the codes shown in
// the LC4 instruction examples (0000, 0001, 0010, 1000).  The codes for STR and
// BRR are not printed anywhere and are this design's choice (0011, 0100).
// The ALU function sits in IR[2:0]; ADD = 000, the other seven follow in the
// order the instruction list names them.
package lc4_pkg;

  typedef enum logic [3:0] {
    OP4_ALU = 4'b0000,
    OP4_LIM = 4'b0001,
    OP4_LDR = 4'b0010,
    OP4_STR = 4'b0011,
    OP4_BRR = 4'b0100,
    OP4_LEA = 4'b1000
  } opcode4_e;

  typedef enum logic [2:0] {
    F_ADD = 3'd0,
    F_SUB = 3'd1,
    F_AND = 3'd2,
    F_IOR = 3'd3,
    F_NOT = 3'd4,
    F_NOR = 3'd5,
    F_INC = 3'd6,
    F_DEC = 3'd7
  } func4_e;

  // INmux selects: which value is written into the register file.
  localparam logic [1:0] IN_PC1  = 2'b00;  // PC + 1       (LEA)
  localparam logic [1:0] IN_DMEM = 2'b01;  // D_MEM.out    (LDR)
  localparam logic [1:0] IN_ALU  = 2'b10;  // ALU.out      (ALU)
  localparam logic [1:0] IN_IMM  = 2'b11;  // SEXT9(IR)    (LIM)

  // DRmux selects: which IR field names the destination register.
  localparam logic DRSEL_11_9 = 1'b0;
  localparam logic DRSEL_5_3  = 1'b1;

endpackage
