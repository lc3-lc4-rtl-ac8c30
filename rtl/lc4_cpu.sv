// lc4_cpu: the LC4 single-cycle processor.  Every instruction completes in
// one clock cycle: PC addresses I_MEM, the instruction word IR[15:0] goes
// straight to the decoder and the register file (S1 = IR[11:9],
// S2 = IR[8:6]); out1 and out2 feed the ALU (func = IR[2:0]), D_MEM (address
// = out2, write data = out1) and the branch test; INmux selects PC+1,
// D_MEM.out, ALU.out or SEXT9(IR[8:0]) as the register write data, and DRmux
// selects IR[11:9] or IR[5:3] as the destination.  On the rising edge the
// register file, D_MEM and PC update together.
// Instructions: ALU S1 S2 DR FUN; LIM DR imm9 (DR <- SEXT9); LDR DR AR
// (DR <- D_MEM[AR]); STR SR AR (D_MEM[AR] <- SR); LEA DR (DR <- PC+1);
// BRR CR AR (PC <- AR if CR < 0, i.e. out1[15] = 1, else PC+1).
// imem_* loads the program into I_MEM; the PC clears to zero on reset.
// The datapath connections follow the LC4 schematic; the reset value of
// PC, the load port and the STR/BRR opcodes are this design's choice.
module lc4_cpu
  import lc4_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [15:0] imem_waddr,
  input  logic [15:0] imem_wdata,
  output logic [15:0] pc,
  output logic [15:0] ir
);
  logic        br, rwe, mwe, drmux, take_br;
  logic [1:0]  inmux;
  logic [2:0]  dr;
  logic [15:0] pc_plus_one, next_pc, out1, out2, alu_out, dmem_out, immed, reg_in;

  lc4_mem #(.ADDR_W(ADDR_W)) u_imem (
    .clk, .raddr(pc), .rdata(ir),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  lc4_decode u_dec (.opcode(ir[15:12]), .br, .inmux, .rwe, .mwe, .drmux);

  assign dr = (drmux == DRSEL_5_3) ? ir[5:3] : ir[11:9];

  regfile u_rf (
    .clk, .rst, .sr1(ir[11:9]), .sr2(ir[8:6]), .dr, .we(rwe),
    .in_data(reg_in), .out1, .out2
  );

  lc4_alu u_alu (.a(out1), .b(out2), .func(ir[2:0]), .y(alu_out));

  lc4_mem #(.ADDR_W(ADDR_W)) u_dmem (
    .clk, .raddr(out2), .rdata(dmem_out),
    .we(mwe), .waddr(out2), .wdata(out1)
  );

  sext #(.IN_W(9), .OUT_W(16)) u_sext9 (.in(ir[8:0]), .out(immed));

  always_comb begin
    unique case (inmux)
      IN_PC1:  reg_in = pc_plus_one;
      IN_DMEM: reg_in = dmem_out;
      IN_ALU:  reg_in = alu_out;
      IN_IMM:  reg_in = immed;
      default: reg_in = alu_out;
    endcase
  end

  assign pc_plus_one = pc + 16'd1;   // Add_1
  assign take_br     = out1[15];
  assign next_pc     = (br && take_br) ? out2 : pc_plus_one;

  always_ff @(posedge clk) begin
    if (rst) pc <= 16'h0000;
    else     pc <= next_pc;
  end
endmodule
