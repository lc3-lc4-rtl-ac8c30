// lc4_decode: the LC4 controller.  Combinational: the opcode IR[15:12] sets
// the five control signals of the single-cycle datapath.
//   opcode  BR  INmux      Rwe  Mwe  DRmux
//   ALU     0   ALU.out    1    0    IR[5:3]
//   LIM     0   SEXT9      1    0    IR[11:9]
//   LDR     0   D_MEM.out  1    0    IR[11:9]
//   STR     0   -          0    1    -
//   LEA     0   PC+1       1    0    IR[11:9]
//   BRR     1   -          0    0    -
// Any other opcode writes nothing and falls through to PC+1.
// The five signals and the ALU, LIM, LDR and LEA codes follow the notes;
// STR = 0011, BRR = 0100 and the INmux codes are this design's choice.
module lc4_decode
  import lc4_pkg::*;
(
  input  logic [3:0] opcode,
  output logic       br,
  output logic [1:0] inmux,
  output logic       rwe,
  output logic       mwe,
  output logic       drmux
);
  always_comb begin
    br = 1'b0; inmux = IN_ALU; rwe = 1'b0; mwe = 1'b0; drmux = DRSEL_11_9;
    unique case (opcode)
      OP4_ALU: begin inmux = IN_ALU;  rwe = 1'b1; drmux = DRSEL_5_3; end
      OP4_LIM: begin inmux = IN_IMM;  rwe = 1'b1; end
      OP4_LDR: begin inmux = IN_DMEM; rwe = 1'b1; end
      OP4_STR: begin mwe = 1'b1; end
      OP4_LEA: begin inmux = IN_PC1;  rwe = 1'b1; end
      OP4_BRR: begin br = 1'b1; end
      default: ;
    endcase
  end
endmodule
