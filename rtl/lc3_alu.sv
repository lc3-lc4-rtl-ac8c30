// lc3_alu: the LC3 arithmetic/logic unit.  Combinational.  ALUK selects
// ADD (00), AND (01), NOT of A (10) or pass A (11).  A comes from the
// register file's SR1 output, B from SR2MUX (SR2 or the sign-extended
// 5-bit immediate).  ADD = 00 and NOT = 10 are the codes the control slides
// print; AND = 01 and PASS = 11 complete the 2-bit code in the usual way.
module lc3_alu
  import lc3_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  aluk_e       aluk,
  output logic [15:0] y
);
  always_comb begin
    unique case (aluk)
      ALU_ADD:  y = a + b;
      ALU_AND:  y = a & b;
      ALU_NOT:  y = ~a;
      ALU_PASS: y = a;
      default:  y = a;
    endcase
  end
endmodule
