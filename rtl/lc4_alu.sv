// lc4_alu: the LC4 16-bit ALU.  Combinational.  func = IR[2:0] selects one
// of eight operations on A (register file out1) and B (out2):
// ADD, SUB (A-B), AND, iOR (inclusive OR), NOT A, NOR, INC (A+1), DEC (A-1).
// ADD = 000 is the code the instruction examples print; the other codes are
// this design's choice and follow the order in which the operations are
// listed.
module lc4_alu
  import lc4_pkg::*;
(
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic [2:0]  func,
  output logic [15:0] y
);
  always_comb begin
    unique case (func4_e'(func))
      F_ADD: y = a + b;
      F_SUB: y = a - b;
      F_AND: y = a & b;
      F_IOR: y = a | b;
      F_NOT: y = ~a;
      F_NOR: y = ~(a | b);
      F_INC: y = a + 16'd1;
      F_DEC: y = a - 16'd1;
      default: y = a;
    endcase
  end
endmodule
