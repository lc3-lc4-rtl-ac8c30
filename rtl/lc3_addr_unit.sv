// lc3_addr_unit: LC3 address arithmetic.  Combinational.
// ADDR1MUX picks the base: PC (0) or the register file's SR1 output (1).
// ADDR2MUX picks the offset: zero (00), SEXT(IR[5:0]) (01), SEXT(IR[8:0]) (10)
// or SEXT(IR[10:0]) (11).  Their sum goes to PCMUX (branches, JSR, JMP) and
// to MARMUX, which passes either the sum (1) or the zero-extended trap vector
// IR[7:0] (0) towards the bus.  PC is the already incremented PC, so
// PC-relative addresses are relative to the next instruction.
// The whole IR comes in for readability; IR[15:11] (opcode and JSR's mode
// bit) are not used here, and the lint tool reports them as unused.
// ADDR1MUX = 0 (PC) and ADDR2MUX = 10 (offset9) are the codes the LD
// slides print; the other codes and MARMUX's encoding are this design's choice.
module lc3_addr_unit
  import lc3_pkg::*;
(
  input  logic [15:0] pc,
  input  logic [15:0] sr1,
  input  logic [15:0] ir,
  input  logic        addr1mux,
  input  logic [1:0]  addr2mux,
  input  logic        marmux,
  output logic [15:0] addr_sum,
  output logic [15:0] marmux_out
);
  logic [15:0] off6, off9, off11, base, offset;

  sext #(.IN_W(6),  .OUT_W(16)) u_sext6  (.in(ir[5:0]),  .out(off6));
  sext #(.IN_W(9),  .OUT_W(16)) u_sext9  (.in(ir[8:0]),  .out(off9));
  sext #(.IN_W(11), .OUT_W(16)) u_sext11 (.in(ir[10:0]), .out(off11));

  always_comb begin
    base = (addr1mux == A1_SR1) ? sr1 : pc;
    unique case (addr2mux)
      A2_ZERO:  offset = 16'h0000;
      A2_OFF6:  offset = off6;
      A2_OFF9:  offset = off9;
      A2_OFF11: offset = off11;
      default:  offset = 16'h0000;
    endcase
    addr_sum   = base + offset;
    marmux_out = marmux ? addr_sum : {8'h00, ir[7:0]};
  end
endmodule
