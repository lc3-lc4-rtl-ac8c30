// lc3_asm_pkg: instruction encoders for LC3 test programs, and the expected
// cycle count of each instruction when every memory access takes L cycles.
// Offsets are given as plain integers and truncated to their field width.
// The field layouts follow the LC3 instruction formats; the cycle formula
// follows from this design's state sequences (one state per register
// transfer, L cycles per memory state).
package lc3_asm_pkg;

  function automatic logic [15:0] add_r(int dr, int s1, int s2);
    return {4'b0001, 3'(dr), 3'(s1), 3'b000, 3'(s2)};
  endfunction
  function automatic logic [15:0] add_i(int dr, int s1, int imm);
    return {4'b0001, 3'(dr), 3'(s1), 1'b1, 5'(imm)};
  endfunction
  function automatic logic [15:0] and_r(int dr, int s1, int s2);
    return {4'b0101, 3'(dr), 3'(s1), 3'b000, 3'(s2)};
  endfunction
  function automatic logic [15:0] and_i(int dr, int s1, int imm);
    return {4'b0101, 3'(dr), 3'(s1), 1'b1, 5'(imm)};
  endfunction
  function automatic logic [15:0] not_(int dr, int s1);
    return {4'b1001, 3'(dr), 3'(s1), 6'b111111};
  endfunction
  function automatic logic [15:0] ld(int dr, int off);
    return {4'b0010, 3'(dr), 9'(off)};
  endfunction
  function automatic logic [15:0] ldi(int dr, int off);
    return {4'b1010, 3'(dr), 9'(off)};
  endfunction
  function automatic logic [15:0] ldr(int dr, int base, int off);
    return {4'b0110, 3'(dr), 3'(base), 6'(off)};
  endfunction
  function automatic logic [15:0] lea(int dr, int off);
    return {4'b1110, 3'(dr), 9'(off)};
  endfunction
  function automatic logic [15:0] st(int sr, int off);
    return {4'b0011, 3'(sr), 9'(off)};
  endfunction
  function automatic logic [15:0] sti(int sr, int off);
    return {4'b1011, 3'(sr), 9'(off)};
  endfunction
  function automatic logic [15:0] str(int sr, int base, int off);
    return {4'b0111, 3'(sr), 3'(base), 6'(off)};
  endfunction
  function automatic logic [15:0] br(int nzp, int off);
    return {4'b0000, 3'(nzp), 9'(off)};
  endfunction
  function automatic logic [15:0] jmp(int base);
    return {4'b1100, 3'b000, 3'(base), 6'b000000};
  endfunction
  function automatic logic [15:0] jsr(int off);
    return {4'b0100, 1'b1, 11'(off)};
  endfunction
  function automatic logic [15:0] jsrr(int base);
    return {4'b0100, 3'b000, 3'(base), 6'b000000};
  endfunction
  function automatic logic [15:0] trap(int vec);
    return {4'b1111, 4'b0000, 8'(vec)};
  endfunction
  function automatic logic [15:0] rti();
    return 16'h8000;
  endfunction

  // clock cycles of one instruction from state 18 back to state 18
  function automatic int cycles(logic [15:0] ir, bit taken, int L);
    case (ir[15:12])
      4'b0010, 4'b0110, 4'b0011, 4'b0111: return 5 + 2 * L;
      4'b1010, 4'b1011:                   return 6 + 3 * L;
      4'b0000:                            return taken ? 5 + L : 4 + L;
      4'b0100:                            return 5 + L;
      4'b1111:                            return 5 + 2 * L;
      4'b1000:                            return 8 + 3 * L;
      default:                            return 4 + L;
    endcase
  endfunction

endpackage
