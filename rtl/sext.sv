// sext: sign extender.  Copies the low IN_W bits of the input and fills the
// upper OUT_W-IN_W bits with copies of bit IN_W-1, so a negative two's
// complement field stays negative.  Purely combinational.  The LC3 uses it
// for its 5-, 6-, 9- and 11-bit fields, the LC4 for its 9-bit immediate.
// The behaviour follows the notes' description of sign extension; making
// the widths parameters is this design's choice.
module sext #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned OUT_W = 16
) (
  input  logic [IN_W-1:0]  in,
  output logic [OUT_W-1:0] out
);
  always_comb out = {{(OUT_W-IN_W){in[IN_W-1]}}, in};
endmodule
