// regfile: 8 x 16-bit general register file (R0..R7), shared by the LC3 and
// the LC4.  Two read ports (sr1 -> out1, sr2 -> out2) are combinational; the
// write port stores in_data into register dr on the rising clock edge when
// we is high, so a value written in one cycle is visible on the read ports in
// the next.  All registers clear on reset (the reset is this design's choice,
// so that simulation starts from known values).
module regfile #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned NREGS = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] sr1,
  input  logic [$clog2(NREGS)-1:0] sr2,
  input  logic [$clog2(NREGS)-1:0] dr,
  input  logic                     we,
  input  logic [WIDTH-1:0]         in_data,
  output logic [WIDTH-1:0]         out1,
  output logic [WIDTH-1:0]         out2
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we) begin
      regs[dr] <= in_data;
    end
  end

  assign out1 = regs[sr1];
  assign out2 = regs[sr2];
endmodule
