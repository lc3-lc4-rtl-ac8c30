// lc4_mem: a 2**ADDR_W x 16 memory ("memory64kX16" at the default ADDR_W =
// 16) with a combinational read port and a write port that stores on the
// rising clock edge when we is high.  The LC4 instantiates it twice: as the
// instruction memory I_MEM (read at PC, written only when a program is
// loaded) and as the data memory D_MEM (read and written at the same
// address, written by STR).  Because reads are combinational, an LC4
// instruction fetches, reads data and writes back within one clock cycle.
// The size and the split into I_MEM and D_MEM follow the notes; the
// combinational read is this design's choice, needed for one-cycle execution.
module lc4_mem #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic        clk,
  input  logic [15:0] raddr,
  output logic [15:0] rdata,
  input  logic        we,
  input  logic [15:0] waddr,
  input  logic [15:0] wdata
);
  logic [15:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[ADDR_W-1:0]] <= wdata;
  end

  assign rdata = mem[raddr[ADDR_W-1:0]];
endmodule
