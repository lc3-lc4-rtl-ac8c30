// lc3_memory: the LC3's unified memory, 2**ADDR_W words of 16 bits, word
// addressed (address x0000..xFFFF with the default ADDR_W = 16).
// A memory access is slow compared with the processor clock: while en is
// held high the memory counts clock cycles and raises ready (the R signal)
// in the WAIT_CYCLES-th cycle of the access.  On that cycle a write (we = 1)
// stores wdata, and rdata (always the word at addr) is the value the
// processor latches.  The counter restarts after every ready, so each access
// state of the controller lasts exactly WAIT_CYCLES cycles.  WAIT_CYCLES = 10
// follows the stated clock period of one tenth of a memory delay.
// A second write port (ld_*) and a read port (dbg_*) let a test bench load
// a program and inspect results; they are not part of the processor's bus.
module lc3_memory #(
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned WAIT_CYCLES = 10
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              we,
  input  logic [15:0]       addr,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  output logic              ready,
  input  logic              ld_we,
  input  logic [15:0]       ld_addr,
  input  logic [15:0]       ld_data,
  input  logic [15:0]       dbg_addr,
  output logic [15:0]       dbg_data
);
  localparam int unsigned CW = (WAIT_CYCLES > 1) ? $clog2(WAIT_CYCLES) : 1;

  logic [15:0]   mem [2**ADDR_W];
  logic [CW-1:0] count;

  assign ready = en && (count == CW'(WAIT_CYCLES - 1));

  always_ff @(posedge clk) begin
    if (rst)        count <= '0;
    else if (ready) count <= '0;
    else if (en)    count <= count + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (ld_we)            mem[ld_addr[ADDR_W-1:0]] <= ld_data;
    else if (ready && we) mem[addr[ADDR_W-1:0]]    <= wdata;
  end

  assign rdata    = mem[addr[ADDR_W-1:0]];
  assign dbg_data = mem[dbg_addr[ADDR_W-1:0]];
endmodule
