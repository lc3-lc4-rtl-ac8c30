// lc3_system: the complete LC3 machine: lc3_cpu, the memory-IO bus with its
// address decoder and keyboard/display registers (lc3_mio), and the unified
// 64K x 16 memory (lc3_memory) with a WAIT_CYCLES-cycle access time.
// The ld_* port writes memory directly (program loading while the processor
// is held in reset); dbg_* reads any memory word.  The keyboard and display
// ports are those of lc3_mio.  The memory address width defaults to the
// full 16-bit address space.
// The three-part structure and the 16-bit address space follow the notes;
// the load and debug ports are this design's own, for testing.
module lc3_system
  import lc3_pkg::*;
#(
  parameter int unsigned ADDR_W      = 16,
  parameter int unsigned WAIT_CYCLES = 10,
  parameter logic [15:0] RESET_PC    = 16'h3000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_we,
  input  logic [15:0] ld_addr,
  input  logic [15:0] ld_data,
  input  logic [15:0] dbg_addr,
  output logic [15:0] dbg_data,
  input  logic        kbd_strobe,
  input  logic [7:0]  kbd_char,
  input  logic        disp_ready,
  output logic        disp_valid,
  output logic [7:0]  disp_char,
  output state_e      state,
  output logic [15:0] pc,
  output logic [15:0] ir,
  output logic [15:0] psr
);
  logic        mio_en, r_w, r, mem_en, mem_we, mem_ready;
  logic [15:0] mar, mdr, rdata, mem_rdata;

  lc3_cpu #(.RESET_PC(RESET_PC)) u_cpu (
    .clk, .rst, .mio_en, .r_w, .mar, .mdr, .rdata, .r,
    .state, .pc, .ir, .psr
  );

  lc3_mio u_mio (
    .clk, .rst, .mio_en, .r_w, .mar, .mdr, .rdata, .r,
    .mem_en, .mem_we, .mem_rdata, .mem_ready,
    .kbd_strobe, .kbd_char, .disp_ready, .disp_valid, .disp_char
  );

  lc3_memory #(.ADDR_W(ADDR_W), .WAIT_CYCLES(WAIT_CYCLES)) u_mem (
    .clk, .rst, .en(mem_en), .we(mem_we), .addr(mar), .wdata(mdr),
    .rdata(mem_rdata), .ready(mem_ready),
    .ld_we, .ld_addr, .ld_data, .dbg_addr, .dbg_data
  );
endmodule
