// lc_top: the two processors side by side, each with its own ports.
// lc3_*: the LC3 system (multi-cycle processor, memory-IO bus, keyboard and
// display registers, 64K x 16 memory with a 10-cycle access time).
// lc4_*: the LC4 single-cycle processor with its separate 64K x 16
// instruction and data memories.  The two share only the clock; each has
// its own synchronous, active-high reset.
// LC3 interrupt handling is not part of this design.  Its connection point
// is brought out instead: lc3_int_window is high in fetch state 18, the
// cycle in which the notes' controller tests the interrupt request [int]
// and would branch to state 49, and lc3_int is that request.  The
// controller here always takes the no-interrupt path, so lc3_int is not
// used inside and lint reports it as unused.
module lc_top
  import lc3_pkg::*;
(
  input  logic        clk,
  // LC3
  input  logic        lc3_rst,
  input  logic        lc3_ld_we,
  input  logic [15:0] lc3_ld_addr,
  input  logic [15:0] lc3_ld_data,
  input  logic [15:0] lc3_dbg_addr,
  output logic [15:0] lc3_dbg_data,
  input  logic        lc3_kbd_strobe,
  input  logic [7:0]  lc3_kbd_char,
  input  logic        lc3_disp_ready,
  output logic        lc3_disp_valid,
  output logic [7:0]  lc3_disp_char,
  output state_e      lc3_state,
  output logic [15:0] lc3_pc,
  output logic [15:0] lc3_ir,
  output logic [15:0] lc3_psr,
  input  logic        lc3_int,
  output logic        lc3_int_window,
  // LC4
  input  logic        lc4_rst,
  input  logic        lc4_imem_we,
  input  logic [15:0] lc4_imem_waddr,
  input  logic [15:0] lc4_imem_wdata,
  output logic [15:0] lc4_pc,
  output logic [15:0] lc4_ir
);
  lc3_system u_lc3 (
    .clk, .rst(lc3_rst),
    .ld_we(lc3_ld_we), .ld_addr(lc3_ld_addr), .ld_data(lc3_ld_data),
    .dbg_addr(lc3_dbg_addr), .dbg_data(lc3_dbg_data),
    .kbd_strobe(lc3_kbd_strobe), .kbd_char(lc3_kbd_char),
    .disp_ready(lc3_disp_ready), .disp_valid(lc3_disp_valid),
    .disp_char(lc3_disp_char),
    .state(lc3_state), .pc(lc3_pc), .ir(lc3_ir), .psr(lc3_psr)
  );

  assign lc3_int_window = (lc3_state == S_FETCH);

  lc4_cpu u_lc4 (
    .clk, .rst(lc4_rst),
    .imem_we(lc4_imem_we), .imem_waddr(lc4_imem_waddr),
    .imem_wdata(lc4_imem_wdata),
    .pc(lc4_pc), .ir(lc4_ir)
  );
endmodule
