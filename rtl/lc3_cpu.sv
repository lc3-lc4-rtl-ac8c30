// lc3_cpu: the LC3 processor, a multi-cycle machine built around one 16-bit
// bus.  Registers PC, IR, MAR, MDR, PSR (whose low three bits are the N, Z,
// P condition codes) and BEN load from the bus or from dedicated paths under
// the control word of lc3_control.  Exactly one gate drives the bus at a
// time: GatePC, GateMDR, GateALU, GateMARMUX or GateSP (R6 + 1, used by RTI
// to pop the stack); the bus is a multiplexer standing in for tri-states.
// Register selection: SR1MUX = IR[11:9] / IR[8:6] / R6, DRMUX = IR[11:9] /
// R7 / R6, SR2 = IR[2:0]; SR2MUX passes SEXT(IR[4:0]) when IR[5] = 1.
// PCMUX: PC+1 (00), bus (01), address adder (10).  MDR loads the memory-IO
// read data when MIO_EN is high and the bus otherwise.
// Memory interface: mio_en, r_w (1 = write), mar, mdr out; rdata and r in.
// An access state repeats until r = 1.  After reset the PC is RESET_PC and
// PSR holds Z = 1 (both this design's choices).
module lc3_cpu
  import lc3_pkg::*;
#(
  parameter logic [15:0] RESET_PC = 16'h3000
) (
  input  logic        clk,
  input  logic        rst,
  output logic        mio_en,
  output logic        r_w,
  output logic [15:0] mar,
  output logic [15:0] mdr,
  input  logic [15:0] rdata,
  input  logic        r,
  output state_e      state,
  output logic [15:0] pc,
  output logic [15:0] ir,
  output logic [15:0] psr
);
  ctrl_t       c;
  logic        ben;
  logic [15:0] bus, sr1_out, sr2_out, alu_b, alu_y, imm5, addr_sum, marmux_out;
  logic [15:0] sp_inc;
  logic [2:0]  sr1_sel, dr_sel;
  logic [2:0]  nzp;

  lc3_control u_ctrl (
    .clk, .rst, .opcode(ir[15:12]), .ir11(ir[11]), .ben, .r,
    .state, .ctrl(c)
  );

  // register numbers
  always_comb begin
    unique case (c.sr1mux)
      SR1_IR11_9: sr1_sel = ir[11:9];
      SR1_IR8_6:  sr1_sel = ir[8:6];
      SR1_R6:     sr1_sel = 3'd6;
      default:    sr1_sel = ir[8:6];
    endcase
    unique case (c.drmux)
      DR_IR11_9: dr_sel = ir[11:9];
      DR_R7:     dr_sel = 3'd7;
      DR_R6:     dr_sel = 3'd6;
      default:   dr_sel = ir[11:9];
    endcase
  end

  regfile u_rf (
    .clk, .rst, .sr1(sr1_sel), .sr2(ir[2:0]), .dr(dr_sel), .we(c.ld_reg),
    .in_data(bus), .out1(sr1_out), .out2(sr2_out)
  );

  sext #(.IN_W(5), .OUT_W(16)) u_sext5 (.in(ir[4:0]), .out(imm5));
  assign alu_b = ir[5] ? imm5 : sr2_out;   // SR2MUX

  lc3_alu u_alu (.a(sr1_out), .b(alu_b), .aluk(c.aluk), .y(alu_y));

  lc3_addr_unit u_addr (
    .pc, .sr1(sr1_out), .ir, .addr1mux(c.addr1mux), .addr2mux(c.addr2mux),
    .marmux(c.marmux), .addr_sum, .marmux_out
  );

  assign sp_inc = sr1_out + 16'd1;

  // the processor bus
  always_comb begin
    if      (c.gate_pc)     bus = pc;
    else if (c.gate_mdr)    bus = mdr;
    else if (c.gate_alu)    bus = alu_y;
    else if (c.gate_marmux) bus = marmux_out;
    else if (c.gate_sp)     bus = sp_inc;
    else                    bus = 16'h0000;
  end

  // condition codes from the value being written
  always_comb begin
    if (bus[15])           nzp = 3'b100;
    else if (bus == 16'd0) nzp = 3'b010;
    else                   nzp = 3'b001;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= RESET_PC;
      ir  <= 16'h0000;
      mar <= 16'h0000;
      mdr <= 16'h0000;
      psr <= 16'h0002;
      ben <= 1'b0;
    end else begin
      if (c.ld_mar) mar <= bus;
      if (c.ld_mdr) mdr <= c.mio_en ? rdata : bus;
      if (c.ld_ir)  ir  <= bus;
      if (c.ld_ben) ben <= (ir[11] & psr[2]) | (ir[10] & psr[1]) | (ir[9] & psr[0]);
      if (c.ld_psr)     psr <= bus;
      else if (c.ld_cc) psr[2:0] <= nzp;
      if (c.ld_pc) begin
        unique case (c.pcmux)
          PC_INC:  pc <= pc + 16'd1;
          PC_BUS:  pc <= bus;
          PC_ADDR: pc <= addr_sum;
          default: pc <= pc + 16'd1;
        endcase
      end
    end
  end

  assign mio_en = c.mio_en;
  assign r_w    = c.r_w;

  // at most one driver on the bus
  a_one_gate: assert property (@(posedge clk) disable iff (rst)
    $onehot0({c.gate_pc, c.gate_mdr, c.gate_alu, c.gate_marmux, c.gate_sp}));
endmodule
