// lc3_mio: LC3 memory-IO bus.  The processor presents MAR (address), MDR
// (write data), MIO_EN and R_W.  The address decoder sends an access either
// to the memory or to one of four device registers mapped at the top of the
// address space: KBSR (xFE00), KBDR (xFE02), DSR (xFE04) and DDR (xFE06).
// The read-data multiplexer stands in for the tri-state drivers of a shared
// data bus, and the ready signal R comes from the memory or, for a device
// register, in the first cycle of the access.
// Keyboard: a kbd_strobe latches kbd_char into KBDR and sets KBSR[15];
// reading KBDR clears KBSR[15].  Display: DSR[15] mirrors disp_ready; a
// write to DDR emits disp_char with a one-cycle disp_valid.
// The device addresses and status-bit positions are those of the standard
// LC-3 and are this design's choice.  The display takes only the character
// in MDR[7:0], so MDR[15:8] is reported unused by lint.
module lc3_mio
  import lc3_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        mio_en,
  input  logic        r_w,
  input  logic [15:0] mar,
  input  logic [15:0] mdr,
  output logic [15:0] rdata,
  output logic        r,
  // memory side
  output logic        mem_en,
  output logic        mem_we,
  input  logic [15:0] mem_rdata,
  input  logic        mem_ready,
  // keyboard
  input  logic        kbd_strobe,
  input  logic [7:0]  kbd_char,
  // display
  input  logic        disp_ready,
  output logic        disp_valid,
  output logic [7:0]  disp_char
);
  logic       kb_ready;
  logic [7:0] kb_data;
  logic       sel_kbsr, sel_kbdr, sel_dsr, sel_ddr, sel_dev;

  always_comb begin
    sel_kbsr = (mar == ADDR_KBSR);
    sel_kbdr = (mar == ADDR_KBDR);
    sel_dsr  = (mar == ADDR_DSR);
    sel_ddr  = (mar == ADDR_DDR);
    sel_dev  = sel_kbsr | sel_kbdr | sel_dsr | sel_ddr;
    mem_en   = mio_en & ~sel_dev;
    mem_we   = r_w;
    r        = sel_dev ? mio_en : mem_ready;
    if      (sel_kbsr) rdata = {kb_ready, 15'h0000};
    else if (sel_kbdr) rdata = {8'h00, kb_data};
    else if (sel_dsr)  rdata = {disp_ready, 15'h0000};
    else if (sel_ddr)  rdata = 16'h0000;
    else               rdata = mem_rdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      kb_ready   <= 1'b0;
      kb_data    <= 8'h00;
      disp_valid <= 1'b0;
      disp_char  <= 8'h00;
    end else begin
      disp_valid <= 1'b0;
      if (kbd_strobe) begin
        kb_ready <= 1'b1;
        kb_data  <= kbd_char;
      end else if (mio_en && !r_w && sel_kbdr) begin
        kb_ready <= 1'b0;
      end
      if (mio_en && r_w && sel_ddr) begin
        disp_valid <= 1'b1;
        disp_char  <= mdr[7:0];
      end
    end
  end
endmodule
