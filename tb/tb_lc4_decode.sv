// tb_lc4_decode: the control signals for each of the 16 opcodes against the
// decode table (opcodes without an instruction must write nothing).
// The table follows the notes for ALU, LIM, LDR and LEA; the STR and BRR
// opcodes are this design's choice.
module tb_lc4_decode;
  int checks = 0, failures = 0;
  logic [3:0] opcode;
  logic br, rwe, mwe, drmux;
  logic [1:0] inmux;

  lc4_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ctl(logic ebr, logic erwe, logic emwe, logic [1:0] ein, logic edr, logic care);
    checks++;
    if (br !== ebr || rwe !== erwe || mwe !== emwe || (care && (inmux !== ein || drmux !== edr))) begin
      failures++;
      $display("FAIL op=%b br=%b rwe=%b mwe=%b inmux=%b drmux=%b", opcode, br, rwe, mwe, inmux, drmux);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      opcode = 4'(i); #1;
      case (i)
        0:  expect_ctl(0, 1, 0, 2'b10, 1'b1, 1);  // ALU
        1:  expect_ctl(0, 1, 0, 2'b11, 1'b0, 1);  // LIM
        2:  expect_ctl(0, 1, 0, 2'b01, 1'b0, 1);  // LDR
        3:  expect_ctl(0, 0, 1, 2'b00, 1'b0, 0);  // STR
        4:  expect_ctl(1, 0, 0, 2'b00, 1'b0, 0);  // BRR
        8:  expect_ctl(0, 1, 0, 2'b00, 1'b0, 1);  // LEA
        default: expect_ctl(0, 0, 0, 2'b00, 1'b0, 0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
