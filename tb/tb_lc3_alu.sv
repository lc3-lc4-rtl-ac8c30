// tb_lc3_alu: the four ALUK functions on random operands, plus the NOT
// example of the operate-instruction notes (R5 = 1100101011110000 gives
// 0011010100001111).
module tb_lc3_alu;
  import lc3_pkg::*;
  int checks = 0, failures = 0;
  logic [15:0] a, b, y, e;
  aluk_e aluk;

  lc3_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'b1100101011110000; b = 16'h0; aluk = ALU_NOT; #1;
    checks++; if (y !== 16'b0011010100001111) failures++;
    for (int n = 0; n < 4000; n++) begin
      a = 16'($urandom); b = 16'($urandom); aluk = aluk_e'(2'($urandom)); #1;
      case (aluk)
        ALU_ADD: e = 16'((32'(a) + 32'(b)) % 65536);
        ALU_AND: e = a & b;
        ALU_NOT: e = a ^ 16'hFFFF;
        default: e = a;
      endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL aluk=%0d a=%h b=%h y=%h exp %h", aluk, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
