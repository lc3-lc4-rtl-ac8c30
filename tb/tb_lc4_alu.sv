// tb_lc4_alu: all eight LC4 ALU functions on random operands against an
// integer reference.
// The list of functions follows the notes; their codes are this design's.
module tb_lc4_alu;
  int checks = 0, failures = 0;
  logic [15:0] a, b, y, e;
  logic [2:0] func;

  lc4_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8000; n++) begin
      a = 16'($urandom); b = 16'($urandom); func = 3'(n % 8); #1;
      case (func)
        3'd0: e = 16'(int'(a) + int'(b));
        3'd1: e = 16'(int'(a) - int'(b));
        3'd2: e = a & b;
        3'd3: e = a | b;
        3'd4: e = a ^ 16'hFFFF;
        3'd5: e = (a | b) ^ 16'hFFFF;
        3'd6: e = 16'(int'(a) + 1);
        default: e = 16'(int'(a) - 1);
      endcase
      checks++;
      if (y !== e) begin failures++; $display("FAIL func=%0d a=%h b=%h y=%h exp %h", func, a, b, y, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
