// tb_sext: exhaustive check of the sign extender for 5-bit and 9-bit fields.
// The expected value is computed as a signed integer and truncated to 16 bits.
// The field widths are the ones the notes use.
module tb_sext;
  int checks = 0, failures = 0;
  logic [4:0]  in5;
  logic [8:0]  in9;
  logic [15:0] out5, out9;

  sext #(.IN_W(5), .OUT_W(16)) dut5 (.in(in5), .out(out5));
  sext #(.IN_W(9), .OUT_W(16)) dut9 (.in(in9), .out(out9));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < 32; i++) begin
      in5 = 5'(i); #1;
      v = (i >= 16) ? i - 32 : i;
      checks++;
      if (out5 !== 16'(v)) begin failures++; $display("FAIL sext5 %0d -> %h", i, out5); end
    end
    for (int i = 0; i < 512; i++) begin
      in9 = 9'(i); #1;
      v = (i >= 256) ? i - 512 : i;
      checks++;
      if (out9 !== 16'(v)) begin failures++; $display("FAIL sext9 %0d -> %h", i, out9); end
    end
    // the LIM example: h136 extends with ones, h036 with zeros
    in9 = 9'h136; #1; checks++; if (out9 !== 16'hFF36) failures++;
    in9 = 9'h036; #1; checks++; if (out9 !== 16'h0036) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
