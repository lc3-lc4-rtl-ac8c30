// tb_regfile: random writes and reads against a reference array.  Checks
// that a write is visible on both read ports after the clock edge, that
// we = 0 leaves the registers alone, and that reset clears all eight.
// Eight 16-bit registers follow the notes; reset clearing is this design's
// choice.
module tb_regfile;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, we = 0;
  logic [2:0] sr1 = 0, sr2 = 0, dr = 0;
  logic [15:0] in_data = 0, out1, out2;
  logic [15:0] model [8];

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 16'h0000;
    for (int i = 0; i < 8; i++) begin
      sr1 = 3'(i); sr2 = 3'(7 - i); #1;
      checks++;
      if (out1 !== 16'h0 || out2 !== 16'h0) begin failures++; $display("FAIL reset R%0d", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom);
      dr = 3'($urandom);
      in_data = 16'($urandom);
      @(posedge clk);
      if (we) model[dr] = in_data;
      #1;
      sr1 = 3'($urandom); sr2 = 3'($urandom); #1;
      checks++;
      if (out1 !== model[sr1] || out2 !== model[sr2]) begin
        failures++;
        $display("FAIL read R%0d=%h R%0d=%h exp %h %h", sr1, out1, sr2, out2, model[sr1], model[sr2]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
