// tb_noi_index_encoder: every nibble of weight <= 2; the index must name
// exactly the positions of its ones, and distinct nibbles get distinct codes.
`timescale 1ns/1ps
module tb_noi_index_encoder;
  logic [3:0] nib;
  logic [2:0] index_ones, index_twos;
  int checks = 0, failures = 0;

  noi_index_encoder dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int code;
    nib = 4'b0000; #1;
    checks++;
    if (index_ones != 0 || index_twos != 0) failures++;
    for (int b = 0; b < 4; b++) begin
      nib = 4'b0001 << b; #1;
      checks++;
      if (int'(index_ones) != b || index_twos != 0) begin
        failures++; $display("FAIL nib=%b ones=%0d", nib, index_ones);
      end
    end
    code = 0;
    for (int a = 0; a < 4; a++)
      for (int b = a + 1; b < 4; b++) begin
        nib = (4'b0001 << a) | (4'b0001 << b); #1;
        checks++;
        if (int'(index_twos) != code || index_ones != 0) begin
          failures++; $display("FAIL nib=%b twos=%0d exp %0d", nib, index_twos, code);
        end
        code++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
