// tb_segment_processor: all 16 nibbles against a $countones model.
`timescale 1ns/1ps
module tb_segment_processor;
  logic [3:0] nib, dout;
  logic flag;
  logic [1:0] noi;
  int checks = 0, failures = 0;

  segment_processor dut (.*);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic inv;
      nib = 4'(v);
      #1;
      inv = ($countones(nib) > 2);
      checks++;
      if (flag != inv || dout != (inv ? ~nib : nib) || int'(noi) != $countones(dout) || noi > 2) begin
        failures++;
        $display("FAIL nib=%b dout=%b flag=%b noi=%0d", nib, dout, flag, noi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
