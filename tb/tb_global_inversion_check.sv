// tb_global_inversion_check: all 65536 words against a $countones model.
`timescale 1ns/1ps
module tb_global_inversion_check;
  logic [15:0] din, dout;
  logic global_flag;
  int checks = 0, failures = 0;

  global_inversion_check dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 65536; w++) begin
      din = 16'(w);
      #1;
      checks++;
      if (global_flag != ($countones(din) > 8) ||
          dout != (($countones(din) > 8) ? ~din : din) ||
          $countones(dout) > 8) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h dout=%h gf=%b", din, dout, global_flag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
