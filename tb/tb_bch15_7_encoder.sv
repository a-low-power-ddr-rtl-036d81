// tb_bch15_7_encoder: checks all 128 messages against a long-division
// reference, the 0x55 -> 0x55E5 vector and the one-cycle latency.
`timescale 1ns/1ps
module tb_bch15_7_encoder;
  import ecs_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [6:0] msg = '0;
  logic [14:0] codeword;
  int checks = 0, failures = 0;

  bch15_7_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int m = 0; m < 128; m++) begin
      @(posedge clk);
      msg <= 7'(m); in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      chk(out_valid, "out_valid one cycle after in_valid");
      chk(codeword == ref_bch_encode(7'(m)), $sformatf("msg %h cw %h exp %h", m, codeword, ref_bch_encode(7'(m))));
      chk(ref_is_codeword(codeword), "divisible by g(x)");
      if (m == 7'h55) chk(codeword == 15'h55E5, "0x55 -> 0x55E5");
      @(posedge clk); #1;
      chk(!out_valid, "out_valid single pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
