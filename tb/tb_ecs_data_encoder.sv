// tb_ecs_data_encoder: all 65536 words against the reference field model.
`timescale 1ns/1ps
module tb_ecs_data_encoder;
  import ecs_pkg::*;
  import ecs_ref_pkg::*;
  logic [15:0] din;
  logic global_flag;
  seg_code_t [3:0] seg;
  int checks = 0, failures = 0;

  ecs_data_encoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fields_t f;
    bit ok;
    for (int w = 0; w < 65536; w++) begin
      din = 16'(w);
      #1;
      f  = ref_fields(din);
      ok = (int'(global_flag) == f[0]);
      for (int k = 0; k < 4; k++) begin
        ok &= int'(seg[k].flag) == f[1+k];
        ok &= int'(seg[k].noi) == f[5+k];
        if (f[5+k] == 1) ok &= int'(seg[k].index_ones) == f[9+k];
        if (f[5+k] == 2) ok &= int'(seg[k].index_twos) == f[9+k];
      end
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL din=%h", din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
