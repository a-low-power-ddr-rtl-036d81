// tb_data_decoder: for all 65536 words, builds the packet with the reference
// field model and checks that the decoder returns the word.
`timescale 1ns/1ps
module tb_data_decoder;
  import ecs_pkg::*;
  import ecs_ref_pkg::*;
  ecs_packet_t packet;
  logic [15:0] dout;
  int checks = 0, failures = 0;

  data_decoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fields_t f;
    for (int w = 0; w < 65536; w++) begin
      f = ref_fields(16'(w));
      packet.gflag = f[0][0];
      for (int k = 0; k < 4; k++) begin
        packet.sf[k]  = f[1+k][0];
        packet.noi[k] = 2'(f[5+k]);
        packet.idx[k] = (f[9+k] < 0) ? 3'($urandom) : 3'(f[9+k]);
      end
      #1;
      checks++;
      if (dout != 16'(w)) begin
        failures++;
        if (failures < 10) $display("FAIL w=%h dout=%h", w, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
