// tb_rx_packet_fsm: feeds the field sequence of random words (absent Index
// fields left out) and checks each completed packet.
`timescale 1ns/1ps
module tb_rx_packet_fsm;
  import ecs_pkg::*;
  import ecs_ref_pkg::*;
  logic clk = 0, rst_n = 0, field_valid = 0;
  logic [2:0] field_value = 0;
  ecs_packet_t packet;
  logic pkt_valid;
  int checks = 0, failures = 0, npkt = 0;

  rx_packet_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ecs_packet_t got_pkt;
  bit          got_flag = 0;
  always @(posedge clk) if (rst_n && pkt_valid) begin
    npkt++; got_pkt = packet; got_flag = 1;
  end

  initial begin
    fields_t f;
    logic [15:0] w;
    bit ok;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 1000; t++) begin
      w = (t == 0) ? 16'h0000 : 16'($urandom);
      f = ref_fields(w);
      for (int i = 0; i < 13; i++) begin
        if (f[i] < 0) continue;
        @(negedge clk);
        field_valid = 1; field_value = 3'(f[i]);
        @(negedge clk);
        field_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      @(posedge clk); #1;
      ok = got_flag && int'(got_pkt.gflag) == f[0];
      for (int k = 0; k < 4; k++) begin
        ok &= int'(got_pkt.sf[k]) == f[1+k] && int'(got_pkt.noi[k]) == f[5+k];
        if (f[9+k] >= 0) ok &= int'(got_pkt.idx[k]) == f[9+k];
      end
      got_flag = 0;
      checks++;
      if (!ok) begin failures++; $display("FAIL word %h", w); end
    end
    checks++;
    if (npkt != 1000) begin failures++; $display("FAIL %0d packets", npkt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
