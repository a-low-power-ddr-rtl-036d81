// tb_packet_former: random segment codes; checks the latched packet and the
// pulse count returned for every (phase, segment).
`timescale 1ns/1ps
module tb_packet_former;
  import ecs_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, global_flag = 0;
  seg_code_t [3:0] seg = '0;
  logic [1:0] phase = 0, segment = 0;
  ecs_packet_t packet;
  logic [2:0] pulse_count_to_send;
  int checks = 0, failures = 0;

  packet_former dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic gf_e;
    int exp_cnt;
    seg_code_t [3:0] s_e;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 300; t++) begin
      @(posedge clk);
      global_flag <= 1'($urandom);
      for (int k = 0; k < 4; k++) begin
        seg[k].dout       <= 4'($urandom);
        seg[k].flag       <= 1'($urandom);
        seg[k].noi        <= 2'($urandom_range(0, 2));
        seg[k].index_ones <= 3'($urandom_range(0, 3));
        seg[k].index_twos <= 3'($urandom_range(0, 5));
      end
      load <= 1;
      @(posedge clk);
      load <= 0;
      gf_e = global_flag; s_e = seg;
      // change the inputs: the latched packet must not follow them
      global_flag <= ~global_flag; seg <= ~seg;
      for (int p = 0; p < 4; p++)
        for (int k = 0; k < 4; k++) begin
          phase <= 2'(p); segment <= 2'(k);
          @(posedge clk); #1;
          case (p)
            0: exp_cnt = 1 + gf_e;
            1: exp_cnt = 1 + s_e[k].flag;
            2: exp_cnt = 1 + s_e[k].noi;
            default: exp_cnt = (s_e[k].noi == 0) ? 0 :
                               (s_e[k].noi == 1) ? 1 + s_e[k].index_ones : 1 + s_e[k].index_twos;
          endcase
          if (p == 0 && k != 0) continue;
          checks++;
          if (int'(pulse_count_to_send) != exp_cnt) begin
            failures++;
            $display("FAIL p=%0d k=%0d got %0d exp %0d", p, k, pulse_count_to_send, exp_cnt);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
