// tb_link_all_patterns: every one of the 128 messages, each with every error
// pattern of weight 0, 1 and 2 (121 patterns), goes through the whole link at
// its default parameters: 15488 frames. The receiver clock runs at the
// transmitter's frequency with a three-quarter-period phase offset. Every
// frame must come out with the original message, the original codeword and
// the injected pattern as error vector.
`timescale 1ns/1ps
module tb_link_all_patterns;
  import ecs_ref_pkg::*;
  logic clk_tx = 0, clk_rx = 0, rst_n = 0, data_valid = 0;
  logic [6:0] data_in = 0, data_out;
  logic [14:0] err_pattern = 0, corrected_codeword, error_vector;
  logic data_ready, tx, tx_busy, tx_in, data_out_valid, err_detected, uncorrectable;
  int checks = 0, failures = 0, n_sent = 0, n_out = 0;
  typedef struct { logic [14:0] cw, e; } exp_t;
  exp_t q [$];

  ddr_ecs_link dut (.*);

  assign tx_in = tx;
  always #5 clk_tx = ~clk_tx;
  initial begin #7.5; forever #5 clk_rx = ~clk_rx; end

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_rx) if (rst_n && data_out_valid) begin
    exp_t x;
    n_out++;
    checks++;
    if (q.size() == 0) failures++;
    else begin
      x = q.pop_front();
      if (corrected_codeword != x.cw || data_out != x.cw[14:8] || error_vector != x.e ||
          err_detected != (x.e != 0) || uncorrectable) begin
        failures++;
        if (failures < 10) $display("FAIL cw %h e %h -> %h ev %h", x.cw, x.e, corrected_codeword, error_vector);
      end
    end
  end

  task automatic send(logic [6:0] m, logic [14:0] e);
    exp_t x;
    @(negedge clk_tx);
    data_in = m; err_pattern = e; data_valid = 1;
    @(posedge clk_tx);
    while (!data_ready) @(posedge clk_tx);
    x.cw = ref_bch_encode(m); x.e = e;
    q.push_back(x);
    n_sent++;
    @(negedge clk_tx);
    data_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk_tx);
    rst_n <= 1;
    repeat (2) @(posedge clk_tx);
    for (int m = 0; m < 128; m++) begin
      send(7'(m), '0);
      for (int i = 0; i < 15; i++) begin
        send(7'(m), 15'(1) << i);
        for (int j = i + 1; j < 15; j++) send(7'(m), (15'(1) << i) | (15'(1) << j));
      end
    end
    @(negedge tx_busy);
    repeat (40) @(posedge clk_rx);
    checks++;
    if (n_out != n_sent || n_sent != 128 * 121) begin
      failures++; $display("FAIL %0d sent, %0d received", n_sent, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
