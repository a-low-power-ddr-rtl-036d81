// tb_ecs_edge_detector: toggles the line at random, a quarter period after
// each receiver clock edge, and checks the per-cycle edge count.
`timescale 1ns/1ps
module tb_ecs_edge_detector;
  logic clk = 0, rst_n = 0, line_in = 0;
  logic [1:0] edges;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  ecs_edge_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < 2000; c++) begin
      // rising edge at time t; toggles at t+2.5 and t+7.5
      #2.5; a = $urandom_range(0, 1); if (a) line_in = ~line_in;
      #5;   b = $urandom_range(0, 1); if (b) line_in = ~line_in;
      @(posedge clk); #1;
      checks++;
      seen[a+b]++;
      if (int'(edges) != a + b) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d edges=%0d exp %0d", c, edges, a + b);
      end
      @(negedge clk); @(posedge clk);   // realign: next window starts here
      #1;
      checks++;
      if (edges != 0) begin failures++; $display("FAIL idle cycle edges=%0d", edges); end
      // wait so the next loop iteration starts right at a rising edge
      @(negedge clk); @(posedge clk);
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
