// tb_toggle_counter: for every count 1..7, counts the line transitions and
// checks that they come one per half clock period and that busy lasts
// ceil(count/2) cycles.
`timescale 1ns/1ps
module tb_toggle_counter;
  logic clk = 0, rst_n = 0, start = 0, busy, tx;
  logic [2:0] count = 0;
  int checks = 0, failures = 0;
  int n_edges = 0;
  realtime last_edge = 0, min_gap = 1e9;

  toggle_counter dut (.*);
  always #5 clk = ~clk;

  always @(tx) if (rst_n) begin
    n_edges++;
    if (n_edges > 1 && ($realtime - last_edge) < min_gap) min_gap = $realtime - last_edge;
    last_edge = $realtime;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int busy_cycles;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int rep = 0; rep < 3; rep++)
      for (int c = 1; c <= 7; c++) begin
        n_edges = 0; min_gap = 1e9;
        @(posedge clk);
        start <= 1; count <= 3'(c);
        @(posedge clk);
        start <= 0; count <= 3'($urandom);
        busy_cycles = 0;
        #1;
        while (busy) begin
          @(posedge clk); #1;
          busy_cycles++;
        end
        repeat (3) @(posedge clk);
        chk(n_edges == c, $sformatf("count %0d gave %0d edges", c, n_edges));
        chk(busy_cycles == (c + 1) / 2, $sformatf("count %0d busy %0d cycles", c, busy_cycles));
        if (c > 1) chk(min_gap > 4.0 && min_gap < 6.0, $sformatf("edge spacing %0t", min_gap));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
