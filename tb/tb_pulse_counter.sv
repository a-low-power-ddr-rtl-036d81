// tb_pulse_counter: sends bursts of N+1 edges (two per cycle, one in the
// first or last cycle when odd) separated by idle gaps of at least
// GAP_CYCLES; checks the values in order and that each is reported
// GAP_CYCLES + 1 cycles after its last edge.
`timescale 1ns/1ps
module tb_pulse_counter;
  localparam int GAP = 2;
  logic clk = 0, rst_n = 0;
  logic [1:0] edges = 0;
  logic field_valid;
  logic [2:0] field_value;
  int checks = 0, failures = 0;
  int sent [$], sent_end [$];
  int cycle = 0, got = 0;

  pulse_counter #(.GAP_CYCLES(GAP)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && field_valid) begin
    int v, e;
    checks++;
    v = sent.pop_front(); e = sent_end.pop_front();
    got++;
    if (int'(field_value) != v || cycle != e + GAP + 1) begin
      failures++;
      $display("FAIL value %0d exp %0d at cycle %0d exp %0d", field_value, v, cycle, e + GAP + 1);
    end
  end

  initial begin
    int v, e, first;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 500; f++) begin
      v = $urandom_range(0, 5);
      e = v + 1;
      first = ((e % 2) == 1 && $urandom_range(0, 1)) ? 1 : 2;
      @(negedge clk);
      while (e > 0) begin
        edges = 2'((e >= first) ? first : e);
        e -= int'(edges);
        first = 2;
        if (e == 0) begin sent.push_back(v); sent_end.push_back(cycle); end
        @(negedge clk);
      end
      edges = 0;
      repeat ($urandom_range(GAP, GAP + 4)) @(negedge clk);
    end
    repeat (10) @(posedge clk);
    checks++;
    if (got != 500) begin failures++; $display("FAIL got %0d fields", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
