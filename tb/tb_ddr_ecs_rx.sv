// tb_ddr_ecs_rx: a behavioural transmitter in the testbench drives the line
// with the field bursts of codewords carrying 0, 1 or 2 errors (one
// transition per half period, a quarter period away from the receiver's
// clock edges, random silent gaps between fields); the receiver must deliver
// the corrected codeword, message and error vector once per frame, at a
// fixed latency after the frame's last transition.
`timescale 1ns/1ps
module tb_ddr_ecs_rx;
  import ecs_ref_pkg::*;
  logic clk = 0, rst_n = 0, tx_in = 0;
  logic [6:0] data_out;
  logic data_out_valid, err_detected, uncorrectable;
  logic [14:0] rx_codeword, corrected_codeword, error_vector;
  int checks = 0, failures = 0, nout = 0;
  logic [14:0] got_cw, got_ev; logic [6:0] got_m; logic got_det, got_unc;

  ddr_ecs_rx dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    checks++;
    if (lat_bad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime last_edge = 0;
  int      lat_bad = 0;
  // data_out_valid must rise at the (GAP_CYCLES + 5)th rising edge after the
  // first rising edge that follows the frame's last transition; this block
  // sees it one edge later
  always @(posedge clk) if (rst_n && data_out_valid) begin
    realtime first_edge;
    first_edge = 10.0 * $floor((last_edge - 5.0) / 10.0) + 15.0;  // rising edges at 5 + 10k ns
    if ($realtime - first_edge > 10.0 * (2 + 6) + 1.0 || $realtime - first_edge < 10.0 * (2 + 6) - 1.0) begin
      lat_bad++;
      if (lat_bad < 5) $display("FAIL output at %0.1f ns, last transition at %0.1f ns", $realtime, last_edge);
    end
    nout++; got_cw = corrected_codeword; got_ev = error_vector; got_m = data_out;
    got_det = err_detected; got_unc = uncorrectable;
  end

  task automatic send_field(int v);
    for (int i = 0; i <= v; i++) begin
      #5 tx_in = ~tx_in;
      last_edge = $realtime;
    end
    repeat ($urandom_range(3, 8)) #10;
  endtask

  initial begin
    fields_t f;
    logic [14:0] cw, e;
    int nerr, a, b;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #2.5;
    for (int t = 0; t < 400; t++) begin
      cw = ref_bch_encode((t == 0) ? 7'h55 : 7'($urandom));
      nerr = (t == 0) ? 2 : t % 3;
      a = $urandom_range(0, 14);
      do b = $urandom_range(0, 14); while (b == a);
      e = (t == 0) ? 15'h2004 : (nerr == 0) ? 15'h0 : (nerr == 1) ? (15'(1) << a) : ((15'(1) << a) | (15'(1) << b));
      f = ref_fields({1'b0, cw ^ e});
      for (int i = 0; i < 13; i++) if (f[i] >= 0) send_field(f[i]);
      repeat (8) #10;
      checks++;
      if (nout != t + 1 || got_cw != cw || got_ev != e || got_m != cw[14:8] || got_det != (e != 0) || got_unc) begin
        failures++;
        if (failures < 10) $display("FAIL frame %0d cw %h e %h got %h ev %h (%0d outputs)", t, cw, e, got_cw, got_ev, nout);
      end
    end
    checks++;
    if (lat_bad != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
