// tb_bch15_7_decoder: every message with every error pattern of weight 0, 1
// and 2, back to back, must come out corrected with the right error vector
// exactly 3 cycles later; random weight-3 patterns must be detected and either
// flagged uncorrectable or decoded to a valid codeword. Also checks the
// 0x55E5 / 0x2004 / 0x75E1 example and the GF(2^4) log and antilog tables.
`timescale 1ns/1ps
module tb_bch15_7_decoder;
  import ecs_pkg::*;
  import ecs_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [14:0] rx_cw = 0, corrected_cw, error_vector;
  logic [6:0] msg;
  logic out_valid, err_detected, uncorrectable;
  int checks = 0, failures = 0;
  int cycle = 0;
  typedef struct { int t; logic [14:0] cw, err; logic [6:0] m; int nerr; } exp_t;
  exp_t q [$];
  int n3 = 0, n3_unc = 0;

  bch15_7_decoder dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    chk(cycle == e.t + 3, $sformatf("latency %0d", cycle - e.t));
    if (e.nerr <= 2) begin
      chk(corrected_cw == e.cw && msg == e.m && error_vector == e.err &&
          err_detected == (e.nerr != 0) && !uncorrectable,
          $sformatf("cw %h err %h -> %h ev %h", e.cw, e.err, corrected_cw, error_vector));
    end else begin
      n3++;
      if (uncorrectable) n3_unc++;
      chk(err_detected && (uncorrectable || ref_is_codeword(corrected_cw)), "3 errors");
    end
  end

  task automatic send(logic [14:0] cw, logic [14:0] err, int nerr);
    exp_t e;
    @(negedge clk);
    in_valid = 1; rx_cw = cw ^ err;
    e.t = cycle; e.cw = cw; e.err = err; e.m = cw[14:8]; e.nerr = nerr;
    q.push_back(e);
  endtask

  initial begin
    logic [14:0] cw;
    // GF(2^4) tables as printed for this field
    logic [3:0] antilog [15] = '{1,2,4,8,3,6,12,11,5,10,7,14,15,13,9};
    for (int i = 0; i < 15; i++) chk(gf_alpha_pow(i) == antilog[i], "antilog table");
    begin
      logic [3:0] logt [16] = '{15,0,1,4,2,8,5,10,3,14,9,7,6,13,11,12};
      for (int v = 0; v < 16; v++) chk(gf_log(4'(v)) == logt[v], "log table");
    end
    chk(gf_inv(4'h0) == 4'h0, "inverse of 0");
    for (int i = 1; i < 15; i++) chk(gf_mul(gf_alpha_pow(i), gf_inv(gf_alpha_pow(i))) == 1, "inverse");
    repeat (2) @(posedge clk);
    rst_n <= 1;
    send(15'h55E5, 15'h2004, 2);
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    #1;
    chk(corrected_cw == 15'h55E5 && error_vector == 15'h2004 && msg == 7'h55, "0x75E1 -> 0x55E5");
    for (int m = 0; m < 128; m++) begin
      cw = ref_bch_encode(7'(m));
      send(cw, '0, 0);
      for (int i = 0; i < 15; i++) begin
        send(cw, 15'(1) << i, 1);
        for (int j = i + 1; j < 15; j++) send(cw, (15'(1) << i) | (15'(1) << j), 2);
      end
      for (int r = 0; r < 20; r++) begin
        int a, b, c;
        a = $urandom_range(0, 14);
        do b = $urandom_range(0, 14); while (b == a);
        do c = $urandom_range(0, 14); while (c == a || c == b);
        send(cw, (15'(1) << a) | (15'(1) << b) | (15'(1) << c), 3);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    chk(q.size() == 0, "all words came out");
    chk(n3_unc > 0, "uncorrectable flag exercised");
    $display("weight-3 patterns: %0d, flagged uncorrectable: %0d", n3, n3_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
