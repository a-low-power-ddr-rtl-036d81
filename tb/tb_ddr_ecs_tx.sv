// tb_ddr_ecs_tx: sends random messages (with random injected error patterns)
// and decodes the line independently: transitions closer than one clock
// period belong to one field, a field of N carries N+1 transitions. The
// field sequence must match the reference model of the padded codeword, the
// codeword must match the reference encoder, transitions must never come
// faster than one per half period, and each frame must keep tx_busy high for
// the expected number of cycles.
`timescale 1ns/1ps
module tb_ddr_ecs_tx;
  import ecs_ref_pkg::*;
  localparam int ALPHA = 4;
  logic clk = 0, rst_n = 0, data_valid = 0;
  logic [6:0] data_in = 0;
  logic data_ready, tx, tx_busy;
  logic [14:0] err_pattern = 0, codeword;
  int checks = 0, failures = 0;
  int burst = 0, fields [$];
  realtime last_edge = -1000;
  int busy_cycles = 0;

  ddr_ecs_tx #(.ALPHA_CYCLES(ALPHA)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(tx) if (rst_n) begin
    if ($realtime - last_edge < 4.5) begin
      failures++; $display("FAIL edges %0t apart", $realtime - last_edge);
    end
    if ($realtime - last_edge > 12.0 && burst > 0) begin
      fields.push_back(burst - 1); burst = 0;
    end
    burst++;
    last_edge = $realtime;
  end

  always @(posedge clk) if (tx_busy) busy_cycles++;

  initial begin
    fields_t f;
    logic [14:0] cw;
    int exp_cyc, nf;
    bit ok;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      logic [6:0] m;
      logic [14:0] e;
      m = (t == 0) ? 7'h55 : (t == 1) ? 7'h00 : 7'($urandom);
      e = (t == 0) ? 15'h2004 : ($urandom_range(0, 1) ? 15'($urandom) : 15'h0);
      while (!data_ready) @(negedge clk);
      @(negedge clk);
      data_in = m; err_pattern = e; data_valid = 1;
      @(negedge clk);
      data_valid = 0; data_in = 7'($urandom);
      busy_cycles = 0; fields.delete();
      #1;
      chk(!data_ready, "data_ready drops after acceptance");
      @(negedge tx_busy);
      repeat (4) @(posedge clk);
      if (burst > 0) begin fields.push_back(burst - 1); burst = 0; end
      cw = ref_bch_encode(m);
      chk(codeword == cw, $sformatf("codeword %h exp %h", codeword, cw));
      if (t == 0) chk(codeword == 15'h55E5, "0x55 -> 0x55E5");
      f = ref_fields({1'b0, cw ^ e});
      exp_cyc = 0; nf = 0; ok = 1;
      for (int i = 0; i < 13; i++) begin
        exp_cyc += 1 + ALPHA;
        if (f[i] >= 0) begin
          exp_cyc += (f[i] + 2) / 2 + 1;
          ok &= (nf < fields.size()) && (fields[nf] == f[i]);
          nf++;
        end
      end
      chk(ok && nf == fields.size(), $sformatf("field sequence of msg %h err %h (%0d fields seen, %0d expected)", m, e, fields.size(), nf));
      chk(busy_cycles == exp_cyc, $sformatf("frame %0d cycles exp %0d", busy_cycles, exp_cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
