// tb_ecs_tx_fsm: drives the FSM with a table of pulse counts and a model of
// the toggle counter; checks the order of the fields it starts, the counts it
// passes on, the ALPHA_CYCLES gap after every field (sent or skipped), tx_busy
// and the frame length in cycles.
`timescale 1ns/1ps
module tb_ecs_tx_fsm;
  import ecs_pkg::*;
  localparam int ALPHA = 4;
  logic clk = 0, rst_n = 0, enable = 0, toggle_counter_busy;
  logic [2:0] pulse_count_to_send;
  logic [1:0] phase, segment;
  logic tc_start, tx_busy, frame_start, frame_done;
  logic [2:0] tc_count;
  tx_state_t state;
  logic [2:0] table_cnt [4][4];
  int checks = 0, failures = 0;
  int busy_left = 0;

  ecs_tx_fsm #(.ALPHA_CYCLES(ALPHA)) dut (.*);
  always #5 clk = ~clk;

  assign pulse_count_to_send = table_cnt[phase][segment];

  // toggle counter model: busy for ceil(count/2) cycles after start
  always_ff @(posedge clk) begin
    if (tc_start) busy_left <= (int'(tc_count) + 1) / 2;
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign toggle_counter_busy = (busy_left > 0);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_p [13], exp_s [13], nf, sent, cyc, exp_cyc, silent;
    bit skipped_seen = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    chk(state == S_IDLE && !tx_busy, "idle after reset");
    repeat (3) @(posedge clk); #1;
    chk(state == S_IDLE, "stays idle while enable = 0");
    for (int fr = 0; fr < 40; fr++) begin
      exp_cyc = 0; nf = 0;
      for (int p = 0; p < 4; p++)
        for (int k = 0; k < 4; k++) begin
          table_cnt[p][k] = (p == 3) ? 3'($urandom_range(0, 6)) : 3'($urandom_range(1, 3));
          if (p == 0 && k != 3) continue;
          exp_cyc += 1 + ALPHA;                               // LOAD + WAIT_ALPHA
          if (table_cnt[p][k] != 0) exp_cyc += (table_cnt[p][k] + 1) / 2 + 1;  // TRANSMIT
          if (table_cnt[p][k] == 0) skipped_seen = 1;
        end
      @(negedge clk); enable = 1;
      @(posedge clk); #1;
      enable = 0;
      cyc = 0; sent = 0; silent = 0;
      while (state != S_IDLE) begin
        chk(tx_busy, "tx_busy outside S_IDLE");
        if (tc_start) begin
          chk(silent >= ALPHA || sent == 0, $sformatf("gap before field %0d was %0d", sent, silent));
          chk(tc_count == table_cnt[phase][segment] && tc_count != 0, "count passed on");
          chk(!(phase == 0 && segment != 3), "phase 0 has one field");
          if (sent > 0) chk({phase, segment} > {2'(exp_p[sent-1]), 2'(exp_s[sent-1])}, "field order");
          exp_p[sent] = phase; exp_s[sent] = segment; sent++;
        end
        if (state == S_WAIT_ALPHA) silent++;
        else if (state == S_TRANSMIT) silent = 0;
        @(posedge clk); #1;
        cyc++;
      end
      begin
        automatic int exp_sent = 0;
        for (int p = 0; p < 4; p++) for (int k = 0; k < 4; k++)
          if (!(p == 0 && k != 3) && table_cnt[p][k] != 0) exp_sent++;
        chk(sent == exp_sent, $sformatf("fields sent %0d exp %0d", sent, exp_sent));
      end
      chk(cyc == exp_cyc, $sformatf("frame cycles %0d exp %0d", cyc, exp_cyc));
    end
    chk(skipped_seen, "an absent field was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
