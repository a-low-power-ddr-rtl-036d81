// tb_ddr_ecs_link: end-to-end test of the link at its default parameters.
// The line is looped from tx to tx_in through a channel that delays each
// transition by a random 0..2 ns of jitter; the receiver clock has the
// transmitter's frequency and a quarter-period phase offset. Messages are
// offered back to back with 0, 1, 2 or 3 injected bit errors; every message
// with up to two errors must be delivered corrected, with the right error
// vector, and every 3-error word must be detected. The testbench counts how
// often each mechanism of the design was exercised (global inversion,
// segment inversion, each number of ones, skipped Index fields, the
// transmitter holding off a waiting message, each error class) and fails if
// one never happened. It also reports the average frame length.
`timescale 1ns/1ps
module tb_ddr_ecs_link;
  import ecs_ref_pkg::*;
  logic clk_tx = 0, clk_rx = 0, rst_n = 0, data_valid = 0;
  logic [6:0] data_in = 0, data_out;
  logic [14:0] err_pattern = 0, corrected_codeword, error_vector;
  logic data_ready, tx, tx_busy, tx_in, data_out_valid, err_detected, uncorrectable;
  int checks = 0, failures = 0;
  localparam int NFRAMES = 400;

  typedef struct { logic [14:0] cw, e; int nerr; } exp_t;
  exp_t q [$];

  ddr_ecs_link dut (.*);

  // channel: each transition is delayed by a random 0..2 ns (jitter)
  logic line = 0;
  int   n_jitter = 0;
  assign tx_in = line;
  always @(tx) begin
    automatic logic    v = tx;
    automatic realtime d = real'($urandom_range(0, 20)) / 10.0;
    if (d > 0.0) n_jitter++;
    fork begin #(d); line = v; end join_none
  end
  always #5 clk_tx = ~clk_tx;
  initial begin #2.5; forever #5 clk_rx = ~clk_rx; end

  // mechanism counters
  int n_gf = 0, n_sf = 0, n_noi [3] = '{0, 0, 0}, n_skip = 0, n_hold = 0;
  int n_err [4] = '{0, 0, 0, 0}, n_unc = 0, n_out = 0;
  longint busy_cycles = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  always @(posedge clk_tx) begin
    if (tx_busy) busy_cycles++;
    if (rst_n && data_valid && !data_ready) n_hold++;
  end

  always @(posedge clk_rx) if (rst_n && data_out_valid) begin
    exp_t x;
    n_out++;
    if (q.size() == 0) begin chk(0, "unexpected output"); end
    else begin
      x = q.pop_front();
      if (x.nerr <= 2)
        chk(corrected_codeword == x.cw && data_out == x.cw[14:8] && error_vector == x.e &&
            err_detected == (x.nerr != 0) && !uncorrectable,
            $sformatf("cw %h e %h -> %h ev %h msg %h", x.cw, x.e, corrected_codeword, error_vector, data_out));
      else begin
        chk(err_detected, "3-error word detected");
        if (uncorrectable) n_unc++;
      end
    end
  end

  initial begin
    logic [6:0] m;
    logic [14:0] e;
    int nerr, pos [3];
    fields_t f;
    exp_t x;
    repeat (3) @(posedge clk_tx);
    rst_n <= 1;
    repeat (2) @(posedge clk_tx);
    for (int t = 0; t < NFRAMES; t++) begin
      m    = (t == 0) ? 7'h55 : 7'($urandom);
      nerr = (t == 0) ? 2 : t % 4;
      pos[0] = $urandom_range(0, 14);
      do pos[1] = $urandom_range(0, 14); while (pos[1] == pos[0]);
      do pos[2] = $urandom_range(0, 14); while (pos[2] == pos[0] || pos[2] == pos[1]);
      e = '0;
      for (int i = 0; i < nerr; i++) e[pos[i]] = 1'b1;
      if (t == 0) e = 15'h2004;
      // mechanisms this frame will exercise, from the reference model
      f = ref_fields({1'b0, ref_bch_encode(m) ^ e});
      if (f[0] == 1) n_gf++;
      for (int k = 0; k < 4; k++) begin
        if (f[1+k] == 1) n_sf++;
        n_noi[f[5+k]]++;
        if (f[9+k] < 0) n_skip++;
      end
      n_err[nerr]++;
      // offer the message and hold it until accepted
      @(negedge clk_tx);
      data_in = m; err_pattern = e; data_valid = 1;
      @(posedge clk_tx);
      while (!data_ready) @(posedge clk_tx);
      x.cw = ref_bch_encode(m); x.e = e; x.nerr = nerr;
      q.push_back(x);
      @(negedge clk_tx);
      data_valid = 0;
      // the next message is offered right away (while this one is sent);
      // err_pattern is taken with the codeword one cycle after acceptance
    end
    @(negedge tx_busy);
    repeat (40) @(posedge clk_rx);
    chk(n_out == NFRAMES, $sformatf("%0d of %0d frames received", n_out, NFRAMES));
    chk(q.size() == 0, "nothing left in flight");
    $display("mechanisms: global_inversion=%0d segment_inversion=%0d noi0=%0d noi1=%0d noi2=%0d skipped_index=%0d",
             n_gf, n_sf, n_noi[0], n_noi[1], n_noi[2], n_skip);
    $display("mechanisms: tx_hold_cycles=%0d errors0=%0d errors1=%0d errors2=%0d errors3=%0d flagged_uncorrectable=%0d",
             n_hold, n_err[0], n_err[1], n_err[2], n_err[3], n_unc);
    $display("mechanisms: jittered_transitions=%0d", n_jitter);
    chk(n_jitter > 0, "channel jitter exercised");
    $display("average frame length: %0d.%02d cycles (%0d frames)", busy_cycles / NFRAMES, (busy_cycles * 100 / NFRAMES) % 100, NFRAMES);
    chk(n_gf > 0, "global inversion exercised");
    chk(n_sf > 0, "segment inversion exercised");
    chk(n_noi[0] > 0 && n_noi[1] > 0 && n_noi[2] > 0, "every number of ones exercised");
    chk(n_skip > 0, "skipped Index field exercised");
    chk(n_hold > 0, "transmitter hold-off exercised");
    chk(n_err[1] > 0 && n_err[2] > 0 && n_err[3] > 0, "every error class exercised");
    chk(n_unc > 0, "uncorrectable flag exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
