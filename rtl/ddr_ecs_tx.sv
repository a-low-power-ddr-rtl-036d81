// ddr_ecs_tx: DDR-ECS transmitter with BCH(15,7) encoding.
//
// A 7-bit message is BCH encoded, a '0' is prepended to the 15-bit codeword
// (bit 15), and the 16-bit word goes through the global and segment inversion
// checks and index coding. The resulting fields are latched in the packet
// former and sent one by one by the FSM and the toggle counter as bursts of
// N+1 line transitions, separated by ALPHA_CYCLES of silence. The chain
// follows the design's block diagram.
//
// err_pattern is XORed onto the codeword before padding; it exists to inject
// test errors and is tied to 0 in normal use.
//
// Handshake (this implementation's choice): a message is taken when
// data_valid and data_ready are both high. data_ready is low while a message
// is in the encoder, waiting for the FSM or being sent. The first line
// transition of a frame comes at the fourth rising edge after the one that
// accepts the message.
module ddr_ecs_tx
  import ecs_pkg::*;
#(
  parameter int unsigned ALPHA_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MSG_W-1:0] data_in,
  input  logic             data_valid,
  output logic             data_ready,
  input  logic [CW_W-1:0]  err_pattern,
  output logic             tx,
  output logic             tx_busy,
  output logic [CW_W-1:0]  codeword
);

  logic                 cw_valid, pending, frame_start, tc_start, tc_busy, frame_done;
  logic [WORD_W-1:0]    padded;
  logic                 gflag;
  seg_code_t [NSEG-1:0] seg;
  logic [1:0]           phase, segment;
  logic [2:0]           pcount, tc_count;
  ecs_packet_t          packet;
  tx_state_t            state;

  assign data_ready = !tx_busy && !cw_valid && !pending;

  bch15_7_encoder u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (data_valid && data_ready),
    .msg       (data_in),
    .out_valid (cw_valid),
    .codeword  (codeword)
  );

  // '0' bit padding
  assign padded = {1'b0, codeword ^ err_pattern};

  ecs_data_encoder u_denc (
    .din         (padded),
    .global_flag (gflag),
    .seg         (seg)
  );

  packet_former u_pf (
    .clk                 (clk),
    .rst_n               (rst_n),
    .load                (cw_valid),
    .global_flag         (gflag),
    .seg                 (seg),
    .phase               (phase),
    .segment             (segment),
    .packet              (packet),
    .pulse_count_to_send (pcount)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           pending <= 1'b0;
    else if (cw_valid)    pending <= 1'b1;
    else if (frame_start) pending <= 1'b0;
  end

  ecs_tx_fsm #(.ALPHA_CYCLES(ALPHA_CYCLES)) u_fsm (
    .clk                 (clk),
    .rst_n               (rst_n),
    .enable              (pending),
    .pulse_count_to_send (pcount),
    .toggle_counter_busy (tc_busy),
    .phase               (phase),
    .segment             (segment),
    .tc_start            (tc_start),
    .tc_count            (tc_count),
    .tx_busy             (tx_busy),
    .frame_start         (frame_start),
    .frame_done          (frame_done),
    .state               (state)
  );

  toggle_counter u_tc (
    .clk   (clk),
    .rst_n (rst_n),
    .start (tc_start),
    .count (tc_count),
    .busy  (tc_busy),
    .tx    (tx)
  );

endmodule
