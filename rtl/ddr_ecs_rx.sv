// ddr_ecs_rx: DDR-ECS receiver with BCH(15,7) decoding.
//
// The line is watched on both edges of the local clock (data detection unit),
// edge bursts are counted into field values (pulse counter), the fields are
// collected into a packet (packet controller), the 16-bit word is rebuilt by
// undoing index coding and inversion (data decoder), the '0' padding bit 15 is
// dropped, and the BCH decoder corrects up to two errors in the 15-bit
// codeword. The chain follows the design's block diagram.
//
// Timing: data_out_valid pulses once per frame. It rises at the
// (GAP_CYCLES + 5)th rising clock edge after the first rising edge that
// follows the frame's last line transition: one cycle in the edge detector,
// GAP_CYCLES + 1 in the pulse counter, one in the packet controller and three
// in the BCH decoder. rx_codeword holds the codeword as received, before
// correction.
module ddr_ecs_rx
  import ecs_pkg::*;
#(
  parameter int unsigned GAP_CYCLES = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tx_in,
  output logic [MSG_W-1:0] data_out,
  output logic             data_out_valid,
  output logic [CW_W-1:0]  rx_codeword,
  output logic [CW_W-1:0]  corrected_codeword,
  output logic [CW_W-1:0]  error_vector,
  output logic             err_detected,
  output logic             uncorrectable
);

  logic [1:0]        edges;
  logic              field_valid, pkt_valid;
  logic [2:0]        field_value;
  ecs_packet_t       packet;
  logic [WORD_W-1:0] word;

  ecs_edge_detector u_det (
    .clk     (clk),
    .rst_n   (rst_n),
    .line_in (tx_in),
    .edges   (edges)
  );

  pulse_counter #(.GAP_CYCLES(GAP_CYCLES)) u_pc (
    .clk         (clk),
    .rst_n       (rst_n),
    .edges       (edges),
    .field_valid (field_valid),
    .field_value (field_value)
  );

  rx_packet_fsm u_pkt (
    .clk         (clk),
    .rst_n       (rst_n),
    .field_valid (field_valid),
    .field_value (field_value),
    .packet      (packet),
    .pkt_valid   (pkt_valid)
  );

  data_decoder u_dd (
    .packet (packet),
    .dout   (word)
  );

  // remove '0' bit padding
  assign rx_codeword = word[CW_W-1:0];

  bch15_7_decoder u_bch (
    .clk           (clk),
    .rst_n         (rst_n),
    .in_valid      (pkt_valid),
    .rx_cw         (rx_codeword),
    .out_valid     (data_out_valid),
    .corrected_cw  (corrected_codeword),
    .msg           (data_out),
    .error_vector  (error_vector),
    .err_detected  (err_detected),
    .uncorrectable (uncorrectable)
  );

endmodule
