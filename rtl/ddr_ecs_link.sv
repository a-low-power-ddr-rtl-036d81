// ddr_ecs_link: a DDR edge-coded signaling link with BCH(15,7) error
// correction, transmitter and receiver side by side.
//
// The transmitter BCH-encodes 7-bit messages and sends each codeword as a
// frame of 13 numeric fields coded as bursts of line transitions on both
// clock edges; the receiver counts the transitions with its own clock,
// rebuilds the codeword and corrects up to two bit errors. The channel
// between them is outside this module: tx is the transmitter's line and
// tx_in the receiver's, to be connected by the environment. err_pattern is
// XORed onto each transmitted codeword for testing and is 0 in normal use.
// clk_rx must have clk_tx's frequency; its phase is free as long as line
// transitions do not coincide with its edges.
module ddr_ecs_link
  import ecs_pkg::*;
#(
  parameter int unsigned ALPHA_CYCLES = 4,
  parameter int unsigned GAP_CYCLES   = 2
) (
  input  logic             clk_tx,
  input  logic             clk_rx,
  input  logic             rst_n,
  input  logic [MSG_W-1:0] data_in,
  input  logic             data_valid,
  output logic             data_ready,
  input  logic [CW_W-1:0]  err_pattern,
  output logic             tx,
  output logic             tx_busy,
  input  logic             tx_in,
  output logic [MSG_W-1:0] data_out,
  output logic             data_out_valid,
  output logic [CW_W-1:0]  corrected_codeword,
  output logic [CW_W-1:0]  error_vector,
  output logic             err_detected,
  output logic             uncorrectable
);

  logic [CW_W-1:0] tx_codeword, rx_codeword;

  ddr_ecs_tx #(.ALPHA_CYCLES(ALPHA_CYCLES)) u_tx (
    .clk         (clk_tx),
    .rst_n       (rst_n),
    .data_in     (data_in),
    .data_valid  (data_valid),
    .data_ready  (data_ready),
    .err_pattern (err_pattern),
    .tx          (tx),
    .tx_busy     (tx_busy),
    .codeword    (tx_codeword)
  );

  ddr_ecs_rx #(.GAP_CYCLES(GAP_CYCLES)) u_rx (
    .clk                (clk_rx),
    .rst_n              (rst_n),
    .tx_in              (tx_in),
    .data_out           (data_out),
    .data_out_valid     (data_out_valid),
    .rx_codeword        (rx_codeword),
    .corrected_codeword (corrected_codeword),
    .error_vector       (error_vector),
    .err_detected       (err_detected),
    .uncorrectable      (uncorrectable)
  );

endmodule
