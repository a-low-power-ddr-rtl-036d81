// bch15_7_encoder: systematic BCH(15,7) encoder.
//
// Computes c(x) = x^8 m(x) + r(x) with r(x) = x^8 m(x) mod g(x),
// g(x) = x^8 + x^7 + x^6 + x^4 + 1, as in the design description. The
// division is the usual 8-bit LFSR of g(x), stepped once per message bit
// (most significant first); here the seven steps are unrolled so that one
// message is encoded per clock. The message occupies codeword bits 14:8 and
// the parity bits 7:0 (so 0x55 encodes to 0x55E5).
//
// Timing: codeword and out_valid are registered, one cycle after in_valid.
// The single-cycle unrolled LFSR and the reset behaviour are this design's
// choices.
module bch15_7_encoder
  import ecs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [MSG_W-1:0] msg,
  output logic            out_valid,
  output logic [CW_W-1:0] codeword
);

  logic [7:0] parity;

  // LFSR division by g(x): feedback = incoming bit XOR register MSB
  always_comb begin
    logic fb;
    parity = '0;
    for (int i = MSG_W - 1; i >= 0; i--) begin
      fb     = msg[i] ^ parity[7];
      parity = {parity[6:0], 1'b0};
      if (fb) parity = parity ^ BCH_G[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      codeword  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) codeword <= {msg, parity};
    end
  end

endmodule
