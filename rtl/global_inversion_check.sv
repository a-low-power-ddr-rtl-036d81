// global_inversion_check: first level of the two-level inversion scheme.
//
// Counts the ones W of the 16-bit padded codeword. If W > 8 the whole word is
// inverted and global_flag (GF) is set, so that the word passed on never has
// more than 8 ones. Threshold and behaviour follow the design description.
// Purely combinational.
module global_inversion_check
  import ecs_pkg::*;
(
  input  logic [WORD_W-1:0] din,
  output logic [WORD_W-1:0] dout,
  output logic              global_flag
);

  logic [4:0] weight;

  always_comb begin
    weight = '0;
    for (int i = 0; i < WORD_W; i++) weight = weight + 5'(din[i]);
    global_flag = (weight > 5'd8);
    dout        = global_flag ? ~din : din;
  end

endmodule
