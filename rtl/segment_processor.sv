// segment_processor: second level of the inversion scheme, for one 4-bit
// segment.
//
// If the segment has more than two ones it is inverted and its segment flag
// is set; dout therefore never holds more than two ones, and noi reports how
// many it holds (0..2). Threshold follows the design description.
// Purely combinational.
module segment_processor
  import ecs_pkg::*;
(
  input  logic [3:0] nib,
  output logic [3:0] dout,
  output logic       flag,
  output logic [1:0] noi
);

  logic [2:0] w_in, w_out;

  always_comb begin
    w_in  = popcount4(nib);
    flag  = (w_in > 3'd2);
    dout  = flag ? ~nib : nib;
    w_out = popcount4(dout);
    noi   = w_out[1:0];
  end

endmodule
