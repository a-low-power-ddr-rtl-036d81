// noi_index_encoder: index coding of one segment.
//
// Instead of the four bits of a segment, only the positions of its ones are
// sent. For a segment with one '1', index_ones is its bit position (0..3);
// for a segment with two ones, index_twos numbers the pair
// ({0,1}=0, {0,2}=1, {0,3}=2, {1,2}=3, {1,3}=4, {2,3}=5). A segment with no
// ones needs no index. The output widths (3 bits each) follow the design's
// block diagram; the numbering is this implementation's choice. Outputs that
// do not apply to the segment's weight are 0. Purely combinational; the input
// is a segment after local inversion (weight <= 2).
module noi_index_encoder
  import ecs_pkg::*;
(
  input  logic [3:0] nib,
  output logic [2:0] index_ones,
  output logic [2:0] index_twos
);

  always_comb begin
    index_ones = '0;
    index_twos = '0;
    case (popcount4(nib))
      3'd1: begin
        for (int i = 0; i < 4; i++) if (nib[i]) index_ones = 3'(i);
      end
      3'd2: index_twos = pair_code(nib);
      default: ;
    endcase
  end

endmodule
