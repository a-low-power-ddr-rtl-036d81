// data_decoder: rebuilds the 16-bit word from a received packet.
//
// For each segment the nibble is reconstructed from its number of ones and
// its index (no ones: 0000; one: a single 1 at position index; two: the pair
// numbered by index), then inverted back if its segment flag is set. The
// whole word is inverted back if the global flag is set. This undoes the
// transmitter's inversion and index coding; index values outside the code
// decode to 0000. Purely combinational.
module data_decoder
  import ecs_pkg::*;
(
  input  ecs_packet_t       packet,
  output logic [WORD_W-1:0] dout
);

  always_comb begin
    logic [3:0] nib;
    for (int k = 0; k < NSEG; k++) begin
      unique case (packet.noi[k])
        2'd1:    nib = (packet.idx[k] < 3'd4) ? (4'b0001 << packet.idx[k][1:0]) : 4'b0000;
        2'd2:    nib = pair_nibble(packet.idx[k]);
        default: nib = 4'b0000;
      endcase
      dout[4*k +: 4] = packet.sf[k] ? ~nib : nib;
    end
    if (packet.gflag) dout = ~dout;
  end

endmodule
