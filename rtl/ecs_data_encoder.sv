// ecs_data_encoder: the switching-activity optimiser in front of the
// transmitter FSM.
//
// The 16-bit padded codeword passes the global inversion check, is cut into
// four 4-bit segments (segment 0 = bits 3:0, segment 3 = bits 15:12), and
// each segment goes through a segment processor (local inversion, number of
// ones) and an index encoder. The structure follows the design's block
// diagram. Purely combinational.
module ecs_data_encoder
  import ecs_pkg::*;
(
  input  logic [WORD_W-1:0]     din,
  output logic                  global_flag,
  output seg_code_t [NSEG-1:0]  seg
);

  logic [WORD_W-1:0] word;

  global_inversion_check u_gic (
    .din         (din),
    .dout        (word),
    .global_flag (global_flag)
  );

  for (genvar k = 0; k < NSEG; k++) begin : g_seg
    segment_processor u_sp (
      .nib  (word[4*k +: 4]),
      .dout (seg[k].dout),
      .flag (seg[k].flag),
      .noi  (seg[k].noi)
    );
    noi_index_encoder u_idx (
      .nib        (seg[k].dout),
      .index_ones (seg[k].index_ones),
      .index_twos (seg[k].index_twos)
    );
  end

endmodule
