// packet_former: index coding and packet formation.
//
// On load it latches one frame's fields: the global flag GF, the four segment
// flags SF, the four numbers of ones NOI and the four indices (index_ones for
// a segment with one '1', index_twos for a segment with two). The transmitter
// FSM then asks for one field at a time by (phase, segment); the answer is the
// number of line edges for that field, N+1 for a field of value N, or 0 for an
// Index field of a segment with no ones, which carries no index and is skipped.
// The field order and the N+1 rule follow the design description; the
// encoding of absent fields as a count of 0 is this implementation's reading of
// the FSM's "pulse_count_to_send = 0" path.
//
// Timing: packet is registered (valid from the cycle after load);
// pulse_count_to_send is combinational from phase, segment and the packet.
module packet_former
  import ecs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 global_flag,
  input  seg_code_t [NSEG-1:0] seg,
  input  logic [1:0]           phase,
  input  logic [1:0]           segment,
  output ecs_packet_t          packet,
  output logic [2:0]           pulse_count_to_send
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      packet <= '0;
    end else if (load) begin
      packet.gflag <= global_flag;
      for (int k = 0; k < NSEG; k++) begin
        packet.sf[k]  <= seg[k].flag;
        packet.noi[k] <= seg[k].noi;
        packet.idx[k] <= (seg[k].noi == 2'd2) ? seg[k].index_twos : seg[k].index_ones;
      end
    end
  end

  always_comb begin
    unique case (phase_t'(phase))
      PH_GF:   pulse_count_to_send = 3'd1 + 3'(packet.gflag);
      PH_SF:   pulse_count_to_send = 3'd1 + 3'(packet.sf[segment]);
      PH_NOI:  pulse_count_to_send = 3'd1 + 3'(packet.noi[segment]);
      PH_IDX:  pulse_count_to_send = (packet.noi[segment] == 2'd0) ? 3'd0
                                     : 3'd1 + packet.idx[segment];
      default: pulse_count_to_send = 3'd0;
    endcase
  end

endmodule
