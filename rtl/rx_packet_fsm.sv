// rx_packet_fsm: packet controller of the DDR-ECS receiver.
//
// Received field values are stored in transmission order: GF, SF1-4, NOI1-4,
// then the indices. Once the four NOI values are known, the Index fields of
// segments with no ones are skipped, because the transmitter does not send
// them. When the last expected field has arrived, the packet is complete and
// pkt_valid pulses for one cycle with the whole packet on `packet`.
// The field order mirrors the transmitter; the controller's structure is this
// implementation's own. There is no timeout: a field lost on the line
// misaligns later frames until reset.
module rx_packet_fsm
  import ecs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        field_valid,
  input  logic [2:0]  field_value,
  output ecs_packet_t packet,
  output logic        pkt_valid
);

  phase_t     phase;
  logic [1:0] segment;
  logic [NSEG-1:0] need_idx;   // Index fields still expected

  // first segment >= s with a pending index; returns 4 when none
  function automatic logic [2:0] next_idx(logic [NSEG-1:0] need);
    for (int k = 0; k < NSEG; k++) if (need[k]) return 3'(k);
    return 3'd4;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    logic [NSEG-1:0] need;
    logic [2:0]      nxt;
    if (!rst_n) begin
      phase     <= PH_GF;
      segment   <= '0;
      need_idx  <= '0;
      packet    <= '0;
      pkt_valid <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      if (field_valid) begin
        unique case (phase)
          PH_GF: begin
            packet.gflag <= field_value[0];
            phase        <= PH_SF;
            segment      <= '0;
          end
          PH_SF: begin
            packet.sf[segment] <= field_value[0];
            if (segment == 2'd3) begin
              phase   <= PH_NOI;
              segment <= '0;
            end else segment <= segment + 2'd1;
          end
          PH_NOI: begin
            packet.noi[segment] <= field_value[1:0];
            if (segment == 2'd3) begin
              need = {field_value[1:0] != 2'd0, packet.noi[2] != 2'd0,
                      packet.noi[1] != 2'd0, packet.noi[0] != 2'd0};
              nxt  = next_idx(need);
              need_idx <= need;
              packet.idx <= '0;
              if (nxt == 3'd4) begin
                pkt_valid <= 1'b1;
                phase     <= PH_GF;
              end else begin
                phase   <= PH_IDX;
                segment <= nxt[1:0];
              end
            end else segment <= segment + 2'd1;
          end
          PH_IDX: begin
            packet.idx[segment] <= field_value;
            need = need_idx;
            need[segment] = 1'b0;
            nxt  = next_idx(need);
            need_idx <= need;
            if (nxt == 3'd4) begin
              pkt_valid <= 1'b1;
              phase     <= PH_GF;
            end else segment <= nxt[1:0];
          end
          default: phase <= PH_GF;
        endcase
      end
    end
  end

endmodule
