// pulse_counter: turns bursts of line edges back into field values.
//
// Edges reported by the data detection unit are summed. Once a burst has
// started, GAP_CYCLES consecutive cycles without an edge end the field, and
// field_value = edges - 1 is reported for one cycle with field_valid
// (a field of value N is sent as N+1 edges). The sum saturates at 7.
// The gap threshold is this implementation's choice and must be smaller
// than the transmitter's idle gap.
module pulse_counter #(
  parameter int unsigned GAP_CYCLES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] edges,
  output logic       field_valid,
  output logic [2:0] field_value
);

  localparam int unsigned GW = $clog2(GAP_CYCLES + 1);

  logic [2:0]    count;
  logic [GW-1:0] idle;
  logic          active;
  logic [3:0]    sum;

  assign sum = 4'(count) + 4'(edges);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count       <= '0;
      idle        <= '0;
      active      <= 1'b0;
      field_valid <= 1'b0;
      field_value <= '0;
    end else begin
      field_valid <= 1'b0;
      if (edges != 2'd0) begin
        active <= 1'b1;
        idle   <= '0;
        count  <= (sum > 4'd7) ? 3'd7 : sum[2:0];
      end else if (active) begin
        if (32'(idle) >= GAP_CYCLES - 1) begin
          field_valid <= 1'b1;
          field_value <= count - 3'd1;
          active      <= 1'b0;
          count       <= '0;
          idle        <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule
