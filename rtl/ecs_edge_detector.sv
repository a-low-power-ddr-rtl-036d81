// ecs_edge_detector: data detection unit of the DDR-ECS receiver.
//
// The line is sampled once on every falling and every rising edge of the
// receiver clock, i.e. twice per cycle, and each sample is compared with the
// one before it. edges reports how many transitions fell in the last clock
// cycle (0, 1 or 2). No clock is recovered from the line: the receiver clock
// is assumed to run at the transmitter's frequency, with any fixed phase that
// keeps the line's transitions away from the sampling edges. The sampling
// scheme is this implementation's own; the description names the unit only.
//
// Timing: edges is registered on the rising edge and covers the half-cycles
// ending at that edge. The line is taken to idle low after reset.
module ecs_edge_detector (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       line_in,
  output logic [1:0] edges
);

  logic s_neg, s_pos;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) s_neg <= 1'b0;
    else        s_neg <= line_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_pos <= 1'b0;
      edges <= '0;
    end else begin
      s_pos <= line_in;
      edges <= 2'(s_pos ^ s_neg) + 2'(s_neg ^ line_in);
    end
  end

endmodule
