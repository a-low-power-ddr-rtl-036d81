// toggle_counter: double-data-rate edge generator.
//
// start loads an edge count (1..7); the line then toggles once on every clock
// edge, rising and falling, until that many transitions have been made, so E
// edges take ceil(E/2) clock cycles. The line is the XOR of a rising-edge flop
// and a falling-edge flop: the rising-edge logic decides, each cycle, whether
// to toggle at this rising edge and whether the following falling edge
// toggles too. The XOR output is the usual DDR output structure; it is driven
// only by flops. Using both edges follows the design description; the flop
// arrangement is this implementation's own.
//
// Timing: count is taken in the cycle start is high; busy is high from the
// next cycle until the rising edge that makes the last rising-edge toggle. The
// final falling-edge toggle, if the count is even, falls half a cycle after
// busy drops. The line level itself carries no information.
module toggle_counter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] count,
  output logic       busy,
  output logic       tx
);

  logic [2:0] remaining;
  logic       tx_pos, tx_neg, neg_toggle;

  assign busy = (remaining != 3'd0);
  assign tx   = tx_pos ^ tx_neg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining  <= '0;
      tx_pos     <= 1'b0;
      neg_toggle <= 1'b0;
    end else if (start) begin
      remaining  <= count;
      neg_toggle <= 1'b0;
    end else if (busy) begin
      tx_pos     <= ~tx_pos;
      neg_toggle <= (remaining >= 3'd2);
      remaining  <= (remaining >= 3'd2) ? remaining - 3'd2 : 3'd0;
    end else begin
      neg_toggle <= 1'b0;
    end
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n)          tx_neg <= 1'b0;
    else if (neg_toggle) tx_neg <= ~tx_neg;
  end

endmodule
