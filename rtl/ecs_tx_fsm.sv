// ecs_tx_fsm: transmitter control FSM.
//
// States and transitions follow the design's state diagram:
//   S_IDLE       (tx_busy = 0) stays while enable = 0, goes to S_LOAD on enable.
//   S_LOAD       looks at pulse_count_to_send for the current (phase, segment):
//                > 0 starts the toggle counter and goes to S_TRANSMIT,
//                = 0 (field absent) goes straight to S_WAIT_ALPHA.
//   S_TRANSMIT   stays while the toggle counter is busy, then S_WAIT_ALPHA.
//   S_WAIT_ALPHA stays for ALPHA_CYCLES cycles of silence on the line; then
//                S_LOAD for the next segment, or for the first segment of the
//                next phase, or S_IDLE after phase 3 / segment 3.
// Phases are 0 = global flag, 1 = segment flags, 2 = numbers of ones,
// 3 = indices. Phase 0 has a single field, so it starts at segment 3. The
// move from segment 3 of one phase to the next phase, and the value of
// ALPHA_CYCLES, are this implementation's choices.
//
// Timing: frame_start pulses in the S_IDLE cycle that accepts enable;
// frame_done pulses in the last S_WAIT_ALPHA cycle of the frame.
module ecs_tx_fsm
  import ecs_pkg::*;
#(
  parameter int unsigned ALPHA_CYCLES = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic [2:0] pulse_count_to_send,
  input  logic       toggle_counter_busy,
  output logic [1:0] phase,
  output logic [1:0] segment,
  output logic       tc_start,
  output logic [2:0] tc_count,
  output logic       tx_busy,
  output logic       frame_start,
  output logic       frame_done,
  output tx_state_t  state
);

  localparam int unsigned DW = (ALPHA_CYCLES > 1) ? $clog2(ALPHA_CYCLES) : 1;

  logic [DW-1:0] delay;
  logic          gap_done;

  assign gap_done    = (32'(delay) >= ALPHA_CYCLES - 1);
  assign tx_busy     = (state != S_IDLE);
  assign tc_start    = (state == S_LOAD) && (pulse_count_to_send != 3'd0);
  assign tc_count    = pulse_count_to_send;
  assign frame_start = (state == S_IDLE) && enable;
  assign frame_done  = (state == S_WAIT_ALPHA) && gap_done && (phase == 2'd3) && (segment == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      phase   <= 2'd0;
      segment <= 2'd3;
      delay   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (enable) begin
            state   <= S_LOAD;
            phase   <= 2'd0;
            segment <= 2'd3;
          end
        end
        S_LOAD: begin
          delay <= '0;
          state <= (pulse_count_to_send != 3'd0) ? S_TRANSMIT : S_WAIT_ALPHA;
        end
        S_TRANSMIT: begin
          delay <= '0;
          if (!toggle_counter_busy) state <= S_WAIT_ALPHA;
        end
        S_WAIT_ALPHA: begin
          if (!gap_done) begin
            delay <= delay + 1'b1;
          end else if (segment < 2'd3) begin
            segment <= segment + 2'd1;
            state   <= S_LOAD;
          end else if (phase < 2'd3) begin
            phase   <= phase + 2'd1;
            segment <= 2'd0;
            state   <= S_LOAD;
          end else begin
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A field is never started while the previous one is still being sent.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 tc_start |-> !toggle_counter_busy);

endmodule
