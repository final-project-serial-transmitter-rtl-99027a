// Serial transmitter.
//
// An eleven-state machine (idle, start bit, eight data bits, stop bit) that
// moves one state per baud_tick. In idle the line is high and done is high;
// when ready is high on a baud tick the machine leaves idle, drives the start
// bit (low) and lowers done, then sends data[7] down to data[0] (most
// significant bit first), then a high stop bit, and returns to idle where done
// rises again. A frame therefore occupies ten baud periods after the tick that
// accepted ready, and the machine spends at least one baud period in idle
// between frames.
//
// The states, the bit order and the done behaviour follow the transmitter
// design. Using baud_tick as a clock enable on the board clock (instead of a
// separate baud-rate clock) and the synchronous reset to idle are this
// design's choices. tx_line and done are decoded from the state register.
//
// Interface rule: data must not change while done is low (checked by an
// assertion).
module tx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       baud_tick,
  input  logic       ready,
  input  logic [7:0] data,
  output logic       tx_line,
  output logic       done
);

  frame_state_t state, state_next;

  always_comb begin
    state_next = state;
    unique case (state)
      ST_IDLE:  state_next = ready ? ST_START : ST_IDLE;
      ST_STOP:  state_next = ST_IDLE;
      default:  state_next = frame_state_t'(state + 4'd1);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)
      state <= ST_IDLE;
    else if (baud_tick)
      state <= state_next;
  end

  always_comb begin
    unique case (state)
      ST_IDLE, ST_STOP: tx_line = 1'b1;
      ST_START:         tx_line = 1'b0;
      default:          tx_line = data[bit_index(state)];
    endcase
    done = (state == ST_IDLE);
  end

  // The byte must stay stable for the whole frame.
  property p_data_stable;
    @(posedge clk) disable iff (rst) (!done && $past(!done)) |-> $stable(data);
  endproperty
  a_data_stable: assert property (p_data_stable)
    else $error("tx: data changed while a frame was being sent");

endmodule
