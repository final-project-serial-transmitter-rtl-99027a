// Serial receiver.
//
// Runs on sample_tick, an enable at sixteen times the baud rate, and walks the
// same eleven states as the transmitter. The line is sampled on every tick. In
// idle, a high sample followed by a low one is the falling edge of a start
// bit: the machine moves to the start state and aligns clk_sampler to half a
// count, so that its full output comes about half a bit later, near the middle
// of the start bit. If the line is still low then, the frame is accepted; if
// it is high, the low was a glitch and the machine returns to idle. From then
// on full comes every sixteen ticks, near the middle of each bit: the eight
// data bits are stored with the first one in data[7] (most significant bit
// first), and at the stop bit err is set if the line is low (framing error)
// and cleared if it is high. The machine then returns to idle.
//
// Timing, numbering sample ticks from the last one that saw the line high
// (tick 0): the edge is seen on tick 1, the start check is on tick 9, the
// data bits (bit 7 first) are taken on ticks 25, 41, ..., 137, and the stop
// check and return to idle are on tick 153. ready is high only in idle, when
// data may be read; err describes the last completed frame. After reset err
// is 1 and data is 0, and a line that is already low is not taken as a start
// bit.
//
// The states, the half-count alignment, the start and stop checks and the bit
// order follow the receiver design. Starting only on a falling edge, not on a
// low level, is taken from its description; it means that a line held low,
// as after a frame with a low stop bit, starts no new frame until it has been
// high again. Sampling on sample_tick as a clock enable of the board clock is
// this design's choice. There is no input synchronizer: a line coming from
// another clock domain needs one in front of rx_line.
module rx
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       sample_tick,
  input  logic       rx_line,
  output logic       err,
  output logic [7:0] data,
  output logic       ready
);

  frame_state_t state;
  logic         align, full;
  logic         line_prev;  // line value at the previous sample tick
  logic         fall;

  assign fall  = line_prev && !rx_line;
  // Align the sampler on the tick that sees the start of a frame.
  assign align = (state == ST_IDLE) && fall;

  clk_sampler #(.WIDTH(4)) u_sampler (
    .clk   (clk),
    .rst   (rst),
    .en    (sample_tick),
    .align (align),
    .full  (full)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      line_prev <= 1'b0;
      state <= ST_IDLE;
      err   <= 1'b1;
      data  <= '0;
    end else if (sample_tick) begin
      line_prev <= rx_line;
      unique case (state)
        ST_IDLE:
          if (fall) state <= ST_START;
        ST_START:
          if (full) state <= rx_line ? ST_IDLE : ST_D0;
        ST_STOP:
          if (full) begin
            err   <= !rx_line;
            state <= ST_IDLE;
          end
        default:
          if (full) begin
            data[bit_index(state)] <= rx_line;
            state <= frame_state_t'(state + 4'd1);
          end
      endcase
    end
  end

  assign ready = (state == ST_IDLE);

endmodule
