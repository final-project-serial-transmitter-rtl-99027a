// Selectable clock divider.
//
// Divides the 50 MHz board clock down to one of four low rates picked by
// {s1, s0}: 00 -> 16 Hz, 01 -> 1 Hz, 10 -> 10 Hz, 11 -> 160 Hz. A counter
// runs from 0 up to DIV-1 of the selected rate and wraps to 0; out_clk is high
// while the count is at most DIV/2, so the square wave is high for slightly
// more than half of each period. These counts and the duty cycle are those of
// the divider described for the board.
//
// The original drives the transmitter and receiver directly with out_clk.
// This design keeps out_clk as an output but also gives tick, a one-cycle
// pulse on the clk cycle in which the count wraps to 0 (the rising edge of
// out_clk). The other blocks use tick as a clock enable so that everything
// runs on the single board clock; that is this design's choice.
//
// Changing {s1, s0} takes effect at once: a count above the new limit wraps
// on the next cycle. Reset (synchronous, active high) clears the count; the
// first tick then comes DIV cycles after reset is released.
module selectable_clock #(
  parameter int unsigned DIV_16HZ  = 3_125_000,
  parameter int unsigned DIV_1HZ   = 50_000_000,
  parameter int unsigned DIV_10HZ  = 5_000_000,
  parameter int unsigned DIV_160HZ = 312_500
) (
  input  logic clk,
  input  logic rst,
  input  logic s0,
  input  logic s1,
  output logic out_clk,
  output logic tick
);

  logic [31:0] count, count_next, limit;

  always_comb begin
    unique case ({s1, s0})
      2'b00:   limit = DIV_16HZ;
      2'b01:   limit = DIV_1HZ;
      2'b10:   limit = DIV_10HZ;
      default: limit = DIV_160HZ;
    endcase
    count_next = (count + 32'd1 >= limit) ? 32'd0 : count + 32'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      count   <= '0;
      out_clk <= 1'b1;
      tick    <= 1'b0;
    end else begin
      count   <= count_next;
      out_clk <= (count_next <= (limit >> 1));
      tick    <= (count_next == 32'd0);
    end
  end

endmodule
