// Receive sample divider.
//
// A WIDTH-bit counter (4 bits: divide by 16) that advances once per enable
// tick of the 16x baud sample rate. full is high while the counter holds its
// largest value, so it is high for one sample period in sixteen. Pulling align
// loads the half count (1000 for four bits), so that after the receiver sees
// the start of a frame the first full falls near the middle of the start bit
// and every later one near the middle of a data bit.
//
// The count, the half-count load and the full decode follow the receiver
// design; making the load synchronous (taken on a tick, like the count) and
// adding a system reset to 0 are this design's choices.
//
// Interface: en is the 16x sample enable; align takes effect only with en.
// full is a decode of the counter register and changes one clk after the tick.
module clk_sampler #(
  parameter int unsigned WIDTH = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic align,
  output logic full
);

  logic [WIDTH-1:0] counter;

  always_ff @(posedge clk) begin
    if (rst)
      counter <= '0;
    else if (en) begin
      if (align)
        counter <= WIDTH'(1) << (WIDTH - 1);
      else
        counter <= counter + WIDTH'(1);
    end
  end

  assign full = (counter == '1);

endmodule
