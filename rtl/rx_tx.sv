// Serial transmitter/receiver pair (top level).
//
// A transmitter and a receiver joined by one serial line on the same board.
// Both run on the 50 MHz board clock. Two selectable_clock dividers give the
// transmitter its baud enable and the receiver its 16x sample enable; the
// speed input picks the pair of rates: speed = 1 gives 10 baud (transmitter
// 10 Hz, receiver 160 Hz), speed = 0 gives 1 baud (1 Hz and 16 Hz).
//
// The transmitter's ready is tied high, so the pair sends continuously: one
// frame every eleven baud periods (one idle period, start bit, eight data bits,
// stop bit). The byte to send is taken from din into input_buffer on every
// clock while the transmitter reports done (idle), so the value of din at the
// end of the idle period is the one sent, and it is held for the whole frame.
// The received byte is copied to dout while the receiver is idle and its last
// frame had no framing error, so dout keeps the last good byte.
//
// The LCD driver of the board is not part of this design; the four nibbles it
// displays (transmit and receive buffers, low nibble first) are brought out
// as lcd_int1..lcd_int4.
//
// The structure, the rate selection and the buffer rules follow the original
// design; the registers in place of its level-sensitive buffers, the clock
// enables and the synchronous active-high reset are this design's choices.
module rx_tx #(
  parameter int unsigned DIV_16HZ  = 3_125_000,
  parameter int unsigned DIV_1HZ   = 50_000_000,
  parameter int unsigned DIV_10HZ  = 5_000_000,
  parameter int unsigned DIV_160HZ = 312_500
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] din,
  input  logic       speed,
  output logic [7:0] dout,
  output logic [3:0] lcd_int1,
  output logic [3:0] lcd_int2,
  output logic [3:0] lcd_int3,
  output logic [3:0] lcd_int4
);
  import uart_pkg::*;

  logic [7:0] input_buffer, output_buffer;
  rate_sel_t  rx_sel, tx_sel;
  logic       rx_tick, tx_tick;
  logic       rx_clk, tx_clk;
  logic       tx_ready, tx_done;
  logic       comms_line;
  logic       rx_ready, rx_err;

  // speed 1: 10 baud; speed 0: 1 baud.
  assign rx_sel = speed ? RATE_160HZ : RATE_16HZ;
  assign tx_sel = speed ? RATE_10HZ  : RATE_1HZ;

  selectable_clock #(
    .DIV_16HZ(DIV_16HZ), .DIV_1HZ(DIV_1HZ), .DIV_10HZ(DIV_10HZ), .DIV_160HZ(DIV_160HZ)
  ) u_rx_clk_sel (
    .clk(clk), .rst(rst), .s0(rx_sel[0]), .s1(rx_sel[1]), .out_clk(rx_clk), .tick(rx_tick)
  );

  selectable_clock #(
    .DIV_16HZ(DIV_16HZ), .DIV_1HZ(DIV_1HZ), .DIV_10HZ(DIV_10HZ), .DIV_160HZ(DIV_160HZ)
  ) u_tx_clk_sel (
    .clk(clk), .rst(rst), .s0(tx_sel[0]), .s1(tx_sel[1]), .out_clk(tx_clk), .tick(tx_tick)
  );

  // The transmitter always has data ready; done is the flow control.
  assign tx_ready = 1'b1;

  tx u_tx (
    .clk(clk), .rst(rst), .baud_tick(tx_tick), .ready(tx_ready),
    .data(input_buffer), .tx_line(comms_line), .done(tx_done)
  );

  rx u_rx (
    .clk(clk), .rst(rst), .sample_tick(rx_tick), .rx_line(comms_line),
    .err(rx_err), .data(output_buffer), .ready(rx_ready)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      input_buffer <= '0;
      dout         <= '0;
    end else begin
      if (tx_done)
        input_buffer <= din;
      if (rx_ready && !rx_err)
        dout <= output_buffer;
    end
  end

  assign lcd_int1 = input_buffer[3:0];
  assign lcd_int2 = input_buffer[7:4];
  assign lcd_int3 = output_buffer[3:0];
  assign lcd_int4 = output_buffer[7:4];

endmodule
