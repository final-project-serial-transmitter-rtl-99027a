// Full-size testbench for the rx_tx pair.
//
// The top runs with its default divisors for a 50 MHz board clock and the
// speed input at 1 (10 baud: 5,000,000 clock cycles per bit, receiver sample
// tick every 312,500 cycles). Two bytes are sent through the loop: the first
// is on din from reset, the second is put on din while the first frame is on
// the line. The testbench checks that each frame starts 11 bit periods after
// the previous one (55,000,000 cycles, 1.1 s of board time), that dout shows
// each byte once the receiver has taken its stop bit, 153 sample ticks after
// the start bit, and that the second byte did not enter the transmit buffer
// before the first frame ended.
module rx_tx_full_tb;
  localparam longint BIT = 5_000_000, TICK = 312_500;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [7:0] din, dout;
  logic speed;
  logic [3:0] lcd_int1, lcd_int2, lcd_int3, lcd_int4;
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  rx_tx dut (.clk(clk), .rst(rst), .din(din), .speed(speed), .dout(dout),
             .lcd_int1(lcd_int1), .lcd_int2(lcd_int2), .lcd_int3(lcd_int3),
             .lcd_int4(lcd_int4));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint t_rst, t_start1, t_start2, t_ready;
    din = 8'hC3;
    speed = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    t_rst = cyc;
    // First frame: the divider's first tick is registered BIT cycles after
    // reset, and the transmitter leaves idle on the next clock edge.
    @(negedge dut.tx_done);
    t_start1 = cyc;
    check("first frame start", t_start1 - t_rst, BIT + 1);
    check("first byte in buffer", dut.input_buffer, 8'hC3);
    // Offer the next byte while the frame is on the line.
    repeat (3 * BIT) @(posedge clk);
    #1 din = 8'h5A;
    @(posedge dut.rx_ready);
    t_ready = cyc;
    check("receiver ticks to idle", (t_ready - t_start1 + TICK / 2) / TICK, 153);
    repeat (2) @(posedge clk);
    #1;
    check("first byte received", dout, 8'hC3);
    check("buffer held during frame", {lcd_int2, lcd_int1}, 8'hC3);
    @(negedge dut.tx_done);
    t_start2 = cyc;
    check("frame period", t_start2 - t_start1, 11 * BIT);
    check("second byte in buffer", dut.input_buffer, 8'h5A);
    @(posedge dut.rx_ready);
    repeat (2) @(posedge clk);
    #1;
    check("second byte received", dout, 8'h5A);
    check("no framing error", longint'(dut.rx_err), 0);
    check("LCD receive nibbles", {lcd_int4, lcd_int3}, 8'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (130_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
