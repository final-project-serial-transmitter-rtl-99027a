// End-to-end testbench for the rx_tx pair.
//
// The divisors are scaled down (transmit 160 / 480 cycles per bit at the two
// speeds, receive 10 / 30 cycles per sample tick) so that a frame takes a few
// thousand cycles; the 16:1 ratio between receive and transmit rates is kept.
// The testbench changes din at random times, including during frames, and
// checks:
//   - the transmit buffer loads din only while the transmitter is idle and
//     holds it for the whole frame (flow control by done);
//   - a decoder written here reads the serial line at the middle of each bit:
//     start bit low, eight bits most significant first equal to the byte in
//     the buffer when the frame began, stop bit high;
//   - frames start every 11 bit periods at a steady speed;
//   - the receiver returns to idle 153 sample ticks after the start bit
//     (give or take one tick) and dout then shows the byte sent;
//   - a frame whose stop bit is forced low raises err and leaves dout
//     unchanged; the next good frame is received normally;
//   - the speed input switches between the two rates.
// It counts frames at each speed, speed switches, buffer holds and framing
// errors, and fails if any of them never happened.
module rx_tx_tb;
  localparam int DIV_16HZ = 30, DIV_1HZ = 480, DIV_10HZ = 160, DIV_160HZ = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [7:0] din, dout;
  logic speed;
  logic [3:0] lcd_int1, lcd_int2, lcd_int3, lcd_int4;

  int n_fast = 0, n_slow = 0, n_switch = 0, n_hold = 0, n_framing = 0, n_decoded = 0;
  int cyc = 0;
  logic force_stop_low = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  rx_tx #(.DIV_16HZ(DIV_16HZ), .DIV_1HZ(DIV_1HZ), .DIV_10HZ(DIV_10HZ), .DIV_160HZ(DIV_160HZ))
  dut (.clk(clk), .rst(rst), .din(din), .speed(speed), .dout(dout),
       .lcd_int1(lcd_int1), .lcd_int2(lcd_int2), .lcd_int3(lcd_int3), .lcd_int4(lcd_int4));

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0d %s", cyc, msg);
  endtask

  function automatic int bit_cycles(input logic spd);
    return spd ? DIV_10HZ : DIV_1HZ;
  endfunction

  // ---------------------------------------------------------------- buffers
  logic [7:0] din_q;
  logic       done_q;
  always_ff @(posedge clk) begin
    din_q  <= din;
    done_q <= dut.tx_done;
  end

  // input_buffer follows din while done, holds otherwise; the LCD nibbles
  // show the two buffers.
  always @(posedge clk) if (!rst) begin
    #1;
    checks++;
    if (done_q) begin
      if (dut.input_buffer !== din_q) fail("input buffer did not load din while idle");
    end else if (dut.input_buffer !== $past(dut.input_buffer)) begin
      fail("input buffer changed during a frame");
    end
    if (!done_q && din_q !== dut.input_buffer && $past(!done_q)) n_hold++;
    checks++;
    if ({lcd_int2, lcd_int1} !== dut.input_buffer || {lcd_int4, lcd_int3} !== dut.output_buffer)
      fail("LCD nibbles do not show the buffers");
  end

  // ---------------------------------------------------------------- frames
  logic [7:0] sent_q[$];    // bytes whose frames began, for the decoder
  logic [7:0] expect_q[$];  // bytes expected at dout, in order, with framing flag
  logic       bad_q[$];
  int         last_start = -1;
  logic       last_speed;

  always @(negedge dut.tx_done) if (!rst) begin
    sent_q.push_back(dut.input_buffer);
    if (last_start >= 0 && last_speed == speed) begin
      checks++;
      if (cyc - last_start != 11 * bit_cycles(speed))
        fail($sformatf("frame period %0d cycles, expected %0d", cyc - last_start,
                       11 * bit_cycles(speed)));
    end
    last_start = cyc;
    last_speed = speed;
    if (speed) n_fast++; else n_slow++;
  end

  // Serial line decoder, independent of the receiver.
  initial begin
    forever begin
      int bc;
      logic [7:0] b, exp_b;
      logic stop;
      @(negedge dut.comms_line);
      if (rst) continue;
      bc = bit_cycles(speed);
      repeat (bc / 2) @(posedge clk);
      checks++;
      if (dut.comms_line !== 1'b0) fail("start bit not low at its middle");
      for (int k = 7; k >= 0; k--) begin
        repeat (bc) @(posedge clk);
        b[k] = dut.comms_line;
      end
      repeat (bc) @(posedge clk);
      stop = dut.comms_line;
      exp_b = sent_q.pop_front();
      checks++;
      if (b !== exp_b) fail($sformatf("line carried %02h, buffer held %02h", b, exp_b));
      checks++;
      if (stop !== !force_stop_low) fail("stop bit value wrong on the line");
      expect_q.push_back(b);
      bad_q.push_back(!stop);
      n_decoded++;
    end
  end

  // Receiver: idle 153 ticks after the start, then dout shows the byte.
  logic [7:0] good_byte = 8'h00;
  always @(posedge dut.rx_ready) if (!rst) begin
    int ticks, rdiv;
    logic [7:0] b;
    logic bad;
    rdiv = speed ? DIV_160HZ : DIV_16HZ;
    ticks = (cyc - last_start + rdiv / 2) / rdiv;
    checks++;
    if (ticks < 153 || ticks > 154)
      fail($sformatf("receiver back in idle after %0d ticks", ticks));
    // The decoder finishes in the middle of the stop bit as well; give it time.
    repeat (rdiv) @(posedge clk);
    #1;
    if (expect_q.size() == 0) fail("receiver finished a frame the line never carried");
    else begin
      b = expect_q.pop_front();
      bad = bad_q.pop_front();
      checks++;
      if (dut.rx_err !== bad) fail($sformatf("err=%b expected %b", dut.rx_err, bad));
      if (bad) n_framing++;
      else good_byte = b;
      checks++;
      if (dout !== good_byte)
        fail($sformatf("dout=%02h expected %02h", dout, good_byte));
    end
  end

  // Force the stop bit of the current frame low until the receiver has sampled it.
  task automatic corrupt_next_stop();
    @(negedge dut.tx_done);
    force_stop_low = 1;
    wait (dut.u_tx.state == uart_pkg::ST_STOP);
    force dut.comms_line = 1'b0;
    wait (dut.u_rx.state == uart_pkg::ST_IDLE);
    repeat (2) @(posedge clk);
    release dut.comms_line;
    wait (dut.tx_done);
    force_stop_low = 0;
  endtask

  task automatic run_frames(input int n);
    repeat (n) begin
      @(negedge dut.tx_done);
      // change din somewhere in the frame
      repeat ($urandom_range(1, 9 * bit_cycles(speed))) @(posedge clk);
      #1 din = 8'($urandom);
    end
  endtask

  initial begin
    din = 8'hA5;
    speed = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Before the first frame dout stays 0 (receiver err is 1 after reset).
    checks++;
    if (dout !== 8'h00) fail("dout not 0 after reset");
    run_frames(6);
    corrupt_next_stop();
    run_frames(3);
    // switch to 1 baud between frames
    wait (dut.tx_done && dut.rx_ready);
    #1 speed = 1'b0; n_switch++;
    run_frames(4);
    corrupt_next_stop();
    run_frames(2);
    wait (dut.tx_done && dut.rx_ready);
    #1 speed = 1'b1; n_switch++;
    run_frames(4);
    @(negedge dut.tx_done);
    repeat (10 * DIV_10HZ) @(posedge clk);
    checks++;
    if (n_fast == 0 || n_slow == 0 || n_switch < 2 || n_hold == 0 || n_framing < 2 ||
        n_decoded < 15)
      fail("a mechanism was not exercised");
    $display("frames: %0d at 10 baud, %0d at 1 baud, %0d decoded, %0d speed switches,",
             n_fast, n_slow, n_decoded, n_switch);
    $display("        %0d cycles with din held off, %0d framing errors", n_hold, n_framing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
