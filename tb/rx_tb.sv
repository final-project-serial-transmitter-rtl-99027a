// Testbench for rx.
//
// The sample enable comes every TICK clock cycles. The testbench builds serial
// frames itself, sixteen sample ticks per bit: start bit 0, the byte from bit 7
// down to bit 0, then a stop bit. The line changes just after a sample tick.
// For every frame it checks, after each tick, that ready is low from the tick
// that sees the start bit until the stop bit is sampled and high from then on:
// the start is seen on tick 1 after the falling edge and the stop bit is
// sampled on tick 153 (9 ticks to the middle of the start bit, then 16 per
// bit). At that point data must equal the byte sent and err must be 0, or 1
// for frames sent with a low stop bit; data must keep the byte through the
// following idle time. Short low glitches (under half a bit) must be rejected
// at the middle of the would-be start bit (tick 9) without touching data/err.
module rx_tb;
  localparam int TICK = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic sample_tick, rx_line;
  logic err, ready;
  logic [7:0] data;
  int phase = 0;
  int n_good = 0, n_framing = 0, n_glitch = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) phase <= (phase == TICK - 1) ? 0 : phase + 1;
  assign sample_tick = (phase == TICK - 1);

  rx dut (.clk(clk), .rst(rst), .sample_tick(sample_tick), .rx_line(rx_line),
          .err(err), .data(data), .ready(ready));

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Wait for the next sample tick edge, then step past it.
  task automatic next_tick();
    do @(posedge clk); while (!sample_tick);
    #1;
  endtask

  // Send one frame; the tick counter t counts ticks since the falling edge.
  task automatic send_frame(input logic [7:0] b, input logic stop_val);
    logic [9:0] bits;
    int t;
    bits = {1'b0, b, stop_val};  // sent left to right
    t = 0;
    for (int i = 9; i >= 0; i--) begin
      rx_line = bits[i];
      repeat (16) begin
        next_tick();
        t++;
        if (t >= 1 && t <= 152) begin
          checks++;
          if (ready !== 1'b0) fail($sformatf("ready high at tick %0d of frame %02h", t, b));
        end
        if (t == 153) begin
          checks++;
          if (ready !== 1'b1) fail($sformatf("ready low after stop bit of frame %02h", b));
          checks++;
          if (data !== b) fail($sformatf("data %02h expected %02h", data, b));
          checks++;
          if (err !== !stop_val) fail($sformatf("err %b for stop bit %b", err, stop_val));
        end
      end
    end
    rx_line = 1'b1;
    if (stop_val) n_good++; else n_framing++;
  endtask

  task automatic idle_ticks(input int n, input logic [7:0] b_exp, input logic err_exp);
    repeat (n) begin
      next_tick();
      checks++;
      if (ready !== 1'b1 || data !== b_exp || err !== err_exp)
        fail($sformatf("idle: ready=%b data=%02h err=%b, expected 1 %02h %b",
                       ready, data, err, b_exp, err_exp));
    end
  endtask

  task automatic send_glitch(input int len, input logic [7:0] b_exp, input logic err_exp);
    rx_line = 1'b0;
    for (int t = 1; t <= 12; t++) begin
      if (t == len + 1) rx_line = 1'b1;
      next_tick();
      if (t >= 1 && t <= 8) begin
        checks++;
        if (ready !== 1'b0) fail($sformatf("ready high at tick %0d of a glitch", t));
      end
      if (t >= 9) begin
        checks++;
        if (ready !== 1'b1 || data !== b_exp || err !== err_exp)
          fail($sformatf("glitch of %0d ticks not rejected", len));
      end
    end
    rx_line = 1'b1;
    n_glitch++;
  endtask

  initial begin
    logic [7:0] last;
    logic last_err;
    rx_line = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // After reset: idle, data 0, err 1.
    idle_ticks(20, 8'h00, 1'b1);
    last = 8'h00; last_err = 1'b1;
    for (int n = 0; n < 60; n++) begin
      int kind;
      logic [7:0] b;
      kind = $urandom_range(0, 9);
      b = 8'($urandom);
      if (n == 0) begin kind = 0; b = 8'hA5; end
      if (n == 1) begin kind = 0; b = 8'h4B; end
      if (n == 2) kind = 8;
      if (n == 3) kind = 9;
      if (kind <= 6) begin
        send_frame(b, 1'b1);
        last = b; last_err = 1'b0;
      end else if (kind == 7 || kind == 8) begin
        send_frame(b, 1'b0);
        last = b; last_err = 1'b1;
        // Line goes high again; the receiver is back in idle.
      end else begin
        send_glitch($urandom_range(1, 6), last, last_err);
      end
      idle_ticks($urandom_range(8, 24), last, last_err);
    end
    checks++;
    if (n_good == 0 || n_framing == 0 || n_glitch == 0)
      fail($sformatf("not every case ran: good=%0d framing=%0d glitch=%0d",
                     n_good, n_framing, n_glitch));
    $display("frames: %0d good, %0d framing errors, %0d glitches", n_good, n_framing, n_glitch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
