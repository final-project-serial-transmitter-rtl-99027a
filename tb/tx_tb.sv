// Testbench for tx.
//
// A baud tick comes every BAUD clock cycles. For a series of random bytes the
// testbench raises ready, then samples tx_line and done in the middle of each
// following baud period and compares them with the expected frame worked out
// here: start bit 0, data bits from bit 7 down to bit 0, stop bit 1, done low
// for those ten periods and high again in the next. It checks that the frame
// starts on the first baud tick after ready, that a frame lasts ten baud
// periods, and that the machine stays idle (line high, done high) while ready
// is low.
module tx_tb;
  localparam int BAUD = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic baud_tick, ready;
  logic [7:0] data;
  logic tx_line, done;
  int phase = 0;
  int cyc_count = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) cyc_count <= cyc_count + 1;
  always_ff @(posedge clk) phase <= (phase == BAUD - 1) ? 0 : phase + 1;
  assign baud_tick = (phase == BAUD - 1);

  tx dut (.clk(clk), .rst(rst), .baud_tick(baud_tick), .ready(ready),
          .data(data), .tx_line(tx_line), .done(done));

  task automatic expect_bits(input string what, input logic line_exp, input logic done_exp);
    checks++;
    if (tx_line !== line_exp || done !== done_exp) begin
      failures++;
      $display("FAIL %s: line=%b done=%b expected line=%b done=%b", what, tx_line, done,
               line_exp, done_exp);
    end
  endtask

  // Move to the middle of the next baud period.
  task automatic next_period();
    do @(posedge clk); while (!baud_tick);
    repeat (BAUD / 2 + 1) @(posedge clk);
    #1;
  endtask

  initial begin
    ready = 0; data = 8'h00;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // Idle while ready is low.
    repeat (3) begin
      next_period();
      expect_bits("idle without ready", 1'b1, 1'b1);
    end
    for (int n = 0; n < 40; n++) begin
      logic [7:0] b;
      int gap;
      b = 8'($urandom);
      if (n == 0) b = 8'hA5;
      if (n == 1) b = 8'h4B;
      // Load data then assert ready in the middle of an idle period.
      data = b;
      ready = 1;
      next_period();
      expect_bits("start bit", 1'b0, 1'b0);
      ready = ($urandom_range(0, 1) == 1);
      for (int k = 7; k >= 0; k--) begin
        next_period();
        expect_bits($sformatf("byte %02h bit %0d", b, k), b[k], 1'b0);
      end
      next_period();
      expect_bits("stop bit", 1'b1, 1'b0);
      ready = 0;
      next_period();
      expect_bits("idle after frame", 1'b1, 1'b1);
      gap = $urandom_range(0, 2);
      repeat (gap) begin
        next_period();
        expect_bits("idle gap", 1'b1, 1'b1);
      end
    end
    // Back-to-back frames with ready held high: one idle period between them.
    begin
      int t_start, t_next;
      data = 8'h3C; ready = 1;
      wait (done == 1'b0);
      t_start = cyc_count;
      wait (done == 1'b1);
      wait (done == 1'b0);
      t_next = cyc_count;
      checks++;
      if (t_next - t_start != 11 * BAUD) begin
        failures++;
        $display("FAIL frame repeat period %0d cycles, expected %0d", t_next - t_start, 11 * BAUD);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
