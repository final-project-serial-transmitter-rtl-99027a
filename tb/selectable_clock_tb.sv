// Testbench for selectable_clock.
//
// A small instance (divisors 20, 50, 10, 6) is run in each of the four rate
// selections. For each, the testbench measures the number of clock cycles
// between tick pulses (must equal the selected divisor), the number of cycles
// out_clk is high per period (DIV/2 + 1) and checks that every tick comes with
// a rising edge of out_clk. A second instance keeps the board defaults and is
// checked in the 160 Hz and 16 Hz selections: 312,500 and 3,125,000 cycles of
// the 50 MHz clock per period.
module selectable_clock_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [1:0] sel;
  logic out_clk, tick, out_clk_d;
  logic [1:0] sel_big;
  logic big_clk, big_tick;

  always #5 clk = ~clk;

  selectable_clock #(.DIV_16HZ(20), .DIV_1HZ(50), .DIV_10HZ(10), .DIV_160HZ(6)) dut (
    .clk(clk), .rst(rst), .s0(sel[0]), .s1(sel[1]), .out_clk(out_clk), .tick(tick));

  selectable_clock big (
    .clk(clk), .rst(rst), .s0(sel_big[0]), .s1(sel_big[1]), .out_clk(big_clk), .tick(big_tick));

  always_ff @(posedge clk) out_clk_d <= out_clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Measure period and high time of the small instance over three periods.
  task automatic measure_small(input logic [1:0] s, input int div);
    int n, high;
    rst = 1; sel = s;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // wait for the first tick
    do @(posedge clk); while (!tick);
    repeat (3) begin
      n = 0; high = 0;
      do begin
        @(posedge clk);
        n++;
        if (out_clk) high++;
        if (tick) begin
          checks++;
          if (!(out_clk && !out_clk_d)) begin
            failures++;
            $display("FAIL tick without out_clk rising edge, sel=%b", s);
          end
        end
      end while (!tick);
      check($sformatf("period sel=%b", s), n, div);
      check($sformatf("high time sel=%b", s), high, div / 2 + 1);
    end
  endtask

  task automatic measure_big(input logic [1:0] s, input longint div);
    longint n;
    rst = 1; sel_big = s;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    do @(posedge clk); while (!big_tick);
    n = 0;
    do begin @(posedge clk); n++; end while (!big_tick);
    check($sformatf("default period sel=%b", s), n, div);
  endtask

  initial begin
    sel = 2'b00; sel_big = 2'b11;
    measure_small(2'b00, 20);
    measure_small(2'b01, 50);
    measure_small(2'b10, 10);
    measure_small(2'b11, 6);
    measure_big(2'b11, 312_500);
    measure_big(2'b00, 3_125_000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
