// Testbench for clk_sampler.
//
// Drives the enable with a random pattern and pulls align at random ticks.
// A reference count kept in the testbench (align loads 8, each other enabled
// cycle adds one modulo 16) gives the expected full output every cycle. It
// also checks the timing the receiver relies on: after an align, full comes
// on the 7th following enabled cycle's result, then every 16 enabled cycles.
module clk_sampler_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic en = 0, align = 0, full;
  int ref_count;
  int since_align;

  always #5 clk = ~clk;

  clk_sampler dut (.clk(clk), .rst(rst), .en(en), .align(align), .full(full));

  initial begin
    ref_count = 0;
    since_align = -1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 4000; i++) begin
      en    = ($urandom_range(0, 2) != 0);
      align = ($urandom_range(0, 60) == 0);
      @(posedge clk);
      if (en) begin
        if (align) begin
          ref_count = 8;
          since_align = 0;
        end else begin
          ref_count = (ref_count + 1) % 16;
          if (since_align >= 0) since_align++;
        end
      end
      #1;
      checks++;
      if (full !== (ref_count == 15)) begin
        failures++;
        $display("FAIL cycle %0d: full=%b reference count=%0d", i, full, ref_count);
      end
      // Alignment timing: full exactly 7, 23, 39, ... enabled cycles after align.
      if (since_align > 0) begin
        checks++;
        if (full !== ((since_align % 16) == 7)) begin
          failures++;
          $display("FAIL cycle %0d: full=%b %0d ticks after align", i, full, since_align);
        end
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
