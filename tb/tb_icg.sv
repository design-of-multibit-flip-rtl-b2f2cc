// tb_icg -- self-checking testbench for the latch-based clock gate.
//
// The clock has a period of 10 time units (high from 0 to 5 of each period).
// The enable is changed at random points of both phases, including the middle
// of the high phase. The expected gated clock is worked out from the enable
// value present when the clock rises: gclk must then be high for the whole
// high phase, or low for the whole of it, and low during every low phase.
// Rising edges of gclk are counted and must equal the number of enabled
// cycles, which catches glitches and shortened pulses.
module tb_icg;
  localparam int CYCLES = 400;

  logic clk = 1'b0;
  logic en  = 1'b0;
  logic en_latched, gclk;
  int   checks = 0, failures = 0;
  int   gclk_rises = 0, expected_rises = 0;

  icg dut (.clk(clk), .en(en), .en_latched(en_latched), .gclk(gclk));

  always @(posedge gclk) gclk_rises++;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    #(10 * (CYCLES + 20));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // low phase of cycle 0
    en = 1'b1;
    #5;
    for (int c = 0; c < CYCLES; c++) begin
      logic sampled;
      sampled = en;              // value of en when the clock rises
      clk = 1'b1;
      if (sampled) expected_rises++;
      #1;
      check(gclk, sampled, "gclk start of high phase");
      check(en_latched, sampled, "en_latched in high phase");
      // disturb the enable in the middle of the high phase
      if ($urandom_range(0, 1) == 1) en = ~en;
      #2;
      check(gclk, sampled, "gclk mid high phase");
      if ($urandom_range(0, 1) == 1) en = ~en;
      #1;
      check(gclk, sampled, "gclk end of high phase");
      #1;
      clk = 1'b0;
      #1;
      check(gclk, 1'b0, "gclk low phase");
      // enable for the next cycle settles during the low phase
      en = ($urandom_range(0, 2) != 0);
      #2;
      if ($urandom_range(0, 3) == 0) en = ~en;
      #1;
      check(en_latched, en, "latch transparent in low phase");
      #1;
    end
    checks++;
    if (gclk_rises != expected_rises) begin
      failures++;
      $display("FAIL gclk rose %0d times, expected %0d", gclk_rises, expected_rises);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
