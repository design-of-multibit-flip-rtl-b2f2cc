// tb_ddcg_mbff -- self-checking testbench for the K-bit multibit flip-flop
// with data-driven clock gating (default K = 4).
//
// The clock has a period of 10 time units. New data are applied in the low
// phase with a per-bit toggle probability that steps through 5 %, 30 % and
// 100 %, so that cycles with no change, with some bits changing and with all
// bits changing all occur. Now and then d is also disturbed in the middle of
// the high phase, which must have no effect.
//
// Reference model: an ungated register that loads d at every rising clock
// edge. Checked every cycle: q equals the reference after the edge and holds
// through the cycle; clk_en is high exactly in cycles whose edge found d != q.
// The rising edges of the clock that reaches the flip-flops are counted and must equal the
// number of such cycles (no pulse is lost, none is added). An asynchronous
// reset in the middle of the run is checked as well.
module tb_ddcg_mbff;
  localparam int unsigned K      = 4;  // the block's default width
  localparam int          CYCLES = 600;

  logic         clk   = 1'b0;
  logic         rst_n = 1'b1;
  logic [K-1:0] d     = '0;
  logic [K-1:0] q;
  logic         clk_en;
  logic [K-1:0] q_ref = '0;

  int checks = 0, failures = 0;
  int gclk_rises = 0, passed = 0, gated = 0, partial = 0, disturbed = 0;

  ddcg_mbff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .clk_en(clk_en));

  always @(posedge dut.u_ff.clk) gclk_rises++;  // clock seen by the flip-flops

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: d=%b q=%b q_ref=%b clk_en=%0b", what, $time, d, q, q_ref, clk_en);
    end
  endtask

  function automatic logic [K-1:0] toggle_mask(input int percent);
    logic [K-1:0] m;
    for (int i = 0; i < K; i++) m[i] = ($urandom_range(0, 99) < percent);
    return m;
  endfunction

  initial begin : watchdog
    #(10 * (CYCLES + 50));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    #2;
    for (int c = 0; c < CYCLES; c++) begin
      logic expect_en;
      int   percent;
      percent = (c < 200) ? 5 : (c < 400) ? 30 : 100;
      // rising edge
      expect_en = (d != q_ref);
      if (expect_en) passed++; else gated++;
      if (expect_en && d != ~q_ref) partial++;
      clk   = 1'b1;
      q_ref = d;
      #1;
      check(q == q_ref, "q after rising edge");
      check(clk_en == expect_en, "clk_en");
      if ($urandom_range(0, 7) == 0) begin
        d = d ^ toggle_mask(50);
        if (d != q_ref) disturbed++;
      end
      #3;
      check(q == q_ref, "q holds in high phase");
      #1 clk = 1'b0;
      // asynchronous reset once, in a low phase
      if (c == 300) begin
        #1 rst_n = 1'b0;
        q_ref = '0;
        #1 check(q == '0, "asynchronous reset");
        rst_n = 1'b1;
        #1;
      end else begin
        #3;
      end
      check(q == q_ref, "q holds in low phase");
      d = q_ref ^ toggle_mask(percent);
      #2;
    end
    checks++;
    if (gclk_rises != passed) begin
      failures++;
      $display("FAIL gated clock rose %0d times, expected %0d", gclk_rises, passed);
    end
    // every mechanism must have been exercised
    checks++;
    if (passed == 0 || gated == 0 || partial == 0 || disturbed == 0) begin
      failures++;
      $display("FAIL coverage: passed=%0d gated=%0d partial=%0d disturbed=%0d",
               passed, gated, partial, disturbed);
    end
    $display("cycles=%0d clock pulses passed=%0d suppressed=%0d partial-change=%0d high-phase disturbances=%0d",
             CYCLES, passed, gated, partial, disturbed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
