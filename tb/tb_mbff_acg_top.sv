// tb_mbff_acg_top -- end-to-end testbench of the whole design at its default
// sizes: the 2-bit and the 4-bit multibit flip-flop with adaptive clock
// gating, run side by side on one clock.
//
// Each group gets its own random data stream. The per-bit toggle probability
// steps through 1 %, 10 % (the range of flip-flop activity the gating scheme
// is aimed at) and 50 %, and the two groups are driven with different
// probabilities so that one may be gated while the other is clocked. An
// ungated reference register per group gives the expected outputs. Checked
// every cycle: q of each group, its clk_en (high exactly when some bit
// changes), and that q holds through the cycle. The rising edges of both
// internal gated clocks are counted against the expected number of passed
// pulses.
//
// Each mechanism of the design is counted and must occur at least once:
// a suppressed clock pulse and a passed one in each group, a passed pulse
// caused by only some of the bits changing, cycles where one group is
// gated while the other is clocked, a data change during the high phase of
// the clock (must not reach the flip-flops), and the asynchronous reset.
module tb_mbff_acg_top;
  localparam int unsigned KA     = 2;
  localparam int unsigned KB     = 4;
  localparam int          CYCLES = 3000;

  logic          clk   = 1'b0;
  logic          rst_n = 1'b1;
  logic [KA-1:0] d_a   = '0, q_a, ref_a = '0;
  logic [KB-1:0] d_b   = '0, q_b, ref_b = '0;
  logic          a_clk_en, b_clk_en;

  int checks = 0, failures = 0;
  int rises_a = 0, rises_b = 0;
  int passed_a = 0, gated_a = 0, passed_b = 0, gated_b = 0;
  int partial = 0, split = 0, disturbed = 0, resets = 0;

  mbff_acg_top dut (
    .clk(clk), .rst_n(rst_n),
    .d_a(d_a), .q_a(q_a), .a_clk_en(a_clk_en),
    .d_b(d_b), .q_b(q_b), .b_clk_en(b_clk_en)
  );

  always @(posedge dut.u_mbff_a.u_ff.clk) rises_a++;
  always @(posedge dut.u_mbff_b.u_ff.clk) rises_b++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: q_a=%b ref_a=%b q_b=%b ref_b=%b en=%0b%0b",
               what, $time, q_a, ref_a, q_b, ref_b, a_clk_en, b_clk_en);
    end
  endtask

  function automatic logic [KB-1:0] toggle_mask(input int per_mille);
    logic [KB-1:0] m;
    for (int i = 0; i < KB; i++) m[i] = ($urandom_range(0, 999) < per_mille);
    return m;
  endfunction

  task automatic require(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

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
      logic en_a, en_b;
      int   pa, pb;
      pa = (c < 1000) ? 10  : (c < 2000) ? 100 : 500;
      pb = (c < 1000) ? 100 : (c < 2000) ? 10  : 500;
      // rising edge
      en_a = (d_a != ref_a);
      en_b = (d_b != ref_b);
      if (en_a) passed_a++; else gated_a++;
      if (en_b) passed_b++; else gated_b++;
      if (en_b && d_b != ~ref_b) partial++;
      if (en_a != en_b) split++;
      clk   = 1'b1;
      ref_a = d_a;
      ref_b = d_b;
      #1;
      check(q_a == ref_a, "2-bit group q after edge");
      check(q_b == ref_b, "4-bit group q after edge");
      check(a_clk_en == en_a, "2-bit group clk_en");
      check(b_clk_en == en_b, "4-bit group clk_en");
      if ($urandom_range(0, 9) == 0) begin
        d_a = d_a ^ KA'(toggle_mask(500));
        d_b = d_b ^ toggle_mask(500);
        if (d_a != ref_a || d_b != ref_b) disturbed++;
      end
      #3;
      check(q_a == ref_a && q_b == ref_b, "hold in high phase");
      #1 clk = 1'b0;
      if (c % 1000 == 999) begin
        #1 rst_n = 1'b0;
        ref_a = '0;
        ref_b = '0;
        resets++;
        #1 check(q_a == '0 && q_b == '0, "asynchronous reset");
        rst_n = 1'b1;
        #1;
      end else begin
        #3;
      end
      check(q_a == ref_a && q_b == ref_b, "hold in low phase");
      d_a = ref_a ^ KA'(toggle_mask(pa));
      d_b = ref_b ^ toggle_mask(pb);
      #2;
    end
    checks++;
    if (rises_a != passed_a || rises_b != passed_b) begin
      failures++;
      $display("FAIL gated clock edges: 2-bit %0d (expected %0d), 4-bit %0d (expected %0d)",
               rises_a, passed_a, rises_b, passed_b);
    end
    require(gated_a,   "2-bit group clock suppressed");
    require(passed_a,  "2-bit group clock passed");
    require(gated_b,   "4-bit group clock suppressed");
    require(passed_b,  "4-bit group clock passed");
    require(partial,   "pulse passed for a partial change of the 4-bit group");
    require(split,     "one group gated while the other is clocked");
    require(disturbed, "data change during the high clock phase");
    require(resets,    "asynchronous reset");
    $display("2-bit group: %0d of %0d clock pulses suppressed", gated_a, CYCLES);
    $display("4-bit group: %0d of %0d clock pulses suppressed", gated_b, CYCLES);
    $display("partial=%0d split=%0d disturbed=%0d resets=%0d", partial, split, disturbed, resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
