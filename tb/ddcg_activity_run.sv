// ddcg_activity_run -- one K-bit multibit flip-flop with data-driven clock
// gating, run with its own clock through a series of activity levels.
//
// For each activity p in ACTIVITIES (per mille), CYCLES_PER_P cycles are run
// in which every bit toggles independently with probability p. Per cycle the
// outputs are compared with an ungated reference register and clk_en with
// "some bit changes". Per activity level the fraction of clock pulses that
// were suppressed is compared with the probability that no bit of the group
// toggles, (1 - p)^K: the two must agree to within TOL_PER_MILLE. Used by
// tb_ddcg_mbff_activity for several group sizes.
//
// Outputs: done rises once all levels have run; checks and failures count
// this instance's checks.
module ddcg_activity_run #(
  parameter int unsigned K             = 4,
  parameter int unsigned CYCLES_PER_P  = 20000,
  parameter int unsigned TOL_PER_MILLE = 15
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NUM_P = 3;
  localparam int ACTIVITIES [NUM_P] = '{10, 50, 100};  // 0.01, 0.05, 0.1

  logic         clk   = 1'b0;
  logic         rst_n = 1'b1;
  logic [K-1:0] d     = '0;
  logic [K-1:0] q;
  logic [K-1:0] q_ref = '0;
  logic         clk_en;
  int           ff_edges = 0;

  ddcg_mbff #(.K(K)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .clk_en(clk_en));

  always @(posedge dut.u_ff.clk) ff_edges++;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    #1 rst_n = 1'b0;
    #2 rst_n = 1'b1;
    #2;
    for (int pi = 0; pi < NUM_P; pi++) begin
      int  suppressed, passed, edges_before;
      real expected_frac, measured_frac;
      suppressed   = 0;
      passed       = 0;
      edges_before = ff_edges;
      for (int c = 0; c < int'(CYCLES_PER_P); c++) begin
        logic expect_en;
        expect_en = (d != q_ref);
        if (expect_en) passed++; else suppressed++;
        clk   = 1'b1;
        q_ref = d;
        #1;
        checks++;
        if (q != q_ref || clk_en != expect_en) begin
          failures++;
          $display("FAIL K=%0d at %0t: q=%b expected %b, clk_en=%0b expected %0b",
                   K, $time, q, q_ref, clk_en, expect_en);
        end
        #4 clk = 1'b0;
        for (int i = 0; i < int'(K); i++)
          if ($urandom_range(0, 999) < ACTIVITIES[pi]) d[i] = ~q_ref[i];
          else                                         d[i] = q_ref[i];
        #5;
      end
      checks++;
      if (ff_edges - edges_before != passed) begin
        failures++;
        $display("FAIL K=%0d p=%0d/1000: flip-flops saw %0d clock edges, expected %0d",
                 K, ACTIVITIES[pi], ff_edges - edges_before, passed);
      end
      expected_frac = (1.0 - ACTIVITIES[pi] / 1000.0) ** K;
      measured_frac = real'(suppressed) / real'(CYCLES_PER_P);
      checks++;
      if (measured_frac - expected_frac > TOL_PER_MILLE / 1000.0 ||
          expected_frac - measured_frac > TOL_PER_MILLE / 1000.0) begin
        failures++;
        $display("FAIL K=%0d p=%0d/1000: suppressed fraction %f, (1-p)^K = %f",
                 K, ACTIVITIES[pi], measured_frac, expected_frac);
      end
      $display("K=%0d p=%0.2f: %0d of %0d clock pulses suppressed (%f, (1-p)^K = %f)",
               K, ACTIVITIES[pi] / 1000.0, suppressed, CYCLES_PER_P, measured_frac, expected_frac);
    end
    done = 1'b1;
  end
endmodule
