// tb_ddcg_mbff_activity -- runs the multibit flip-flop with data-driven clock
// gating at the group sizes k = 2, 4 and 8 over flip-flop activities of 0.01,
// 0.05 and 0.1 (the usual range of data-to-clock toggling ratios), checking
// the register function every cycle and that the share of suppressed clock
// pulses matches the probability (1 - p)^k that no bit of the group toggles.
// The printed fractions show how the gating benefit shrinks as k grows.
module tb_ddcg_mbff_activity;
  logic done2, done4, done8;
  int   checks2, checks4, checks8;
  int   failures2, failures4, failures8;

  ddcg_activity_run #(.K(2)) run2 (.done(done2), .checks(checks2), .failures(failures2));
  ddcg_activity_run #(.K(4)) run4 (.done(done4), .checks(checks4), .failures(failures4));
  ddcg_activity_run #(.K(8)) run8 (.done(done8), .checks(checks8), .failures(failures8));

  initial begin : watchdog
    #(10 * 3 * 20000 + 1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks4 + checks8,
             failures2 + failures4 + failures8 + 1);
    $finish;
  end

  initial begin
    wait (done2 && done4 && done8);
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks2 + checks4 + checks8,
             failures2 + failures4 + failures8);
    $finish;
  end
endmodule
