// tb_state_change_detector -- self-checking testbench for the K-bit state
// change detector. Every combination of d and q is applied (2^(2K) vectors for
// the default K = 4) and `change` is compared with "some bit of d differs from
// the same bit of q", evaluated bit by bit here.
module tb_state_change_detector;
  localparam int unsigned K = 4;  // the block's default width

  logic [K-1:0] d, q;
  logic         change;
  int           checks = 0, failures = 0;

  state_change_detector dut (.d(d), .q(q), .change(change));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * K)); v++) begin
      logic expected;
      {d, q} = (2 * K)'(v);
      #1;
      expected = 1'b0;
      for (int i = 0; i < K; i++)
        if (d[i] != q[i]) expected = 1'b1;
      checks++;
      if (change !== expected) begin
        failures++;
        $display("FAIL d=%b q=%b change=%0b expected %0b", d, q, change, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
