// tb_ptl_and2 -- self-checking testbench for ptl_and2: applies all four input
// combinations several times, in varying order, and compares y with the
// two-input AND truth table computed here.
module tb_ptl_and2;
  logic a, b, y;
  int   checks = 0, failures = 0;

  ptl_and2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int v = 0; v < 4; v++) begin
        logic [1:0] ab;
        logic       expected;
        ab = 2'(v) ^ 2'(rep);
        {a, b} = ab;
        #1;
        expected = (ab == 2'b11);
        checks++;
        if (y !== expected) begin
          failures++;
          $display("FAIL a=%0b b=%0b y=%0b expected %0b", a, b, y, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
