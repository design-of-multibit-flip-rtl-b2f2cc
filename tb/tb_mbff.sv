// tb_mbff -- self-checking testbench for the K-bit merged flip-flop. Checks
// the asynchronous reset (clears q without a clock edge), that q loads d on
// every rising edge, and that q holds while the clock is idle although d
// changes.
module tb_mbff;
  localparam int unsigned K = 4;  // the block's default width

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic [K-1:0] d = '1;
  logic [K-1:0] q;
  logic [K-1:0] expected;
  int           checks = 0, failures = 0;

  mbff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  task automatic check(input logic [K-1:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s at %0t: q=%b expected %b", what, $time, q, exp);
    end
  endtask

  initial begin : watchdog
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load all ones, then reset asynchronously
    #2 clk = 1'b1; #3 clk = 1'b0;
    check('1, "load before reset");
    #2 rst_n = 1'b0;
    #1 check('0, "asynchronous reset");
    #2 rst_n = 1'b1;
    for (int c = 0; c < 300; c++) begin
      d = K'($urandom);
      #4 clk = 1'b1;
      expected = d;
      #1;
      check(expected, "load on rising edge");
      d = K'($urandom);    // change while clock is high: must not load
      #4 clk = 1'b0;
      #1;
      check(expected, "hold until next edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
