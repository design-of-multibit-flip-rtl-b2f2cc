// mbff -- K-bit multibit flip-flop: K positive-edge D flip-flops merged into
// one cell so that they share a single clock input (and, in silicon, a single
// clock driver instead of one per flip-flop).
//
// On each rising edge of `clk` all K bits load `d`. The asynchronous
// active-low reset clears them; reset is not part of the published cell and is
// added here so that the stored state is defined after power-up.
//
// Interface: clk, rst_n, d[K-1:0] in; q[K-1:0] out, valid after the edge.
module mbff #(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d,
  output logic [K-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
