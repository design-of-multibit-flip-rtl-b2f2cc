// mbff_acg_top -- the two multibit flip-flops with adaptive clock gating of
// this design, side by side: a 2-bit group and a 4-bit group, each with its
// own state-change detector and clock gate, driven by a common clock and
// reset.
//
// Each group behaves as an ordinary register of its width (q follows d one
// clock later) while its flip-flops are clocked only in cycles where at least
// one of its bits changes. The per-group `*_clk_en` outputs show, cycle by
// cycle, whether the group's clock pulse was passed.
//
// The group sizes 2 and 4 are the two sizes the design is presented at;
// sharing one clock and reset between the groups is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low); d_a/q_a/a_clk_en for
// the K_A-bit group, d_b/q_b/b_clk_en for the K_B-bit group.
module mbff_acg_top #(
  parameter int unsigned K_A = 2,
  parameter int unsigned K_B = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [K_A-1:0] d_a,
  output logic [K_A-1:0] q_a,
  output logic           a_clk_en,
  input  logic [K_B-1:0] d_b,
  output logic [K_B-1:0] q_b,
  output logic           b_clk_en
);

  ddcg_mbff #(.K(K_A)) u_mbff_a (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (d_a),
    .q      (q_a),
    .clk_en (a_clk_en)
  );

  ddcg_mbff #(.K(K_B)) u_mbff_b (
    .clk    (clk),
    .rst_n  (rst_n),
    .d      (d_b),
    .q      (q_b),
    .clk_en (b_clk_en)
  );

endmodule
