// scg_unit: sum and carry generator unit of the optimised carry-select adder.
//
// The unit holds one shared half-sum/half-carry generator (hsg_hcg) and two
// carry generators: CG0 for an input carry of 0 and CG1 for an input carry
// of 1. It passes on the half-sum word (needed later by the final-sum
// generator) and the two anticipated carry words. Unlike a conventional
// carry-select adder, it forms no sum words: the carry is selected first and
// the sum is formed once, afterwards. That schedule is the document's; the
// split into these sub-units follows its stage names.
//
// Interface: a, b (N bits) in; hs, c0w, c1w (N bits) out.
// Timing: purely combinational.
module scg_unit #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] hs,
  output logic [N-1:0] c0w,
  output logic [N-1:0] c1w
);

  logic [N-1:0] hc;

  hsg_hcg #(.N(N)) u_hsg_hcg (.a(a), .b(b), .hs(hs), .hc(hc));

  cg_unit #(.N(N), .CIN_FIXED(1'b0)) u_cg0 (.hs(hs), .hc(hc), .cw(c0w));
  cg_unit #(.N(N), .CIN_FIXED(1'b1)) u_cg1 (.hs(hs), .hc(hc), .cw(c1w));

endmodule
