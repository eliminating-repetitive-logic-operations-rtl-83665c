// hsg_hcg: half-sum and half-carry generation for an N-bit addition.
//
// The first two stages of every ripple adder are the half-sum (a XOR b) and
// the half-carry (a AND b) of each bit pair. A conventional carry-select
// adder computes them twice, once in each of its two ripple adders; in this
// design they are computed once here and shared by both carry generators and
// by the final-sum generator. The sharing is the document's idea; the gates
// are the standard half adder.
//
// Interface: a, b (N bits) in; hs = a ^ b, hc = a & b out.
// Timing: purely combinational, one gate level.
module hsg_hcg #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] hs,
  output logic [N-1:0] hc
);

  always_comb begin
    hs = a ^ b;
    hc = a & b;
  end

endmodule
