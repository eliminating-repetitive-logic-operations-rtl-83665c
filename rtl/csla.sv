// csla: optimised single-stage carry-select adder (CSLA).
//
// Adds a + b + cin over N bits. The redundant work of a conventional CSLA
// (two full ripple adders, each computing its own half sums and sums) is
// removed:
//   1. scg_unit  - one shared half-sum/half-carry generator feeds two carry
//                  generators, CG0 (input carry 0) and CG1 (input carry 1);
//                  no sum words are formed.
//   2. cs_unit   - the real input carry selects the final carry word with
//                  one AND-OR per bit; the output carry comes from it.
//   3. fsg_unit  - the sum is formed once, from the half-sum word and the
//                  selected carry word.
// Scheduling carry selection before final-sum generation, and the early
// output carry that results, are the document's; the gate-level forms of
// the units are this design's reading of it.
//
// Interface: a, b (N bits), cin in; s (N bits), cout out.
// Timing: purely combinational. The path from cin to cout is two gate
// levels, which is what makes this stage suited to square-root chaining.
module csla #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  logic [N-1:0] hs, c0w, c1w, cw;

  scg_unit #(.N(N)) u_scg (.a(a), .b(b), .hs(hs), .c0w(c0w), .c1w(c1w));
  cs_unit  #(.N(N)) u_cs  (.c0w(c0w), .c1w(c1w), .cin(cin), .cw(cw), .cout(cout));
  fsg_unit #(.N(N)) u_fsg (.hs(hs), .cw(cw), .cin(cin), .s(s));

endmodule
