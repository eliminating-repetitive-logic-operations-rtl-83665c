// cs_unit: carry selection unit.
//
// Chooses the final carry word from the two anticipated carry words, with
// the real input carry as the control. A plain n-bit 2-to-1 multiplexer
// would do, but the two words always follow a fixed bit pattern: wherever
// the carry word for input carry 0 holds a 1, the word for input carry 1
// holds a 1 too (a larger input carry never removes a carry). So
//     cw[i] = c0w[i] | (c1w[i] & cin)
// gives the same result with one AND and one OR per bit. The output carry is
// the top bit of the selected word, available before any sum bit is formed.
// Exploiting the bit pattern in the selector is the document's idea; the
// exact gate form follows from it. The assertion checks the pattern holds.
//
// Interface: c0w, c1w (N bits), cin in; cw (N bits), cout out.
// Timing: purely combinational, two gate levels from cin to every output.
module cs_unit #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] c0w,
  input  logic [N-1:0] c1w,
  input  logic         cin,
  output logic [N-1:0] cw,
  output logic         cout
);

  always_comb begin
    cw   = c0w | (c1w & {N{cin}});
    cout = cw[N-1];
  end

  // The carry word for input carry 0 must be covered by the one for carry 1.
  always_comb begin
    assert ((c0w & ~c1w) == '0)
      else $error("cs_unit: carry word pattern violated, c0w=%h c1w=%h", c0w, c1w);
  end

endmodule
