// cg_unit: carry generation for one anticipated input carry.
//
// A carry-select adder works out, ahead of time, the carries for both
// possible values of the input carry. This unit produces the whole carry
// word for one of them: cw[i] is the carry out of bit i when the input carry
// equals CIN_FIXED. It ripples c(i) = hc(i) | (hs(i) & c(i-1)) from the
// shared half-sum/half-carry words. Because the input carry is a constant,
// bit 0 simplifies: cw[0] = hc[0] for CIN_FIXED = 0 (CG0) and
// cw[0] = hc[0] | hs[0] for CIN_FIXED = 1 (CG1). Only carries leave the unit;
// no sum word is formed for either anticipated carry.
//
// Using the fixed input carry to simplify the generator follows the
// document; the recurrence itself is the standard ripple carry, and making
// the fixed carry a parameter is this design's choice.
//
// Interface: hs, hc (N bits) in; cw (N bits) out.
// Timing: purely combinational; depth grows linearly with N.
// Lint note: CG0 never reads hs[0] (with input carry 0 the carry out of bit
// 0 is just the half-carry), so that input bit is unused in that variant.
module cg_unit #(
  parameter int unsigned N         = 16,
  parameter bit          CIN_FIXED = 1'b0
) (
  input  logic [N-1:0] hs,
  input  logic [N-1:0] hc,
  output logic [N-1:0] cw
);

  // Bit 0 folds in the fixed input carry.
  if (CIN_FIXED) begin : g_cin1
    assign cw[0] = hc[0] | hs[0];
  end else begin : g_cin0
    assign cw[0] = hc[0];
  end

  // Ripple of the carry recurrence through bits 1..N-1.
  for (genvar i = 1; i < N; i++) begin : g_ripple
    assign cw[i] = hc[i] | (hs[i] & cw[i-1]);
  end

endmodule
