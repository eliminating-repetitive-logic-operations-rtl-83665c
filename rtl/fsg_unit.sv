// fsg_unit: final-sum generation.
//
// Forms the sum once the carry word has been selected: each sum bit is the
// half-sum of its bit pair XOR the carry into that bit, which is the input
// carry for bit 0 and the selected carry out of bit i-1 otherwise.
// Forming the sum after carry selection is the document's schedule; the XOR
// per bit is the standard full-sum stage.
//
// Interface: hs, cw (N bits), cin in; s (N bits) out.
// Timing: purely combinational, one XOR level.
module fsg_unit #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] hs,
  input  logic [N-1:0] cw,
  input  logic         cin,
  output logic [N-1:0] s
);

  // cw[N-1] is the output carry; it feeds no sum bit here.
  always_comb begin
    s[0] = hs[0] ^ cin;
    for (int unsigned i = 1; i < N; i++)
      s[i] = hs[i] ^ cw[i-1];
  end

endmodule
