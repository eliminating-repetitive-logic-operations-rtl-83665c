// sqrt_csla: square-root carry-select adder built from optimised CSLA stages.
//
// The N-bit addition is cut into groups of growing width (2, 2, 3, 4, 5, ...
// bits from the least significant end; see csla_pkg). Each group is a csla
// stage. All stages generate their two anticipated carry words at once, in
// parallel; the only serial path is the chain of output carries, each of
// which passes through just the two-level carry selector of the next stage.
// Wider groups sit further up the chain, so their longer carry generation is
// hidden behind the select carries arriving from below.
// Building the square-root adder from the optimised CSLA stage is the
// document's proposal; the group widths are this design's choice.
//
// Interface: a, b (N bits), cin in; s (N bits), cout out.
// Timing: purely combinational.
module sqrt_csla
  import csla_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);

  localparam int unsigned G = group_count(N);

  // carry[k] is the input carry of group k; carry[G] is the adder's output carry.
  logic [G:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < G; k++) begin : g_stage
    localparam int unsigned OFF = group_offset(N, k);
    localparam int unsigned W   = group_size(N, k);

    csla #(.N(W)) u_csla (
      .a   (a[OFF +: W]),
      .b   (b[OFF +: W]),
      .cin (carry[k]),
      .s   (s[OFF +: W]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[G];

endmodule
