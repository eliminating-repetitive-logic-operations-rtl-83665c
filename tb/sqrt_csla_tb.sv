// sqrt_csla_tb: end-to-end test of the square-root carry-select adder at its
// default width (64 bits, no parameter overrides).
// Applies corner cases and random operand pairs with both input carries and
// checks {cout, s} against the 65-bit integer sum a + b + cin.
// It also counts how often each mechanism of the design was exercised, and
// counts a failure for any that never happened:
//   sel1      - a stage above the first selected its carry-1 word
//   sel0      - a stage above the first selected its carry-0 word
//   chain     - a carry entered at cin and travelled through every stage
//               (all half-sums 1, cin 1), the longest select path
//   overflow  - the adder produced an output carry
//   kill      - cin was 1 but the top stage's input carry was 0 (the
//               carry was absorbed on the way)
module sqrt_csla_tb;
  localparam int unsigned N = 64;

  logic [N-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;
  int n_sel1 = 0, n_sel0 = 0, n_chain = 0, n_overflow = 0, n_kill = 0;

  sqrt_csla dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  localparam int unsigned G = $bits(dut.carry) - 1;  // number of stages

  task automatic check_one(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N:0] exp;
    a = x; b = y; cin = c;
    #1;
    exp = (N+1)'(x) + (N+1)'(y) + (N+1)'(c);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b got %b_%h exp %h", x, y, c, cout, s, exp);
    end
    for (int k = 1; k < int'(G); k++) begin
      if (dut.carry[k]) n_sel1++;
      else              n_sel0++;
    end
    if (c && (x ^ y) == '1 && cout) n_chain++;
    if (c && !dut.carry[G-1]) n_kill++;
    if (cout) n_overflow++;
  endtask

  initial begin
    $display("stages: %0d", G);
    check_one('0, '0, 1'b0);
    check_one('1, '0, 1'b1);                 // carry through every stage
    check_one('1, '1, 1'b1);
    check_one(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    check_one(64'h0000_0000_FFFF_FFFF, 64'h0000_0000_0000_0001, 1'b0);
    check_one(64'h7FFF_FFFF_FFFF_FFFF, 64'h0000_0000_0000_0001, 1'b0);
    // One carry origin at every bit position, carried to the top.
    for (int i = 0; i < int'(N); i++)
      check_one(~(N'(1) << i) | (N'(1) << i), N'(1) << i, 1'b0);
    for (int n = 0; n < 20000; n++)
      check_one({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("mechanisms: sel1=%0d sel0=%0d chain=%0d overflow=%0d kill=%0d",
             n_sel1, n_sel0, n_chain, n_overflow, n_kill);
    checks += 5;
    if (n_sel1 == 0)     failures++;
    if (n_sel0 == 0)     failures++;
    if (n_chain == 0)    failures++;
    if (n_overflow == 0) failures++;
    if (n_kill == 0)     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
