// cs_unit_tb: self-checking test of the carry selection unit.
// The two input carry words are the true carry words of random operand
// pairs for input carry 0 and 1 (worked out by integer addition), so they
// always have the bit pattern the unit relies on. The selected word must
// equal the word for the applied input carry, and cout its top bit.
// Both values of cin are applied to every pair.
module cs_unit_tb;
  localparam int unsigned N = 16;

  logic [N-1:0] c0w, c1w, cw;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cs_unit #(.N(N)) dut (.c0w(c0w), .c1w(c1w), .cin(cin), .cw(cw), .cout(cout));

  function automatic logic [N-1:0] carry_word(input logic [N-1:0] x, input logic [N-1:0] y,
                                              input logic c);
    longint unsigned mask, sum;
    logic [N-1:0] w;
    for (int i = 0; i < N; i++) begin
      mask = (longint'(1) << (i + 1)) - 1;
      sum  = (longint'(x) & mask) + (longint'(y) & mask) + longint'(c);
      w[i] = sum[i+1];
    end
    return w;
  endfunction

  task automatic check_pair(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0] exp_w;
    c0w = carry_word(x, y, 1'b0);
    c1w = carry_word(x, y, 1'b1);
    for (int c = 0; c < 2; c++) begin
      cin = 1'(c);
      #1;
      exp_w = cin ? c1w : c0w;
      checks += 2;
      if (cw !== exp_w) begin
        failures++;
        if (failures < 10) $display("FAIL cw cin=%b c0w=%h c1w=%h got %h", cin, c0w, c1w, cw);
      end
      if (cout !== exp_w[N-1]) begin
        failures++;
        if (failures < 10) $display("FAIL cout cin=%b got %b", cin, cout);
      end
    end
  endtask

  initial begin
    check_pair('1, '0);       // c0w all zeros, c1w all ones
    check_pair('1, '1);
    check_pair('0, '0);
    check_pair(16'h0F0F, 16'h00F1);
    for (int n = 0; n < 3000; n++) check_pair(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
