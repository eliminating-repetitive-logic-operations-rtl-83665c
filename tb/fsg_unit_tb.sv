// fsg_unit_tb: self-checking test of the final-sum generator.
// For random operands and both input carries, the unit is given the true
// half-sum word and the true carry word, and its sum must equal the low N
// bits of the integer sum a + b + cin.
module fsg_unit_tb;
  localparam int unsigned N = 16;

  logic [N-1:0] hs, cw, s;
  logic         cin;
  int checks = 0, failures = 0;

  fsg_unit #(.N(N)) dut (.hs(hs), .cw(cw), .cin(cin), .s(s));

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

  task automatic check_one(input logic [N-1:0] x, input logic [N-1:0] y, input logic c);
    logic [N-1:0] exp_s;
    hs  = x ^ y;
    cw  = carry_word(x, y, c);
    cin = c;
    #1;
    exp_s = N'(longint'(x) + longint'(y) + longint'(c));
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b s=%h exp=%h", x, y, c, s, exp_s);
    end
  endtask

  initial begin
    check_one('1, '0, 1'b1);
    check_one('1, '1, 1'b0);
    check_one('0, '0, 1'b1);
    for (int n = 0; n < 3000; n++) check_one(N'($urandom), N'($urandom), 1'($urandom));
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
