// scg_unit_tb: self-checking test of the sum and carry generator unit.
// For random and corner operands, checks the half-sum word against the
// carry-less sum and both anticipated carry words against integer addition
// of the operands' low bits with input carry 0 and 1.
module scg_unit_tb;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, hs, c0w, c1w;
  int checks = 0, failures = 0;

  scg_unit #(.N(N)) dut (.a(a), .b(b), .hs(hs), .c0w(c0w), .c1w(c1w));

  // Carry out of every bit position for input carry c: bit i of the result
  // is bit i+1 of (low i+1 bits of x) + (low i+1 bits of y) + c.
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

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic [N-1:0] exp_hs;
    a = ta; b = tb_;
    #1;
    for (int i = 0; i < N; i++) exp_hs[i] = (a[i] != b[i]);
    checks += 3;
    if (hs !== exp_hs) begin
      failures++;
      if (failures < 10) $display("FAIL hs a=%h b=%h got %h", a, b, hs);
    end
    if (c0w !== carry_word(a, b, 1'b0)) begin
      failures++;
      if (failures < 10) $display("FAIL c0w a=%h b=%h got %h", a, b, c0w);
    end
    if (c1w !== carry_word(a, b, 1'b1)) begin
      failures++;
      if (failures < 10) $display("FAIL c1w a=%h b=%h got %h", a, b, c1w);
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '0);
    check_one('1, '1);
    check_one(16'h8000, 16'h8000);
    for (int n = 0; n < 3000; n++) check_one(N'($urandom), N'($urandom));
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
