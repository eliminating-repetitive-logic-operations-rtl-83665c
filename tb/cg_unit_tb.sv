// cg_unit_tb: self-checking test of the carry generators CG0 and CG1.
// Both are instantiated at 16 bits and fed the half-sum/half-carry words of
// random and corner operand pairs. The expected carry out of bit i is taken
// from an integer addition of the low i+1 bits of the operands plus the
// fixed input carry: it is bit i+1 of that sum.
module cg_unit_tb;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, hs, hc, cw0, cw1;
  int checks = 0, failures = 0;

  assign hs = a ^ b;
  assign hc = a & b;

  cg_unit #(.N(N), .CIN_FIXED(1'b0)) dut0 (.hs(hs), .hc(hc), .cw(cw0));
  cg_unit #(.N(N), .CIN_FIXED(1'b1)) dut1 (.hs(hs), .hc(hc), .cw(cw1));

  function automatic logic carry_out_of(input logic [N-1:0] x, input logic [N-1:0] y,
                                        input logic c, input int i);
    longint unsigned mask, sum;
    mask = (longint'(1) << (i + 1)) - 1;
    sum  = (longint'(x) & mask) + (longint'(y) & mask) + longint'(c);
    return sum[i+1];
  endfunction

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    a = ta; b = tb_;
    #1;
    for (int i = 0; i < N; i++) begin
      checks += 2;
      if (cw0[i] !== carry_out_of(a, b, 1'b0, i)) begin
        failures++;
        if (failures < 10) $display("FAIL CG0 a=%h b=%h bit %0d got %b", a, b, i, cw0[i]);
      end
      if (cw1[i] !== carry_out_of(a, b, 1'b1, i)) begin
        failures++;
        if (failures < 10) $display("FAIL CG1 a=%h b=%h bit %0d got %b", a, b, i, cw1[i]);
      end
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '0);      // propagate everywhere: CG1 all ones, CG0 all zeros
    check_one('1, '1);
    check_one(16'h00FF, 16'h0001);
    check_one(16'h7FFF, 16'h0001);
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
