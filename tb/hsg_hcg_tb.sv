// hsg_hcg_tb: self-checking test of the half-sum/half-carry generator.
// Drives corner words and random words into a 16-bit instance and checks
// every bit against the one-bit arithmetic sum of its operand bits: the
// half-sum is that sum's low bit and the half-carry its high bit.
module hsg_hcg_tb;
  localparam int unsigned N = 16;

  logic [N-1:0] a, b, hs, hc;
  int checks = 0, failures = 0;

  hsg_hcg #(.N(N)) dut (.a(a), .b(b), .hs(hs), .hc(hc));

  task automatic check_one(input logic [N-1:0] ta, input logic [N-1:0] tb_);
    logic [1:0] bitsum;
    a = ta; b = tb_;
    #1;
    for (int i = 0; i < N; i++) begin
      bitsum = 2'(a[i]) + 2'(b[i]);
      checks++;
      if (hs[i] !== bitsum[0] || hc[i] !== bitsum[1]) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h bit %0d hs=%b hc=%b", a, b, i, hs[i], hc[i]);
      end
    end
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, '0);
    check_one('0, '1);
    check_one(16'hAAAA, 16'h5555);
    for (int n = 0; n < 2000; n++) check_one(N'($urandom), N'($urandom));
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
