// sqrt_csla_widths_tb: runs the square-root carry-select adder at the other
// operand widths it is evaluated at, 16 and 32 bits (64 bits is covered by
// sqrt_csla_tb). For each width it checks corner cases and random operands
// against the integer sum a + b + cin, and checks the stage count that the
// group-width rule gives: 5 stages at 16 bits (2,2,3,4,5) and 8 at 32 bits
// (2,2,3,4,5,6,7,3).
module sqrt_csla_widths_tb;
  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic        cin16, cout16, cin32, cout32;
  int checks = 0, failures = 0;

  sqrt_csla #(.N(16)) dut16 (.a(a16), .b(b16), .cin(cin16), .s(s16), .cout(cout16));
  sqrt_csla #(.N(32)) dut32 (.a(a32), .b(b32), .cin(cin32), .s(s32), .cout(cout32));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] exp;
    a16 = x; b16 = y; cin16 = c;
    #1;
    exp = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout16, s16} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h+%h+%b got %b_%h", x, y, c, cout16, s16);
    end
  endtask

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] exp;
    a32 = x; b32 = y; cin32 = c;
    #1;
    exp = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({cout32, s32} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL32 %h+%h+%b got %b_%h", x, y, c, cout32, s32);
    end
  endtask

  initial begin
    checks += 2;
    if ($bits(dut16.carry) - 1 != 5) begin failures++; $display("FAIL stage count 16"); end
    if ($bits(dut32.carry) - 1 != 8) begin failures++; $display("FAIL stage count 32"); end
    check16('1, '0, 1'b1);
    check16('1, '1, 1'b1);
    check16('0, '0, 1'b0);
    check32('1, '0, 1'b1);
    check32('1, '1, 1'b0);
    check32('0, '0, 1'b1);
    for (int n = 0; n < 20000; n++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
      check32($urandom, $urandom, 1'($urandom));
    end
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
