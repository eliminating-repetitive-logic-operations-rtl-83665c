// csla_tb: self-checking test of the optimised single-stage carry-select
// adder at the two widths estimated for it, 8 and 16 bits.
// The 8-bit adder is tested exhaustively (all operand pairs, both input
// carries); the 16-bit adder with corner cases and random operands. The
// reference is the integer sum a + b + cin, split into sum and carry out.
module csla_tb;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        cin8, cout8, cin16, cout16;
  int checks = 0, failures = 0;

  csla #(.N(8)) dut8  (.a(a8),  .b(b8),  .cin(cin8),  .s(s8),  .cout(cout8));
  csla          dut16 (.a(a16), .b(b16), .cin(cin16), .s(s16), .cout(cout16));

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] exp;
    a16 = x; b16 = y; cin16 = c;
    #1;
    exp = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({cout16, s16} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL16 %h+%h+%b got %b_%h exp %h", x, y, c, cout16, s16, exp);
    end
  endtask

  initial begin
    logic [8:0] exp8;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin8 = 1'(c);
          #1;
          exp8 = 9'(x + y + c);
          checks++;
          if ({cout8, s8} !== exp8) begin
            failures++;
            if (failures < 10) $display("FAIL8 %h+%h+%b got %b_%h", a8, b8, cin8, cout8, s8);
          end
        end
    check16('1, '0, 1'b1);
    check16('1, '1, 1'b1);
    check16('0, '0, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom), 1'($urandom));
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
