// tb_lf_adder: self-checking test of the Ladner-Fischer adder (lf_adder).
//
// Three instances are checked against the behavioural sum a + b + cin:
// the default 16-bit adder with corner cases and 20000 random operand pairs, an 8-bit
// adder over every operand pair and both carry-ins, and a 4-bit adder on the worked
// example 1001 + 1100 = 10101. Combinational: each vector is applied and read after
// #1. A watchdog ends the run with a failure if it hangs.
module tb_lf_adder;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [3:0]  a4, b4, s4;
  logic        co4;

  lf_adder            dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  lf_adder #(.N(8))   dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  lf_adder #(.N(4))   dut4  (.a(a4),  .b(b4),  .cin(1'b0), .sum(s4),  .cout(co4));

  task automatic check16(logic [15:0] x, logic [15:0] y, logic c);
    logic [16:0] exp;
    a16 = x; b16 = y; ci16 = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + {16'b0, c};
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL 16-bit %h + %h + %b: got %h, expected %h", x, y, c, {co16, s16}, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked 4-bit example: A=1001, B=1100, SUM=10101.
    a4 = 4'b1001; b4 = 4'b1100; #1;
    checks++;
    if ({co4, s4} !== 5'b10101) begin
      failures++; $display("FAIL 4-bit example: got %b", {co4, s4});
    end

    // 16-bit corners: long carry chains in both directions.
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 16; i++) check16(16'(1) << i, (16'(1) << i) - 16'(1), 1'b1);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom), 1'($urandom));

    // 8-bit, exhaustive.
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8-bit %0d + %0d + %0d: got %0d", x, y, c, {co8, s8});
          end
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
