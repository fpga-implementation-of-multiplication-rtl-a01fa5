// tb_half_adder: exhaustive self-checking test of half_adder (all four input pairs,
// sum = a XOR b, carry = a AND b). Combinational; watchdog ends a hung run.
module tb_half_adder;
  int checks = 0, failures = 0;
  logic a, b, s, c;

  half_adder dut (.a, .b, .s, .c);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({c, s} !== 2'(a + b)) begin
        failures++;
        $display("FAIL %b + %b gave carry %b sum %b", a, b, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
