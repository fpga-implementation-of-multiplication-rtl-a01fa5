// tb_vedic2: exhaustive self-checking test of the 2x2 Vedic multiplier (vedic2):
// all 16 operand pairs against a * b, including the worked example 11 x 11 = 1001.
// Combinational; watchdog ends a hung run.
module tb_vedic2;
  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] s;

  vedic2 dut (.a, .b, .s);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        a = 2'(x); b = 2'(y);
        #1;
        checks++;
        if (s !== 4'(x * y)) begin
          failures++;
          $display("FAIL %0d x %0d gave %0d", x, y, s);
        end
      end
    a = 2'b11; b = 2'b11; #1;
    checks++;
    if (s !== 4'b1001) begin
      failures++;
      $display("FAIL worked example 11 x 11 gave %b", s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
