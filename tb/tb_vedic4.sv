// tb_vedic4: exhaustive self-checking test of the 4x4 Vedic multiplier (vedic4).
//
// One instance per adder kind; every operand pair is applied and each product is
// compared with a * b computed in the testbench. Combinational, read #1 after each
// vector. A watchdog ends a hung run as a failure.
module tb_vedic4;
  import mac_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0] a, b;
  logic [7:0] c [4];

  vedic4 #(.KIND(ADDER_KS)) u_ks (.a, .b, .c(c[0]));
  vedic4 #(.KIND(ADDER_BK)) u_bk (.a, .b, .c(c[1]));
  vedic4 #(.KIND(ADDER_LF)) u_lf (.a, .b, .c(c[2]));
  vedic4 #(.KIND(ADDER_HC)) u_hc (.a, .b, .c(c[3]));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < (1 << 4); x++)
      for (int y = 0; y < (1 << 4); y++) begin
        a = 4'(x); b = 4'(y);
        #1;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (c[k] !== 8'(x * y)) begin
            failures++;
            if (failures < 10) $display("FAIL kind %0d: %0d x %0d gave %0d", k, x, y, c[k]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
