// tb_vedic16: self-checking test of the 16x16 Vedic multiplier (vedic16).
//
// One instance per adder kind. Applies the operand pairs of the reference waveform
// (25x25=625, 56x89=4984, 256x58=14848, 156x65=10140, 78x45=3510, 36x54=1944,
// 200x200=40000), extreme values, walking ones and 20000 random pairs; each product
// is compared with a * b computed in the testbench. Combinational, read #1 after each
// vector. A watchdog ends a hung run as a failure.
module tb_vedic16;
  import mac_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] a, b;
  logic [31:0] c [4];

  vedic16 #(.KIND(ADDER_KS)) u_ks (.a, .b, .c(c[0]));
  vedic16 #(.KIND(ADDER_BK)) u_bk (.a, .b, .c(c[1]));
  vedic16 #(.KIND(ADDER_LF)) u_lf (.a, .b, .c(c[2]));
  vedic16 #(.KIND(ADDER_HC)) u_hc (.a, .b, .c(c[3]));

  task automatic apply(logic [15:0] x, logic [15:0] y, logic [31:0] exp);
    a = x; b = y;
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (c[k] !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d: %0d x %0d gave %0d, expected %0d", k, x, y, c[k], exp);
      end
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
    logic [15:0] x, y;
    // Reference waveform values, expected products written out.
    apply(16'd25,  16'd25,  32'd625);
    apply(16'd56,  16'd89,  32'd4984);
    apply(16'd256, 16'd58,  32'd14848);
    apply(16'd156, 16'd65,  32'd10140);
    apply(16'd78,  16'd45,  32'd3510);
    apply(16'd36,  16'd54,  32'd1944);
    apply(16'd200, 16'd200, 32'd40000);
    apply(16'hFFFF, 16'hFFFF, 32'hFFFE_0001);
    apply(16'hFFFF, 16'h0000, 32'h0);
    apply(16'h8000, 16'h8000, 32'h4000_0000);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) apply(16'(1) << i, 16'hFFFF >> j, 32'(16'(1) << i) * 32'(16'hFFFF >> j));
    for (int n = 0; n < 20000; n++) begin
      x = 16'($urandom); y = 16'($urandom);
      apply(x, y, 32'(x) * 32'(y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
