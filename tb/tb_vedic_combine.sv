// tb_vedic_combine: self-checking test of the partial-product combiner (vedic_combine).
//
// The four inputs are fed with true half-size products of random (and extreme)
// 16-bit operands, computed in the testbench with '*', for every adder kind; the
// output must equal the full 32-bit product. An 8-bit instance is checked over all
// operand pairs. Combinational; watchdog ends a hung run.
module tb_vedic_combine;
  import mac_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] hh, lh, hl, ll;
  logic [31:0] c [4];
  logic [7:0]  hh8, lh8, hl8, ll8;
  logic [15:0] c8;

  vedic_combine #(.N(16), .KIND(ADDER_KS)) u_ks (.q_hh(hh), .q_lh(lh), .q_hl(hl), .q_ll(ll), .c(c[0]));
  vedic_combine #(.N(16), .KIND(ADDER_BK)) u_bk (.q_hh(hh), .q_lh(lh), .q_hl(hl), .q_ll(ll), .c(c[1]));
  vedic_combine #(.N(16), .KIND(ADDER_LF)) u_lf (.q_hh(hh), .q_lh(lh), .q_hl(hl), .q_ll(ll), .c(c[2]));
  vedic_combine #(.N(16), .KIND(ADDER_HC)) u_hc (.q_hh(hh), .q_lh(lh), .q_hl(hl), .q_ll(ll), .c(c[3]));
  vedic_combine #(.N(8)) u_8 (.q_hh(hh8), .q_lh(lh8), .q_hl(hl8), .q_ll(ll8), .c(c8));

  task automatic apply16(logic [15:0] x, logic [15:0] y);
    hh = 16'(x[15:8] * y[15:8]);
    lh = 16'(x[7:0]  * y[15:8]);
    hl = 16'(x[15:8] * y[7:0]);
    ll = 16'(x[7:0]  * y[7:0]);
    #1;
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (c[k] !== 32'(x) * 32'(y)) begin
        failures++;
        if (failures < 10) $display("FAIL kind %0d: %0d x %0d gave %0d", k, x, y, c[k]);
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
    apply16(16'hFFFF, 16'hFFFF);
    apply16(16'hFFFF, 16'h0001);
    apply16(16'h00FF, 16'hFF00);
    apply16(16'h80FF, 16'h80FF);
    for (int n = 0; n < 20000; n++) apply16(16'($urandom), 16'($urandom));
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        hh8 = 8'(x[7:4] * y[7:4]);
        lh8 = 8'(x[3:0] * y[7:4]);
        hl8 = 8'(x[7:4] * y[3:0]);
        ll8 = 8'(x[3:0] * y[3:0]);
        #1;
        checks++;
        if (c8 !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d x %0d gave %0d", x, y, c8);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
