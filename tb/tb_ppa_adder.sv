// tb_ppa_adder: self-checking test of the selectable prefix adder (ppa_adder).
//
// One 16-bit instance per adder kind (Kogge-Stone, Brent-Kung, Ladner-Fischer,
// Han-Carlson) plus a 32-bit instance of the default kind are driven with the same
// random operands and carry-in; every output is compared with a + b + cin.
// Combinational, read #1 after each vector. A watchdog ends a hung run as a failure.
module tb_ppa_adder;
  import mac_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] a, b;
  logic        cin;
  logic [15:0] s [4];
  logic        co [4];
  logic [31:0] a32, b32, s32;
  logic        co32;

  ppa_adder #(.N(16), .KIND(ADDER_KS)) u_ks (.a, .b, .cin, .sum(s[0]), .cout(co[0]));
  ppa_adder #(.N(16), .KIND(ADDER_BK)) u_bk (.a, .b, .cin, .sum(s[1]), .cout(co[1]));
  ppa_adder #(.N(16), .KIND(ADDER_LF)) u_lf (.a, .b, .cin, .sum(s[2]), .cout(co[2]));
  ppa_adder #(.N(16), .KIND(ADDER_HC)) u_hc (.a, .b, .cin, .sum(s[3]), .cout(co[3]));
  ppa_adder #(.N(32))                  u_32 (.a(a32), .b(b32), .cin, .sum(s32), .cout(co32));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [16:0] exp;
    logic [32:0] exp32;
    for (int n = 0; n < 20000; n++) begin
      if (n == 0) begin
        a = 16'hFFFF; b = 16'h0000; cin = 1'b1; a32 = '1; b32 = '0;
      end else begin
        a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
        a32 = $urandom; b32 = $urandom;
      end
      #1;
      exp   = {1'b0, a} + {1'b0, b} + {16'b0, cin};
      exp32 = {1'b0, a32} + {1'b0, b32} + {32'b0, cin};
      for (int k = 0; k < 4; k++) begin
        checks++;
        if ({co[k], s[k]} !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL kind %0d: %h + %h + %b gave %h", k, a, b, cin, {co[k], s[k]});
        end
      end
      checks++;
      if ({co32, s32} !== exp32) begin
        failures++;
        if (failures < 10) $display("FAIL 32-bit: %h + %h + %b gave %h", a32, b32, cin, {co32, s32});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
