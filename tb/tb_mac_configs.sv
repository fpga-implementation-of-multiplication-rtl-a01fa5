// tb_mac_configs: the multiply-accumulate unit in every size and adder kind compared.
//
// Instantiates vedic_mac at N = 4, 8 and 16 with each of the Kogge-Stone,
// Brent-Kung and Ladner-Fischer adders (the nine configurations whose multiplier or
// MAC sizes are reported) plus Han-Carlson at 16 bits. All share a clock and reset;
// each gets its own random operands every cycle (with bursts of all-ones operands
// so each sum wraps) and is compared after every rising edge with a model of
// c <= c + a*b mod 2^(2N). Random synchronous resets are applied to all at once.
// Watchdog: a failure is counted if the run has not ended after 100000 cycles.
module tb_mac_configs;
  import mac_pkg::*;
  int checks = 0, failures = 0, resets = 0;
  int wraps [10];

  logic clk;
  logic rst;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  a4 [3], b4 [3];
  logic [7:0]  c4 [3], m4 [3];
  logic [7:0]  a8 [3], b8 [3];
  logic [15:0] c8 [3], m8 [3];
  logic [15:0] a16 [4], b16 [4];
  logic [31:0] c16 [4], m16 [4];

  localparam adder_e KINDS [4] = '{ADDER_KS, ADDER_BK, ADDER_LF, ADDER_HC};

  for (genvar k = 0; k < 3; k++) begin : g_small
    vedic_mac #(.N(4), .KIND(KINDS[k])) u4 (.clk, .rst, .a(a4[k]), .b(b4[k]), .c(c4[k]));
    vedic_mac #(.N(8), .KIND(KINDS[k])) u8 (.clk, .rst, .a(a8[k]), .b(b8[k]), .c(c8[k]));
  end
  for (genvar k = 0; k < 4; k++) begin : g_16
    vedic_mac #(.N(16), .KIND(KINDS[k])) u16 (.clk, .rst, .a(a16[k]), .b(b16[k]), .c(c16[k]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check(string what, int k, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s kind %0d: c=%h expected %h", what, k, got, exp);
    end
  endfunction

  initial begin
    logic burst;
    for (int i = 0; i < 10; i++) wraps[i] = 0;
    rst = 1'b1;
    for (int k = 0; k < 4; k++) begin
      a16[k] = '0; b16[k] = '0; m16[k] = '0;
      if (k < 3) begin a4[k] = '0; b4[k] = '0; a8[k] = '0; b8[k] = '0; m4[k] = '0; m8[k] = '0; end
    end
    @(posedge clk);
    @(negedge clk);
    for (int n = 0; n < 20000; n++) begin
      burst = (n % 700) < 8;
      rst = (n % 700 == 699) || ($urandom_range(0, 499) == 0);
      for (int k = 0; k < 4; k++) begin
        a16[k] = burst ? '1 : 16'($urandom);
        b16[k] = burst ? '1 : 16'($urandom);
        if (k < 3) begin
          a4[k] = burst ? '1 : 4'($urandom);  b4[k] = burst ? '1 : 4'($urandom);
          a8[k] = burst ? '1 : 8'($urandom);  b8[k] = burst ? '1 : 8'($urandom);
        end
      end
      @(posedge clk);
      if (rst) resets++;
      for (int k = 0; k < 4; k++) begin
        logic [31:0] p16;
        p16 = 32'(a16[k]) * 32'(b16[k]);
        if (!rst && m16[k] + p16 < m16[k]) wraps[6+k]++;
        m16[k] = rst ? '0 : m16[k] + p16;
        if (k < 3) begin
          logic [7:0]  p4;
          logic [15:0] p8;
          p4 = 8'(a4[k]) * 8'(b4[k]);
          p8 = 16'(a8[k]) * 16'(b8[k]);
          if (!rst && m4[k] + p4 < m4[k]) wraps[k]++;
          if (!rst && m8[k] + p8 < m8[k]) wraps[3+k]++;
          m4[k] = rst ? '0 : m4[k] + p4;
          m8[k] = rst ? '0 : m8[k] + p8;
        end
      end
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        check("N=16", k, c16[k], m16[k]);
        if (k < 3) begin
          check("N=4", k, 32'(c4[k]), 32'(m4[k]));
          check("N=8", k, 32'(c8[k]), 32'(m8[k]));
        end
      end
    end
    checks++;
    if (resets == 0) begin failures++; $display("FAIL reset never applied"); end
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (wraps[i] == 0) begin failures++; $display("FAIL configuration %0d never wrapped", i); end
    end
    $display("resets=%0d", resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
