// tb_accumulator: self-checking test of the accumulate register (accumulator).
//
// A 32-bit instance (default adder) and an 8-bit Kogge-Stone instance get a new
// random addend every clock. A testbench model keeps the expected sum modulo 2^W; the
// register is compared with it after every rising edge, which also checks the
// one-clock latency from rin to rout. Synchronous resets are inserted at random
// points and large addends force the sum to wrap. Inputs change on the falling edge.
// Watchdog: a failure is counted if the run has not ended after 200000 cycles.
module tb_accumulator;
  import mac_pkg::*;
  int checks = 0, failures = 0;
  int resets = 0, wraps = 0;

  logic        clk;
  logic        rst;
  logic [31:0] rin, rout, model;
  logic [7:0]  rin8, rout8, model8;

  accumulator                             dut   (.clk, .rst, .rin(rin),  .rout(rout));
  accumulator #(.W(8), .KIND(ADDER_KS))   dut8  (.clk, .rst, .rin(rin8), .rout(rout8));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; rin = '0; rin8 = '0;
    @(posedge clk);
    @(negedge clk);
    model = '0; model8 = '0;
    checks++;
    if (rout !== 32'd0 || rout8 !== 8'd0) begin
      failures++; $display("FAIL not cleared by reset");
    end
    for (int n = 0; n < 20000; n++) begin
      rst  = ($urandom_range(0, 99) == 0);
      rin  = (n % 500 < 10) ? 32'hF000_0000 | $urandom : $urandom;
      rin8 = 8'($urandom);
      @(posedge clk);
      if (rst) begin
        model = '0; model8 = '0; resets++;
      end else begin
        if (model + rin < model) wraps++;
        model  = model + rin;
        model8 = model8 + rin8;
      end
      @(negedge clk);
      checks++;
      if (rout !== model || rout8 !== model8) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: rout %h (exp %h), rout8 %h (exp %h)", n, rout, model, rout8, model8);
      end
    end
    checks++;
    if (resets == 0 || wraps == 0) begin
      failures++; $display("FAIL reset (%0d) or wrap (%0d) never exercised", resets, wraps);
    end
    $display("resets=%0d wraps=%0d", resets, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
