// tb_vedic_mac: end-to-end test of the 16-bit multiply-accumulate unit at its defaults.
//
// Phase 1 replays the reference operand sequence (56x98, 50x20, 100x50, 30x20,
// 80x90, 126x79, 256x56, 36x96, 32x25, then a reset with 100x20 on the inputs) and
// checks c after every clock against the running sum worked out by hand.
// Phase 2 runs 50000 cycles of random operands, maximum-value bursts that make the
// 32-bit sum wrap, and random synchronous resets, comparing c with a model each
// cycle (this also checks the one-clock latency). It counts how often each mechanism
// occurred (accumulate, reset while accumulating, wrap-around, maximum product) and
// counts a failure for any that never did. Inputs change on the falling edge.
// Watchdog: a failure is counted if the run has not ended after 200000 cycles.
module tb_vedic_mac;
  int checks = 0, failures = 0;
  int n_acc = 0, n_rst = 0, n_wrap = 0, n_max = 0;

  logic        clk;
  logic        rst;
  logic [15:0] a, b;
  logic [31:0] c, model;

  vedic_mac dut (.clk, .rst, .a, .b, .c);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One clock: apply operands, take the edge, update the model, compare.
  task automatic step(logic r, logic [15:0] x, logic [15:0] y);
    logic [31:0] p;
    rst = r; a = x; b = y;
    @(posedge clk);
    p = 32'(x) * 32'(y);
    if (r) begin
      if (model != 0) n_rst++;
      model = '0;
    end else begin
      n_acc++;
      if (model + p < model) n_wrap++;
      if (x == 16'hFFFF && y == 16'hFFFF) n_max++;
      model = model + p;
    end
    @(negedge clk);
    checks++;
    if (c !== model) begin
      failures++;
      if (failures < 10) $display("FAIL rst=%b %0d x %0d: c=%0d expected %0d", r, x, y, c, model);
    end
  endtask

  localparam int NSEQ = 10;
  localparam logic [15:0] SEQ_A [NSEQ] = '{56, 50, 100, 30, 80, 126, 256, 36, 32, 100};
  localparam logic [15:0] SEQ_B [NSEQ] = '{98, 20,  50, 20, 90,  79,  56, 96, 25,  20};
  // Running sums written out by hand; the last entry is the reset.
  localparam logic [31:0] SEQ_C [NSEQ] = '{5488, 6488, 11488, 12088, 19288, 29242, 43578, 47034, 47834, 0};

  initial begin
    a = '0; b = '0; rst = 1'b1;
    model = '0;
    @(negedge clk);
    step(1'b1, 16'd0, 16'd0);

    // Phase 1: reference sequence.
    for (int i = 0; i < NSEQ; i++) begin
      step(i == NSEQ - 1, SEQ_A[i], SEQ_B[i]);
      checks++;
      if (c !== SEQ_C[i]) begin
        failures++;
        $display("FAIL reference step %0d: c=%0d expected %0d", i, c, SEQ_C[i]);
      end
    end

    // Phase 2: random traffic with bursts of maximum products and random resets.
    for (int n = 0; n < 50000; n++) begin
      if (n % 1000 < 20) step(1'b0, 16'hFFFF, 16'hFFFF);
      else               step($urandom_range(0, 199) == 0, 16'($urandom), 16'($urandom));
    end

    $display("accumulate=%0d reset=%0d wrap=%0d max_product=%0d", n_acc, n_rst, n_wrap, n_max);
    checks++;
    if (n_acc == 0 || n_rst == 0 || n_wrap == 0 || n_max == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
