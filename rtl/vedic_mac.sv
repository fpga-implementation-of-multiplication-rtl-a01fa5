// vedic_mac: unsigned multiply-accumulate unit, c <= c + a*b on every clock.
//
// An NxN Vedic multiplier (q1) forms a*b combinationally; the 2N-bit accumulator
// (q2) adds that product to its register through a parallel-prefix adder each rising
// clock edge. All adders in the multiplier and the accumulator use the prefix network
// chosen by KIND. Timing: a and b are sampled at each rising edge and their product
// is visible in c after that edge; c wraps modulo 2^(2N). rst (synchronous, active
// high) clears c on the next edge. N may be 4, 8 or 16 (the three sizes the document
// reports); 16 is its main design.
// From the document: the multiplier-then-accumulator structure, the 16-bit size, the
// 32-bit output and the instance names. This design's choices: the reset style, the
// unsigned operands and the default adder kind (Ladner-Fischer).
module vedic_mac
  import mac_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter adder_e      KIND = ADDER_LF
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);
  logic [2*N-1:0] prod;

  if (N == 4) begin : g_m4
    vedic4 #(.KIND(KIND)) q1 (.a(a), .b(b), .c(prod));
  end else if (N == 8) begin : g_m8
    vedic8 #(.KIND(KIND)) q1 (.a(a), .b(b), .c(prod));
  end else begin : g_m16
    vedic16 #(.KIND(KIND)) q1 (.a(a), .b(b), .c(prod));
  end

  accumulator #(.W(2*N), .KIND(KIND)) q2 (.clk(clk), .rst(rst), .rin(prod), .rout(c));

  initial begin
    assert (N == 4 || N == 8 || N == 16) else $error("vedic_mac: N must be 4, 8 or 16");
  end
endmodule
