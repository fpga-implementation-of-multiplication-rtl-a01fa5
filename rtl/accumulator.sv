// accumulator: W-bit accumulate register with a parallel-prefix adder in its feedback path.
//
// Every rising clock edge the register takes rout + rin (mod 2^W), so the sum of all
// inputs since reset builds up one term per cycle; the adder's carry out is dropped.
// rst is synchronous and active high and clears the register on the next edge.
// rout is the register itself: a value presented on rin appears added into rout one
// clock later. The document gives this block's ports and job (add the product to the
// stored result each clock); the reset style and the use of a prefix adder of kind
// KIND in the feedback path are this design's choices, the latter following the
// document's move from ripple-carry to prefix adders.
module accumulator
  import mac_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter adder_e      KIND = ADDER_LF
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] rin,
  output logic [W-1:0] rout
);
  logic [W-1:0] nxt;
  logic         carry_unused;

  ppa_adder #(.N(W), .KIND(KIND)) u_add (
    .a(rout), .b(rin), .cin(1'b0), .sum(nxt), .cout(carry_unused));

  always_ff @(posedge clk) begin
    if (rst) rout <= '0;
    else     rout <= nxt;
  end
endmodule
