// vedic8: 8x8 unsigned Urdhva Tiryakbhyam (Vedic) multiplier, combinational.
//
// The operands are split into halves. Four 4x4 Vedic multipliers (vedic4) form
// the vertical products Ah*Bh and Al*Bl and the crosswise products Al*Bh and Ah*Bl
// at the same time, and vedic_combine adds them with three 8-bit parallel-prefix
// adders of kind KIND. c = a * b with no clock.
// The document draws this arrangement for 16 bits and states that it extends to any
// n x n size; this smaller size applies the same scheme.
module vedic8
  import mac_pkg::*;
#(
  parameter adder_e KIND = ADDER_LF
) (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] c
);
  logic [7:0] q_hh, q_lh, q_hl, q_ll;

  vedic4 #(.KIND(KIND)) z1 (.a(a[3:0]),  .b(b[3:0]),  .c(q_ll));
  vedic4 #(.KIND(KIND)) z2 (.a(a[7:4]), .b(b[7:4]), .c(q_hh));
  vedic4 #(.KIND(KIND)) z3 (.a(a[3:0]),  .b(b[7:4]), .c(q_lh));
  vedic4 #(.KIND(KIND)) z4 (.a(a[7:4]), .b(b[3:0]),  .c(q_hl));

  vedic_combine #(.N(8), .KIND(KIND)) u_comb (
    .q_hh(q_hh), .q_lh(q_lh), .q_hl(q_hl), .q_ll(q_ll), .c(c));
endmodule
