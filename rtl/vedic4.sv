// vedic4: 4x4 unsigned Urdhva Tiryakbhyam (Vedic) multiplier, combinational.
//
// The operands are split into halves. Four 2x2 Vedic multipliers (vedic2) form
// the vertical products Ah*Bh and Al*Bl and the crosswise products Al*Bh and Ah*Bl
// at the same time, and vedic_combine adds them with three 4-bit parallel-prefix
// adders of kind KIND. c = a * b with no clock.
// The document draws this arrangement for 16 bits and states that it extends to any
// n x n size; this smaller size applies the same scheme.
module vedic4
  import mac_pkg::*;
#(
  parameter adder_e KIND = ADDER_LF
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] c
);
  logic [3:0] q_hh, q_lh, q_hl, q_ll;

  vedic2 z1 (.a(a[1:0]),  .b(b[1:0]),  .s(q_ll));
  vedic2 z2 (.a(a[3:2]), .b(b[3:2]), .s(q_hh));
  vedic2 z3 (.a(a[1:0]),  .b(b[3:2]), .s(q_lh));
  vedic2 z4 (.a(a[3:2]), .b(b[1:0]),  .s(q_hl));

  vedic_combine #(.N(4), .KIND(KIND)) u_comb (
    .q_hh(q_hh), .q_lh(q_lh), .q_hl(q_hl), .q_ll(q_ll), .c(c));
endmodule
