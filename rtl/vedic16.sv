// vedic16: 16x16 unsigned Urdhva Tiryakbhyam (Vedic) multiplier, combinational.
//
// The operands are split into halves. Four 8x8 Vedic multipliers (vedic8) form
// the vertical products Ah*Bh and Al*Bl and the crosswise products Al*Bh and Ah*Bl
// at the same time, and vedic_combine adds them with three 16-bit parallel-prefix
// adders of kind KIND. c = a * b with no clock.
// The split and the adder arrangement are the document's 16-bit multiplier; the instance
// names z1..z4 and u1..u3 follow its schematic.
module vedic16
  import mac_pkg::*;
#(
  parameter adder_e KIND = ADDER_LF
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] c
);
  logic [15:0] q_hh, q_lh, q_hl, q_ll;

  vedic8 #(.KIND(KIND)) z1 (.a(a[7:0]),  .b(b[7:0]),  .c(q_ll));
  vedic8 #(.KIND(KIND)) z2 (.a(a[15:8]), .b(b[15:8]), .c(q_hh));
  vedic8 #(.KIND(KIND)) z3 (.a(a[7:0]),  .b(b[15:8]), .c(q_lh));
  vedic8 #(.KIND(KIND)) z4 (.a(a[15:8]), .b(b[7:0]),  .c(q_hl));

  vedic_combine #(.N(16), .KIND(KIND)) u_comb (
    .q_hh(q_hh), .q_lh(q_lh), .q_hl(q_hl), .q_ll(q_ll), .c(c));
endmodule
