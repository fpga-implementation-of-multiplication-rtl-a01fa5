// vedic2: 2x2 unsigned Urdhva Tiryakbhyam ("vertically and crosswise") multiplier.
//
// s[0] is the vertical product of the LSBs. The two crosswise products a0*b1 and
// a1*b0 are added by a half adder whose sum is s[1]; its carry is added to the
// vertical product of the MSBs by a second half adder, giving s[2] and s[3].
// Combinational, no clock. The wiring is the document's two-half-adder 2x2 cell;
// bit products are AND gates.
module vedic2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);
  logic c1;

  assign s[0] = a[0] & b[0];

  half_adder u_ha1 (.a(a[0] & b[1]), .b(a[1] & b[0]), .s(s[1]), .c(c1));
  half_adder u_ha2 (.a(c1),          .b(a[1] & b[1]), .s(s[2]), .c(s[3]));
endmodule
