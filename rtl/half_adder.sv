// half_adder: one-bit half adder, s = a XOR b, c = a AND b.
//
// Purely combinational. Used twice in the 2x2 Vedic multiplier (vedic2), where the
// document draws it as a named box; its insides are the textbook ones.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
