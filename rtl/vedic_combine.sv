// vedic_combine: final stage of an NxN Vedic multiplier built from four (N/2)x(N/2) ones.
//
// With A = {Ah,Al}, B = {Bh,Bl} and H = N/2 the product is
//   q_hh<<N + (q_lh + q_hl)<<H + q_ll.
// Three N-bit parallel-prefix adders do this:
//   adder 1: q_lh + q_hl                          -> s1, carry c1
//   adder 2: s1 + {H zeros, q_ll[N-1:H]}          -> s2, carry c2
//   adder 3: q_hh + {H-1 zeros, c1|c2, s2[N-1:H]} -> product[2N-1:N]
// and product[N-1:H] = s2[H-1:0], product[H-1:0] = q_ll[H-1:0].
// c1 and c2 are never both 1 (if c1 is set, s1 is small enough that adder 2 cannot
// carry), so an OR gate merges them. Adder 3's carry out is always 0 and unused.
// Combinational. This is the document's 16-bit combining scheme, parameterised in N.
module vedic_combine
  import mac_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter adder_e      KIND = ADDER_LF
) (
  input  logic [N-1:0]   q_hh,   // A(high) * B(high)
  input  logic [N-1:0]   q_lh,   // A(low)  * B(high)
  input  logic [N-1:0]   q_hl,   // A(high) * B(low)
  input  logic [N-1:0]   q_ll,   // A(low)  * B(low)
  output logic [2*N-1:0] c
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] s1, s2, s3;
  logic         c1, c2, c3;

  ppa_adder #(.N(N), .KIND(KIND)) u1 (
    .a(q_lh), .b(q_hl), .cin(1'b0), .sum(s1), .cout(c1));
  ppa_adder #(.N(N), .KIND(KIND)) u2 (
    .a(s1), .b({{H{1'b0}}, q_ll[N-1:H]}), .cin(1'b0), .sum(s2), .cout(c2));
  ppa_adder #(.N(N), .KIND(KIND)) u3 (
    .a(q_hh), .b({{(H-1){1'b0}}, c1 | c2, s2[N-1:H]}), .cin(1'b0), .sum(s3), .cout(c3));

  assign c = {s3, s2[H-1:0], q_ll[H-1:0]};

  // The two middle carries are exclusive and the top adder never overflows.
  always_comb begin
    assert (!(c1 && c2)) else $error("vedic_combine: c1 and c2 both set");
    assert (!c3)         else $error("vedic_combine: top adder carried out");
  end
endmodule
