// ppa_adder: N-bit parallel-prefix adder with a selectable prefix network.
//
// KIND picks Kogge-Stone, Brent-Kung, Ladner-Fischer or Han-Carlson; all four give
// sum = (a + b + cin) mod 2^N and the carry out, and differ only in depth, cell
// count and fan-out. Combinational. Every adder of the Vedic multiplier and the
// accumulator is one of these, so one parameter switches the whole MAC between the
// adders compared in the document. N must be a power of two.
module ppa_adder
  import mac_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter adder_e      KIND = ADDER_LF
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  if (KIND == ADDER_KS) begin : g_ks
    ks_adder #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (KIND == ADDER_BK) begin : g_bk
    bk_adder #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else if (KIND == ADDER_LF) begin : g_lf
    lf_adder #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end else begin : g_hc
    hc_adder #(.N(N)) u_add (.a, .b, .cin, .sum, .cout);
  end
endmodule
