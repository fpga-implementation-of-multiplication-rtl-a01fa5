// ks_adder: N-bit Kogge-Stone parallel-prefix adder.
//
// Bit i first forms P=a^b and G=a&b (the carry-in is folded into bit 0's generate).
// The prefix tree has log2(N) levels; at level k every position i >= 2^k combines its
// group with the group ending 2^k places lower, so after the last level position i
// holds the carry out of bits i..0. Fan-out is one per level, at the cost of the most
// cells and wires of the adders here. sum[i] = P[i] ^ carry[i-1].
// Combinational. The preprocessing, sum formula and stage layout follow the
// document's 4- and 16-bit drawings; the combining cell is the standard prefix operator.
// N must be a power of two.
module ks_adder
  import mac_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  localparam int LV = $clog2(N);

  // Position whose group position i absorbs at level k, or -1 for a plain wire.
  function automatic int partner(int k, int i);
    return (i >= (1 << k)) ? i - (1 << k) : -1;
  endfunction

  pg_t pre [N];
  logic [N-1:0] carry;

  for (genvar i = 0; i < N; i++) begin : g_pre
    if (i == 0) begin : g_b0
      assign pre[i] = '{g: (a[i] & b[i]) | ((a[i] ^ b[i]) & cin), p: a[i] ^ b[i]};
    end else begin : g_bi
      assign pre[i] = '{g: a[i] & b[i], p: a[i] ^ b[i]};
    end
  end

  for (genvar k = 0; k < LV; k++) begin : g_lvl
    pg_t row [N];
    for (genvar i = 0; i < N; i++) begin : g_pos
      localparam int PT = partner(k, i);
      if (k == 0 && PT >= 0) begin : g_cell0
        assign row[i] = pg_dot(pre[i], pre[PT]);
      end else if (k == 0) begin : g_wire0
        assign row[i] = pre[i];
      end else if (PT >= 0) begin : g_cell
        assign row[i] = pg_dot(g_lvl[k-1].row[i], g_lvl[k-1].row[PT]);
      end else begin : g_wire
        assign row[i] = g_lvl[k-1].row[i];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_sum
    assign carry[i] = g_lvl[LV-1].row[i].g;
    if (i == 0) begin : g_s0
      assign sum[i] = pre[i].p ^ cin;
    end else begin : g_si
      assign sum[i] = pre[i].p ^ carry[i-1];
    end
  end
  assign cout = carry[N-1];
endmodule
