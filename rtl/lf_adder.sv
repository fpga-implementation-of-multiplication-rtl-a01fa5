// lf_adder: N-bit Ladner-Fischer parallel-prefix adder.
//
// Bit i first forms P=a^b and G=a&b (carry-in folded into bit 0). Level 1 pairs
// every odd position with the even position below it. Levels 2 .. log2(N) run a
// minimum-depth, high-fan-out (Sklansky style) tree over the odd positions: with
// j = (i-1)/2, at level m a position whose bit m of j is set absorbs the prefix
// ending at the top of the block below it. A final level gives every even position
// i > 0 the prefix of position i-1. log2(N)+1 levels in all, fewer cells than
// Kogge-Stone, larger fan-out. sum[i] = P[i] ^ carry[i-1]. Combinational.
// The document describes this adder as low-depth, O(log n), with high fan-out; the
// exact network above is the textbook Ladner-Fischer one. N must be a power of two.
module lf_adder
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
  localparam int L  = $clog2(N);
  localparam int LV = L + 1;

  // Position whose group position i absorbs at level k, or -1 for a plain wire.
  function automatic int partner(int k, int i);
    int j, m;
    if (k == 0) return (i % 2 == 1) ? i - 1 : -1;        // pair odd with even
    if (k == L) return (i % 2 == 0 && i > 0) ? i - 1 : -1; // fix up even positions
    // Sklansky tree over odd positions, index j = (i-1)/2, tree level m
    m = k - 1;
    j = i / 2;
    if (i % 2 == 1 && ((j >> m) & 1) == 1) return 2 * (((j >> m) << m) - 1) + 1;
    return -1;
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
