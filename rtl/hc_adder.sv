// hc_adder: N-bit Han-Carlson parallel-prefix adder.
//
// Bit i first forms P=a^b and G=a&b (carry-in folded into bit 0). Level 1 pairs
// every odd position with the even position below it. Levels 2 .. log2(N) run a
// Kogge-Stone tree over the odd positions only: at level m (m = 1 .. L-1) an odd
// position i >= 2^m + 1 absorbs the group ending 2^m places lower. A final level
// gives every even position i > 0 the prefix of position i-1. log2(N)+1 levels,
// about half the cells and wires of Kogge-Stone with fan-out kept low.
// sum[i] = P[i] ^ carry[i-1]. Combinational. The document only names this adder
// among those it considers; the network is the textbook Han-Carlson one.
// N must be a power of two.
module hc_adder
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
    if (k == 0) return (i % 2 == 1) ? i - 1 : -1;        // pair odd with even
    if (k == L) return (i % 2 == 0 && i > 0) ? i - 1 : -1; // fix up even positions
    // Kogge-Stone over odd positions, distance 2^k
    return (i % 2 == 1 && i >= (1 << k) + 1) ? i - (1 << k) : -1;
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
