// bk_adder: N-bit Brent-Kung parallel-prefix adder.
//
// Bit i first forms P=a^b and G=a&b (carry-in folded into bit 0). An up-sweep of
// log2(N) levels builds a binary tree: at level k, every position i with
// (i+1) a multiple of 2^(k+1) absorbs the group 2^k places lower, so the positions
// 2^m-1 end up holding full prefixes. A down-sweep of log2(N)-1 levels then fills
// the remaining positions: at distance d = 2^k, positions i with (i+1) mod 2d == d
// and i > d absorb the prefix ending at i-d. Few cells and short wires, twice the
// depth of Kogge-Stone. sum[i] = P[i] ^ carry[i-1]. Combinational.
// The node positions follow the document's 16-bit drawing; the drawing packs two
// tree nodes into one stage, here they are successive levels with the same function.
// N must be a power of two.
module bk_adder
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
  localparam int LV = (L > 0) ? 2 * L - 1 : 0;

  // Position whose group position i absorbs at level k, or -1 for a plain wire.
  function automatic int partner(int k, int i);
    int d;
    if (k < L) begin
      // up-sweep: distance 2^k, positions 2^(k+1)-1, 2*2^(k+1)-1, ...
      d = 1 << k;
      return ((i + 1) % (2 * d) == 0) ? i - d : -1;
    end
    // down-sweep: distance 2^(2L-2-k), positions 3d-1, 5d-1, ...
    d = 1 << (2 * L - 2 - k);
    return ((i + 1) % (2 * d) == d && i > d) ? i - d : -1;
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
