// mac_pkg: types and the prefix operator shared by the adders, multipliers and MAC.
//
// adder_e names the parallel-prefix network an adder, multiplier or MAC is built
// with. The document compares Kogge-Stone, Brent-Kung and Ladner-Fischer adders inside
// the Vedic multiplier and also names Han-Carlson; the parameter lets each of them be
// built. pg_t is a (generate, propagate) pair and pg_dot the associative prefix
// operator applied by every black cell: (G,P) o (G',P') = (G | P&G', P&P').
package mac_pkg;

  typedef enum logic [1:0] {
    ADDER_KS = 2'd0,  // Kogge-Stone
    ADDER_BK = 2'd1,  // Brent-Kung
    ADDER_LF = 2'd2,  // Ladner-Fischer
    ADDER_HC = 2'd3   // Han-Carlson
  } adder_e;

  typedef struct packed {
    logic g;
    logic p;
  } pg_t;

  // Combine a higher group (hi) with the adjacent lower group (lo).
  function automatic pg_t pg_dot(pg_t hi, pg_t lo);
    pg_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
