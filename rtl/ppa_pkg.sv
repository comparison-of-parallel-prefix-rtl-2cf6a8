// ppa_pkg: types and helper functions shared by the parallel prefix adders.
//
// A prefix adder works on (generate, propagate) pairs. pg_t is that pair; the
// fundamental carry operator (carry_operator) combines two of them. The
// functions below give, for a power-of-two width N, how many carry operators
// and how many operator levels each prefix network uses. They are the usual
// closed forms for the two networks and serve the testbenches as an
// independent reference for the structural counts the adders report:
//   Kogge-Stone: N*log2(N) - N + 1 operators, log2(N) levels
//   Brent-Kung : 2N - 2 - log2(N) operators, 2*log2(N) - 1 levels
package ppa_pkg;

  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group propagates an incoming carry
  } pg_t;

  function automatic int unsigned ksa_cells(int unsigned n);
    return n * $clog2(n) - n + 1;
  endfunction

  function automatic int unsigned ksa_levels(int unsigned n);
    return $clog2(n);
  endfunction

  function automatic int unsigned bka_cells(int unsigned n);
    return (n < 2) ? 0 : 2 * n - 2 - $clog2(n);
  endfunction

  function automatic int unsigned bka_levels(int unsigned n);
    return (n < 2) ? 0 : 2 * $clog2(n) - 1;
  endfunction

endpackage
