// ppa_pkg: types and constants shared by the parallel prefix adders.
//
// A prefix adder works on (generate, propagate) pairs. pg_t bundles one such
// pair, for a single bit after pre-computation or for a group of bits after
// one or more prefix cells. DEFAULT_WIDTH is the 32-bit operand size the
// adders are built for; every adder takes it as the default of its WIDTH
// parameter and accepts any power of two of at least 2.
package ppa_pkg;

  localparam int unsigned DEFAULT_WIDTH = 32;

  typedef struct packed {
    logic g;  // group generates a carry
    logic p;  // group propagates an incoming carry
  } pg_t;

endpackage
