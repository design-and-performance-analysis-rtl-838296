// black_cell: the full prefix operator of a parallel prefix adder.
//
// It merges a higher group (hi, bits j+1 and up) with the adjacent lower group
// (lo, bits j and down) into one group:
//   group propagate  P = P_lo & P_hi
//   group generate   G = (G_lo & P_hi) | G_hi
// i.e. two AND gates and one OR gate. Purely combinational, no timing of its own.
module black_cell
  import ppa_pkg::pg_t;
(
  input  pg_t hi,   // higher-order group
  input  pg_t lo,   // adjacent lower-order group
  output pg_t grp   // merged group
);

  always_comb begin
    grp.p = lo.p & hi.p;
    grp.g = (lo.g & hi.p) | hi.g;
  end

endmodule
