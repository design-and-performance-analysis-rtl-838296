// gray_cell: the reduced prefix operator of a parallel prefix adder.
//
// Used where the lower group already reaches bit 0 (or the carry input), so
// the merged group is complete and its generate is the carry out of the
// higher group's top bit. Only the generate is formed:
//   G = (G_lo & P_hi) | G_hi
// The group propagate of a complete group is never needed, so it is not built.
// Purely combinational.
module gray_cell
  import ppa_pkg::pg_t;
(
  input  pg_t  hi,    // higher-order group
  input  logic g_lo,  // generate (carry) of the complete lower group
  output logic g      // carry out of the top bit of hi
);

  always_comb g = (g_lo & hi.p) | hi.g;

endmodule
