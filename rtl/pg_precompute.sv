// pg_precompute: pre-computation stage of a parallel prefix adder.
//
// For every bit j it forms the propagate P[j] = X[j] xor Y[j] and the
// generate G[j] = X[j] and Y[j], all bits in parallel.
//
// The enable input stands in for the power gating the adders use: when it is
// low the operands and the carry input are forced to zero (operand isolation),
// so nothing behind this stage toggles and the adder's outputs settle at zero.
// How the gating works is this design's choice; only the fact that the adders
// are power gated is given. Purely combinational.
module pg_precompute
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic             enable,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output pg_t  [WIDTH-1:0] pg,      // per-bit (generate, propagate)
  output logic             cin_q    // carry input after gating
);

  logic [WIDTH-1:0] xq, yq;

  always_comb begin
    xq    = x & {WIDTH{enable}};
    yq    = y & {WIDTH{enable}};
    cin_q = cin & enable;
    for (int j = 0; j < WIDTH; j++) begin
      pg[j].p = xq[j] ^ yq[j];
      pg[j].g = xq[j] & yq[j];
    end
  end

endmodule
