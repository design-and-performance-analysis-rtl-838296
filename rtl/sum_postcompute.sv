// sum_postcompute: post-computation stage of a parallel prefix adder.
//
// c[j] is the carry out of bit j, i.e. the generate of the complete group
// j..0 including the carry input, as produced by the prefix network. Each sum
// bit is the bit's own propagate xor the carry into it:
//   S[0] = P[0] xor Cin,   S[j+1] = P[j+1] xor C[j]
// and the adder's carry-out is C[WIDTH-1]. Purely combinational.
module sum_postcompute
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic [WIDTH-1:0] p,     // per-bit propagate from pre-computation
  input  logic [WIDTH-1:0] c,     // carry out of each bit from the prefix network
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  always_comb begin
    s[0] = p[0] ^ cin;
    for (int j = 0; j < WIDTH - 1; j++) s[j+1] = p[j+1] ^ c[j];
    cout = c[WIDTH-1];
  end

endmodule
