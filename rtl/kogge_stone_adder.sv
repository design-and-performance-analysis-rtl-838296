// kogge_stone_adder: WIDTH-bit Kogge-Stone parallel prefix adder,
// {cout, s} = a + b + cin. Default WIDTH is 32.
//
// Three steps. Pre-computation forms per-bit propagate and generate. The
// prefix network then has log2(WIDTH) levels (5 for 32 bits); at level l every
// bit i >= 2^(l-1) merges its group with the group ending 2^(l-1) bits below,
// so every bit gets its carry after log2(WIDTH) cell delays and no node drives
// more than two cells. A merge whose lower group already reaches bit 0 is a
// gray cell (generate only); all others are black cells. Post-computation xors
// each bit's propagate with the carry into it.
//
// The carry input is folded into bit 0 ahead of the network by one gray cell,
// so group generates include it. The enable input isolates the operands and
// the carry input when low, forcing s and cout to zero (see pg_precompute).
// The network shape is the classic Kogge-Stone one; the carry-input folding and
// the enable behaviour are this design's choices. Purely combinational.
module kogge_stone_adder
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic             enable,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  pg_t  [WIDTH-1:0] pg_bit;
  logic             cin_q;
  logic [WIDTH-1:0] p_bit;
  logic [WIDTH-1:0] carry;

  pg_precompute #(.WIDTH(WIDTH)) u_pre (
    .enable(enable), .x(a), .y(b), .cin(cin), .pg(pg_bit), .cin_q(cin_q)
  );

  for (genvar l = 0; l <= LEVELS; l++) begin : lvl
    pg_t [WIDTH-1:0] node;
    if (l == 0) begin : g_fold
      // bit 0 absorbs the carry input; its group is then complete
      gray_cell u_cin (.hi(pg_bit[0]), .g_lo(cin_q), .g(node[0].g));
      assign node[0].p = 1'b0;
      assign node[WIDTH-1:1] = pg_bit[WIDTH-1:1];
    end else begin : g_merge
      localparam int unsigned D = 1 << (l - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : bitn
        if (i < D) begin : g_pass
          assign node[i] = lvl[l-1].node[i];
        end else if (i < 2 * D) begin : g_gray
          gray_cell u_g (.hi(lvl[l-1].node[i]), .g_lo(lvl[l-1].node[i-D].g), .g(node[i].g));
          assign node[i].p = 1'b0;
        end else begin : g_black
          black_cell u_b (.hi(lvl[l-1].node[i]), .lo(lvl[l-1].node[i-D]), .grp(node[i]));
        end
      end
    end
  end

  always_comb
    for (int i = 0; i < WIDTH; i++) begin
      p_bit[i] = pg_bit[i].p;
      carry[i] = lvl[LEVELS].node[i].g;
    end

  sum_postcompute #(.WIDTH(WIDTH)) u_post (
    .p(p_bit), .c(carry), .cin(cin_q), .s(s), .cout(cout)
  );

  initial assert (WIDTH >= 2 && (WIDTH & (WIDTH - 1)) == 0)
    else $error("kogge_stone_adder: WIDTH must be a power of two");

endmodule
