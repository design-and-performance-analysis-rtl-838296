// ladner_fischer_adder: WIDTH-bit Ladner-Fischer parallel prefix adder,
// {cout, s} = a + b + cin. Default WIDTH is 32.
//
// The Ladner-Fischer family lies between the Brent-Kung and Sklansky trees.
// Two members are offered through ODD_EVEN_SPLIT:
//
//  * ODD_EVEN_SPLIT = 0 (default): log2(WIDTH) levels, 5 for 32 bits. At level
//    l (span D = 2^(l-1)) every bit i whose bit (l-1) is set merges with the
//    group ending just below its aligned 2D-bit block, i.e. at bit
//    (i with its low l-1 bits cleared) - 1. Levels 1..5 thus build complete
//    prefixes for 2-, 4-, 8-, 16- and 32-bit blocks with few cells, at the
//    price of a fan-out that doubles from level to level.
//
//  * ODD_EVEN_SPLIT = 1: the prefixes are first built for the odd bits only
//    (level 1 pairs each odd bit with the even bit below it, then a
//    Sklansky-type tree over the odd bits), and one extra level ripples the
//    result into the even bits: log2(WIDTH) + 1 levels, about half the cells
//    and half the fan-out of the tree part.
//
// Merges whose lower group reaches bit 0 are gray cells, the rest black cells.
// The choice of the 5-level member as default, the carry-input folding into
// bit 0 and the enable (operand isolation, see pg_precompute) behaviour are
// this design's choices. Purely combinational.
module ladner_fischer_adder
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH          = DEFAULT_WIDTH,
  parameter bit          ODD_EVEN_SPLIT = 1'b0
) (
  input  logic             enable,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  localparam int unsigned L      = $clog2(WIDTH);
  localparam int unsigned LEVELS = ODD_EVEN_SPLIT ? L + 1 : L;

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
      gray_cell u_cin (.hi(pg_bit[0]), .g_lo(cin_q), .g(node[0].g));
      assign node[0].p = 1'b0;
      assign node[WIDTH-1:1] = pg_bit[WIDTH-1:1];
    end else if (!ODD_EVEN_SPLIT) begin : g_skl
      localparam int unsigned D = 1 << (l - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : bitn
        localparam int LO = ((i >> (l - 1)) << (l - 1)) - 1;
        if (((i >> (l - 1)) & 1) == 0) begin : g_pass
          assign node[i] = lvl[l-1].node[i];
        end else if (i < 2 * D) begin : g_gray
          gray_cell u_g (.hi(lvl[l-1].node[i]), .g_lo(lvl[l-1].node[LO].g), .g(node[i].g));
          assign node[i].p = 1'b0;
        end else begin : g_black
          black_cell u_b (.hi(lvl[l-1].node[i]), .lo(lvl[l-1].node[LO]), .grp(node[i]));
        end
      end
    end else if (l == 1) begin : g_pair
      // odd bits absorb the even bit below them
      for (genvar i = 0; i < WIDTH; i++) begin : bitn
        if (i % 2 == 0) begin : g_pass
          assign node[i] = lvl[0].node[i];
        end else if (i == 1) begin : g_gray
          gray_cell u_g (.hi(lvl[0].node[1]), .g_lo(lvl[0].node[0].g), .g(node[1].g));
          assign node[1].p = 1'b0;
        end else begin : g_black
          black_cell u_b (.hi(lvl[0].node[i]), .lo(lvl[0].node[i-1]), .grp(node[i]));
        end
      end
    end else if (l < LEVELS) begin : g_odd
      // Sklansky level m = l-1 over the odd bits, odd bit i = 2k+1
      localparam int unsigned M  = l - 1;
      localparam int unsigned DM = 1 << (M - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : bitn
        localparam int unsigned K  = i / 2;
        localparam int KL = ((K >> (M - 1)) << (M - 1)) - 1;
        if (i % 2 == 0 || ((K >> (M - 1)) & 1) == 0) begin : g_pass
          assign node[i] = lvl[l-1].node[i];
        end else if (K < 2 * DM) begin : g_gray
          gray_cell u_g (.hi(lvl[l-1].node[i]), .g_lo(lvl[l-1].node[2*KL+1].g), .g(node[i].g));
          assign node[i].p = 1'b0;
        end else begin : g_black
          black_cell u_b (.hi(lvl[l-1].node[i]), .lo(lvl[l-1].node[2*KL+1]), .grp(node[i]));
        end
      end
    end else begin : g_even
      // last level: every even bit takes the complete carry of the odd bit below
      for (genvar i = 0; i < WIDTH; i++) begin : bitn
        if (i % 2 == 1 || i == 0) begin : g_pass
          assign node[i] = lvl[l-1].node[i];
        end else begin : g_gray
          gray_cell u_g (.hi(lvl[l-1].node[i]), .g_lo(lvl[l-1].node[i-1].g), .g(node[i].g));
          assign node[i].p = 1'b0;
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
    else $error("ladner_fischer_adder: WIDTH must be a power of two");

endmodule
