// brent_kung_adder: WIDTH-bit Brent-Kung parallel prefix adder,
// {cout, s} = a + b + cin. Default WIDTH is 32.
//
// The prefix network works on bit groups of growing size. An up-sweep of
// log2(WIDTH) levels forms the prefixes of 2-bit groups, then of 4-bit groups
// from those, then 8-bit and so on: at up level u (span D = 2^(u-1)) only the
// bits i with (i+1) a multiple of 2D merge with the group ending D bits below.
// This leaves every bit 2^k - 1 with its complete carry. A down-sweep of
// log2(WIDTH) - 1 levels then fills in the remaining bits from those carries:
// at down level with span D, bit i with (i+1) = D modulo 2D (and i >= 3D - 1)
// merges with the complete group ending at bit i - D. That is 2*log2(WIDTH) - 1
// levels in all (9 for 32 bits), with few cells and a fan-out of at most two
// per node and level. Merges whose lower group reaches bit 0 are gray cells,
// all others black cells.
//
// Pre- and post-computation, the folding of the carry input into bit 0 and
// the enable (operand isolation) behaviour are shared with the other adders;
// the latter two are this design's choices. Purely combinational.
module brent_kung_adder
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

  localparam int unsigned L      = $clog2(WIDTH);
  localparam int unsigned LEVELS = 2 * L - 1;

  pg_t  [WIDTH-1:0] pg_bit;
  logic             cin_q;
  logic [WIDTH-1:0] p_bit;
  logic [WIDTH-1:0] carry;

  pg_precompute #(.WIDTH(WIDTH)) u_pre (
    .enable(enable), .x(a), .y(b), .cin(cin), .pg(pg_bit), .cin_q(cin_q)
  );

  for (genvar k = 0; k <= LEVELS; k++) begin : lvl
    pg_t [WIDTH-1:0] node;
    if (k == 0) begin : g_fold
      gray_cell u_cin (.hi(pg_bit[0]), .g_lo(cin_q), .g(node[0].g));
      assign node[0].p = 1'b0;
      assign node[WIDTH-1:1] = pg_bit[WIDTH-1:1];
    end else if (k <= L) begin : g_up
      localparam int unsigned D = 1 << (k - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : bitn
        if ((i + 1) % (2 * D) != 0) begin : g_pass
          assign node[i] = lvl[k-1].node[i];
        end else if (i + 1 == 2 * D) begin : g_gray
          gray_cell u_g (.hi(lvl[k-1].node[i]), .g_lo(lvl[k-1].node[i-D].g), .g(node[i].g));
          assign node[i].p = 1'b0;
        end else begin : g_black
          black_cell u_b (.hi(lvl[k-1].node[i]), .lo(lvl[k-1].node[i-D]), .grp(node[i]));
        end
      end
    end else begin : g_down
      localparam int unsigned D = 1 << (2 * L - k - 1);
      for (genvar i = 0; i < WIDTH; i++) begin : bitn
        if ((i + 1) % (2 * D) == D && i + 1 >= 3 * D) begin : g_gray
          gray_cell u_g (.hi(lvl[k-1].node[i]), .g_lo(lvl[k-1].node[i-D].g), .g(node[i].g));
          assign node[i].p = 1'b0;
        end else begin : g_pass
          assign node[i] = lvl[k-1].node[i];
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
    else $error("brent_kung_adder: WIDTH must be a power of two");

endmodule
