// ppa32_top: the three 32-bit parallel prefix adders side by side.
//
// Kogge-Stone, Brent-Kung and Ladner-Fischer adders all compute
// {cout, s} = a + b + cin; they differ only in the shape of the carry (prefix)
// network and hence in cell count, wiring, fan-out and logic depth. This top
// drives all three from one operand pair, carry input and enable so they can
// be compared bit for bit and synthesised together; each adder's sum and
// carry-out leave on their own ports. A low enable isolates all three adders
// (outputs zero). Subtraction a - b is obtained by applying ~b and cin = 1.
//
// Fully combinational: outputs follow the inputs after the adders' logic delay.
// Bringing the three out side by side is this design's choice.
module ppa32_top
  import ppa_pkg::*;
#(
  parameter int unsigned WIDTH = DEFAULT_WIDTH
) (
  input  logic             enable,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s_ksa,
  output logic             cout_ksa,
  output logic [WIDTH-1:0] s_bka,
  output logic             cout_bka,
  output logic [WIDTH-1:0] s_lfa,
  output logic             cout_lfa
);

  kogge_stone_adder #(.WIDTH(WIDTH)) u_ksa (
    .enable(enable), .a(a), .b(b), .cin(cin), .s(s_ksa), .cout(cout_ksa)
  );

  brent_kung_adder #(.WIDTH(WIDTH)) u_bka (
    .enable(enable), .a(a), .b(b), .cin(cin), .s(s_bka), .cout(cout_bka)
  );

  ladner_fischer_adder #(.WIDTH(WIDTH)) u_lfa (
    .enable(enable), .a(a), .b(b), .cin(cin), .s(s_lfa), .cout(cout_lfa)
  );

endmodule
