// tb_gray_cell: self-checking testbench for gray_cell.
//
// Applies all 8 combinations of the higher group's (generate, propagate) and
// the lower group's carry, and checks that the output is the carry leaving
// the top of the higher group. Combinational; 1 ns per vector, with watchdog.
module tb_gray_cell;
  import ppa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  pg_t  hi;
  logic g_lo, g;
  gray_cell dut (.hi(hi), .g_lo(g_lo), .g(g));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic expected;
      {hi.g, hi.p, g_lo} = 3'(v);
      #1;
      expected = hi.g ? 1'b1 : (hi.p ? g_lo : 1'b0);
      checks++;
      if (g !== expected) begin
        failures++;
        $display("FAIL hi=%b g_lo=%b got %b", hi, g_lo, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
