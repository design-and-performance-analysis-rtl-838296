// tb_black_cell: self-checking testbench for black_cell.
//
// Applies all 16 combinations of the two (generate, propagate) inputs. The
// expected group is worked out from what a group means: the merged group
// generates a carry if, with no carry entering bit j, a carry leaves the top
// of hi; it propagates if both halves pass an incoming carry through. The cell
// is combinational; vectors are applied 1 ns apart under a watchdog.
module tb_black_cell;
  import ppa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  pg_t hi, lo, grp;
  black_cell dut (.hi(hi), .lo(lo), .grp(grp));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic carry_mid, exp_g, exp_p;
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1;
      carry_mid = lo.g;                    // carry out of the lower group, none entering
      exp_g     = hi.g ? 1'b1 : (hi.p ? carry_mid : 1'b0);
      exp_p     = (lo.p == 1'b1) && (hi.p == 1'b1);
      checks += 2;
      if (grp.g !== exp_g) begin
        failures++;
        $display("FAIL g: hi=%b lo=%b got %b", hi, lo, grp.g);
      end
      if (grp.p !== exp_p) begin
        failures++;
        $display("FAIL p: hi=%b lo=%b got %b", hi, lo, grp.p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
