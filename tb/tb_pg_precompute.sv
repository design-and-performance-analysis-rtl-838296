// tb_pg_precompute: self-checking testbench for pg_precompute.
//
// Drives random 32-bit operands and checks, bit by bit, that propagate is set
// exactly when the two operand bits differ and generate exactly when both are
// one; with enable low every output, and the gated carry input, must be zero.
// Combinational; 1 ns per vector, with watchdog.
module tb_pg_precompute;
  import ppa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             en, cin, cin_q;
  logic [31:0]      x, y;
  pg_t  [31:0]      pg;
  pg_precompute dut (.enable(en), .x(x), .y(y), .cin(cin), .pg(pg), .cin_q(cin_q));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      en  = (n % 8) != 7;
      x   = $urandom;
      y   = $urandom;
      cin = 1'($urandom);
      #1;
      for (int j = 0; j < 32; j++) begin
        logic exp_p, exp_g;
        exp_p = en && (x[j] != y[j]);
        exp_g = en && (x[j] == 1'b1) && (y[j] == 1'b1);
        checks++;
        if (pg[j].p !== exp_p || pg[j].g !== exp_g) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d en=%b x=%h y=%h got %b", j, en, x, y, pg[j]);
        end
      end
      checks++;
      if (cin_q !== (en && cin)) begin
        failures++;
        $display("FAIL cin_q en=%b cin=%b got %b", en, cin, cin_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
