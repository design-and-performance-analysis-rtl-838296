// tb_sum_postcompute: self-checking testbench for sum_postcompute.
//
// Drives random propagate and carry vectors with a random carry input and
// checks each sum bit against the propagate of that bit and the carry entering
// it (the carry input for bit 0, the previous bit's carry above), and the
// carry-out against the top carry. Combinational; 1 ns per vector, watchdog.
module tb_sum_postcompute;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] p, c, s;
  logic        cin, cout;
  sum_postcompute dut (.p(p), .c(c), .cin(cin), .s(s), .cout(cout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      p = $urandom; c = $urandom; cin = 1'($urandom);
      #1;
      for (int j = 0; j < 32; j++) begin
        logic carry_in;
        carry_in = (j == 0) ? cin : c[j-1];
        checks++;
        if (s[j] !== (p[j] != carry_in)) begin
          failures++;
          if (failures < 10) $display("FAIL s[%0d] p=%h c=%h cin=%b got %h", j, p, c, cin, s);
        end
      end
      checks++;
      if (cout !== c[31]) begin
        failures++;
        $display("FAIL cout c=%h got %b", c, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
