// tb_ppa32_top: end-to-end testbench for ppa32_top at its default 32-bit size.
//
// Every vector is applied to all three adders at once; each adder's
// {cout, sum} must equal a + b + cin worked out with a wider built-in
// addition (zero when enable is low). The run covers directed cases and
// random traffic, and counts how often each mechanism of the design was
// exercised, failing if one never was:
//   carry_out    - a carry leaves bit 31
//   carry_in     - the carry input is set and used
//   full_chain   - a carry travels from the carry input through all 32 bits
//   isolated     - enable low: the adders are isolated and read zero
//   subtraction  - a - b formed as a + ~b + 1, checked against a - b
// Combinational; 1 ns per vector, with a watchdog clock.
module tb_ppa32_top;

  int checks = 0, failures = 0;
  int n_carry_out = 0, n_carry_in = 0, n_full_chain = 0, n_isolated = 0, n_subtraction = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        en, cin;
  logic [31:0] a, b;
  logic [31:0] s_ksa, s_bka, s_lfa;
  logic        cout_ksa, cout_bka, cout_lfa;

  ppa32_top dut (
    .enable(en), .a(a), .b(b), .cin(cin),
    .s_ksa(s_ksa), .cout_ksa(cout_ksa),
    .s_bka(s_bka), .cout_bka(cout_bka),
    .s_lfa(s_lfa), .cout_lfa(cout_lfa)
  );

  task automatic apply(input logic e, input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] expected;
    en = e; a = x; b = y; cin = c;
    #1;
    expected = e ? ({1'b0, x} + {1'b0, y} + 33'(c)) : '0;
    checks += 3;
    if ({cout_ksa, s_ksa} !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL KSA a=%h b=%h cin=%b en=%b: %b_%h", x, y, c, e, cout_ksa, s_ksa);
    end
    if ({cout_bka, s_bka} !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL BKA a=%h b=%h cin=%b en=%b: %b_%h", x, y, c, e, cout_bka, s_bka);
    end
    if ({cout_lfa, s_lfa} !== expected) begin
      failures++;
      if (failures < 10) $display("FAIL LFA a=%h b=%h cin=%b en=%b: %b_%h", x, y, c, e, cout_lfa, s_lfa);
    end
    if (!e) n_isolated++;
    if (e && expected[32]) n_carry_out++;
    if (e && c) n_carry_in++;
    if (e && c && (x ^ y) == 32'hFFFF_FFFF) n_full_chain++;
  endtask

  task automatic subtract(input logic [31:0] x, input logic [31:0] y);
    apply(1'b1, x, ~y, 1'b1);
    checks++;
    if (s_ksa !== x - y || s_bka !== x - y || s_lfa !== x - y || cout_ksa !== (x >= y)) begin
      failures++;
      if (failures < 10) $display("FAIL subtraction %h - %h: %h %h %h", x, y, s_ksa, s_bka, s_lfa);
    end
    n_subtraction++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(1, 32'h0000_0000, 32'h0000_0000, 1'b0);
    apply(1, 32'hFFFF_FFFF, 32'h0000_0000, 1'b1);   // carry through every bit
    apply(1, 32'hAAAA_AAAA, 32'h5555_5555, 1'b1);   // same, split between operands
    apply(1, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(1, 32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(1, 32'h1234_5678, 32'h9ABC_DEF0, 1'b0);
    apply(0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);   // isolated
    subtract(32'd100, 32'd58);
    subtract(32'd58, 32'd100);
    subtract(32'h8000_0000, 32'h0000_0001);
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x;
      x = $urandom;
      case (i % 8)
        0:       apply(0, x, $urandom, 1'($urandom));
        1:       apply(1, x, ~x, 1'b1);
        2:       subtract(x, $urandom);
        default: apply(1, x, $urandom, 1'($urandom));
      endcase
    end
    $display("mechanisms: carry_out=%0d carry_in=%0d full_chain=%0d isolated=%0d subtraction=%0d",
             n_carry_out, n_carry_in, n_full_chain, n_isolated, n_subtraction);
    if (n_carry_out == 0)   begin failures++; $display("FAIL carry_out never exercised");   end
    if (n_carry_in == 0)    begin failures++; $display("FAIL carry_in never exercised");    end
    if (n_full_chain == 0)  begin failures++; $display("FAIL full_chain never exercised");  end
    if (n_isolated == 0)    begin failures++; $display("FAIL isolated never exercised");    end
    if (n_subtraction == 0) begin failures++; $display("FAIL subtraction never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
