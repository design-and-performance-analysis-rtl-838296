// tb_brent_kung_adder: self-checking testbench for brent_kung_adder.
//
// Checks the default 32-bit adder against a + b + cin computed with a wider
// built-in addition: corner cases (longest carry chains, all ones, zero),
// random vectors with and without carry input, and the enable isolation
// (outputs zero when enable is low). An 8-bit instance is checked over all
// 2^17 operand/carry combinations. The adder is combinational; vectors are
// applied 1 ns apart. A watchdog clock stops the run if it hangs.
module tb_brent_kung_adder;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        en, cin;
  logic [31:0] a, b, s;
  logic        cout;
  brent_kung_adder dut (.enable(en), .a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  logic        en8, cin8;
  logic [7:0]  a8, b8, s8;
  logic        cout8;
  brent_kung_adder #(.WIDTH(8)) dut8 (.enable(en8), .a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8));

  task automatic check32(input logic e, input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] expected;
    en = e; a = x; b = y; cin = c;
    #1;
    expected = e ? ({1'b0, x} + {1'b0, y} + 33'(c)) : '0;
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL 32b en=%0b a=%h b=%h cin=%0b: got %0b_%h expected %0b_%h",
                 e, x, y, c, cout, s, expected[32], expected[31:0]);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner cases
    check32(1, 32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check32(1, 32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    check32(1, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(1, 32'h0000_0000, 32'h0000_0000, 1'b0);
    check32(1, 32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(1, 32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    check32(1, 32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    for (int i = 0; i < 32; i++) begin
      check32(1, 32'hFFFF_FFFF >> i, 32'h1, 1'b0);   // carry chain of every length
      check32(1, 32'h1 << i, 32'h1 << i, 1'b1);       // generate at bit i
    end
    for (int i = 0; i < 20000; i++)
      check32(1, $urandom, $urandom, 1'($urandom));
    // enable low: isolated, outputs zero
    for (int i = 0; i < 200; i++)
      check32(0, $urandom, $urandom, 1'($urandom));
    check32(0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    // 8-bit instance, exhaustive
    en8 = 1'b1;
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); cin8 = 1'(c);
          #1;
          checks++;
          if ({cout8, s8} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8b a=%h b=%h cin=%0d: got %0b_%h", x, y, c, cout8, s8);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
