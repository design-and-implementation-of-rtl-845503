// Exhaustive check of the 4-bit carry lookahead adder: all 512 combinations
// of x, y and cin against x + y + cin.
module tb_cla4;
  logic [3:0] x, y, s;
  logic       cin, cout;
  int checks = 0, failures = 0;

  cla4 dut (.x, .y, .cin, .s, .cout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, x, y} = 9'(i);
      #1;
      checks++;
      if ({cout, s} !== 5'(x) + 5'(y) + 5'(cin)) begin
        failures++;
        $display("FAIL x=%h y=%h cin=%b -> %b%h", x, y, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
