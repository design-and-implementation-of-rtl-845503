// Random check of the (4,2) carry save adder: sum + carry == a+b+c+d+cin,
// carry[0] == 0 (the free slot), and no sideways carry travels further than
// one position (checked indirectly by the exact sum at full width).
module tb_csa42;
  localparam int W = 24;
  logic [W-1:0] a, b, c, d;
  logic         cin;
  logic [W:0]   s, cy;
  int checks = 0, failures = 0;

  csa42 #(.W(W)) dut (.a, .b, .c, .d, .cin, .sum_o(s), .carry_o(cy));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      cin = 1'($urandom);
      if (i == 0) begin a = '1; b = '1; c = '1; d = '1; cin = 1'b1; end
      #1;
      checks++;
      if ((W+3)'(s) + (W+3)'(cy) !== (W+3)'(a) + (W+3)'(b) + (W+3)'(c) + (W+3)'(d) + (W+3)'(cin)
          || cy[0] !== 1'b0) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h d=%h cin=%b s=%h cy=%h", a, b, c, d, cin, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
