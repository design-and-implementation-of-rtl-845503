// Random check of the (3,2) carry save adder: sum + carry == a + b + c.
module tb_csa32;
  localparam int W = 24;
  logic [W-1:0] a, b, c, s;
  logic [W:0]   cy;
  int checks = 0, failures = 0;

  csa32 #(.W(W)) dut (.a, .b, .c, .sum_o(s), .carry_o(cy));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom);
      if (i == 0) begin a = '1; b = '1; c = '1; end
      #1;
      checks++;
      if ((W+2)'(s) + (W+2)'(cy) !== (W+2)'(a) + (W+2)'(b) + (W+2)'(c) || cy[0] !== 1'b0) begin
        failures++;
        $display("FAIL a=%h b=%h c=%h s=%h cy=%h", a, b, c, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
