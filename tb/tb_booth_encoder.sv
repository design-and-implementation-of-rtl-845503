// Checks the radix-4 Booth encoder against the recoding rule
// digit = -2 b(i+1) + b(i) + b(i-1): for every window and random
// multiplicands, pp (as a signed number) + neg must equal digit * y.
module tb_booth_encoder;
  localparam int W = 12;
  logic [2:0]   win;
  logic [W-1:0] y;
  logic [W+1:0] pp;
  logic         neg;
  int checks = 0, failures = 0;

  booth_encoder #(.W(W)) dut (.win, .y, .pp, .neg);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int digit;
    longint expect_v, got;
    for (int i = 0; i < 800; i++) begin
      win = 3'(i % 8);
      y   = W'($urandom);
      if (i < 8) y = '1;
      #1;
      digit    = -2 * int'(win[2]) + int'(win[1]) + int'(win[0]);
      expect_v = longint'(digit) * longint'(y);
      got      = longint'($signed(pp)) + longint'(neg);
      checks++;
      if (got != expect_v) begin
        failures++;
        $display("FAIL win=%b y=%0d pp=%h neg=%b got=%0d expect=%0d", win, y, pp, neg, got, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
