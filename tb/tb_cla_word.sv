// Random check of the 32-bit adder built from 4-bit CLA blocks, plus the
// carry-chain corner cases (all ones + 1, all ones + all ones).
module tb_cla_word;
  logic [31:0] x, y, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_word #(.W(32)) dut (.x, .y, .cin, .s, .cout);

  task automatic check();
    #1;
    checks++;
    if ({cout, s} !== 33'(x) + 33'(y) + 33'(cin)) begin
      failures++;
      $display("FAIL %h + %h + %b -> %b%h", x, y, cin, cout, s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '1; y = '0; cin = 1'b1; check();
    x = '1; y = '1; cin = 1'b1; check();
    x = 32'h8000_0000; y = 32'h8000_0000; cin = 1'b0; check();
    for (int i = 0; i < 2000; i++) begin
      x = $urandom; y = $urandom; cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
