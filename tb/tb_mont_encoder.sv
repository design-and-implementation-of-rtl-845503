// Checks the Montgomery encoder for every (sp1, sp0, n1) and random odd N:
// the chosen multiple QN must clear the two low bits (sp + QN = 0 mod 4),
// lie in {0, N, 2N, -N}, agree with q and sign, and match the encoding table.
module tb_mont_encoder;
  localparam int W = 12;
  logic [1:0]   sp, q;
  logic [W-1:0] n;
  logic         sign;
  logic [W+1:0] qn;
  int checks = 0, failures = 0;

  mont_encoder #(.W(W)) dut (.sp, .n, .q, .sign, .qn);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint qnv, expect_q;
    for (int i = 0; i < 800; i++) begin
      sp = 2'(i % 4);
      n  = W'($urandom) | W'(1);
      if (i % 8 >= 4) n[1] = 1'b1; else n[1] = 1'b0;
      #1;
      qnv = longint'($signed(qn)) + longint'(sign);
      // expected signed multiple from the table
      unique case ({sp, n[1]})
        3'b000, 3'b001: expect_q = 0;
        3'b010:         expect_q = -1;
        3'b011:         expect_q = 1;
        3'b100, 3'b101: expect_q = 2;
        3'b110:         expect_q = 1;
        default:        expect_q = -1;
      endcase
      checks++;
      if (qnv != expect_q * longint'(n) || ((longint'(sp) + qnv) & 3) != 0
          || longint'(q) != (expect_q < 0 ? -expect_q : expect_q) || sign != (expect_q < 0)) begin
        failures++;
        $display("FAIL sp=%b n=%h q=%b sign=%b qn=%h", sp, n, q, sign, qn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
