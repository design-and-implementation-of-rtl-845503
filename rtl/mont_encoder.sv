// Montgomery encoder for the radix-4 Montgomery multiplier.
// From the two low bits {sp1, sp0} of the partial result and bit n1 of the odd
// modulus N it picks the multiple QN of N that clears the two low bits of
// partial result + QN, using only {0, N, 2N, -N} (no 3N):
//   sp=00 -> 0;  sp=10 -> 2N;  sp=01 -> -N if n1=0, N if n1=1;
//   sp=11 -> N if n1=0, -N if n1=1.
// q = {q(i+1), q(i)} is the recoded quotient digit (0, 1 or 2) and sign = 1
// marks the negative choice (document's Montgomery encoding table).
// qn is the (W+2)-bit pattern of QN, complemented for -N; the user adds
// sign at its least significant position to finish the negation.
// Purely combinational.
module mont_encoder #(
  parameter int unsigned W = 8
) (
  input  logic [1:0]   sp,
  input  logic [W-1:0] n,
  output logic [1:0]   q,
  output logic         sign,
  output logic [W+1:0] qn
);
  logic [W+1:0] mag;

  always_comb begin
    unique case (sp)
      2'b00:   begin q = 2'b00; sign = 1'b0;  end
      2'b10:   begin q = 2'b10; sign = 1'b0;  end
      2'b01:   begin q = 2'b01; sign = ~n[1]; end
      default: begin q = 2'b01; sign = n[1];  end
    endcase
    unique case (q)
      2'b01:   mag = {2'b00, n};
      2'b10:   mag = {1'b0, n, 1'b0};
      default: mag = '0;
    endcase
    qn = sign ? ~mag : mag;
  end
endmodule
