// (3,2) carry save adder: W full adders working side by side with no carry
// links. sum_o[i] = a^b^c, carry_o[i+1] = majority(a,b,c); carry_o[0] = 0.
// sum_o + carry_o equals a + b + c exactly. Purely combinational.
module csa32 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum_o,
  output logic [W:0]   carry_o
);
  always_comb begin
    sum_o   = a ^ b ^ c;
    carry_o = {(a & b) | (a & c) | (b & c), 1'b0};
  end
endmodule
