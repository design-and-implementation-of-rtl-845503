// (4,2) carry save adder made of W (5;3) compressors, as in the document's
// figure of the (4,2) CSA. Compressor i adds b_i, c_i and d_i in a first full
// adder, whose carry goes sideways to compressor i+1 ("carry out"); a second
// full adder adds that sum, a_i and the sideways carry from compressor i-1
// (cin for i = 0) into sum_o[i] and carry_o[i+1]. The sideways carry of the
// top compressor becomes sum_o[W]; carry_o[0] is always 0, a free slot the
// users fill with a bit of their own. sum_o + carry_o = a + b + c + d + cin.
// The sideways carry never travels more than one position, so the delay does
// not depend on W. Purely combinational.
module csa42 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  input  logic         cin,
  output logic [W:0]   sum_o,
  output logic [W:0]   carry_o
);
  logic [W-1:0] s1, co1;
  logic [W:0]   side;

  always_comb begin
    s1        = b ^ c ^ d;
    co1       = (b & c) | (b & d) | (c & d);
    side      = {co1, cin};
    sum_o     = {co1[W-1], a ^ s1 ^ side[W-1:0]};
    carry_o   = {(a & s1) | (a & side[W-1:0]) | (s1 & side[W-1:0]), 1'b0};
  end
endmodule
