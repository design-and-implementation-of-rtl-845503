// 4-bit carry lookahead adder.
// Four propagate/generate units form p_i = x_i ^ y_i and g_i = x_i & y_i and
// the sum bit s_i = p_i ^ c_i; a carry lookahead unit forms every carry
// c_1..c_4 directly from p, g and cin, so no carry ripples from bit to bit.
// Structure and equations follow the document's 4-bit CLA figure.
// Purely combinational.
module cla4 (
  input  logic [3:0] x,
  input  logic [3:0] y,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);
  logic [3:0] p, g;
  logic [4:0] c;

  always_comb begin
    p    = x ^ y;
    g    = x & y;
    c[0] = cin;
    c[1] = g[0] | (p[0] & c[0]);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c[0]);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c[0]);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & c[0]);
    s    = p ^ c[3:0];
    cout = c[4];
  end
endmodule
