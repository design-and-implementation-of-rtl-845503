// W-bit adder built from W/4 carry lookahead blocks (cla4) connected in
// series, the carry out of one block feeding the next. With the default
// W = 32 this is the 32-bit CLA the design reuses iteratively for every wide
// addition. W must be a multiple of 4. Purely combinational.
module cla_word #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NB = W / 4;
  logic [NB:0] c;

  assign c[0] = cin;
  for (genvar b = 0; b < NB; b++) begin : g_blk
    cla4 u_cla4 (
      .x   (x[4*b +: 4]),
      .y   (y[4*b +: 4]),
      .cin (c[b]),
      .s   (s[4*b +: 4]),
      .cout(c[b+1])
    );
  end
  assign cout = c[NB];

  initial assert (W % 4 == 0) else $error("cla_word: W must be a multiple of 4");
endmodule
