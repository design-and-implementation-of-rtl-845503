// Radix-4 modified Booth encoder (Booth 2).
// The window {b(i+1), b(i), b(i-1)} of the multiplier selects the digit
// -2b(i+1) + b(i) + b(i-1), so the partial product is one of
// {0, Y, 2Y, -Y, -2Y}: only shifts and complements, no 3Y (document's Booth
// table). pp is the (W+2)-bit two's complement pattern of the digit times Y
// with the negation done as "complement now, add 1 later": for a negative
// digit pp = ~(|digit|*Y) and neg = 1, and the user adds neg at the partial
// product's least significant position (the s bit of the Booth dot diagram).
// The digit for windows 000 and 111 is 0 with neg = 0. Purely combinational.
module booth_encoder #(
  parameter int unsigned W = 8
) (
  input  logic [2:0]   win,   // {b(i+1), b(i), b(i-1)}
  input  logic [W-1:0] y,
  output logic [W+1:0] pp,
  output logic         neg
);
  logic [W+1:0] mag;

  always_comb begin
    unique case (win)
      3'b001, 3'b010, 3'b101, 3'b110: mag = {2'b00, y};
      3'b011, 3'b100:                 mag = {1'b0, y, 1'b0};
      default:                        mag = '0;
    endcase
    neg = win[2] & ~(win[1] & win[0]);
    pp  = neg ? ~mag : mag;
  end
endmodule
