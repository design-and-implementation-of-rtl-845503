// Word-serial wide adder: computes x + (inv_y ? ~y : y) + cin over WIDTH bits
// by reusing one WORD_W-bit carry lookahead adder (cla_word) once per word,
// least significant word first, with the carry held in a flip-flop between
// words. Subtraction x - y is inv_y = 1, cin = 1. x and y sit in shift
// registers that shift one word out at the bottom each cycle while the result
// register takes the new word in at the top, as the document describes for
// the registers feeding its iteratively used CLAs.
// Interface: pulse start for one cycle with the operands valid; busy is high
// while words are processed; done pulses one cycle after the last word, with
// sum (WIDTH bits) and cout (the carry out of bit WIDTH-1) then valid and held
// until the next start. Latency: ceil(WIDTH / WORD_W) cycles from start to done.
module serial_addsub #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned WORD_W = pikom_pkg::WORD_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             inv_y,
  input  logic             cin,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NW = (WIDTH + WORD_W - 1) / WORD_W;
  localparam int unsigned PW = NW * WORD_W;
  localparam int unsigned CW = $clog2(NW + 1);

  logic [PW-1:0] xr, yr, rr;
  logic          carry;
  logic [CW-1:0] cnt;
  logic [WORD_W-1:0] wsum;
  logic          wcout;
  logic [WIDTH-1:0] y_eff;

  assign y_eff = inv_y ? ~y : y;

  cla_word #(.W(WORD_W)) u_cla (
    .x   (xr[WORD_W-1:0]),
    .y   (yr[WORD_W-1:0]),
    .cin (carry),
    .s   (wsum),
    .cout(wcout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xr <= '0; yr <= '0; rr <= '0; carry <= 1'b0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        xr    <= PW'(x);
        yr    <= PW'(y_eff);
        carry <= cin;
        cnt   <= CW'(NW);
        busy  <= 1'b1;
      end else if (busy) begin
        xr    <= PW'(xr >> WORD_W);
        yr    <= PW'(yr >> WORD_W);
        rr    <= {wsum, rr[PW-1:WORD_W]};
        carry <= wcout;
        cnt   <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // Padding bits above WIDTH are zero in both operands, so the carry out of
  // bit WIDTH-1 shows up as result bit WIDTH when there is padding.
  if (PW > WIDTH) begin : g_pad
    assign cout = rr[WIDTH];
  end else begin : g_nopad
    assign cout = carry;
  end
  assign sum = rr[WIDTH-1:0];
endmodule
