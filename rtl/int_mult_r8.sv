// Radix-8 sequential integer multiplier for unsigned operands: P = X * Y.
//
// Three multiplier bits are scanned per cycle, from the least significant
// end. Instead of a full 8-way multiple of Y, two partial products are
// selected from small sets, I1 from {0, Y, 2Y, 3Y} and I0 from
// {0, Y, 3Y, 4Y}, whose sum is (x(i+2) x(i+1) x(i))_2 * Y (the document's
// multiplexing table). Only 3Y needs an adder; it is formed once before the
// loop with the word-serial 32-bit CLA. Each cycle the (4,2) CSA adds S, C,
// I0 and I1 with the carry kept from the previous cycle as carry in; the
// three lowest result bits are final: bit 0 directly, bits 1 and 2 through a
// half adder and a full adder whose carry is kept for the next cycle. Those
// three bits are shifted into the right part of the product, and S and C
// shift down by three. At the end S + C + carry (the left part) is resolved
// with the word-serial CLA and placed above the right part.
//
// Interface: pulse start with x, y valid (registered at start); done pulses
// with p valid; p holds until the next start.
// Timing: ceil((YW+2)/32) + ceil(XW/3) + ceil(YW/32) + 5 cycles from the
// start cycle to the done cycle inclusive;
// XW = YW = 513 gives 210. The document gives (11k/24) + 13 cycles (248).
//
// Follows the document: the multiplexing table, the (4,2) CSA, the HA/FA
// retirement of three bits per cycle and the split left/right product.
// This design's own choices: operand widths as parameters and how 3Y is made.
module int_mult_r8 #(
  parameter int unsigned XW = pikom_pkg::DEFAULT_K / 2 + 1,
  parameter int unsigned YW = pikom_pkg::DEFAULT_K / 2 + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [XW-1:0]    x,
  input  logic [YW-1:0]    y,
  output logic             busy,
  output logic             done,
  output logic [XW+YW-1:0] p
);
  localparam int unsigned IT = (XW + 2) / 3;      // cycles of the loop
  localparam int unsigned RW = 3 * IT;            // right part width
  localparam int unsigned CW = YW + 3;            // CSA width
  localparam int unsigned IW = $clog2(IT + 1);

  typedef enum logic [1:0] {S_IDLE, S_PRE, S_LOOP, S_ADD} state_t;
  state_t state;

  logic [RW-1:0] xr, rpart;
  logic [YW-1:0] yr;
  logic [YW+1:0] y3r;
  logic [CW-1:0] s_r, c_r;
  logic          cin_r;
  logic [IW-1:0] it;

  // ---------------- partial product selection ----------------
  logic [CW-1:0] i1, i0;
  always_comb begin
    unique case (xr[2:0])
      3'b000: begin i1 = '0;               i0 = '0;               end
      3'b001: begin i1 = '0;               i0 = CW'(yr);          end
      3'b010: begin i1 = CW'(yr);          i0 = CW'(yr);          end
      3'b011: begin i1 = CW'({yr, 1'b0});  i0 = CW'(yr);          end
      3'b100: begin i1 = CW'(y3r);         i0 = CW'(yr);          end
      3'b101: begin i1 = CW'({yr, 1'b0});  i0 = CW'(y3r);         end
      3'b110: begin i1 = CW'(y3r);         i0 = CW'(y3r);         end
      default: begin i1 = CW'(y3r);        i0 = CW'({yr, 2'b00}); end
    endcase
  end

  logic [CW:0] csum, ccar;
  csa42 #(.W(CW)) u_csa42 (
    .a(s_r), .b(c_r), .c(i0), .d(i1), .cin(cin_r), .sum_o(csum), .carry_o(ccar)
  );

  // ---------------- retirement of the three low bits ----------------
  logic s_ha, c_ha, s_fa, c_fa;
  always_comb begin
    s_ha = csum[1] ^ ccar[1];
    c_ha = csum[1] & ccar[1];
    s_fa = csum[2] ^ ccar[2] ^ c_ha;
    c_fa = (csum[2] & ccar[2]) | (csum[2] & c_ha) | (ccar[2] & c_ha);
  end

  // ---------------- word-serial adder (3Y, then the left part) ----------------
  logic          sa_start, sa_busy, sa_done, sa_cout;
  logic [YW+1:0] sa_x, sa_y, sa_sum;
  logic          sa_cin;
  always_comb begin
    if (state == S_PRE) begin
      sa_x = {1'b0, yr, 1'b0};
      sa_y = (YW+2)'(yr);
      sa_cin = 1'b0;
    end else begin
      sa_x = s_r[YW+1:0];
      sa_y = c_r[YW+1:0];
      sa_cin = cin_r;
    end
  end
  serial_addsub #(.WIDTH(YW+2)) u_sa (
    .clk, .rst_n, .start(sa_start), .x(sa_x), .y(sa_y), .inv_y(1'b0), .cin(sa_cin),
    .busy(sa_busy), .done(sa_done), .sum(sa_sum), .cout(sa_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0; sa_start <= 1'b0;
      xr <= '0; rpart <= '0; yr <= '0; y3r <= '0; s_r <= '0; c_r <= '0;
      cin_r <= 1'b0; it <= '0; p <= '0;
    end else begin
      done     <= 1'b0;
      sa_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr       <= RW'(x);
          yr       <= y;
          sa_start <= 1'b1;
          busy     <= 1'b1;
          state    <= S_PRE;
        end
        S_PRE: if (sa_done) begin
          y3r   <= sa_sum;
          s_r   <= '0;
          c_r   <= '0;
          cin_r <= 1'b0;
          it    <= IW'(IT);
          state <= S_LOOP;
        end
        S_LOOP: begin
          s_r   <= CW'(csum >> 3);
          c_r   <= CW'(ccar >> 3);
          cin_r <= c_fa;
          rpart <= {s_fa, s_ha, csum[0], rpart[RW-1:3]};
          xr    <= xr >> 3;
          it    <= it - 1'b1;
          if (it == IW'(1)) begin
            sa_start <= 1'b1;
            state    <= S_ADD;
          end
        end
        S_ADD: if (sa_done) begin
          p     <= (XW+YW)'({sa_sum, rpart});
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
