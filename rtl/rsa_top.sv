// RSA modular exponentiation engine: result = msg^exp mod N.
//
// Runs the left-to-right binary (square-and-multiply) method on the PIKOM
// modular multiplier, which returns A*B*r^-1 mod N with r = 2^(K/2). The
// work is therefore done on values scaled by r:
//   R2    = r^2 mod N = 2^K - N  (one word-serial subtraction, valid because
//                                  the modulus has its top bit set)
//   Mbar  = mm(msg, R2) = msg*r mod N
//   C     = Mbar, after skipping the exponent's leading zeros and its top 1
//   for every remaining exponent bit, from the top:
//           C = mm(C, C);  if the bit is 1: C = mm(C, Mbar)
//   result = mm(C, 1) = msg^exp mod N
// An exponent of 0 gives 1. Leading zeros are skipped while R2 is being
// formed, a whole 32-bit word per cycle while the top word is zero and one
// bit per cycle after that.
//
// Requirements: N odd, 2^(K-1) <= N < 2^K, msg < N.
// Interface: pulse start with msg, exp, n valid (registered at start); done
// pulses with result valid; result holds until the next start.
// Timing: (number of exponent bits below the top 1) squarings plus
// (number of 1 bits below the top 1) multiplications plus 2 conversions,
// each one PIKOM multiplication (about 640-740 cycles at K = 1024, about
// 250 more for the first one when N differs from the previous operation's);
// e = 2^16 + 1 takes 16 + 1 + 2 = 19 multiplications.
//
// The binary method and the use of the modular multiplier follow the
// document; the scaling by r, the way R2 is obtained and the controller are
// this design's own.
module rsa_top #(
  parameter int unsigned K  = pikom_pkg::DEFAULT_K,
  parameter int unsigned EW = pikom_pkg::DEFAULT_K
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [K-1:0]  msg,
  input  logic [EW-1:0] exp,
  input  logic [K-1:0]  n,
  output logic          busy,
  output logic          done,
  output logic [K-1:0]  result
);
  localparam int unsigned BW   = $clog2(EW + 1);
  localparam int unsigned SKIP = (EW < pikom_pkg::WORD_W) ? EW : pikom_pkg::WORD_W;

  typedef enum logic [2:0] {S_IDLE, S_PREP, S_TOM, S_LOOP, S_SQ, S_MUL, S_FROM} state_t;
  state_t state;

  logic [K-1:0]  nr, mr, mbar, c_r, r2;
  logic [EW-1:0] er;
  logic [BW-1:0] bits_left;
  logic          r2_ok, scan_ok;

  // ---------------- R2 = 2^K - N ----------------
  logic         r2_start, r2_busy, r2_done, r2_co;
  logic [K-1:0] r2_sum;
  serial_addsub #(.WIDTH(K)) u_r2 (
    .clk, .rst_n, .start(r2_start), .x('0), .y(nr), .inv_y(1'b1), .cin(1'b1),
    .busy(r2_busy), .done(r2_done), .sum(r2_sum), .cout(r2_co)
  );

  // ---------------- modular multiplier ----------------
  logic         mm_start, mm_busy, mm_done;
  logic [K-1:0] mm_a, mm_b, mm_p;
  pikom_mm #(.K(K)) u_mm (
    .clk, .rst_n, .start(mm_start), .a(mm_a), .b(mm_b), .n(nr),
    .busy(mm_busy), .done(mm_done), .p(mm_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0; result <= '0;
      nr <= '0; mr <= '0; mbar <= '0; c_r <= '0; r2 <= '0; er <= '0; bits_left <= '0;
      r2_ok <= 1'b0; scan_ok <= 1'b0;
      r2_start <= 1'b0; mm_start <= 1'b0; mm_a <= '0; mm_b <= '0;
    end else begin
      done     <= 1'b0;
      r2_start <= 1'b0;
      mm_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          nr        <= n;
          mr        <= msg;
          er        <= exp;
          bits_left <= BW'(EW);
          r2_ok     <= 1'b0;
          scan_ok   <= 1'b0;
          r2_start  <= 1'b1;
          busy      <= 1'b1;
          state     <= S_PREP;
        end
        S_PREP: begin
          if (r2_done) begin r2 <= r2_sum; r2_ok <= 1'b1; end
          if (!scan_ok) begin
            if (er[EW-1] || bits_left == '0) scan_ok <= 1'b1;
            else if (bits_left >= BW'(SKIP) && er[EW-1 -: SKIP] == '0) begin
              er        <= er << SKIP;      // a whole zero word at once
              bits_left <= bits_left - BW'(SKIP);
            end else begin
              er        <= er << 1;
              bits_left <= bits_left - 1'b1;
            end
          end
          if (r2_ok && scan_ok) begin
            if (bits_left == '0) begin      // exponent 0
              result <= K'(1);
              busy   <= 1'b0;
              done   <= 1'b1;
              state  <= S_IDLE;
            end else begin
              mm_a     <= mr;
              mm_b     <= r2;
              mm_start <= 1'b1;
              state    <= S_TOM;
            end
          end
        end
        S_TOM: if (mm_done) begin
          mbar      <= mm_p;
          c_r       <= mm_p;
          er        <= er << 1;             // the top 1 is consumed by C = Mbar
          bits_left <= bits_left - 1'b1;
          state     <= S_LOOP;
        end
        S_LOOP: begin
          if (bits_left == '0) begin
            mm_a     <= c_r;
            mm_b     <= K'(1);
            mm_start <= 1'b1;
            state    <= S_FROM;
          end else begin
            mm_a     <= c_r;
            mm_b     <= c_r;
            mm_start <= 1'b1;
            state    <= S_SQ;
          end
        end
        S_SQ: if (mm_done) begin
          c_r <= mm_p;
          if (er[EW-1]) begin
            mm_a     <= mm_p;
            mm_b     <= mbar;
            mm_start <= 1'b1;
            state    <= S_MUL;
          end else begin
            er        <= er << 1;
            bits_left <= bits_left - 1'b1;
            state     <= S_LOOP;
          end
        end
        S_MUL: if (mm_done) begin
          c_r       <= mm_p;
          er        <= er << 1;
          bits_left <= bits_left - 1'b1;
          state     <= S_LOOP;
        end
        S_FROM: if (mm_done) begin
          result <= mm_p;
          busy   <= 1'b0;
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
