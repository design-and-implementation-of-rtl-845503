// Radix-4 Booth-encoded Montgomery multiplier with quotient calculation.
//
// Computes P and Q0' with P * 2^K = X*Y - Q0' * N for K-bit X, Y and an odd
// K-bit modulus N (K even), that is P = X*Y*2^-K mod N; Q0' is signed
// (K+3 bits, two's complement). After the single final correction P lies in
// [0, 2^K); it is below N whenever X*Y < N*2^K. Inside the PIKOM multiplier
// it works on the lower halves and delivers T0' and Q0'.
//
// How it works
//  * K/2 + 1 iterations, two multiplier bits per cycle from the bottom. The
//    Booth encoder turns the window {x(i+1), x(i), x(i-1)} into a digit in
//    {-2..2} times 4Y; because this partial product always ends in two
//    zeros, the Montgomery encoder can choose QN in {0, N, 2N, -N} from the
//    two low bits of S + C alone, in parallel with the Booth encoder.
//  * The two low bits of S, C, QN, the -N completion bit and the carry kept
//    from the previous cycle are summed by a small adder; their total is a
//    multiple of 4, and the two resulting bits of weight 4 go one into the
//    free least significant position of the new carry vector and one into
//    the carry-in register for the next cycle. The upper bits go through the
//    (4,2) CSA; the Booth completion bit (S_booth) is its carry in. Dropping
//    the two zero bits is the division by 4.
//  * Recoded quotient digits are stored in Q+ (negative choices) or Q-
//    (positive choices); at the end Q' = (Q+ - Q-) / 4.
//  * S + C and Q+ - Q- are resolved by word-serial 32-bit CLA adders, then
//    one correction: P >= N subtracts N (Q0' += 2^K), P < 0 adds N
//    (Q0' -= 2^K).
//  * Negative Booth and QN values are kept out of the carry-save vectors by
//    a constant offset: the Booth product enters with +2^(K+3), QN with
//    +2^(K+2), so the vectors always hold the true partial result plus
//    2^(K+2), never a negative number; the offset is removed at the end by
//    flipping one bit. This keeps S and C free of sign extension.
//
// Interface: pulse start with x, y, n valid (registered at start); done
// pulses when p and q0 are valid; they hold until the next start.
// Timing: K/2 + 1 + 2 * ceil((K+3)/32) + 4 cycles counted from the start
// cycle to the done cycle inclusive; K = 512 gives 296.
// The document gives (9K/16) + 8 = 296 cycles for K = 512.
//
// Follows the document: Booth encoding, 4Y multiplicand, Montgomery encoding
// table, low-bit full adders with a stored carry, Q+/Q- registers and the
// final correction. This design's own choices: the constant offset that
// replaces sign extension, and the exact widths.
module mont_mm_r4 #(
  parameter int unsigned K = pikom_pkg::DEFAULT_K / 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] x,
  input  logic [K-1:0] y,
  input  logic [K-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [K-1:0] p,
  output logic [K+2:0] q0
);
  localparam int unsigned SW = K + 3;
  localparam int unsigned IT = K / 2 + 1;
  localparam int unsigned IW = $clog2(IT + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOOP, S_ADD, S_CORR} state_t;
  state_t state;

  logic [K+2:0]  xr;          // {x, x(-1)=0} plus zero padding on top
  logic [K-1:0]  yr, nr;
  logic [SW-1:0] s_r, c_r;
  logic          cin_r;
  logic [K+1:0]  qm_r, qp_r;
  logic [IW-1:0] it;
  logic [SW-1:0] v_r;
  logic [SW-1:0] qd_r;
  logic [1:0]    adj;          // 01: +2^K, 11: -2^K, 00: none

  // ---------------- encoders ----------------
  logic [1:0]   sp, q;
  logic         sign, bneg;
  logic [K+1:0] pp, qn;
  assign sp = s_r[1:0] + c_r[1:0] + {1'b0, cin_r};

  booth_encoder #(.W(K)) u_booth (.win(xr[2:0]), .y(yr), .pp(pp), .neg(bneg));
  mont_encoder  #(.W(K)) u_menc  (.sp(sp), .n(nr), .q(q), .sign(sign), .qn(qn));

  // ---------------- offset operands, low adder, (4,2) CSA ----------------
  logic [K+1:0] pp_b;         // digit*Y + 2^(K+1)
  logic [K+2:0] qn_b;         // QN + 2^(K+2)
  logic [3:0]   low;
  logic         ba, bb;
  logic [K+3:0] csum, ccar;
  always_comb begin
    pp_b = {~pp[K+1], pp[K:0]};
    qn_b = {~qn[K+1], qn};
    low  = 4'(s_r[1:0]) + 4'(c_r[1:0]) + 4'(qn_b[1:0]) + 4'(sign) + 4'(cin_r);
    ba   = low[2] | low[3];
    bb   = low[3];
  end

  csa42 #(.W(K+3)) u_csa42 (
    .a  (SW'(s_r[SW-1:2])),
    .b  (SW'(c_r[SW-1:2])),
    .c  (SW'(pp_b)),
    .d  (SW'(qn_b[K+2:2])),
    .cin(bneg),
    .sum_o(csum),
    .carry_o(ccar)
  );

  // ---------------- word-serial adders ----------------
  logic          sp_start, sq_start;
  logic [SW-1:0] sp_x, sp_y, sp_sum, sq_sum;
  logic          sp_inv, sp_cin, sp_busy, sp_done, sp_cout;
  logic          sq_busy, sq_done, sq_cout;
  logic          v_neg;
  assign v_neg = v_r[SW-1];

  always_comb begin
    if (state == S_CORR) begin
      sp_x   = v_r;
      sp_y   = SW'(nr);
      sp_inv = ~v_neg;          // V >= 0: V - N ; V < 0: V + N
      sp_cin = ~v_neg;
    end else begin
      sp_x   = s_r;
      sp_y   = c_r;
      sp_inv = 1'b0;
      sp_cin = cin_r;
    end
  end

  serial_addsub #(.WIDTH(SW)) u_sp (
    .clk, .rst_n, .start(sp_start), .x(sp_x), .y(sp_y), .inv_y(sp_inv), .cin(sp_cin),
    .busy(sp_busy), .done(sp_done), .sum(sp_sum), .cout(sp_cout)
  );
  serial_addsub #(.WIDTH(SW)) u_sq (
    .clk, .rst_n, .start(sq_start), .x(SW'(qp_r)), .y(SW'(qm_r)), .inv_y(1'b1), .cin(1'b1),
    .busy(sq_busy), .done(sq_done), .sum(sq_sum), .cout(sq_cout)
  );

  // Q0' = (Q+ - Q-) / 4, then +-2^K for the correction (top bits only)
  logic [SW-1:0] qd_sh;
  always_comb begin
    qd_sh = SW'($signed(qd_r) >>> 2);
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      xr <= '0; yr <= '0; nr <= '0; s_r <= '0; c_r <= '0; cin_r <= 1'b0;
      qm_r <= '0; qp_r <= '0; it <= '0; v_r <= '0; qd_r <= '0;
      adj <= '0;
      sp_start <= 1'b0; sq_start <= 1'b0; p <= '0; q0 <= '0;
    end else begin
      done     <= 1'b0;
      sp_start <= 1'b0;
      sq_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr    <= {2'b00, x, 1'b0};
          yr    <= y;
          nr    <= n;
          s_r   <= SW'(1) << (K + 2);   // partial result 0 plus the offset 2^(K+2)
          c_r   <= '0;
          cin_r <= 1'b0;
          qm_r  <= '0;
          qp_r  <= '0;
          it    <= IW'(IT);
          busy  <= 1'b1;
          state <= S_LOOP;
        end
        S_LOOP: begin
          s_r   <= csum[SW-1:0];
          c_r   <= {ccar[SW-1:1], ba};
          cin_r <= bb;
          qm_r  <= {sign ? 2'b00 : q, qm_r[K+1:2]};
          qp_r  <= {sign ? q : 2'b00, qp_r[K+1:2]};
          xr    <= xr >> 2;
          it    <= it - 1'b1;
          if (it == IW'(1)) begin
            sp_start <= 1'b1;
            sq_start <= 1'b1;
            state <= S_ADD;
          end
        end
        S_ADD: if (sp_done) begin
          // U = S + C + cin; V = U - 2^(K+2) is U with its top bit flipped.
          // Both serial adders have the same width and finish together.
          v_r      <= {~sp_sum[SW-1], sp_sum[SW-2:0]};
          qd_r     <= sq_sum;
          sp_start <= 1'b1;
          state    <= S_CORR;
        end
        S_CORR: if (sp_done) begin
          if (v_neg) begin
            p  <= sp_sum[K-1:0];
            q0 <= {qd_sh[SW-1:K] - 3'd1, qd_sh[K-1:0]};
          end else if (sp_cout) begin
            p  <= sp_sum[K-1:0];
            q0 <= {qd_sh[SW-1:K] + 3'd1, qd_sh[K-1:0]};
          end else begin
            p  <= v_r[K-1:0];
            q0 <= qd_sh;
          end
          adj   <= {v_neg, v_neg | sp_cout};
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
