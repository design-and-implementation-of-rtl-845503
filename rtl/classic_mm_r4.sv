// Radix-4 classic (left-to-right, Blakley/Bunimov style) modular multiplier
// with quotient calculation.
//
// Computes P = X*Y mod N and Q1 = floor(X*Y / N) for K-bit X, Y and a K-bit
// modulus N with its top bit set (2^(K-1) <= N < 2^K). X and Y need not be
// below N. Inside the PIKOM multiplier it works on the upper halves and
// delivers T2' and Q1.
//
// How it works
//  * Precompute (PRE): 3Y is formed with the word-serial 32-bit CLA
//    (2Y + Y). When N differs from the modulus of the previous
//    multiplication (or after reset) the two look-up tables are filled
//    first: A_tab[t] = t*2^K mod N and Q_tab[t] = floor(t*2^K / N) for
//    t = 0..14, each entry obtained from the previous one by adding 2^K - N
//    and subtracting N once more if needed, both word-serially with two
//    chained 32-bit CLAs (K/32 + 2 cycles per entry). With an unchanged N
//    the tables are reused, as in an exponentiation.
//  * Main loop (LOOP), K/2 cycles, two multiplier bits per cycle from the
//    top: the partial result is kept in carry-save form (S, C). Each cycle
//    t = S[K+2:K] + C[K+2:K] selects A = A_tab[t] and Qnew = Q_tab[t]; the
//    (4,2) CSA adds 4*(S mod 2^K), 4*(C mod 2^K), 4*A and
//    I = (2x_i + x_(i-1))*Y taken from {0, Y, 2Y, 3Y}. The quotient is
//    kept in carry-save form too (Q1S, Q1C) and a (3,2) CSA adds
//    4*Q1S + 4*Q1C + 4*Qnew.
//  * One fold cycle (FOLD) applies the table once more without the shift,
//    so S + C < 3*2^K, then (ADD) S + C and Q1S + Q1C are resolved with the
//    word-serial adders, (RED) N is subtracted until the difference turns
//    negative, and (QADD) the number of subtractions is added to the quotient.
//
// Interface: pulse start with x, y, n valid (they are registered at start);
// done pulses when p and q1 are valid; they hold until the next start.
// Timing with the tables ready: about 1 + ceil((K+2)/32) + K/2 + 1 +
// (3 + r) * ceil((K+3)/32) cycles, r = number of final subtractions (at
// most 5); K = 512 gives up to 393 cycles measured. A new modulus adds
// 14 * (K/32 + 2) cycles (252 for K = 512) for the table fill. The document
// gives (21K/32) + 17 cycles (353 for K = 512), with the tables
// precomputed.
//
// Follows the document: 3-bit estimation on S and C, 15-entry A and Q tables,
// precomputed 3Y, carry-save quotient, iterative 32-bit CLA for the final
// sums and the final reduction. This design's own choices: how the tables
// are filled (word-serially, and only for a new modulus), the new quotient entering
// the quotient CSA shifted by two like A (needed for Q1 to be exact), and the
// extra fold cycle that bounds the final number of subtractions. Deciding
// whether N is new takes one K-bit equality compare at start.
module classic_mm_r4 #(
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
  output logic [K:0]   q1
);
  localparam int unsigned QW = K + 3;   // quotient carry-save width
  localparam int unsigned SW = K + 3;   // S, C width
  localparam int unsigned IT = K / 2;   // loop iterations
  localparam int unsigned IW = $clog2(IT + 1);
  localparam int unsigned WW = pikom_pkg::WORD_W;
  localparam int unsigned FN = K / WW + 1;     // words of the table fill (> K bits)
  localparam int unsigned FP = FN * WW;
  localparam int unsigned FWW = $clog2(FN + 1);

  typedef enum logic [2:0] {S_IDLE, S_PRE, S_LOOP, S_FOLD, S_ADD, S_RED, S_QADD} state_t;
  state_t state;

  logic [K-1:0]   xr, yr, nr;
  logic [K+1:0]   y3r;
  logic [K-1:0]   a_tab [15];
  logic [4:0]     q_tab [15];
  logic [3:0]     fill_t;
  logic           tab_ok, y3_ok, tab_valid;
  logic [SW-1:0]  s_r, c_r;
  logic [QW-1:0]  qs_r, qc_r;
  logic [IW-1:0]  it;
  logic [SW-1:0]  u_r;
  logic [QW-1:0]  qsum_r;
  logic [2:0]     nsub;
  logic           p_wait, q_wait;

  // ---------------- table fill: word-serial, once per modulus ----------------
  // Entry t = entry(t-1) + 2^K - N, minus N once more if that is still >= N.
  // With nk = 2^K - 1 - N (the K-bit complement of N, zero above bit K-1):
  //   sum  = prev + nk + 1 = prev - N + 2^K   (< 2^K since prev < N)
  //   diff = sum  + nk + 1 = sum  - N + 2^K   (bit K set exactly when sum >= N)
  // Both are formed one word per cycle by two chained 32-bit CLAs.
  logic [FP-1:0]  preg, sreg, dreg, nkp;
  logic [FWW-1:0] fill_w;
  logic           fill_sel, fc1, fc2, fc1_n, fc2_n;
  logic [WW-1:0]  fnw, fsw, fdw;
  logic [K-1:0]   fill_val;
  logic           fill_ge;
  always_comb begin
    nkp      = FP'(~nr);
    fnw      = nkp[fill_w * WW +: WW];
    fill_ge  = dreg[K];
    fill_val = fill_ge ? dreg[K-1:0] : sreg[K-1:0];
  end
  cla_word #(.W(WW)) u_fill_sum (.x(preg[WW-1:0]), .y(fnw), .cin(fc1), .s(fsw), .cout(fc1_n));
  cla_word #(.W(WW)) u_fill_dif (.x(fsw),          .y(fnw), .cin(fc2), .s(fdw), .cout(fc2_n));

  // ---------------- estimation and partial product ----------------
  logic [3:0]   t;
  logic [K-1:0] a_sel;
  logic [4:0]   qn_sel;
  logic [K+1:0] pp;
  always_comb begin
    t      = {1'b0, s_r[K+2:K]} + {1'b0, c_r[K+2:K]};
    a_sel  = a_tab[t];
    qn_sel = q_tab[t];
    unique case (xr[K-1:K-2])
      2'b00:   pp = '0;
      2'b01:   pp = {2'b00, yr};
      2'b10:   pp = {1'b0, yr, 1'b0};
      default: pp = y3r;
    endcase
  end

  // ---------------- carry-save datapath ----------------
  logic         fold;
  logic [K+1:0] ca, cb, cc, cd;
  logic [K+2:0] csum, ccar;
  logic [QW-1:0] qa, qb, qc;
  logic [QW-1:0] qsum_o;
  logic [QW:0]   qcar_o;
  assign fold = (state == S_FOLD);
  always_comb begin
    if (fold) begin
      ca = {2'b00, s_r[K-1:0]};
      cb = {2'b00, c_r[K-1:0]};
      cc = {2'b00, a_sel};
      cd = '0;
      qa = qs_r;
      qb = qc_r;
      qc = QW'(qn_sel);
    end else begin
      ca = {s_r[K-1:0], 2'b00};
      cb = {c_r[K-1:0], 2'b00};
      cc = {a_sel, 2'b00};
      cd = pp;
      qa = QW'({qs_r, 2'b00});
      qb = QW'({qc_r, 2'b00});
      qc = QW'({qn_sel, 2'b00});
    end
  end

  csa42 #(.W(K+2)) u_csa42 (
    .a(ca), .b(cb), .c(cc), .d(cd), .cin(1'b0), .sum_o(csum), .carry_o(ccar)
  );
  csa32 #(.W(QW)) u_csa32 (
    .a(qa), .b(qb), .c(qc), .sum_o(qsum_o), .carry_o(qcar_o)
  );

  // ---------------- word-serial adders ----------------
  logic          sp_start, sq_start;
  logic [SW-1:0] sp_x, sp_y, sp_sum;
  logic          sp_inv, sp_busy, sp_done, sp_cout;
  logic [QW-1:0] sq_x, sq_y, sq_sum;
  logic          sq_busy, sq_done, sq_cout;

  serial_addsub #(.WIDTH(SW)) u_sp (
    .clk, .rst_n, .start(sp_start), .x(sp_x), .y(sp_y), .inv_y(sp_inv), .cin(sp_inv),
    .busy(sp_busy), .done(sp_done), .sum(sp_sum), .cout(sp_cout)
  );
  serial_addsub #(.WIDTH(QW)) u_sq (
    .clk, .rst_n, .start(sq_start), .x(sq_x), .y(sq_y), .inv_y(1'b0), .cin(1'b0),
    .busy(sq_busy), .done(sq_done), .sum(sq_sum), .cout(sq_cout)
  );

  // 3Y is formed with the quotient-side serial adder during PRE
  always_comb begin
    sp_x = (state == S_RED) ? u_r : s_r;
    sp_y = (state == S_RED) ? SW'(nr) : c_r;
    sp_inv = (state == S_RED);
    if (state == S_PRE) begin
      sq_x = QW'({yr, 1'b0});
      sq_y = QW'(yr);
    end else if (state == S_QADD) begin
      sq_x = qsum_r;
      sq_y = QW'(nsub);
    end else begin
      sq_x = qs_r;
      sq_y = qc_r;
    end
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; busy <= 1'b0; done <= 1'b0;
      xr <= '0; yr <= '0; nr <= '0; y3r <= '0;
      fill_t <= '0; tab_ok <= 1'b0; y3_ok <= 1'b0; tab_valid <= 1'b0;
      preg <= '0; sreg <= '0; dreg <= '0; fill_w <= '0; fill_sel <= 1'b0;
      fc1 <= 1'b1; fc2 <= 1'b1;
      s_r <= '0; c_r <= '0; qs_r <= '0; qc_r <= '0; it <= '0;
      u_r <= '0; qsum_r <= '0; nsub <= '0; p_wait <= 1'b0; q_wait <= 1'b0;
      sp_start <= 1'b0; sq_start <= 1'b0;
      p <= '0; q1 <= '0;
      for (int i = 0; i < 15; i++) begin
        a_tab[i] <= '0;
        q_tab[i] <= '0;
      end
    end else begin
      done     <= 1'b0;
      sp_start <= 1'b0;
      sq_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          xr <= x; yr <= y; nr <= n;
          // the tables depend on N only: keep them while N is unchanged
          if (!(tab_valid && n == nr)) begin
            a_tab[0] <= '0; q_tab[0] <= '0;
            tab_valid <= 1'b0;
            tab_ok    <= 1'b0;
          end else begin
            tab_ok    <= 1'b1;
          end
          fill_t <= 4'd1; fill_w <= '0; fill_sel <= 1'b0;
          preg <= '0; fc1 <= 1'b1; fc2 <= 1'b1;
          y3_ok <= 1'b0;
          sq_start <= 1'b1;              // 3Y = 2Y + Y
          busy  <= 1'b1;
          state <= S_PRE;
        end
        S_PRE: begin
          if (!tab_ok) begin
            if (!fill_sel) begin         // one word of sum and diff
              sreg   <= {fsw, sreg[FP-1:WW]};
              dreg   <= {fdw, dreg[FP-1:WW]};
              preg   <= preg >> WW;
              fc1    <= fc1_n;
              fc2    <= fc2_n;
              fill_w <= fill_w + 1'b1;
              if (fill_w == FWW'(FN - 1)) fill_sel <= 1'b1;
            end else begin               // keep sum or diff
              a_tab[fill_t] <= fill_val;
              q_tab[fill_t] <= q_tab[fill_t - 4'd1] + (fill_ge ? 5'd2 : 5'd1);
              preg     <= FP'(fill_val);
              fc1      <= 1'b1;
              fc2      <= 1'b1;
              fill_w   <= '0;
              fill_sel <= 1'b0;
              fill_t   <= fill_t + 4'd1;
              if (fill_t == 4'd14) begin
                tab_ok    <= 1'b1;
                tab_valid <= 1'b1;
              end
            end
          end
          if (sq_done) begin
            y3r   <= sq_sum[K+1:0];
            y3_ok <= 1'b1;
          end
          if (tab_ok && y3_ok) begin
            s_r <= '0; c_r <= '0; qs_r <= '0; qc_r <= '0;
            it <= IW'(IT);
            state <= S_LOOP;
          end
        end
        S_LOOP: begin
          s_r  <= csum;
          c_r  <= ccar;
          qs_r <= qsum_o;
          qc_r <= qcar_o[QW-1:0];
          xr   <= xr << 2;
          it   <= it - 1'b1;
          if (it == IW'(1)) state <= S_FOLD;
        end
        S_FOLD: begin
          s_r  <= csum;
          c_r  <= ccar;
          qs_r <= qsum_o;
          qc_r <= qcar_o[QW-1:0];
          sp_start <= 1'b1;
          sq_start <= 1'b1;
          p_wait <= 1'b1; q_wait <= 1'b1;
          state <= S_ADD;
        end
        S_ADD: begin
          if (sp_done) begin u_r <= sp_sum; p_wait <= 1'b0; end
          if (sq_done) begin qsum_r <= sq_sum; q_wait <= 1'b0; end
          if (!p_wait && !q_wait) begin
            nsub <= '0;
            sp_start <= 1'b1;            // U - N
            state <= S_RED;
          end
        end
        S_RED: if (sp_done) begin
          if (sp_cout) begin             // no borrow: U >= N
            u_r  <= sp_sum;
            nsub <= nsub + 3'd1;
            sp_start <= 1'b1;
          end else begin
            sq_start <= 1'b1;            // Q1 = Q + number of subtractions
            state <= S_QADD;
          end
        end
        S_QADD: if (sq_done) begin
          p     <= u_r[K-1:0];
          q1    <= sq_sum[K:0];
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
