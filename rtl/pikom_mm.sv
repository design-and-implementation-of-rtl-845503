// High-radix Partially Interleaved Modular Karatsuba-Ofman (PIKOM) multiplier.
//
// Computes P = A * B * r^-1 mod N with r = 2^h, h = K/2, for K-bit A, B and
// an odd K-bit modulus N with its top bit set (2^(K-1) <= N < 2^K).
//
// Main idea. Karatsuba-Ofman splits A*B into three half-size products; the
// bipartite reduction splits the reduction the same way: the upper halves go
// through a left-to-right (classic) modular multiplication and the lower
// halves through a right-to-left (Montgomery) one, at the same time. With
//   T2' = A1*B1 - Q1*N1          (classic_mm_r4 on A1, B1, N1)
//   T0' * r = A0*B0 - Q0'*N0     (mont_mm_r4 on A0, B0, N0)
// the result before the final reduction is
//   P = (T2' r + T0') + (A0+A1)(B0+B1) - (Q0'+Q1)(N0+N1) - (T0' r + T2')
// which equals (A*B - (Q1 r + Q0') N) / r, so P = A*B*r^-1 (mod N); a few
// additions or subtractions of N bring it into [0, N). T2' r + T0' and
// T0' r + T2' are plain concatenations of the two h-bit results.
//
// Schedule (one start, everything else follows by itself):
//   cycle 0     classic and Montgomery multipliers start; Adder_A, Adder_B and
//               Adder_N form A0+A1, B0+B1, N0+N1 (word-serial)
//   then        integer multiplier 1: (A0+A1)(B0+B1)
//   when both modular multipliers are done (and N0+N1 is ready): Adder_Q
//               forms Q0'+Q1 (signed; a negative sum is negated, since
//               the integer multiplier takes unsigned operands) and
//               integer multiplier 2 forms |Q0'+Q1| (N0+N1); meanwhile
//               Adder_Result computes
//               T2T0 + (A0+A1)(B0+B1) and then subtracts T0T2
//   last        Adder_Result subtracts (or adds, for a negative Q0'+Q1) the
//               second product, then adds N while P < 0 and subtracts N
//               while P >= N.
// Every adder is a word-serial 32-bit CLA (serial_addsub).
//
// Interface: pulse start with a, b, n valid (registered at start); done
// pulses with p valid; p holds until the next start. busy is high in between.
// Timing for K = 1024: about 640-740 cycles, depending on the number of
// final corrections (the document's schedule gives 799); the first
// multiplication with a new modulus takes about 250 cycles more while the
// classic multiplier fills its tables.
//
// Follows the document: the block structure, the equation, which block
// computes what, and the order of the jobs. This design's own choices: the
// exact start conditions of each job, the sign handling of Q0'+Q1 and the
// loop that ends the reduction.
module pikom_mm #(
  parameter int unsigned K = pikom_pkg::DEFAULT_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [K-1:0] p
);
  localparam int unsigned H  = K / 2;
  localparam int unsigned QW = H + 4;     // signed Q0' + Q1
  localparam int unsigned RW = K + 6;     // signed result accumulator

  logic [H-1:0] a0, a1, b0, b1, n0, n1;
  logic [K-1:0] nfull;

  // ---------------- modular multipliers ----------------
  logic         go;
  logic         cl_busy, cl_done, mo_busy, mo_done;
  logic [H-1:0] t2, t0;
  logic [H:0]   q1;
  logic [H+2:0] q0;

  classic_mm_r4 #(.K(H)) u_classic (
    .clk, .rst_n, .start(go), .x(a1), .y(b1), .n(n1),
    .busy(cl_busy), .done(cl_done), .p(t2), .q1(q1)
  );
  mont_mm_r4 #(.K(H)) u_mont (
    .clk, .rst_n, .start(go), .x(a0), .y(b0), .n(n0),
    .busy(mo_busy), .done(mo_done), .p(t0), .q0(q0)
  );

  // ---------------- Adder_A, Adder_B, Adder_N ----------------
  logic         aa_done, ab_done, an_done;
  logic         aa_busy, ab_busy, an_busy, aa_co, ab_co, an_co;
  logic [H:0]   sa, sb, sn, sa_o, sb_o, sn_o;

  serial_addsub #(.WIDTH(H+1)) u_adder_a (
    .clk, .rst_n, .start(go), .x({1'b0, a0}), .y({1'b0, a1}), .inv_y(1'b0), .cin(1'b0),
    .busy(aa_busy), .done(aa_done), .sum(sa_o), .cout(aa_co)
  );
  serial_addsub #(.WIDTH(H+1)) u_adder_b (
    .clk, .rst_n, .start(go), .x({1'b0, b0}), .y({1'b0, b1}), .inv_y(1'b0), .cin(1'b0),
    .busy(ab_busy), .done(ab_done), .sum(sb_o), .cout(ab_co)
  );
  serial_addsub #(.WIDTH(H+1)) u_adder_n (
    .clk, .rst_n, .start(go), .x({1'b0, n0}), .y({1'b0, n1}), .inv_y(1'b0), .cin(1'b0),
    .busy(an_busy), .done(an_done), .sum(sn_o), .cout(an_co)
  );

  // ---------------- integer multipliers ----------------
  logic            im1_start, im1_busy, im1_done;
  logic [2*H+1:0]  m1, m1_o;
  logic            im2_start, im2_busy, im2_done;
  logic [2*H+3:0]  m2, m2_o;
  logic [H+2:0]    qabs;

  int_mult_r8 #(.XW(H+1), .YW(H+1)) u_int_mult_1 (
    .clk, .rst_n, .start(im1_start), .x(sa), .y(sb),
    .busy(im1_busy), .done(im1_done), .p(m1_o)
  );
  int_mult_r8 #(.XW(H+3), .YW(H+1)) u_int_mult_2 (
    .clk, .rst_n, .start(im2_start), .x(qabs), .y(sn),
    .busy(im2_busy), .done(im2_done), .p(m2_o)
  );

  // ---------------- Adder_Q ----------------
  logic          aq_start, aq_busy, aq_done, aq_co, aq_neg_op;
  logic [QW-1:0] aq_x, aq_y, aq_sum, qsum;
  logic          qneg;
  always_comb begin
    if (aq_neg_op) begin                 // 0 - (Q0' + Q1)
      aq_x = '0;
      aq_y = qsum;
    end else begin
      aq_x = {{(QW-H-3){q0[H+2]}}, q0};
      aq_y = QW'(q1);
    end
  end
  serial_addsub #(.WIDTH(QW)) u_adder_q (
    .clk, .rst_n, .start(aq_start), .x(aq_x), .y(aq_y), .inv_y(aq_neg_op), .cin(aq_neg_op),
    .busy(aq_busy), .done(aq_done), .sum(aq_sum), .cout(aq_co)
  );

  // ---------------- Adder_Result ----------------
  typedef enum logic [2:0] {R_OP_T2T0_M1, R_OP_T0T2, R_OP_M2, R_OP_ADDN, R_OP_SUBN} rop_t;
  rop_t          rop;
  logic          ar_start, ar_busy, ar_done, ar_co;
  logic [RW-1:0] ar_x, ar_y, ar_sum, acc;
  logic          ar_inv;
  always_comb begin
    ar_x   = acc;
    ar_y   = '0;
    ar_inv = 1'b0;
    unique case (rop)
      R_OP_T2T0_M1: begin ar_x = RW'({t2, t0}); ar_y = RW'(m1); end
      R_OP_T0T2:    begin ar_y = RW'({t0, t2}); ar_inv = 1'b1; end
      R_OP_M2:      begin ar_y = RW'(m2); ar_inv = ~qneg; end
      R_OP_ADDN:    begin ar_y = RW'(nfull); end
      default:      begin ar_y = RW'(nfull); ar_inv = 1'b1; end
    endcase
  end
  serial_addsub #(.WIDTH(RW)) u_adder_result (
    .clk, .rst_n, .start(ar_start), .x(ar_x), .y(ar_y), .inv_y(ar_inv), .cin(ar_inv),
    .busy(ar_busy), .done(ar_done), .sum(ar_sum), .cout(ar_co)
  );

  // ---------------- control ----------------
  typedef enum logic [1:0] {Q_IDLE, Q_ADD, Q_NEG, Q_DONE} qst_t;
  typedef enum logic [2:0] {R_IDLE, R_WAIT, R_T2T0, R_T0T2, R_WAITM2, R_M2, R_RED} rst_t;
  qst_t qst;
  rst_t rst;
  logic cl_ok, mo_ok, sa_ok, sb_ok, sn_ok, m1_ok, m2_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a0 <= '0; a1 <= '0; b0 <= '0; b1 <= '0; n0 <= '0; n1 <= '0; nfull <= '0;
      go <= 1'b0; busy <= 1'b0; done <= 1'b0; p <= '0;
      sa <= '0; sb <= '0; sn <= '0; m1 <= '0; m2 <= '0; qabs <= '0; qsum <= '0; qneg <= 1'b0;
      im1_start <= 1'b0; im2_start <= 1'b0; aq_start <= 1'b0; aq_neg_op <= 1'b0;
      ar_start <= 1'b0; rop <= R_OP_T2T0_M1; acc <= '0;
      qst <= Q_IDLE; rst <= R_IDLE;
      cl_ok <= 1'b0; mo_ok <= 1'b0; sa_ok <= 1'b0; sb_ok <= 1'b0; sn_ok <= 1'b0;
      m1_ok <= 1'b0; m2_ok <= 1'b0;
    end else begin
      go        <= 1'b0;
      done      <= 1'b0;
      im1_start <= 1'b0;
      im2_start <= 1'b0;
      aq_start  <= 1'b0;
      ar_start  <= 1'b0;

      if (start && !busy) begin
        {a1, a0} <= a;
        {b1, b0} <= b;
        {n1, n0} <= n;
        nfull    <= n;
        go       <= 1'b1;
        busy     <= 1'b1;
        cl_ok <= 1'b0; mo_ok <= 1'b0; sa_ok <= 1'b0; sb_ok <= 1'b0; sn_ok <= 1'b0;
        m1_ok <= 1'b0; m2_ok <= 1'b0;
        qst <= Q_IDLE;
        rst <= R_WAIT;
      end

      // completion flags
      if (cl_done) cl_ok <= 1'b1;
      if (mo_done) mo_ok <= 1'b1;
      if (aa_done) begin sa <= sa_o; sa_ok <= 1'b1; end
      if (ab_done) begin sb <= sb_o; sb_ok <= 1'b1; end
      if (an_done) begin sn <= sn_o; sn_ok <= 1'b1; end
      if (im1_done) begin m1 <= m1_o; m1_ok <= 1'b1; end
      if (im2_done) begin m2 <= m2_o; m2_ok <= 1'b1; end

      // integer multiplier 1 starts once its operands are ready
      if (sa_ok && sb_ok && !m1_ok && !im1_busy && !im1_start && busy && rst == R_WAIT)
        im1_start <= 1'b1;

      // Adder_Q and integer multiplier 2
      unique case (qst)
        Q_IDLE: if (busy && cl_ok && mo_ok && sn_ok && !go) begin
          aq_neg_op <= 1'b0;
          aq_start  <= 1'b1;
          qst       <= Q_ADD;
        end
        Q_ADD: if (aq_done) begin
          qsum <= aq_sum;
          if (aq_sum[QW-1]) begin         // negative: form |Q0' + Q1|
            qneg      <= 1'b1;
            aq_neg_op <= 1'b1;
            aq_start  <= 1'b1;
            qst       <= Q_NEG;
          end else begin
            qneg      <= 1'b0;
            qabs      <= aq_sum[H+2:0];
            qst       <= Q_DONE;
            im2_start <= 1'b1;
          end
        end
        Q_NEG: if (aq_done) begin
          qabs      <= aq_sum[H+2:0];
          im2_start <= 1'b1;
          qst       <= Q_DONE;
        end
        default: ;
      endcase

      // Adder_Result
      unique case (rst)
        R_IDLE: ;
        R_WAIT: if (cl_ok && mo_ok && m1_ok) begin
          rop      <= R_OP_T2T0_M1;
          ar_start <= 1'b1;
          rst      <= R_T2T0;
        end
        R_T2T0: if (ar_done) begin
          acc      <= ar_sum;
          rop      <= R_OP_T0T2;
          ar_start <= 1'b1;
          rst      <= R_T0T2;
        end
        R_T0T2: if (ar_done) begin
          acc <= ar_sum;
          rst <= R_WAITM2;
        end
        R_WAITM2: if (m2_ok) begin
          rop      <= R_OP_M2;
          ar_start <= 1'b1;
          rst      <= R_M2;
        end
        R_M2: if (ar_done) begin
          acc      <= ar_sum;
          rop      <= ar_sum[RW-1] ? R_OP_ADDN : R_OP_SUBN;
          ar_start <= 1'b1;
          rst      <= R_RED;
        end
        R_RED: if (ar_done) begin
          if (rop == R_OP_ADDN) begin
            acc      <= ar_sum;
            rop      <= ar_sum[RW-1] ? R_OP_ADDN : R_OP_SUBN;
            ar_start <= 1'b1;
          end else if (ar_co) begin       // acc >= N: keep the difference
            acc      <= ar_sum;
            ar_start <= 1'b1;
          end else begin                  // 0 <= acc < N: finished
            p    <= acc[K-1:0];
            busy <= 1'b0;
            done <= 1'b1;
            rst  <= R_IDLE;
          end
        end
        default: rst <= R_IDLE;
      endcase
    end
  end
endmodule
