// Self-checking testbench of the PIKOM modular multiplier at its default
// size (K = 1024, h = 512).
// Random reduced operands A, B < N for random odd moduli with the top bit
// set, plus extreme cases (A = B = N - 1, A = 0, smallest and largest N).
// Each modulus is used several times, as in an exponentiation: the first
// multiplication also fills the classic multiplier's tables.
// Checks 0 <= P < N and P * 2^h = A*B (mod N) with wide arithmetic here, and
// the cycle count against the document's 799-cycle schedule plus the final
// reduction passes this design may add (and the table fill for a new N). Counts how often each mechanism was
// used: negative Q0'+Q1, add-N and subtract-N reduction passes, and the
// Montgomery multiplier's final corrections; each must occur at least once.
module tb_pikom_mm;
  localparam int K = 1024, H = K / 2;
  localparam int RNW = (K + 6 + 31) / 32;   // words of the result adder
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start, busy, done;
  logic [K-1:0] a, b, n, p;

  pikom_mm dut (.clk, .rst_n, .start, .a, .b, .n, .busy, .done, .p);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] rnd();
    logic [K-1:0] v;
    for (int i = 0; i < K / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  // mechanism counters, sampled from inside the multiplier
  int n_qneg = 0, n_addn = 0, n_subn = 0, n_msub = 0, n_madd = 0;
  always @(posedge clk) begin
    if (dut.ar_start && int'(dut.rop) == 3) n_addn++;
    if (dut.ar_start && int'(dut.rop) == 4) n_subn++;
    if (dut.u_mont.done && dut.u_mont.adj == 2'b01) n_msub++;
    if (dut.u_mont.done && dut.u_mont.adj == 2'b11) n_madd++;
    if (dut.im2_start && dut.qneg) n_qneg++;
  end

  int min_cyc = 1000000, max_cyc = 0, max_fill_cyc = 0;
  logic [K-1:0] last_n = '0;
  logic         have_n = 1'b0;
  task automatic run(input logic [K-1:0] aa, input logic [K-1:0] ba, input logic [K-1:0] na);
    logic [2*K-1:0] lhs, rhs;
    int cyc, bound;
    bit fresh;
    fresh = !have_n || na != last_n;
    last_n = na; have_n = 1'b1;
    a = aa; b = ba; n = na; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    lhs = ((2*K)'(p) << H) % (2*K)'(na);
    rhs = ((2*K)'(aa) * (2*K)'(ba)) % (2*K)'(na);
    checks++;
    if (p >= na || lhs !== rhs) begin
      failures++;
      $display("FAIL a=%h\n b=%h\n n=%h\n p=%h", aa, ba, na, p);
    end
    // the 799-cycle schedule plus up to three extra reduction passes
    bound = 799 + 3 * RNW;
    // a new modulus first fills the classic multiplier's tables
    if (fresh) bound += 14 * (H / 32 + 2);
    checks++;
    if (cyc > bound) begin
      failures++;
      $display("FAIL cycle count %0d > %0d", cyc, bound);
    end
    if (fresh) begin
      if (cyc > max_fill_cyc) max_fill_cyc = cyc;
    end else begin
      if (cyc < min_cyc) min_cyc = cyc;
      if (cyc > max_cyc) max_cyc = cyc;
    end
  endtask

  initial begin
    logic [K-1:0] nn;
    start = 0; a = '0; b = '0; n = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    nn = '1;
    run(nn - 1, nn - 1, nn);
    run(nn - 1, nn - 1, nn);
    nn = {1'b1, {(K-2){1'b0}}, 1'b1};
    run(nn - 1, nn - 1, nn);
    run('0, nn - 1, nn);
    for (int i = 0; i < 30; i++) begin
      nn = rnd(); nn[K-1] = 1'b1; nn[0] = 1'b1;
      for (int j = 0; j < 2; j++) run(rnd() % nn, rnd() % nn, nn);
    end
    $display("pikom_mm K=%0d: %0d..%0d cycles with the tables ready (document: 799), up to %0d with a new modulus",
             K, min_cyc, max_cyc, max_fill_cyc);
    $display("mechanisms: negative Q0'+Q1=%0d add-N passes=%0d subtract-N passes=%0d Montgomery -N=%0d +N=%0d",
             n_qneg, n_addn, n_subn, n_msub, n_madd);
    checks++;
    if (n_qneg == 0 || n_addn == 0 || n_subn == 0 || n_msub == 0 || n_madd == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
