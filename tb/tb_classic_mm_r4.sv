// Self-checking testbench of the radix-4 classic modular multiplier at its
// default size (K = 512, the upper half of a 1024-bit operand).
// Random X, Y < 2^K and moduli with the top bit set, plus the extreme cases
// (X = Y = 2^K - 1 with the smallest and largest moduli). The reference is
// X*Y mod N and floor(X*Y / N) computed with wide arithmetic here. The cycle
// count from start to done is checked against 21K/32 + 17 (353 for K = 512,
// the document's figure) plus the final subtractions this design makes
// (each ceil((K+3)/32) cycles), plus the table fill when the modulus is new.
// Each modulus is used three times, so both the table fill and the reuse of
// the tables for an unchanged modulus are exercised and counted.
module tb_classic_mm_r4;
  localparam int K  = 512;
  localparam int NW = (K + 3 + 31) / 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start, busy, done;
  logic [K-1:0] x, y, n, p;
  logic [K:0]   q1;

  classic_mm_r4 dut (.clk, .rst_n, .start, .x, .y, .n, .busy, .done, .p, .q1);

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

  int max_cyc = 0;
  int n_fill = 0, n_reuse = 0;
  logic [K-1:0] last_n = '0;
  logic         have_n = 1'b0;
  task automatic run(input logic [K-1:0] xa, input logic [K-1:0] ya, input logic [K-1:0] na);
    bit fresh;
    logic [2*K-1:0] prod, qref, pref;
    int cyc, bound;
    fresh = !have_n || na != last_n;
    last_n = na; have_n = 1'b1;
    if (fresh) n_fill++; else n_reuse++;
    x = xa; y = ya; n = na; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    prod = (2*K)'(xa) * (2*K)'(ya);
    qref = prod / (2*K)'(na);
    pref = prod % (2*K)'(na);
    checks++;
    if (p !== pref[K-1:0] || (2*K)'(q1) !== qref) begin
      failures++;
      $display("FAIL x=%h\n y=%h\n n=%h\n p=%h\n pref=%h\n q1=%h\n qref=%h", xa, ya, na, p, pref, q1, qref);
    end
    // the document's count plus up to five final subtractions
    bound = 21 * K / 32 + 17 + 5 * NW;
    // a new modulus first fills the tables: 14 entries of FN + 1 cycles
    if (fresh) bound += 14 * (K / 32 + 2);
    checks++;
    if (cyc > bound) begin
      failures++;
      $display("FAIL cycle count %0d > %0d", cyc, bound);
    end
    if (!fresh && cyc > max_cyc) max_cyc = cyc;
  endtask

  initial begin
    logic [K-1:0] nn;
    start = 0; x = '0; y = '0; n = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run('1, '1, {1'b1, {(K-1){1'b0}}});
    run('1, '1, '1);
    run('0, rnd(), {1'b1, rnd() >> 1});
    for (int i = 0; i < 12; i++) begin
      nn = rnd(); nn[K-1] = 1'b1;
      for (int j = 0; j < 3; j++) run(rnd(), rnd(), nn);   // tables reused after the first
    end
    checks++;
    if (n_fill == 0 || n_reuse == 0) begin
      failures++;
      $display("FAIL table fill or table reuse never happened");
    end
    $display("classic_mm_r4 K=%0d: longest multiplication with tables ready %0d cycles (document: %0d); %0d table fills, %0d reuses",
             K, max_cyc, 21*K/32+17, n_fill, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
