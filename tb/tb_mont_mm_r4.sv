// Self-checking testbench of the radix-4 Booth-encoded Montgomery multiplier
// at its default size (K = 512, the lower half of a 1024-bit operand).
// Random X, Y < 2^K and random odd moduli of every size (the lower half of
// an RSA modulus can be anything odd), plus extreme cases. Checks the exact
// identity P * 2^K = X*Y - Q0' * N, that 0 <= P < 2^K, that P < N when
// X*Y < N*2^K, and the cycle count against the document's 9K/16 + 8.
// Counts how often each final correction (subtract N, add N, none) happened.
module tb_mont_mm_r4;
  localparam int K = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         start, busy, done;
  logic [K-1:0] x, y, n, p;
  logic [K+2:0] q0;

  mont_mm_r4 dut (.clk, .rst_n, .start, .x, .y, .n, .busy, .done, .p, .q0);

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

  int n_sub = 0, n_add = 0, n_none = 0, last_cyc = 0;
  task automatic run(input logic [K-1:0] xa, input logic [K-1:0] ya, input logic [K-1:0] na);
    logic signed [2*K+8:0] lhs, rhs;
    int cyc;
    x = xa; y = ya; n = na; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    lhs = (2*K+9)'(p) <<< K;
    rhs = $signed((2*K+9)'(xa) * (2*K+9)'(ya)) - $signed((2*K+9)'($signed(q0))) * $signed((2*K+9)'(na));
    checks++;
    if (lhs !== rhs) begin
      failures++;
      $display("FAIL identity x=%h\n y=%h\n n=%h\n p=%h\n q0=%h", xa, ya, na, p, q0);
    end
    if ((2*K+9)'(xa) * (2*K+9)'(ya) < ((2*K+9)'(na) << K)) begin
      checks++;
      if (p >= na) begin
        failures++;
        $display("FAIL not reduced p=%h n=%h", p, na);
      end
    end
    checks++;
    if (cyc > 9 * K / 16 + 8) begin
      failures++;
      $display("FAIL cycle count %0d > %0d", cyc, 9 * K / 16 + 8);
    end
    last_cyc = cyc;
    if (dut.adj == 2'b01) n_sub++; else if (dut.adj == 2'b11) n_add++; else n_none++;
  endtask

  initial begin
    logic [K-1:0] nn, xx;
    start = 0; x = '0; y = '0; n = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run('1, '1, '1);
    run('1, '1, K'(1));
    run('0, '0, K'(3));
    run('1, '1, {1'b1, {(K-2){1'b0}}, 1'b1});
    for (int i = 0; i < 40; i++) begin
      nn = rnd() | K'(1);
      if (i % 4 == 1) nn = nn >> (i % 97);
      nn[0] = 1'b1;
      xx = rnd();
      if (i % 3 == 0) xx = xx % nn;       // reduced operands too
      run(xx, (i % 3 == 0) ? rnd() % nn : rnd(), nn);
    end
    $display("mont_mm_r4 K=%0d: %0d cycles, corrections sub=%0d add=%0d none=%0d", K, last_cyc, n_sub, n_add, n_none);
    checks++;
    if (n_sub == 0 || n_add == 0 || n_none == 0) begin
      failures++;
      $display("FAIL a final correction case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
