// Self-checking end-to-end testbench of the RSA engine at its default size
// (K = 1024-bit modulus, 1024-bit exponent port, top module with no
// parameter overrides).
// Uses a real 1024-bit RSA key (generated offline with a fixed seed, public
// exponent 2^16 + 1): messages are encrypted with e and the ciphertexts are
// decrypted with d, which must give the message back; every result is also
// compared with a square-and-multiply reference computed here with wide
// arithmetic. Further cases: exponent 0 and 1, message 0 and 1, and random
// moduli with random 64-bit exponents.
// Counts each mechanism (squarings, multiplications, conversions into and
// out of the scaled domain, word and bit skips of leading exponent zeros,
// the exponent-0 shortcut) and checks the number of squarings and
// multiplications of every run against the exponent; each mechanism must
// occur. Prints the encryption cycle count next to the document's
// 10863 ns / 0.8 ns = 13579 cycles.
module tb_rsa_top;
  localparam int K = 1024, EW = 1024;
  localparam logic [1023:0] KEY_N = 1024'hafa929d18c2806414661f52a1cbfa1cf2ea6bbb231f41cd5f0ca18396e5a733457d8136b3fdd48bcc1c13409d281187294b27024763bca404e080f74b52e2879aeacf1c6b26de6d82adcec1d41f2724375e7d13121dad0bef160862d71e9c918b236c4c24f43a75da2415b13e5e612c27d45f7b5b380f94380594e16deaa4737;
  localparam logic [1023:0] KEY_D = 1024'ha600e9a23c1fbef984f821e67050b12bc85c8d58b3588cbfa9d472dc236b9b1fc63c4eedb5e6fb4c5696ad04f34848c04fc1e9b4ab7f897d07c11a4a22c6c23bda3a08bf146e603d611b876aaca7b6eb7ef626f0927c733ce0a1b21214e1d9e139775a813d137849342475d93457e29f884e1f180f46c87b152d42d9ca299691;
  localparam logic [EW-1:0] KEY_E = EW'(65537);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, busy, done;
  logic [K-1:0]  msg, n, result;
  logic [EW-1:0] exp;

  rsa_top dut (.clk, .rst_n, .start, .msg, .exp, .n, .busy, .done, .result);

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] rnd();
    logic [K-1:0] v;
    for (int i = 0; i < K / 32; i++) v[32*i +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [K-1:0] modexp(input logic [K-1:0] m, input logic [EW-1:0] e,
                                          input logic [K-1:0] nn);
    logic [2*K-1:0] c;
    c = 1;
    for (int i = EW - 1; i >= 0; i--) begin
      c = (c * c) % (2*K)'(nn);
      if (e[i]) c = (c * (2*K)'(m)) % (2*K)'(nn);
    end
    return c[K-1:0];
  endfunction

  // mechanism counters, sampled inside the engine
  int n_sq = 0, n_mul = 0, n_to = 0, n_from = 0, n_wskip = 0, n_bskip = 0, n_zero = 0;
  always @(posedge clk) begin
    if (dut.mm_start) begin
      case (int'(dut.state))
        2: n_to++;
        4: n_sq++;
        5: n_mul++;
        6: n_from++;
        default: ;
      endcase
    end
    if (int'(dut.state) == 1 && !dut.scan_ok && !dut.er[EW-1] && dut.bits_left != 0) begin
      if (dut.bits_left >= 32 && dut.er[EW-1 -: 32] == '0) n_wskip++;
      else n_bskip++;
    end
    if (int'(dut.state) == 1 && dut.r2_ok && dut.scan_ok && dut.bits_left == 0) n_zero++;
  end

  int last_cyc;
  task automatic run(input logic [K-1:0] m, input logic [EW-1:0] e, input logic [K-1:0] nn,
                     output logic [K-1:0] res);
    logic [K-1:0] ref_r;
    int cyc, sq0, mul0, top, ones;
    sq0 = n_sq; mul0 = n_mul;
    msg = m; exp = e; n = nn; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    res = result;
    last_cyc = cyc;
    ref_r = modexp(m, e, nn);
    checks++;
    if (result !== ref_r) begin
      failures++;
      $display("FAIL m=%h\n e=%h\n n=%h\n result=%h\n ref=%h", m, e, nn, result, ref_r);
    end
    // squarings = bits below the top 1, multiplications = 1 bits below it
    top = -1; ones = 0;
    for (int i = 0; i < EW; i++) if (e[i]) begin top = i; ones++; end
    checks++;
    if (top >= 0 && (n_sq - sq0 != top || n_mul - mul0 != ones - 1)) begin
      failures++;
      $display("FAIL %0d squarings and %0d multiplications for an exponent with top bit %0d and %0d ones",
               n_sq - sq0, n_mul - mul0, top, ones);
    end
  endtask

  initial begin
    logic [K-1:0] m, c, back, nn, r;
    start = 0; msg = '0; exp = '0; n = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    run(rnd() % KEY_N, '0, KEY_N, r);
    run(K'(12345), EW'(1), KEY_N, r);
    run('0, KEY_E, KEY_N, r);
    run(K'(1), KEY_E, KEY_N, r);

    for (int i = 0; i < 2; i++) begin
      m = rnd() % KEY_N;
      run(m, KEY_E, KEY_N, c);
      $display("encryption with e = 2^16+1: %0d cycles (document: 13579 at 0.8 ns)", last_cyc);
      checks++;
      if (last_cyc > 19 * 799 + 200) begin
        failures++;
        $display("FAIL encryption took %0d cycles", last_cyc);
      end
      run(c, KEY_D, KEY_N, back);
      $display("decryption with the 1024-bit private exponent: %0d cycles", last_cyc);
      checks++;
      if (back !== m) begin
        failures++;
        $display("FAIL decryption did not return the message");
      end
    end

    for (int i = 0; i < 3; i++) begin
      nn = rnd(); nn[K-1] = 1'b1; nn[0] = 1'b1;
      run(rnd() % nn, EW'({$urandom, $urandom}), nn, r);
    end

    $display("mechanisms: squarings=%0d multiplications=%0d into-domain=%0d out-of-domain=%0d word-skips=%0d bit-skips=%0d zero-exponent=%0d",
             n_sq, n_mul, n_to, n_from, n_wskip, n_bskip, n_zero);
    checks++;
    if (n_sq == 0 || n_mul == 0 || n_to == 0 || n_from == 0 || n_wskip == 0 || n_bskip == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
