// Self-checking testbench of the radix-8 integer multiplier at its default
// size (513 x 513 bits, the size of (A0+A1)(B0+B1) in a 1024-bit
// multiplication). Random and extreme operands against X*Y, and the cycle
// count against the document's 11k/24 + 13 (k = 513).
module tb_int_mult_r8;
  localparam int XW = 513, YW = 513;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               start, busy, done;
  logic [XW-1:0]      x;
  logic [YW-1:0]      y;
  logic [XW+YW-1:0]   p;

  int_mult_r8 dut (.clk, .rst_n, .start, .x, .y, .busy, .done, .p);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XW-1:0] rnd();
    logic [XW+30:0] v;
    for (int i = 0; i < (XW + 31) / 32; i++) v[32*i +: 32] = $urandom;
    return v[XW-1:0];
  endfunction

  int last_cyc;
  task automatic run(input logic [XW-1:0] xa, input logic [YW-1:0] ya);
    int cyc;
    x = xa; y = ya; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (p !== (XW+YW)'(xa) * (XW+YW)'(ya)) begin
      failures++;
      $display("FAIL x=%h\n y=%h\n p=%h", xa, ya, p);
    end
    checks++;
    if (cyc > 11 * XW / 24 + 13) begin
      failures++;
      $display("FAIL cycle count %0d > %0d", cyc, 11 * XW / 24 + 13);
    end
    last_cyc = cyc;
  endtask

  initial begin
    start = 0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run('1, '1);
    run('0, '1);
    run('1, YW'(7));
    for (int i = 0; i < 40; i++) run(rnd(), rnd());
    $display("int_mult_r8 %0dx%0d: %0d cycles (document: %0d)", XW, YW, last_cyc, 11 * XW / 24 + 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
