// Checks the word-serial adder/subtractor at a width that is not a multiple
// of the word (100 bits, 4 words) and at an exact multiple (64 bits):
// random additions and subtractions, carry/borrow out, and the latency of
// ceil(WIDTH/32) cycles from start to done.
module tb_serial_addsub;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         st1, inv1, cin1, busy1, done1, co1;
  logic [99:0]  x1, y1, s1;
  logic         st2, inv2, cin2, busy2, done2, co2;
  logic [63:0]  x2, y2, s2;

  serial_addsub #(.WIDTH(100)) dut1 (.clk, .rst_n, .start(st1), .x(x1), .y(y1), .inv_y(inv1),
    .cin(cin1), .busy(busy1), .done(done1), .sum(s1), .cout(co1));
  serial_addsub #(.WIDTH(64)) dut2 (.clk, .rst_n, .start(st2), .x(x2), .y(y2), .inv_y(inv2),
    .cin(cin2), .busy(busy2), .done(done2), .sum(s2), .cout(co2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run1(input logic [99:0] a, input logic [99:0] b, input logic sub);
    logic [100:0] ref_v;
    logic [99:0]  nb;
    int cyc;
    nb = ~b;
    x1 = a; y1 = b; inv1 = sub; cin1 = sub; st1 = 1;
    @(posedge clk); #1 st1 = 0;
    cyc = 0;
    while (!done1) begin @(posedge clk); #1 cyc++; end
    ref_v = sub ? 101'(a) + 101'(nb) + 101'd1 : 101'(a) + 101'(b);
    checks++;
    if ({co1, s1} !== ref_v || cyc != 4) begin
      failures++;
      $display("FAIL100 sub=%b a=%h b=%h got=%b%h cyc=%0d", sub, a, b, co1, s1, cyc);
    end
  endtask

  task automatic run2(input logic [63:0] a, input logic [63:0] b, input logic sub);
    logic [64:0] ref_v;
    logic [63:0] nb;
    int cyc;
    nb = ~b;
    x2 = a; y2 = b; inv2 = sub; cin2 = sub; st2 = 1;
    @(posedge clk); #1 st2 = 0;
    cyc = 0;
    while (!done2) begin @(posedge clk); #1 cyc++; end
    ref_v = sub ? 65'(a) + 65'(nb) + 65'd1 : 65'(a) + 65'(b);
    checks++;
    if ({co2, s2} !== ref_v || cyc != 2) begin
      failures++;
      $display("FAIL64 sub=%b a=%h b=%h got=%b%h cyc=%0d", sub, a, b, co2, s2, cyc);
    end
  endtask

  initial begin
    st1 = 0; st2 = 0; x1 = '0; y1 = '0; x2 = '0; y2 = '0; inv1 = 0; inv2 = 0; cin1 = 0; cin2 = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run1('1, 100'd1, 1'b0);
    run1(100'd5, 100'd7, 1'b1);
    run2('1, 64'd1, 1'b0);
    for (int i = 0; i < 200; i++) begin
      run1({$urandom, $urandom, $urandom, 4'($urandom)}, {$urandom, $urandom, $urandom, 4'($urandom)}, 1'($urandom));
      run2({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
