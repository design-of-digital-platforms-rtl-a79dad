// tb_montgomery: self-checking testbench of the Montgomery multiplier.
//
// Two instances: the full 1024-bit multiplier with its default 514-bit adder
// slices, and a 16-bit one (10-bit slices, so its additions also take three
// cycles) that is given many random operands. A result r is accepted when
// r < M and r * 2^WIDTH = A * B (mod M), computed with the simulator's wide
// arithmetic, which does not need the modular inverse of 2^WIDTH. Edge
// cases: A = 0, A = 1, B = 0, A = 2^WIDTH-1, B = M-1, M = 2^WIDTH-1. The
// latency is checked to be 3*WIDTH + 8 cycles (3080 for 1024 bits), inside
// the 3097-cycle budget of the design.
module tb_montgomery;
  localparam int unsigned W1 = 1024;
  localparam int unsigned W2 = 16, C2 = 10;

  logic clk = 1'b0;
  logic resetn = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic s1, d1, s2, d2;
  logic [W1-1:0] a1, b1, m1, r1;
  logic [W2-1:0] a2, b2, m2, r2;

  montgomery #(.WIDTH(W1)) dut1 (.clk, .resetn, .start(s1), .in_a(a1), .in_b(b1),
    .in_m(m1), .result(r1), .done(d1));
  montgomery #(.WIDTH(W2), .CHUNK(C2)) dut2 (.clk, .resetn, .start(s2), .in_a(a2),
    .in_b(b2), .in_m(m2), .result(r2), .done(d2));

  function automatic logic [W1-1:0] rnd1();
    logic [W1-1:0] v;
    for (int i = 0; i < W1; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic run1(logic [W1-1:0] a, logic [W1-1:0] b, logic [W1-1:0] m);
    int cyc;
    logic [2*W1+1:0] lhs, rhs;
    @(negedge clk);
    a1 = a; b1 = b; m1 = m; s1 = 1'b1;
    @(negedge clk);
    s1 = 1'b0; a1 = '0; b1 = '0; m1 = '0;
    cyc = 1;
    while (!d1 && cyc < 10000) begin @(negedge clk); cyc++; end
    lhs = ({{(W1+2){1'b0}}, r1} << W1) % {{(W1+2){1'b0}}, m};
    rhs = ({{(W1+2){1'b0}}, a} * {{(W1+2){1'b0}}, b}) % {{(W1+2){1'b0}}, m};
    checks++;
    if (!d1 || r1 >= m || lhs != rhs) begin
      failures++;
      $display("FAIL 1024-bit: a=%h b=%h m=%h r=%h", a, b, m, r1);
    end
    checks++;
    if (cyc != 3 * W1 + 8) begin
      failures++; $display("FAIL 1024-bit latency %0d, expected %0d", cyc, 3 * W1 + 8);
    end
  endtask

  task automatic run2(logic [W2-1:0] a, logic [W2-1:0] b, logic [W2-1:0] m);
    int cyc;
    logic [63:0] lhs, rhs;
    @(negedge clk);
    a2 = a; b2 = b; m2 = m; s2 = 1'b1;
    @(negedge clk);
    s2 = 1'b0; a2 = ~a; b2 = ~b;
    cyc = 1;
    while (!d2 && cyc < 1000) begin @(negedge clk); cyc++; end
    lhs = (64'(r2) << W2) % 64'(m);
    rhs = (64'(a) * 64'(b)) % 64'(m);
    checks++;
    if (!d2 || r2 >= m || lhs != rhs) begin
      failures++;
      $display("FAIL 16-bit: a=%h b=%h m=%h r=%h", a, b, m, r2);
    end
    checks++;
    if (cyc != 3 * W2 + 8) begin
      failures++; $display("FAIL 16-bit latency %0d, expected %0d", cyc, 3 * W2 + 8);
    end
  endtask

  initial begin
    logic [W1-1:0] m, a, b;
    s1 = 0; s2 = 0; a1 = '0; b1 = '0; m1 = '0; a2 = '0; b2 = '0; m2 = '0;
    repeat (3) @(negedge clk);
    resetn = 1'b1;
    // 1024-bit
    m = rnd1(); m[W1-1] = 1'b1; m[0] = 1'b1;
    a = rnd1(); b = rnd1() % m;
    run1(a, b, m);
    run1('1, m - 1, m);
    run1(W1'(1), b, m);
    run1('0, b, m);
    run1('1, '1 - 1, '1);
    m = rnd1() >> 200; m[0] = 1'b1;    // a smaller modulus
    run1(rnd1() % m, rnd1() % m, m);
    // 16-bit
    run2('1, 16'hFFFE, 16'hFFFF);
    run2(16'h1, 16'h1, 16'h0001 | 16'h8001);
    run2(16'h0, 16'h1234, 16'hC001);
    for (int i = 0; i < 300; i++) begin
      logic [W2-1:0] mm, aa, bb;
      mm = W2'($urandom) | 16'h0001;
      if (i % 2 == 0) mm[W2-1] = 1'b1;
      if (mm == 1) mm = 3;
      aa = W2'($urandom);
      bb = W2'($urandom) % mm;
      run2(aa, bb, mm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
