// tb_mpadder: self-checking testbench of the multi-precision adder.
//
// Runs the full-width adder (1027 bits, 514-bit slices), the same width
// with 64-bit slices (17 slices) and a narrow one (70 bits, 16-bit slices,
// five slices) side by side. Random and corner-case
// additions and subtractions (all ones, zero, a - b with a < b, equal
// operands, overflow) are compared with the simulator's own wide arithmetic.
// It checks the latency (done in cycle ceil((WIDTH+1)/CHUNK) + 1, counting
// the start cycle as 1: 3 for 514-bit slices, 18 for 64-bit slices) and
// that the result does not depend on the inputs being held after start.
module tb_mpadder;
  localparam int unsigned W1 = 1027, C1 = 514;
  localparam int unsigned W2 = 70,   C2 = 16;

  logic clk = 1'b0;
  logic resetn = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic           s1, sub1, d1;
  logic [W1-1:0]  a1, b1;
  logic [W1:0]    r1;
  logic           s2, sub2, d2;
  logic [W2-1:0]  a2, b2;
  logic [W2:0]    r2;

  mpadder #(.WIDTH(W1), .CHUNK(C1)) dut1 (.clk, .resetn, .start(s1), .subtract(sub1),
    .in_a(a1), .in_b(b1), .result(r1), .done(d1));
  logic           s3, d3;
  logic [W1:0]    r3;
  // Same 1027-bit operands as dut1, 64-bit slices: the 18-cycle adder.
  mpadder #(.WIDTH(W1), .CHUNK(64)) dut3 (.clk, .resetn, .start(s3), .subtract(sub1),
    .in_a(a1), .in_b(b1), .result(r3), .done(d3));
  mpadder #(.WIDTH(W2), .CHUNK(C2)) dut2 (.clk, .resetn, .start(s2), .subtract(sub2),
    .in_a(a2), .in_b(b2), .result(r2), .done(d2));

  function automatic logic [W1-1:0] rnd1();
    logic [W1-1:0] v;
    for (int i = 0; i < W1; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  // Expected value: WIDTH+1-bit sum, or difference with "no borrow" on top.
  function automatic logic [W1:0] ref1(logic [W1-1:0] a, logic [W1-1:0] b, logic sub);
    if (sub) return {a >= b, a - b};
    return {1'b0, a} + {1'b0, b};
  endfunction

  function automatic logic [W2:0] ref2(logic [W2-1:0] a, logic [W2-1:0] b, logic sub);
    if (sub) return {a >= b, a - b};
    return {1'b0, a} + {1'b0, b};
  endfunction

  task automatic run1(logic [W1-1:0] a, logic [W1-1:0] b, logic sub);
    int cyc, cyc3;
    logic [W1:0] exp_r;
    exp_r = ref1(a, b, sub);
    @(negedge clk);
    a1 = a; b1 = b; sub1 = sub; s1 = 1'b1; s3 = 1'b1;
    @(negedge clk);
    s1 = 1'b0; s3 = 1'b0;
    a1 = ~a; b1 = ~b; sub1 = ~sub;   // inputs may change while it runs
    cyc = 1;
    cyc3 = 0;
    while ((cyc3 == 0 || !d1) && cyc < 50) begin
      if (d1) begin
        checks++;
        if (r1 !== exp_r) begin
          failures++;
          $display("FAIL W=%0d sub=%0d a=%h b=%h got %h exp %h", W1, sub, a, b, r1, exp_r);
        end
        checks++;
        if (cyc != 3) begin failures++; $display("FAIL latency %0d, expected 3", cyc); end
      end
      if (d3) begin
        cyc3 = cyc;
        checks++;
        if (r3 !== exp_r) begin
          failures++;
          $display("FAIL 64-bit slices sub=%0d a=%h b=%h got %h exp %h", sub, a, b, r3, exp_r);
        end
      end
      @(negedge clk); cyc++;
    end
    checks++;
    // ceil(1028/64) = 17 slices + 1 capture cycle
    if (cyc3 != 18) begin failures++; $display("FAIL 64-bit slice latency %0d, expected 18", cyc3); end
  endtask

  task automatic run2(logic [W2-1:0] a, logic [W2-1:0] b, logic sub);
    int cyc;
    logic [W2:0] exp_r;
    exp_r = ref2(a, b, sub);
    @(negedge clk);
    a2 = a; b2 = b; sub2 = sub; s2 = 1'b1;
    @(negedge clk);
    s2 = 1'b0;
    a2 = '0; b2 = '1;
    cyc = 1;
    while (!d2 && cyc < 50) begin @(negedge clk); cyc++; end
    checks++;
    if (r2 !== exp_r || !d2) begin
      failures++;
      $display("FAIL W=%0d sub=%0d a=%h b=%h got %h exp %h", W2, sub, a, b, r2, exp_r);
    end
    checks++;
    // ceil(71/16) = 5 slices + 1
    if (cyc != 6) begin failures++; $display("FAIL latency %0d, expected 6", cyc); end
  endtask

  initial begin
    s1 = 0; s2 = 0; s3 = 0; sub1 = 0; sub2 = 0; a1 = '0; b1 = '0; a2 = '0; b2 = '0;
    repeat (3) @(negedge clk);
    resetn = 1'b1;
    // Corner cases
    run1('1, '1, 1'b0);          // overflow into the carry bit
    run1('1, W1'(1), 1'b0);      // carry ripples through both slices
    run1('0, '0, 1'b1);
    run1(W1'(5), W1'(7), 1'b1);  // negative difference
    run1(W1'(7), W1'(7), 1'b1);
    run1('1, '0, 1'b1);
    run1('0, '1, 1'b1);
    run1({1'b0, {(W1-1){1'b1}}}, W1'(1), 1'b0);
    run2('1, '1, 1'b0);
    run2('1, W2'(1), 1'b0);
    run2(W2'(3), W2'(9), 1'b1);
    run2(W2'(9), W2'(9), 1'b1);
    run2('0, '0, 1'b0);
    for (int i = 0; i < 40; i++) begin
      logic [W1-1:0] x, y;
      x = rnd1(); y = rnd1();
      if (i % 4 == 3) y = x;
      run1(x, y, i[0]);
      run2(x[W2-1:0], y[W2-1:0], i[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
