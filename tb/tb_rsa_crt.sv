// tb_rsa_crt: RSA key generation, encryption and decryption, plain and by
// the Chinese Remainder Theorem (CRT), on a 64-bit build of the co-processor.
//
// The host model finds two random 32-bit primes p and q by trial division,
// forms N = p*q, e = 65537 and d = e^-1 mod (p-1)(q-1) with the extended
// Euclidean algorithm. Each message is encrypted on the co-processor and
// decrypted twice: once directly with d modulo N, and once by CRT, where the
// co-processor runs ct^dP mod p and ct^dQ mod q (with N loaded as p or q,
// R2_N = 2^128 mod p and A = 2^64 mod p, the ciphertext entering as an
// operand larger than the modulus) and the host recombines
// m = m2 + q * (qinv * (m1 - m2) mod p). Every result is compared with the
// message and with square-and-multiply on wide integers. The DMA model, busy
// times and mechanism counters are as in the other end-to-end testbenches;
// the ladder commands spent on plain and CRT decryption are printed.
module tb_rsa_crt;
  import rsa_pkg::*;

  localparam int unsigned W      = 64;
  localparam int unsigned CHUNK  = 34;
  localparam int unsigned AW     = 32;
  localparam int unsigned RX_LAT = 86;
  localparam int unsigned TX_LAT = 8;
  localparam int unsigned BYTES  = W / 8;
  // Word addresses in the memory model.
  localparam logic [AW-1:0] ADDR_N = 0 * BYTES, ADDR_R2N = 1 * BYTES,
                            ADDR_M = 2 * BYTES, ADDR_A   = 3 * BYTES;
  // Busy cycles of each command type (see the header of rsa.sv): the DMA
  // round trip(s), one Montgomery multiplication of 3*W+8 cycles and the
  // handshake cycles between the units.
  localparam int unsigned MM_CYC    = 3 * W + 8;
  localparam int unsigned LOAD_CYC  = RX_LAT + 3;
  localparam int unsigned M_CYC     = RX_LAT + MM_CYC + 4;
  localparam int unsigned STEP_CYC  = RX_LAT + MM_CYC + TX_LAT + 6;

  logic clk = 1'b0;
  logic resetn = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [3:0]    command;
  logic [AW-1:0] rx_addr, tx_addr;
  logic          busy;
  rsa_state_e    state;
  logic          rx_start, rx_done, tx_start, tx_done;
  logic [AW-1:0] dma_rx_addr, dma_tx_addr;
  logic [W-1:0]  rx_data, tx_data;

  rsa #(.WIDTH(W), .CHUNK(CHUNK)) dut (
    .clk, .resetn, .command, .rx_addr, .tx_addr, .busy, .state_o(state),
    .dma_rx_start(rx_start), .dma_rx_addr, .dma_rx_done(rx_done), .dma_rx_data(rx_data),
    .dma_tx_start(tx_start), .dma_tx_addr, .dma_tx_data(tx_data), .dma_tx_done(tx_done));

  dma_model #(.WIDTH(W), .ADDR_W(AW), .DEPTH(4), .RX_LAT(RX_LAT), .TX_LAT(TX_LAT)) dma (
    .clk, .resetn, .rx_start, .rx_addr(dma_rx_addr), .rx_done, .rx_data,
    .tx_start, .tx_addr(dma_tx_addr), .tx_data, .tx_done);

  // Mechanism counters.
  int n_load_n = 0, n_load_r2n = 0, n_load_m = 0, n_step1 = 0, n_step0 = 0;
  int n_final = 0, n_parallel = 0, n_rx = 0, n_tx = 0, n_held = 0;

  always @(posedge clk) begin
    if (rx_done) n_rx++;
    if (tx_done) n_tx++;
    if (dut.u_mul0.start && dut.u_mul1.start) n_parallel++;
  end

  // ---- reference arithmetic -------------------------------------------
  typedef logic [2*W+1:0] wide_t;

  function automatic logic [W-1:0] mulmod(logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] n);
    wide_t p;
    p = (wide_t'(a) * wide_t'(b)) % wide_t'(n);
    return p[W-1:0];
  endfunction

  function automatic logic [W-1:0] modexp(logic [W-1:0] m, logic [W-1:0] e, int elen,
                                          logic [W-1:0] n);
    logic [W-1:0] r;
    r = W'(1) % n;
    for (int i = elen - 1; i >= 0; i--) begin
      r = mulmod(r, r, n);
      if (e[i]) r = mulmod(r, m, n);
    end
    return r;
  endfunction

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  // ---- host processor model ----------------------------------------------
  // Write a command, wait while busy, leave the command set for a few more
  // cycles (the block must not start again), then clear it.
  task automatic issue(logic [3:0] cmd, logic [AW-1:0] rxa, logic [AW-1:0] txa,
                       int unsigned exp_cyc);
    int unsigned cyc;
    int          rx0, tx0;
    rx0 = n_rx; tx0 = n_tx;
    @(negedge clk);
    rx_addr = rxa; tx_addr = txa; command = cmd;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (busy && cyc < 20000);
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL command %b busy for %0d cycles, expected %0d", cmd, cyc, exp_cyc);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (state != ST_WAITCLR || busy) begin
      failures++; $display("FAIL command %b restarted while still set", cmd);
    end else n_held++;
    command = 4'b0000;
    @(negedge clk);
    checks++;
    if (state != ST_IDLE || (n_rx - rx0) != 1 || (n_tx - tx0) != (cmd[2:1] != 2'b00 && !cmd[3] ? 1 : 0)) begin
      failures++; $display("FAIL command %b: DMA transfers rx=%0d tx=%0d", cmd, n_rx - rx0, n_tx - tx0);
    end
  endtask

  task automatic load_data(logic [W-1:0] n, logic [W-1:0] r2n);
    dma.mem[0] = n;
    dma.mem[1] = r2n;
    issue(CMD_LOAD_N,   ADDR_N,   '0, LOAD_CYC); n_load_n++;
    issue(CMD_LOAD_R2N, ADDR_R2N, '0, LOAD_CYC); n_load_r2n++;
  endtask

  task automatic power_ladder(logic [W-1:0] m, logic [W-1:0] e, int elen, logic [W-1:0] rn,
                              output logic [W-1:0] ct);
    dma.mem[2] = m;
    issue(CMD_LOAD_M, ADDR_M, '0, M_CYC); n_load_m++;
    dma.mem[3] = rn;
    for (int i = elen - 1; i >= 0; i--) begin
      if (e[i]) begin issue(CMD_STEP_ONE,  ADDR_A, ADDR_A, STEP_CYC); n_step1++; end
      else      begin issue(CMD_STEP_ZERO, ADDR_A, ADDR_A, STEP_CYC); n_step0++; end
    end
    issue(CMD_FINAL, ADDR_A, ADDR_A, STEP_CYC); n_final++;
    ct = dma.mem[3];
  endtask

  task automatic encrypt_check(logic [W-1:0] n, logic [W-1:0] m, logic [W-1:0] e, int elen);
    logic [W-1:0] rn, r2n, ct, expct;
    wide_t        t;
    t   = (wide_t'(1) << W) % wide_t'(n);
    rn  = t[W-1:0];
    r2n = mulmod(rn, rn, n);
    load_data(n, r2n);
    power_ladder(m, e, elen, rn, ct);
    expct = modexp(m, e, elen, n);
    checks++;
    if (ct !== expct) begin
      failures++;
      $display("FAIL ciphertext mismatch (e=%h)\n got %h\n exp %h", e[31:0], ct, expct);
    end
  endtask

  // ---- host-side key generation ------------------------------------------
  function automatic bit is_prime(logic [31:0] x);
    if (x < 2) return 1'b0;
    if (x % 2 == 0) return x == 2;
    for (logic [31:0] f = 3; f <= 65535 && f * f <= x; f += 2)
      if (x % f == 0) return 1'b0;
    return 1'b1;
  endfunction

  function automatic logic [31:0] rand_prime();
    logic [31:0] x;
    x = $urandom;
    x[31] = 1'b1; x[30] = 1'b1; x[0] = 1'b1;
    while (!is_prime(x)) x += 2;
    return x;
  endfunction

  // Modular inverse of a modulo m (gcd(a, m) = 1), extended Euclid.
  function automatic logic [W-1:0] modinv(logic [W-1:0] a, logic [W-1:0] m);
    logic signed [W+2:0] r0, r1, t0, t1, qq, tmp;
    r0 = $signed({3'b000, m}); r1 = $signed({3'b000, a % m});
    t0 = 0; t1 = 1;
    while (r1 != 0) begin
      qq = r0 / r1;
      tmp = r0 - qq * r1; r0 = r1; r1 = tmp;
      tmp = t0 - qq * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 = t0 + $signed({3'b000, m});
    return t0[W-1:0];
  endfunction

  function automatic logic [W-1:0] gcd(logic [W-1:0] a, logic [W-1:0] b);
    logic [W-1:0] t;
    while (b != 0) begin t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic int bitlen(logic [W-1:0] x);
    for (int i = W - 1; i >= 0; i--) if (x[i]) return i + 1;
    return 0;
  endfunction

  // m^e mod n on the co-processor, as the host software would run it.
  task automatic hw_modexp(logic [W-1:0] n, logic [W-1:0] m, logic [W-1:0] e,
                           output logic [W-1:0] res);
    logic [W-1:0] rn, r2n;
    wide_t        t;
    t   = (wide_t'(1) << W) % wide_t'(n);
    rn  = t[W-1:0];
    r2n = mulmod(rn, rn, n);
    load_data(n, r2n);
    power_ladder(m, e, bitlen(e), rn, res);
  endtask

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  int steps_plain = 0, steps_crt = 0;

  initial begin
    logic [W-1:0] p, q, n, phi, e, d, dp, dq, qinv, m, ct, m_plain, m1, m2, h, m_crt;
    int s0;
    command = '0; rx_addr = '0; tx_addr = '0;
    repeat (3) @(negedge clk);
    resetn = 1'b1;
    @(negedge clk);

    for (int k = 0; k < 8; k++) begin
      e = W'(65537);
      do begin
        p = W'(rand_prime());
        do q = W'(rand_prime()); while (q == p);
        phi = (p - 1) * (q - 1);
      end while (gcd(e, phi) != 1);
      n    = p * q;
      d    = modinv(e, phi);
      dp   = d % (p - 1);
      dq   = d % (q - 1);
      qinv = modinv(q, p);
      checks++;
      if (mulmod(e, d, phi) != 1 || mulmod(q, qinv, p) != 1) begin
        failures++; $display("FAIL key generation");
      end
      m = rnd() % n;
      // Encryption
      hw_modexp(n, m, e, ct);
      expect_eq("encryption", ct, modexp(m, e, bitlen(e), n));
      // Plain decryption
      s0 = n_step0 + n_step1;
      hw_modexp(n, ct, d, m_plain);
      steps_plain += n_step0 + n_step1 - s0;
      expect_eq("plain decryption", m_plain, m);
      // CRT decryption: two exponentiations with the primes as modulus
      s0 = n_step0 + n_step1;
      hw_modexp(p, ct, dp, m1);
      hw_modexp(q, ct, dq, m2);
      steps_crt += n_step0 + n_step1 - s0;
      expect_eq("ct^dP mod p", m1, modexp(ct, dp, bitlen(dp), p));
      expect_eq("ct^dQ mod q", m2, modexp(ct, dq, bitlen(dq), q));
      h     = mulmod(qinv, (m1 + p - (m2 % p)) % p, p);
      m_crt = m2 + h * q;
      expect_eq("CRT decryption", m_crt, m);
    end
    $display("ladder steps: plain decryption %0d, CRT decryption %0d", steps_plain, steps_crt);

    checks++;
    if (n_load_n == 0 || n_load_r2n == 0 || n_load_m == 0 || n_step1 == 0 || n_step0 == 0 ||
        n_final == 0 || n_parallel == 0 || n_rx == 0 || n_tx == 0 || n_held == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: load_N=%0d load_R2N=%0d load_M=%0d step_bit1=%0d step_bit0=%0d final=%0d",
             n_load_n, n_load_r2n, n_load_m, n_step1, n_step0, n_final);
    $display("            parallel_multiplications=%0d dma_reads=%0d dma_writes=%0d held_commands=%0d",
             n_parallel, n_rx, n_tx, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
