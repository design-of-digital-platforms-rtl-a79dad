// tb_rsa: end-to-end testbench of the RSA co-processor at full size.
//
// The top runs with all its defaults (1024-bit operands, 514-bit adder
// slices, two Montgomery multipliers). A behavioural DMA model with the
// platform's measured latencies (86 cycles to bring a word in, 8 to write
// one back) sits between the block and a word-addressed memory, and the
// initial block plays the host processor: it writes N and R2_N with the
// loading commands, sends M, initialises A = 2^1024 mod N in memory, issues
// one ladder command per exponent bit (most significant first) and the
// final command, polling busy after each and then clearing the command.
//
// The ciphertext read back from memory is compared with M^e mod N worked
// out with plain square-and-multiply on the simulator's wide integers. Two
// encryptions with 16-bit exponents and one with the 17-bit exponent 65537
// are run, then one exponentiation with a random full-length 1024-bit
// exponent, the size of a private-key (decryption) operation. Every
// command's busy time is checked against its expected cycle count. Each
// mechanism must occur at least once: both loading commands, the
// M-to-Montgomery command, ladder steps for bits 1 and 0, the final
// command, both multipliers running together, DMA reads and writes, and a
// command left set after busy fell without being run again.
module tb_rsa;
  import rsa_pkg::*;

  localparam int unsigned W      = RSA_WIDTH;
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

  rsa dut (
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

  initial begin
    logic [W-1:0] n, m;
    command = '0; rx_addr = '0; tx_addr = '0;
    repeat (3) @(negedge clk);
    resetn = 1'b1;
    @(negedge clk);

    n = rnd(); n[W-1] = 1'b1; n[0] = 1'b1;
    m = rnd() % n;
    encrypt_check(n, m, W'(16'hB3A5), 16);         // 16-bit key, mixed bits
    encrypt_check(n, rnd() % n, W'(17'h10001), 17); // e = 65537
    n = rnd(); n[W-1] = 1'b1; n[0] = 1'b1;         // new key
    encrypt_check(n, rnd() % n, W'({1'b1, 15'($urandom)}), 16);
    begin                                          // full-length private exponent
      logic [W-1:0] d;
      d = rnd(); d[W-1] = 1'b1;
      encrypt_check(n, rnd() % n, d, W);
    end

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
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
