// rsa: RSA co-processor, hardware half of a hardware/software RSA design.
//
// The host processor runs the exponentiation loop (a Montgomery ladder over
// the exponent bits, most significant first) and this block performs the
// Montgomery multiplications. It holds four WIDTH-bit registers: the
// modulus N, R2_N = 2^(2*WIDTH) mod N, the ladder variable A and the second
// ladder variable X_tilde. X_tilde never leaves the block; A is received
// from memory before and written back to memory after every ladder step.
// Two Montgomery multipliers run in parallel, so one ladder step (two
// multiplications) costs one multiplication time.
//
// Commands (written to `command` by software, bit 0 = start):
//   0b1001  receive N                         (DMA read from rx_addr)
//   0b1011  receive R2_N                      (DMA read from rx_addr)
//   0b0001  receive M; X_tilde <- MM(M, R2_N)  (M into Montgomery domain)
//   0b0011  exponent bit 1: receive A; A <- MM(A, X_tilde),
//           X_tilde <- MM(X_tilde, X_tilde); send A to tx_addr
//   0b0101  exponent bit 0: receive A; X_tilde <- MM(A, X_tilde),
//           A <- MM(A, A); send A to tx_addr
//   0b0111  final: receive A; A <- MM(A, 1); send A to tx_addr
// MM(x, y) = x * y * 2^-WIDTH mod N. Software starts the ladder with
// A = 2^WIDTH mod N (Montgomery form of 1); after the final command A holds
// M^e mod N.
//
// Handshake with software: `busy` rises combinationally as soon as a
// command with bit 0 set is seen in the idle state and falls when the
// command has finished. The block then waits until software writes a
// command with bit 0 clear before it accepts the next one, so a command that
// is left in the register after busy falls is not run twice.
//
// DMA interface: a one-cycle rx_start requests the WIDTH-bit word at
// dma_rx_addr; the DMA answers with dma_rx_done high for one cycle, with the
// data valid only in that cycle, and the block captures it. A one-cycle
// dma_tx_start asks the DMA to write dma_tx_data to dma_tx_addr; dma_tx_done
// pulses when that is finished. The addresses are taken from rx_addr and
// tx_addr when the command starts.
//
// Timing: busy stays high for the DMA read time, one Montgomery
// multiplication (3*WIDTH + 8 cycles with the default slice) and the DMA
// write time, plus six cycles of handshakes between the units (four for the
// load-M command, which writes nothing back, and three plus the read time
// for the loading commands). With a DMA that takes 86 cycles to read and 8
// to write, a 1024-bit ladder step is 3180 cycles.
//
// The command encodings, the register set, the parallel multipliers and the
// data flow of A and X_tilde follow the design. The pulse handshakes with
// the DMA, the busy/clear protocol details and the state sequence are this
// implementation's choices.
module rsa
  import rsa_pkg::*;
#(
  parameter int unsigned WIDTH  = rsa_pkg::RSA_WIDTH,
  parameter int unsigned CHUNK  = rsa_pkg::ADD_CHUNK,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              resetn,
  // Software command / status registers
  input  logic [3:0]        command,
  input  logic [ADDR_W-1:0] rx_addr,
  input  logic [ADDR_W-1:0] tx_addr,
  output logic              busy,
  output rsa_state_e        state_o,
  // DMA read channel (memory to co-processor)
  output logic              dma_rx_start,
  output logic [ADDR_W-1:0] dma_rx_addr,
  input  logic              dma_rx_done,
  input  logic [WIDTH-1:0]  dma_rx_data,
  // DMA write channel (co-processor to memory)
  output logic              dma_tx_start,
  output logic [ADDR_W-1:0] dma_tx_addr,
  output logic [WIDTH-1:0]  dma_tx_data,
  input  logic              dma_tx_done
);

  rsa_state_e        state;
  rsa_op_e           op;
  logic [WIDTH-1:0]  n_reg, r2n_reg, a_reg, x_reg;
  logic              pend0, pend1;   // multiplier results still outstanding

  // Multipliers
  logic              mul_start;
  logic              uses_mul1;
  logic [WIDTH-1:0]  m0_a, m0_b, m1_a, m1_b, m0_res, m1_res;
  logic              m0_done, m1_done;

  montgomery #(.WIDTH(WIDTH), .CHUNK(CHUNK)) u_mul0 (
    .clk, .resetn, .start(mul_start), .in_a(m0_a), .in_b(m0_b), .in_m(n_reg),
    .result(m0_res), .done(m0_done));

  montgomery #(.WIDTH(WIDTH), .CHUNK(CHUNK)) u_mul1 (
    .clk, .resetn, .start(mul_start && uses_mul1), .in_a(m1_a), .in_b(m1_b), .in_m(n_reg),
    .result(m1_res), .done(m1_done));

  // The second multiplier is used only by the two ladder steps.
  assign uses_mul1 = (op == OP_STEP_ONE) || (op == OP_STEP_ZERO);

  // Operand routing per operation.
  always_comb begin
    m0_a = a_reg;
    m0_b = x_reg;
    m1_a = x_reg;
    m1_b = x_reg;
    unique case (op)
      OP_LOAD_M:    m0_b = r2n_reg;                   // X <- MM(M, R2_N)
      OP_STEP_ONE:  ;                                 // A <- MM(A,X), X <- MM(X,X)
      OP_STEP_ZERO: begin m0_b = a_reg; m1_a = a_reg; end  // A <- MM(A,A), X <- MM(A,X)
      OP_FINAL:     m0_b = WIDTH'(1);                 // A <- MM(A,1)
      default: ;
    endcase
  end

  assign busy        = (state == ST_IDLE) ? command[0] : (state != ST_WAITCLR);
  assign state_o     = state;
  assign dma_tx_data = a_reg;

  always_ff @(posedge clk) begin
    if (!resetn) begin
      state        <= ST_IDLE;
      op           <= OP_LOAD_M;
      n_reg        <= '0;
      r2n_reg      <= '0;
      a_reg        <= '0;
      x_reg        <= '0;
      pend0        <= 1'b0;
      pend1        <= 1'b0;
      mul_start    <= 1'b0;
      dma_rx_start <= 1'b0;
      dma_tx_start <= 1'b0;
      dma_rx_addr  <= '0;
      dma_tx_addr  <= '0;
    end else begin
      mul_start    <= 1'b0;
      dma_rx_start <= 1'b0;
      dma_tx_start <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (command[0]) begin
            op           <= rsa_op_e'(command[3:1]);
            dma_rx_addr  <= rx_addr;
            dma_tx_addr  <= tx_addr;
            dma_rx_start <= 1'b1;
            state        <= ST_RX;
          end
        end
        ST_RX: begin
          if (dma_rx_done) begin
            unique case (op)
              OP_LOAD_N:   begin n_reg   <= dma_rx_data; state <= ST_WAITCLR; end
              OP_LOAD_R2N: begin r2n_reg <= dma_rx_data; state <= ST_WAITCLR; end
              default: begin
                a_reg     <= dma_rx_data;   // M or A
                mul_start <= 1'b1;
                pend0     <= 1'b1;
                pend1     <= uses_mul1;
                state     <= ST_MUL;
              end
            endcase
          end
        end
        ST_MUL: begin
          if (m0_done) begin
            pend0 <= 1'b0;
            if (op == OP_LOAD_M) x_reg <= m0_res;
            else                 a_reg <= m0_res;
          end
          if (m1_done && pend1) begin
            pend1 <= 1'b0;
            x_reg <= m1_res;
          end
          if ((!pend0 || m0_done) && (!pend1 || m1_done) && !mul_start) begin
            if (op == OP_LOAD_M) begin
              state <= ST_WAITCLR;
            end else begin
              dma_tx_start <= 1'b1;
              state        <= ST_TX;
            end
          end
        end
        ST_TX: begin
          if (dma_tx_done) state <= ST_WAITCLR;
        end
        ST_WAITCLR: begin
          if (!command[0]) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // A new command is accepted only in the idle state, so its encoding must
  // be one of the six defined operations.
  a_known_command: assert property (@(posedge clk) disable iff (!resetn)
    (state == ST_IDLE && command[0]) |->
      (command inside {4'b1001, 4'b1011, 4'b0001, 4'b0011, 4'b0101, 4'b0111}))
    else $error("rsa: undefined command %b", command);

  a_rx_done_expected: assert property (@(posedge clk) disable iff (!resetn)
    dma_rx_done |-> (state == ST_RX))
    else $error("rsa: DMA read completion outside a read");

  a_tx_done_expected: assert property (@(posedge clk) disable iff (!resetn)
    dma_tx_done |-> (state == ST_TX))
    else $error("rsa: DMA write completion outside a write");

endmodule
