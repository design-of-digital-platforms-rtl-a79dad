// montgomery: bit-serial Montgomery multiplier with a single adder.
//
// Computes result = in_a * in_b * 2^-WIDTH mod in_m for an odd modulus
// in_m, with in_b < in_m and any in_a < 2^WIDTH. The result is fully reduced
// (result < in_m).
//
// The multiplier scans in_a from its least significant bit. In each of the
// WIDTH iterations it forms C <- (C + a_i*B + q*M) / 2, where the quotient
// bit q = (C + a_i*B) mod 2 makes the sum even. Only one mpadder is used for
// the whole multiplication: B + M is computed first and kept, so that every
// iteration is a single addition of C and one of {0, B, M, B+M}, chosen by
// (q, a_i). The halving is a one-bit shift of the adder result that feeds
// straight back into the adder's A operand, so a new iteration starts in the
// cycle in which the previous addition finishes. A final subtraction C - M
// (borrow decides) brings C from [0, 2M) into [0, M).
//
// Interface: pulse start for one cycle with the operands valid; they are
// captured on that edge. done pulses for one cycle with result valid, and
// result holds until the next operation finishes. With the default 514-bit
// adder slice each addition takes 3 cycles, and done rises in cycle
// 3*WIDTH + 8 counting the cycle in which start is high as cycle 1: one
// cycle to capture the operands, 3 for B + M, 3 per bit of A, 3 for the
// final subtraction and one to register the result. That is 3080 cycles for
// WIDTH = 1024.
//
// The single shared adder and the shift/mux feedback into the adder operand
// follow the design; the precomputed B+M, the exact state sequence and the
// resulting cycle count are this implementation's choices.
module montgomery #(
  parameter int unsigned WIDTH = rsa_pkg::RSA_WIDTH,
  parameter int unsigned CHUNK = rsa_pkg::ADD_CHUNK
) (
  input  logic             clk,
  input  logic             resetn,
  input  logic             start,
  input  logic [WIDTH-1:0] in_a,
  input  logic [WIDTH-1:0] in_b,
  input  logic [WIDTH-1:0] in_m,
  output logic [WIDTH-1:0] result,
  output logic             done
);

  // Adder width: C + B + M < 4M needs WIDTH+2 bits; one spare bit.
  localparam int unsigned AW = WIDTH + 3;
  localparam int unsigned IW = $clog2(WIDTH);

  typedef enum logic [2:0] {
    S_IDLE,    // waiting for start
    S_PRE_GO,  // issue B + M
    S_PRE,     // B + M in the adder
    S_LOOP,    // one iteration per bit of A
    S_SUB      // final C - M
  } state_e;

  state_e            state;
  logic [WIDTH-1:0]  a_sh;        // A, shifted right once per iteration
  logic [AW-1:0]     b_reg, m_reg, bm_reg;
  logic [WIDTH-1:0]  c_reg;       // final C; if it needs WIDTH+1 bits, C >= M anyway
  logic [IW-1:0]     iter;

  // Adder connections.
  logic              add_start, add_sub, add_done;
  logic [AW-1:0]     add_a, add_b;
  logic [AW:0]       add_res;

  mpadder #(.WIDTH(AW), .CHUNK(CHUNK)) u_adder (
    .clk     (clk),
    .resetn  (resetn),
    .start   (add_start),
    .subtract(add_sub),
    .in_a    (add_a),
    .in_b    (add_b),
    .result  (add_res),
    .done    (add_done)
  );

  // C for the next iteration: zero before the first, otherwise the halved
  // adder result (its sum is even by construction of q).
  logic [AW-1:0] c_next;
  logic          a_bit, q_bit;
  logic [AW-1:0] sel_op;
  logic [AW-1:0] bm_val;   // B + M; still on the adder output in S_PRE

  always_comb begin
    c_next = (state == S_PRE) ? '0 : add_res[AW:1];
    bm_val = (state == S_PRE) ? add_res[AW-1:0] : bm_reg;
    a_bit  = a_sh[0];
    q_bit  = c_next[0] ^ (a_bit & b_reg[0]);
    unique case ({q_bit, a_bit})
      2'b00:   sel_op = '0;
      2'b01:   sel_op = b_reg;
      2'b10:   sel_op = m_reg;
      default: sel_op = bm_val;
    endcase
  end

  logic last_iter;
  assign last_iter = (iter == IW'(WIDTH - 1));

  // Adder operand selection.
  always_comb begin
    add_start = 1'b0;
    add_sub   = 1'b0;
    add_a     = c_next;
    add_b     = sel_op;
    unique case (state)
      S_PRE_GO: begin
        add_start = 1'b1;
        add_a     = b_reg;
        add_b     = m_reg;
      end
      S_PRE: begin
        add_start = add_done;
      end
      S_LOOP: begin
        add_start = add_done;
        if (last_iter) begin
          add_sub = 1'b1;
          add_b   = m_reg;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!resetn) begin
      state  <= S_IDLE;
      a_sh   <= '0;
      b_reg  <= '0;
      m_reg  <= '0;
      bm_reg <= '0;
      c_reg  <= '0;
      iter   <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            a_sh  <= in_a;
            b_reg <= AW'(in_b);
            m_reg <= AW'(in_m);
            state <= S_PRE_GO;
          end
        end
        S_PRE_GO: state <= S_PRE;
        S_PRE: begin
          if (add_done) begin
            bm_reg <= add_res[AW-1:0];
            a_sh   <= a_sh >> 1;
            iter   <= '0;
            state  <= S_LOOP;
          end
        end
        S_LOOP: begin
          if (add_done) begin
            if (last_iter) begin
              c_reg <= c_next[WIDTH-1:0];
              state <= S_SUB;
            end else begin
              a_sh <= a_sh >> 1;
              iter <= iter + 1'b1;
            end
          end
        end
        S_SUB: begin
          if (add_done) begin
            // add_res[AW] set: no borrow, C >= M.
            result <= add_res[AW] ? add_res[WIDTH-1:0] : c_reg;
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!resetn)
    (state != S_IDLE) |-> !start)
    else $error("montgomery: start asserted while a multiplication is running");

endmodule
