// mpadder: multi-precision adder / subtractor.
//
// Computes result = in_a + in_b, or in_a - in_b when subtract is set, on
// WIDTH-bit unsigned operands, using one CHUNK-bit carry-propagate adder
// that is reused over several clock cycles. On start both operands and the
// operation are captured in registers, so the caller may change its inputs while the operation runs. Each
// following cycle adds the lowest CHUNK bits of both operand registers (the
// B slice passing through an inverter and a multiplexer for a subtraction)
// plus the stored carry, shifts the operand registers down by CHUNK bits and
// shifts the partial sum into the top of the result register.
//
// With the defaults (WIDTH 1027, CHUNK 514) the addition is done in two
// slices, least significant half first: start is sampled on one edge, the
// two slices follow on the next two, and done is high for one cycle, with a
// valid result, in the third cycle counting the start cycle as the first. In general the latency is
// ceil((WIDTH+1)/CHUNK) + 1 cycles. result has WIDTH+1 bits: bit WIDTH is
// the carry out of the addition; for a subtraction it is 1 when
// in_a >= in_b (no borrow), and bits WIDTH-1:0 are the difference modulo
// 2^WIDTH.
//
// The slice-serial structure, the operand registers, the inverter on B and
// the 514-bit slice are those of the design; WIDTH is derived from its
// quoted cycle counts. result holds its value until the cycle after the next start. A start
// while busy is ignored (and flagged by an assertion).
module mpadder #(
  parameter int unsigned WIDTH = 1027,
  parameter int unsigned CHUNK = 514
) (
  input  logic             clk,
  input  logic             resetn,
  input  logic             start,
  input  logic             subtract,
  input  logic [WIDTH-1:0] in_a,
  input  logic [WIDTH-1:0] in_b,
  output logic [WIDTH:0]   result,
  output logic             done
);

  // One extra bit so that the carry out lands inside the padded sum.
  localparam int unsigned PARTS = (WIDTH + 1 + CHUNK - 1) / CHUNK;
  localparam int unsigned PW    = PARTS * CHUNK;
  localparam int unsigned CW    = (PARTS > 1) ? $clog2(PARTS) : 1;

  logic [PW-1:0]    reg_a, reg_b, reg_sum;
  logic             carry;
  logic             busy;
  logic [CW-1:0]    part;
  logic [CHUNK:0]   slice_sum;
  logic             sub_reg;     // operation captured with the operands
  logic [CHUNK-1:0] b_slice;     // B slice, inverted for a subtraction

  assign b_slice = sub_reg ? ~reg_b[CHUNK-1:0] : reg_b[CHUNK-1:0];

  assign slice_sum = {1'b0, reg_a[CHUNK-1:0]} + {1'b0, b_slice}
                   + {{CHUNK{1'b0}}, carry};

  always_ff @(posedge clk) begin
    if (!resetn) begin
      reg_a   <= '0;
      reg_b   <= '0;
      sub_reg <= 1'b0;
      reg_sum <= '0;
      carry   <= 1'b0;
      busy    <= 1'b0;
      part    <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          reg_a <= {{(PW-WIDTH){1'b0}}, in_a};
          reg_b   <= {{(PW-WIDTH){1'b0}}, in_b};
          sub_reg <= subtract;
          carry <= subtract;
          part  <= '0;
          busy  <= 1'b1;
        end
      end else begin
        reg_a   <= reg_a >> CHUNK;
        reg_b   <= reg_b >> CHUNK;
        reg_sum <= {slice_sum[CHUNK-1:0], reg_sum[PW-1:CHUNK]};
        carry   <= slice_sum[CHUNK];
        if (part == CW'(PARTS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          part <= part + 1'b1;
        end
      end
    end
  end

  // Carry out of the WIDTH-bit operation. Both operand registers are zero
  // above WIDTH, so for an addition bit WIDTH of the padded sum is that
  // carry. For a subtraction the inverted B has ones above WIDTH; adding them
  // to the carry c leaves bit WIDTH equal to ~c, so the bit is flipped back.
  assign result = {reg_sum[WIDTH] ^ sub_reg, reg_sum[WIDTH-1:0]};

  a_no_start_while_busy: assert property (@(posedge clk) disable iff (!resetn)
    busy |-> !start)
    else $error("mpadder: start asserted while an operation is running");

endmodule
