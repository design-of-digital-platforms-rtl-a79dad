// rsa_pkg: constants and types shared by the RSA co-processor.
//
// The co-processor is driven by a 4-bit command word written by the host
// processor. Bit 0 is the start flag; the software writes the command, polls
// the busy flag until it drops, then writes zero. Bit 3 marks the loading
// phase (modulus N and R^2 mod N); bits 2:1 select the operation. The
// encodings follow the command tables of the design (0b1001, 0b1011, 0b0001,
// 0b0011, 0b0101, 0b0111). The operand width of 1024 bits is the RSA key size
// of the design; the 1027-bit adder width holds the largest Montgomery
// intermediate (below 4*N) plus one spare bit.
package rsa_pkg;

  localparam int unsigned RSA_WIDTH   = 1024;  // key / operand size
  localparam int unsigned ADD_CHUNK   = 514;   // adder slice width

  // Operation selected by command bits [3:1].
  typedef enum logic [2:0] {
    OP_LOAD_M    = 3'b000,  // 0b0001: receive M, X_tilde <- MM(M, R2_N)
    OP_STEP_ONE  = 3'b001,  // 0b0011: exponent bit 1, A <- MM(A,X), X <- MM(X,X)
    OP_STEP_ZERO = 3'b010,  // 0b0101: exponent bit 0, X <- MM(A,X), A <- MM(A,A)
    OP_FINAL     = 3'b011,  // 0b0111: A <- MM(A,1), leave Montgomery domain
    OP_LOAD_N    = 3'b100,  // 0b1001: receive N
    OP_LOAD_R2N  = 3'b101   // 0b1011: receive R^2 mod N
  } rsa_op_e;

  localparam logic [3:0] CMD_LOAD_N    = 4'b1001;
  localparam logic [3:0] CMD_LOAD_R2N  = 4'b1011;
  localparam logic [3:0] CMD_LOAD_M    = 4'b0001;
  localparam logic [3:0] CMD_STEP_ONE  = 4'b0011;
  localparam logic [3:0] CMD_STEP_ZERO = 4'b0101;
  localparam logic [3:0] CMD_FINAL     = 4'b0111;

  // Controller states of the co-processor (exposed for monitoring).
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // waiting for a command with bit 0 set
    ST_RX      = 3'd1,  // DMA read of the operand in progress
    ST_MUL     = 3'd2,  // Montgomery multiplier(s) running
    ST_TX      = 3'd3,  // DMA write of A in progress
    ST_WAITCLR = 3'd4   // finished; waiting for the command to be cleared
  } rsa_state_e;

endpackage
