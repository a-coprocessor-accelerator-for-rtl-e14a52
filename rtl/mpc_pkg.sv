// mpc_pkg: types and constants shared by the MPC matrix coprocessor.
//
// Number format. Every datum is a 16-bit logarithmic-number-system (LNS)
// word: bit 15 is the sign of the value, bits 14:0 hold log2|value| as a
// two's-complement fixed-point number with LNS_F fractional bits. With
// LNS_F = 9 the log covers -32 .. +31.998, i.e. magnitudes from about
// 2.3e-10 to 4.3e9 with a relative step of 2^(1/512) (0.14 %). The most
// negative log code (15'h4000) is reserved for the value zero, so that
// magnitude order equals signed order of the log field, zero included.
// The 16-bit word length follows the design description; the split into
// sign / integer / fraction and the zero code are this design's choice.
//
// Commands. The host writes a command (opcode plus operand fields) and the
// coprocessor sequences it over the matrix elements. LOADC, STOREC, OUTC,
// POW2A, POW3A, MULV and PIVOT are the commands named by the design; ADDC,
// SUBC and MULC are the addition, subtraction and multiplication it names as
// matrix operations; GJSTEP is the row-reduction step that, driven by PIVOT,
// forms a Gauss-Jordan inversion. Matrices are stored row-major in the
// coprocessor's data memory: element (i,j) of a matrix with C columns at
// base address B is at B + i*C + j.
package mpc_pkg;

  localparam int unsigned LNS_W = 16;          // word length
  localparam int unsigned LNS_F = 9;           // fractional bits of the log
  localparam int unsigned LOG_W = LNS_W - 1;   // log field width

  typedef logic [LNS_W-1:0] lns_t;
  typedef logic signed [LOG_W-1:0] lns_log_t;

  localparam lns_log_t LOG_MIN  = lns_log_t'(1 << (LOG_W-1));        // zero code
  localparam lns_log_t LOG_MAX  = lns_log_t'((1 << (LOG_W-1)) - 1);  // largest magnitude
  localparam lns_t     LNS_ZERO = {1'b0, LOG_MIN};

  function automatic logic lns_is_zero(lns_t x);
    return x[LOG_W-1:0] == LOG_MIN;
  endfunction

  // ALU operations (y is the ALU result)
  typedef enum logic [2:0] {
    ALU_PASS = 3'd0,   // y = a
    ALU_ADD  = 3'd1,   // y = a + b
    ALU_SUB  = 3'd2,   // y = a - b
    ALU_MAC  = 3'd3,   // y = c + a*b
    ALU_MSB  = 3'd4,   // y = c - a*b
    ALU_DIV  = 3'd5,   // y = a / b
    ALU_IP2  = 3'd6,   // y = 1 / a^2
    ALU_IP3  = 3'd7    // y = 1 / a^3
  } alu_op_e;

  // Command opcodes
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_LOADC  = 4'd1,   // host -> memory: dst[rows x cols] from the data port
    OP_STOREC = 4'd2,   // memory copy:  dst = A            (rows x cols)
    OP_OUTC   = 4'd3,   // memory -> host: A[rows x cols] to the data port
    OP_ADDC   = 4'd4,   // dst = A + B                      (rows x cols)
    OP_SUBC   = 4'd5,   // dst = A - B                      (rows x cols)
    OP_MULC   = 4'd6,   // dst[rows x cols] = A[rows x k] * B[k x cols]
    OP_MULV   = 4'd7,   // dst[rows] = A[rows x cols] * b[cols]
    OP_POW2A  = 4'd8,   // dst_i = 1 / a_i^2                (rows x cols)
    OP_POW3A  = 4'd9,   // dst_i = 1 / a_i^3                (rows x cols)
    OP_PIVOT  = 4'd10,  // result = argmax_{i >= k} |A[i][k]| (A is rows x cols)
    OP_GJSTEP = 4'd11   // in place on A: swap rows k,p; row k /= pivot; clear column k elsewhere
  } opcode_e;

  localparam int unsigned ADDR_W = 10;   // data-memory address width (1024 words)
  localparam int unsigned DIM_W  = 8;    // matrix dimension / index width

  typedef struct packed {
    opcode_e           op;
    logic [ADDR_W-1:0] dst;    // base of the result matrix
    logic [ADDR_W-1:0] src_a;  // base of operand A
    logic [ADDR_W-1:0] src_b;  // base of operand B
    logic [DIM_W-1:0]  rows;
    logic [DIM_W-1:0]  cols;
    logic [DIM_W-1:0]  k;      // inner dimension (MULC) or pivot column (PIVOT, GJSTEP)
    logic [DIM_W-1:0]  p;      // pivot row (GJSTEP)
  } cmd_t;

  // Host bus register map (16-bit word addresses)
  localparam logic [3:0] REG_OP     = 4'd0;   // write: opcode, starts the command
  localparam logic [3:0] REG_DST    = 4'd1;
  localparam logic [3:0] REG_SRCA   = 4'd2;
  localparam logic [3:0] REG_SRCB   = 4'd3;
  localparam logic [3:0] REG_ROWS   = 4'd4;
  localparam logic [3:0] REG_COLS   = 4'd5;
  localparam logic [3:0] REG_K      = 4'd6;
  localparam logic [3:0] REG_P      = 4'd7;
  localparam logic [3:0] REG_DATA   = 4'd8;   // write: LOADC data, read: OUTC data
  localparam logic [3:0] REG_STATUS = 4'd9;   // read: {busy, done, 6'b0, result[7:0]}

endpackage
