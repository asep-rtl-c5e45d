// asep_pkg: types and constants shared by the ASEP encryption co-processor.
//
// External instruction (44 bits): op-code in bits [7:0], session tag in
// bits [11:8], data in bits [43:12]; the op-code holds the algorithm
// identifier in [3:0], the action in [6:4] and the encode/decode flag in [7].
// These positions and widths follow the instruction and op-code formats.
// The numeric action and algorithm codes are this design's own choice.
//
// Internal system I/O bus word (36 bits) = {tag, data}. Output words have the
// same shape. The ALU bus word is 40 bits wide: {tag, function, a, b} on the
// way to an ALU and {tag, function, result} on the way back. How those 40
// bits are split is this design's choice; only the width is given.
package asep_pkg;

  localparam int unsigned NUM_SESSIONS = 16;
  localparam int unsigned TAG_W        = 4;
  localparam int unsigned DATA_W       = 32;
  localparam int unsigned INSTR_W      = 44;
  localparam int unsigned IOBUS_W      = TAG_W + DATA_W;   // 36
  localparam int unsigned ALUBUS_W     = 40;
  localparam int unsigned OPND_W       = 16;
  localparam int unsigned NUM_CORES    = 2;                 // DES, IDEA
  localparam int unsigned NUM_ALUS     = 5;

  typedef logic [TAG_W-1:0] tag_t;

  typedef enum logic [2:0] {
    ACT_NOP   = 3'd0,
    ACT_CLEAR = 3'd1,
    ACT_FLUSH = 3'd2,
    ACT_READ  = 3'd3
  } action_e;

  typedef enum logic [3:0] {
    ALG_NONE = 4'd0,
    ALG_DES  = 4'd1,
    ALG_IDEA = 4'd2
  } alg_e;

  // op-code: bit 7 decode, bits 6:4 action, bits 3:0 algorithm
  typedef struct packed {
    logic     decode;
    action_e  action;
    alg_e     alg;
  } opcode_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;   // [43:12]
    tag_t              tag;    // [11:8]
    opcode_t           op;     // [7:0]
  } instr_t;

  typedef struct packed {
    tag_t              tag;
    logic [DATA_W-1:0] data;
  } ioword_t;

  // control lines from the microcontroller to one algorithm module (4 bits)
  typedef struct packed {
    logic decode;
    logic read;
    logic clear;
    logic flush;
  } ctrl_t;

  // ALU function codes; the code also selects which ALU serves the request
  typedef enum logic [3:0] {
    FN_XOR = 4'd0,
    FN_ADD = 4'd1,
    FN_MUL = 4'd2,
    FN_EXP = 4'd3,
    FN_GCD = 4'd4
  } alu_fn_e;

  typedef struct packed {
    tag_t              tag;
    alu_fn_e           fn;
    logic [OPND_W-1:0] a;
    logic [OPND_W-1:0] b;
  } alu_req_t;

  typedef struct packed {
    tag_t              tag;
    alu_fn_e           fn;
    logic [DATA_W-1:0] r;
  } alu_rsp_t;

  // multiplication modulo 2^16+1 with the IDEA convention that the
  // operand and result value 0 stand for 2^16
  function automatic logic [15:0] mulmod65537(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] aa, bb;
    logic [32:0] p;
    logic [16:0] hi;
    logic [15:0] lo;
    aa = (a == 16'd0) ? 17'h10000 : {1'b0, a};
    bb = (b == 16'd0) ? 17'h10000 : {1'b0, b};
    p  = 33'(aa) * 33'(bb);
    // low-high reduction: 2^16 = -1 (mod 2^16+1)
    lo = p[15:0];
    hi = p[32:16];
    return lo - hi[15:0] + 16'((17'(lo) < hi) ? 1 : 0);
  endfunction

endpackage
