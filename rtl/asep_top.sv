// asep_top: ASEP, an encryption co-processor that serves many encryption
// sessions of different algorithms at the same time.
//
// A host sends 44-bit instructions {data[31:0], tag[3:0], op-code[7:0]}.
// The microcontroller decodes the op-code and loads tag and data into the
// input buffer. In the next cycle it pulses CLEAR, FLUSH or READ on the
// control lines of the algorithm module the op-code names, and the buffer
// puts {tag, data} on the 36-bit system I/O bus shared by all modules.
// Two algorithm modules are present: DES (module 0, algorithm id 1) and
// IDEA (module 1, algorithm id 2). Each keeps up to 16 sessions apart by
// tag. Each does its own table lookups, permutations and key schedule. It
// sends every arithmetic step as a 40-bit request over its own ALU bus to
// the ALU controller, which queues one request per module and shares five
// ALUs: XOR, add mod 2^16, multiply mod 2^16+1, exponentiate mod 2^16+1,
// and GCD. Finished blocks leave over 36-bit {tag, data} words to the output
// buffer. It keeps one block per session and sends them to the host in
// round robin order, two words per block, high word first, with
// out_valid/out_ready.
//
// The block structure follows the document's system overview: interface
// controller, system I/O bus, algorithm modules, ALU bus and ALUs. So do
// the bus widths (44-bit in, 36-bit out and I/O bus, 40-bit ALU bus, 4-bit
// status and control). The GCD ALU is present but neither cipher uses it.
// Module status lines and the bad-instruction pulse are brought out.
//
// Timing: one instruction can be taken every cycle (no ready signal; the
// host must follow the convention of one pending block per session).
module asep_top
  import asep_pkg::*;
#(
  parameter int unsigned NUM_SESS = NUM_SESSIONS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       instr_valid,
  input  instr_t                     instr,
  output logic                       out_valid,
  input  logic                       out_ready,
  output ioword_t                    out_word,
  output logic [NUM_CORES-1:0][3:0]  mod_status,
  output logic                       bad_instr
);

  localparam int unsigned SRC_W = (NUM_CORES > 1) ? $clog2(NUM_CORES) : 1;
  // ALU positions on the ALU bus = their function codes
  localparam int unsigned I_XOR = int'(FN_XOR);
  localparam int unsigned I_ADD = int'(FN_ADD);
  localparam int unsigned I_MUL = int'(FN_MUL);
  localparam int unsigned I_EXP = int'(FN_EXP);
  localparam int unsigned I_GCD = int'(FN_GCD);

  // ---------------- interface unit
  ctrl_t [NUM_CORES-1:0] ctrl;
  logic                  buf_load, buf_release;
  ioword_t               iobus;

  asep_microcontroller #(.NMOD(NUM_CORES)) u_mc (
    .clk, .rst_n, .instr_valid, .op(instr.op),
    .ctrl, .buf_load, .buf_release, .bad_instr);

  asep_input_buffer u_inbuf (
    .clk, .rst_n, .load(buf_load), .tag(instr.tag), .data(instr.data),
    .release_i(buf_release), .bus(iobus));

  // ---------------- algorithm unit
  logic     [NUM_CORES-1:0] dout_req, dout_en;
  ioword_t  [NUM_CORES-1:0] dout;
  logic     [NUM_CORES-1:0] c_req, c_busy, c_rsp_valid;
  alu_req_t [NUM_CORES-1:0] c_req_w;
  alu_rsp_t [NUM_CORES-1:0] c_rsp;

  asep_des_core #(.NSESS(NUM_SESS)) u_des (
    .clk, .rst_n, .din(iobus), .ctrl(ctrl[0]), .status(mod_status[0]),
    .dout_req(dout_req[0]), .dout_en(dout_en[0]), .dout(dout[0]),
    .alu_req(c_req[0]), .alu_busy(c_busy[0]), .alu_out(c_req_w[0]),
    .alu_in_valid(c_rsp_valid[0]), .alu_in(c_rsp[0]));

  asep_idea_core #(.NSESS(NUM_SESS)) u_idea (
    .clk, .rst_n, .din(iobus), .ctrl(ctrl[1]), .status(mod_status[1]),
    .dout_req(dout_req[1]), .dout_en(dout_en[1]), .dout(dout[1]),
    .alu_req(c_req[1]), .alu_busy(c_busy[1]), .alu_out(c_req_w[1]),
    .alu_in_valid(c_rsp_valid[1]), .alu_in(c_rsp[1]));

  // ---------------- arithmetic unit
  logic     [NUM_ALUS-1:0]             a_req_valid, a_busy, a_rsp_valid, a_rsp_ack;
  alu_req_t [NUM_ALUS-1:0]             a_req;
  alu_rsp_t [NUM_ALUS-1:0]             a_rsp;
  logic     [NUM_ALUS-1:0][SRC_W-1:0]  a_req_src, a_rsp_src;

  asep_alu_controller #(.NCORE(NUM_CORES), .NALU(NUM_ALUS), .SRC_W(SRC_W)) u_aluctl (
    .clk, .rst_n,
    .core_req_valid(c_req), .core_req(c_req_w), .core_busy(c_busy),
    .core_rsp_valid(c_rsp_valid), .core_rsp(c_rsp),
    .alu_req_valid(a_req_valid), .alu_req(a_req), .alu_req_src(a_req_src),
    .alu_busy(a_busy), .alu_rsp_valid(a_rsp_valid), .alu_rsp(a_rsp),
    .alu_rsp_src(a_rsp_src), .alu_rsp_ack(a_rsp_ack));

  asep_alu_xor #(.SRC_W(SRC_W)) u_alu_xor (
    .clk, .rst_n, .req_valid(a_req_valid[I_XOR]), .req(a_req[I_XOR]), .req_src(a_req_src[I_XOR]),
    .busy(a_busy[I_XOR]), .rsp_valid(a_rsp_valid[I_XOR]), .rsp(a_rsp[I_XOR]),
    .rsp_src(a_rsp_src[I_XOR]), .rsp_ack(a_rsp_ack[I_XOR]));
  asep_alu_modadd #(.SRC_W(SRC_W)) u_alu_add (
    .clk, .rst_n, .req_valid(a_req_valid[I_ADD]), .req(a_req[I_ADD]), .req_src(a_req_src[I_ADD]),
    .busy(a_busy[I_ADD]), .rsp_valid(a_rsp_valid[I_ADD]), .rsp(a_rsp[I_ADD]),
    .rsp_src(a_rsp_src[I_ADD]), .rsp_ack(a_rsp_ack[I_ADD]));
  asep_alu_modmul #(.SRC_W(SRC_W)) u_alu_mul (
    .clk, .rst_n, .req_valid(a_req_valid[I_MUL]), .req(a_req[I_MUL]), .req_src(a_req_src[I_MUL]),
    .busy(a_busy[I_MUL]), .rsp_valid(a_rsp_valid[I_MUL]), .rsp(a_rsp[I_MUL]),
    .rsp_src(a_rsp_src[I_MUL]), .rsp_ack(a_rsp_ack[I_MUL]));
  asep_alu_modexp #(.SRC_W(SRC_W)) u_alu_exp (
    .clk, .rst_n, .req_valid(a_req_valid[I_EXP]), .req(a_req[I_EXP]), .req_src(a_req_src[I_EXP]),
    .busy(a_busy[I_EXP]), .rsp_valid(a_rsp_valid[I_EXP]), .rsp(a_rsp[I_EXP]),
    .rsp_src(a_rsp_src[I_EXP]), .rsp_ack(a_rsp_ack[I_EXP]));
  asep_alu_gcd #(.SRC_W(SRC_W)) u_alu_gcd (
    .clk, .rst_n, .req_valid(a_req_valid[I_GCD]), .req(a_req[I_GCD]), .req_src(a_req_src[I_GCD]),
    .busy(a_busy[I_GCD]), .rsp_valid(a_rsp_valid[I_GCD]), .rsp(a_rsp[I_GCD]),
    .rsp_src(a_rsp_src[I_GCD]), .rsp_ack(a_rsp_ack[I_GCD]));

  // ---------------- output interface
  asep_output_buffer #(.NMOD(NUM_CORES), .NSESS(NUM_SESS)) u_outbuf (
    .clk, .rst_n, .dout_req, .dout, .dout_en, .out_valid, .out_ready, .out_word);

endmodule
