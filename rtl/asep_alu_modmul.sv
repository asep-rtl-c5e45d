// asep_alu_modmul: the modular multiply ALU of the arithmetic unit.
//
// Computes the multiplication of the two 16-bit operands modulo 2^16+1, with the operand and result value 0 standing for 2^16 (the convention of the IDEA cipher).
// It takes one request in a cycle when it is not busy, computes in that
// cycle and holds the result in its output register until the ALU
// controller acknowledges it; while a result waits unacknowledged it
// reports busy, which is the ALU's wait status wire, so one request per
// cycle can flow through. The result keeps the request's session tag
// and function code and the number of the requesting core (src), so the
// controller can route it back. The operation is one the document lists for
// the arithmetic unit; the 16-bit operand width, the one-cycle timing and
// the hold-until-acknowledged handshake are this design's choices.
//
// Interface: req_valid/req/req_src in, busy out; rsp_valid/rsp/rsp_src out,
// rsp_ack in. Latency: result valid the cycle after the request is taken.
//
// The result field of the ALU bus word is 32 bits wide; this ALU's results
// are 16 bits, so the upper 16 result bits are always zero.
module asep_alu_modmul
  import asep_pkg::*;
#(
  parameter int unsigned SRC_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  input  alu_req_t         req,
  input  logic [SRC_W-1:0] req_src,
  output logic             busy,
  output logic             rsp_valid,
  output alu_rsp_t         rsp,
  output logic [SRC_W-1:0] rsp_src,
  input  logic             rsp_ack
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      rsp       <= '0;
      rsp_src   <= '0;
    end else if (req_valid && !busy) begin
      rsp_valid <= 1'b1;
      rsp.tag   <= req.tag;
      rsp.fn    <= req.fn;
      rsp.r     <= 32'(mulmod65537(req.a, req.b));
      rsp_src   <= req_src;
    end else if (rsp_ack) begin
      rsp_valid <= 1'b0;
    end
  end

  // a held result that is acknowledged this cycle frees the ALU at once
  assign busy = rsp_valid && !rsp_ack;

`ifndef SYNTHESIS
  a_no_req_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !req_valid)
    else $error("asep_alu_modmul: request while busy");
  a_ack_only_valid: assert property (@(posedge clk) disable iff (!rst_n) rsp_ack |-> rsp_valid)
    else $error("asep_alu_modmul: acknowledge without result");
  a_fn: assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> req.fn == FN_MUL)
    else $error("asep_alu_modmul: wrong function code");
`endif

endmodule
