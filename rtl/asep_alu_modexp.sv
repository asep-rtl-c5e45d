// asep_alu_modexp: the modular exponentiation ALU of the arithmetic unit.
//
// Computes a^b modulo the Fermat prime 2^16+1 for a 16-bit base a (value 0
// standing for 2^16, as in IDEA) and a 16-bit exponent b, by left-to-right
// square-and-multiply: one exponent bit per cycle, sixteen cycles in all.
// With exponent 2^16-1 it returns the multiplicative inverse of a, which the
// IDEA core uses to build its decryption subkeys. The document names modular
// exponentiation as one of the arithmetic unit's operations and gives no
// more; the modulus, the widths and the bit-serial structure are this
// design's choices.
//
// Interface as the other ALUs: request taken when not busy, busy through the
// computation and until the result is acknowledged. Latency: the result is
// valid 17 cycles after the request is taken.
//
// The result field of the ALU bus word is 32 bits wide; this ALU's results
// are 16 bits, so the upper 16 result bits are always zero.
module asep_alu_modexp
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

  logic        running;
  logic [15:0] base, expo, acc;
  logic [4:0]  cnt;
  logic [15:0] sq, nxt;

  always_comb begin
    sq  = mulmod65537(acc, acc);
    nxt = expo[15] ? mulmod65537(sq, base) : sq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      rsp_src   <= '0;
      base      <= '0;
      expo      <= '0;
      acc       <= '0;
      cnt       <= '0;
    end else if (req_valid && !busy) begin
      running <= 1'b1;
      base    <= req.a;
      expo    <= req.b;
      acc     <= 16'd1;
      cnt     <= 5'd16;
      rsp.tag <= req.tag;
      rsp.fn  <= req.fn;
      rsp_src <= req_src;
    end else if (running) begin
      acc  <= nxt;
      expo <= {expo[14:0], 1'b0};
      cnt  <= cnt - 5'd1;
      if (cnt == 5'd1) begin
        running   <= 1'b0;
        rsp_valid <= 1'b1;
        rsp.r     <= {16'd0, nxt};
      end
    end else if (rsp_ack) begin
      rsp_valid <= 1'b0;
    end
  end

  assign busy = running | rsp_valid;

`ifndef SYNTHESIS
  a_no_req_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !req_valid)
    else $error("asep_alu_modexp: request while busy");
  a_ack_only_valid: assert property (@(posedge clk) disable iff (!rst_n) rsp_ack |-> rsp_valid)
    else $error("asep_alu_modexp: acknowledge without result");
`endif

endmodule
