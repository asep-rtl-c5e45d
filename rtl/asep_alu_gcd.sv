// asep_alu_gcd: the greatest common divisor ALU of the arithmetic unit.
//
// Computes gcd(a, b) of two 16-bit operands with the binary (Stein)
// algorithm: each cycle it either halves both even operands (counting a
// common factor of two), halves the one even operand, or replaces the
// larger odd operand by half the difference. It stops when one operand is
// zero and returns the other shifted left by the common factor count;
// gcd(0, 0) is 0. The document names GCD as an arithmetic unit operation and
// gives no more; the algorithm and widths are this design's choices.
//
// Interface as the other ALUs: request taken when not busy, busy through the
// computation and until the result is acknowledged. Latency: data
// dependent, at most 33 cycles for 16-bit operands.
module asep_alu_gcd
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
  logic [15:0] x, y;
  logic [4:0]  k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running   <= 1'b0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
      rsp_src   <= '0;
      x         <= '0;
      y         <= '0;
      k         <= '0;
    end else if (req_valid && !busy) begin
      running <= 1'b1;
      x       <= req.a;
      y       <= req.b;
      k       <= '0;
      rsp.tag <= req.tag;
      rsp.fn  <= req.fn;
      rsp_src <= req_src;
    end else if (running) begin
      if (x == 16'd0 || y == 16'd0) begin
        running   <= 1'b0;
        rsp_valid <= 1'b1;
        rsp.r     <= 32'(x | y) << k;
      end else if (!x[0] && !y[0]) begin
        x <= x >> 1;
        y <= y >> 1;
        k <= k + 5'd1;
      end else if (!x[0]) begin
        x <= x >> 1;
      end else if (!y[0]) begin
        y <= y >> 1;
      end else if (x >= y) begin
        x <= (x - y) >> 1;
      end else begin
        y <= (y - x) >> 1;
      end
    end else if (rsp_ack) begin
      rsp_valid <= 1'b0;
    end
  end

  assign busy = running | rsp_valid;

`ifndef SYNTHESIS
  a_no_req_when_busy: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !req_valid)
    else $error("asep_alu_gcd: request while busy");
  a_ack_only_valid: assert property (@(posedge clk) disable iff (!rst_n) rsp_ack |-> rsp_valid)
    else $error("asep_alu_gcd: acknowledge without result");
`endif

endmodule
