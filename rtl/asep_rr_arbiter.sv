// asep_rr_arbiter: round robin arbiter, the "round robin counter" of the
// design.
//
// Among the requesters in req it grants the first one at or after the
// pointer, wrapping around. When the grant is used (take), the pointer moves
// to the requester after the one granted, so a requester that was served
// waits behind every other requester before it is served again. The grant
// is combinational from req and the pointer; the pointer is a register.
// The algorithm modules use three of these (ALU request, processing,
// output), and the output buffer and the ALU controller use them as their
// schedulers, as the document describes round robin counters for these
// choices. The exact pointer update rule is this design's own.
//
// Interface: req[N] in, take in; gnt_valid, gnt_idx out.
module asep_rr_arbiter #(
  parameter int unsigned N   = 16,
  parameter int unsigned IDX = (N > 1) ? $clog2(N) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N-1:0]   req,
  input  logic           take,
  output logic           gnt_valid,
  output logic [IDX-1:0] gnt_idx
);

  logic [IDX-1:0] ptr;

  always_comb begin
    int unsigned k;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    for (int unsigned i = 0; i < N; i++) begin
      k = (int'(ptr) + i) % N;
      if (!gnt_valid && req[k]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IDX'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (take && gnt_valid)
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + IDX'(1);
  end

endmodule
