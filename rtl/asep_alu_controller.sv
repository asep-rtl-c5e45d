// asep_alu_controller: the ALU bus controller between the algorithm
// modules (cores) and the shared ALUs.
//
// Each core has its own 40-bit request bus to the controller, a request
// valid, a wait wire (core_busy) and a 40-bit result bus with a result
// valid. The function code of a request names the ALU that serves it. Each
// cycle, every idle ALU takes the request of one core that wants it, cores
// chosen in round robin order. A request whose ALU is free is dispatched in
// the cycle it arrives. Otherwise it waits in the core's single queue slot
// and the core's wait wire stays set until the slot is dispatched. A slot
// that is being dispatched can take the core's next request in the same
// cycle. An ALU holds its result, tagged with the session and the core
// number, until the controller forwards it. Each cycle every core receives
// at most one result, ALUs chosen in round robin order, and the chosen
// ALUs are acknowledged.
//
// Following the document: one request tracked per core, a request served at
// once when its ALU is free and queued otherwise, results forwarded to the
// requesting core, a wait status wire per core and per ALU. This design's
// choices: round robin as the tie-break, a queued request served before a
// new one, and the ALU chosen by function code.
//
// Timing: a request seen at a clock edge while its one-cycle ALU is free
// enters the ALU at that edge, and its result is presented to the core in
// the next cycle (two cycles from request to result). A queued request adds
// one cycle for every cycle the ALU stays busy.
module asep_alu_controller
  import asep_pkg::*;
#(
  parameter int unsigned NCORE = NUM_CORES,
  parameter int unsigned NALU  = NUM_ALUS,
  parameter int unsigned SRC_W = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // core side
  input  logic     [NCORE-1:0] core_req_valid,
  input  alu_req_t [NCORE-1:0] core_req,
  output logic     [NCORE-1:0] core_busy,
  output logic     [NCORE-1:0] core_rsp_valid,
  output alu_rsp_t [NCORE-1:0] core_rsp,
  // ALU side
  output logic     [NALU-1:0]  alu_req_valid,
  output alu_req_t [NALU-1:0]  alu_req,
  output logic     [NALU-1:0][SRC_W-1:0] alu_req_src,
  input  logic     [NALU-1:0]  alu_busy,
  input  logic     [NALU-1:0]  alu_rsp_valid,
  input  alu_rsp_t [NALU-1:0]  alu_rsp,
  input  logic     [NALU-1:0][SRC_W-1:0] alu_rsp_src,
  output logic     [NALU-1:0]  alu_rsp_ack
);

  localparam int unsigned AIDX = (NALU > 1) ? $clog2(NALU) : 1;

  logic     [NCORE-1:0] slot_valid;
  alu_req_t [NCORE-1:0] slot;
  logic     [NCORE-1:0] slot_go;       // slot (or bypassed request) dispatched this cycle

  // a queued request goes first; with the slot empty a new request can go
  // straight to a free ALU in the cycle it arrives
  logic     [NCORE-1:0] eff_valid;
  alu_req_t [NCORE-1:0] eff;
  always_comb begin
    for (int unsigned i = 0; i < NCORE; i++) begin
      eff_valid[i] = slot_valid[i] || core_req_valid[i];
      eff[i]       = slot_valid[i] ? slot[i] : core_req[i];
    end
  end

  // ---------------- dispatch: one round robin arbiter per ALU over cores
  logic [NALU-1:0][NCORE-1:0] want;
  logic [NALU-1:0]            d_valid;
  logic [NALU-1:0][SRC_W-1:0] d_idx;

  always_comb begin
    for (int unsigned j = 0; j < NALU; j++)
      for (int unsigned i = 0; i < NCORE; i++)
        want[j][i] = eff_valid[i] && (int'(eff[i].fn) == int'(j));
  end

  for (genvar j = 0; j < NALU; j++) begin : g_disp
    asep_rr_arbiter #(.N(NCORE), .IDX(SRC_W)) u_arb (
      .clk, .rst_n,
      .req(want[j]), .take(!alu_busy[j]),
      .gnt_valid(d_valid[j]), .gnt_idx(d_idx[j])
    );
    assign alu_req_valid[j] = d_valid[j] && !alu_busy[j];
    assign alu_req[j]       = eff[d_idx[j]];
    assign alu_req_src[j]   = d_idx[j];
  end

  always_comb begin
    slot_go = '0;
    for (int unsigned j = 0; j < NALU; j++)
      if (alu_req_valid[j]) slot_go[d_idx[j]] = 1'b1;
  end

  // ---------------- request slots
  always_comb begin
    for (int unsigned i = 0; i < NCORE; i++)
      core_busy[i] = slot_valid[i] && !slot_go[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_valid <= '0;
      slot       <= '0;
    end else begin
      for (int unsigned i = 0; i < NCORE; i++) begin
        if (core_req_valid[i] && !core_busy[i] && (slot_valid[i] || !slot_go[i])) begin
          slot_valid[i] <= 1'b1;
          slot[i]       <= core_req[i];
        end else if (slot_go[i]) begin
          slot_valid[i] <= 1'b0;
        end
      end
    end
  end

  // ---------------- results: one round robin arbiter per core over ALUs
  logic [NCORE-1:0][NALU-1:0] has;
  logic [NCORE-1:0]           r_valid;
  logic [NCORE-1:0][AIDX-1:0] r_idx;

  always_comb begin
    for (int unsigned i = 0; i < NCORE; i++)
      for (int unsigned j = 0; j < NALU; j++)
        has[i][j] = alu_rsp_valid[j] && (int'(alu_rsp_src[j]) == int'(i));
  end

  for (genvar i = 0; i < NCORE; i++) begin : g_ret
    asep_rr_arbiter #(.N(NALU), .IDX(AIDX)) u_arb (
      .clk, .rst_n,
      .req(has[i]), .take(1'b1),
      .gnt_valid(r_valid[i]), .gnt_idx(r_idx[i])
    );
    assign core_rsp_valid[i] = r_valid[i];
    assign core_rsp[i]       = alu_rsp[r_idx[i]];
  end

  always_comb begin
    alu_rsp_ack = '0;
    for (int unsigned i = 0; i < NCORE; i++)
      if (r_valid[i]) alu_rsp_ack[r_idx[i]] = 1'b1;
  end

`ifndef SYNTHESIS
  for (genvar i = 0; i < NCORE; i++) begin : g_chk
    a_fn_known: assert property (@(posedge clk) disable iff (!rst_n)
        slot_valid[i] |-> int'(slot[i].fn) < int'(NALU))
      else $error("asep_alu_controller: request for an ALU that does not exist");
  end
`endif

endmodule
