// asep_des_core: the DES algorithm module, serving up to 16 sessions at once.
//
// Every session (tag) has its own buffers: the key, stored as the 56-bit
// PC-1 output {C0, D0}; the two block halves L and R; a round and step
// counter; a 48-bit work register; the last ALU result; a prepared ALU
// request; the encode/decode flag; and a status code (sess_e). The first two
// READ words of a session are the 64-bit key (56 key bits and parity, high
// word first). The next two are a data block, high word first.
//
// The core does the table lookups and permutations itself: IP, E, the
// S-boxes, P, FP and the key schedule. All XORs go to the shared XOR ALU as
// 16-bit requests. Each round therefore has five ALU stop points: three
// for E(R) xor K and two for L xor f. A decode session uses the subkeys in
// reverse order. Each subkey is formed when it is needed, by rotating
// {C0, D0} by the cumulative shift of that round.
//
// Three round robin counters keep sessions from starving. The processing
// counter picks a session whose block has just arrived or whose ALU result
// is back, and the core runs it to its next stop point. The ALU counter
// picks a session whose request is prepared and puts it on the ALU bus. The
// output counter picks a finished session; its two 32-bit result words then
// go out over Data Out, high word first. While one session waits for the
// ALU, others are processed: this interleaving gives the pipelining effect.
//
// Interface (36-bit Data In and Out, 4-bit Control and Status, 40-bit ALU
// Out and In, ALU Request, ALU Busy, Data Out Request and Enable) follows
// the document's algorithm module. Status is {protocol error, output
// pending, processing, any session open}. That bit assignment, the 16-bit
// ALU operands and the state encoding are this design's choices.
//
// Timing, one session alone: a READ seen at a clock edge is stored at that
// edge. Each ALU stop point costs three cycles with a free one-cycle ALU:
// process, request (taken by the ALU at once), result. The first output word
// is offered 243 cycles after the bus cycle of the block's second data word
// (80 stop points of three cycles, plus the
// final processing step and output selection).
module asep_des_core
  import asep_pkg::*;
  import asep_des_pkg::*;
#(
  parameter int unsigned NSESS = NUM_SESSIONS
) (
  input  logic       clk,
  input  logic       rst_n,
  // system I/O bus and control from the microcontroller
  input  ioword_t    din,
  input  ctrl_t      ctrl,
  output logic [3:0] status,
  // output bus
  output logic       dout_req,
  input  logic       dout_en,
  output ioword_t    dout,
  // ALU bus
  output logic       alu_req,
  input  logic       alu_busy,
  output alu_req_t   alu_out,
  input  logic       alu_in_valid,
  input  alu_rsp_t   alu_in
);

  localparam int unsigned SI = (NSESS > 1) ? $clog2(NSESS) : 1;

  typedef enum logic [2:0] {
    S_EMPTY, S_KEY1, S_IDLE, S_DATA1, S_PROC, S_REQ, S_WAIT, S_DONE
  } sess_e;

  sess_e       st    [NSESS];
  logic        dec   [NSESS];
  logic [55:0] cd    [NSESS];
  logic [31:0] lw    [NSESS];
  logic [31:0] rw    [NSESS];
  logic [3:0]  rnd   [NSESS];
  logic [2:0]  op    [NSESS];   // ALU step in flight within the round
  logic        fresh [NSESS];   // block just loaded, nothing to absorb
  logic [47:0] acc   [NSESS];
  logic [15:0] res   [NSESS];
  alu_req_t    areq  [NSESS];
  logic        err;

  // ---------------------------------------------------------------- round robin counters
  logic [NSESS-1:0] want_proc, want_alu, want_out;
  logic           p_valid, a_valid, o_valid;
  logic [SI-1:0]  p_idx, a_idx, o_idx;

  always_comb begin
    for (int i = 0; i < NSESS; i++) begin
      want_proc[i] = (st[i] == S_PROC);
      want_alu[i]  = (st[i] == S_REQ);
      want_out[i]  = (st[i] == S_DONE);
    end
  end

  logic          o_busy, o_half;
  logic [SI-1:0] o_tag;

  asep_rr_arbiter #(.N(NSESS), .IDX(SI)) u_rr_proc (
    .clk, .rst_n, .req(want_proc), .take(1'b1), .gnt_valid(p_valid), .gnt_idx(p_idx));
  asep_rr_arbiter #(.N(NSESS), .IDX(SI)) u_rr_alu (
    .clk, .rst_n, .req(want_alu), .take(!alu_busy), .gnt_valid(a_valid), .gnt_idx(a_idx));
  asep_rr_arbiter #(.N(NSESS), .IDX(SI)) u_rr_out (
    .clk, .rst_n, .req(want_out), .take(!o_busy), .gnt_valid(o_valid), .gnt_idx(o_idx));

  // ---------------------------------------------------------------- processing step
  // absorb the result of the step in flight, then run to the next stop point
  logic [31:0] n_l, n_r;
  logic [47:0] n_acc;
  logic [3:0]  n_rnd;
  logic [2:0]  n_op;
  logic        n_done;
  alu_req_t    n_req;
  logic [47:0] n_k, n_e;
  logic [31:0] n_new_r;

  always_comb begin
    n_l     = lw[p_idx];
    n_r     = rw[p_idx];
    n_acc   = acc[p_idx];
    n_rnd   = rnd[p_idx];
    n_op    = 3'd0;
    n_done  = 1'b0;
    n_new_r = '0;
    if (!fresh[p_idx]) begin
      unique case (op[p_idx])
        3'd0: begin n_acc[47:32] = res[p_idx]; n_op = 3'd1; end
        3'd1: begin n_acc[31:16] = res[p_idx]; n_op = 3'd2; end
        3'd2: begin
          // E(R) xor K complete: S-box lookups and P, f kept in acc[31:0]
          n_acc[15:0]  = res[p_idx];
          n_acc[31:0]  = des_p(des_sbox(n_acc));
          n_op         = 3'd3;
        end
        3'd3: begin n_acc[47:32] = res[p_idx]; n_op = 3'd4; end
        default: begin
          n_new_r = {n_acc[47:32], res[p_idx]};
          if (rnd[p_idx] == 4'd15) begin
            // last round: no swap, then the final permutation
            {n_l, n_r} = des_fp({n_new_r, rw[p_idx]});
            n_done     = 1'b1;
          end else begin
            n_l   = rw[p_idx];
            n_r   = n_new_r;
            n_rnd = rnd[p_idx] + 4'd1;
            n_op  = 3'd0;
          end
        end
      endcase
    end
    n_k = des_subkey(cd[p_idx], dec[p_idx] ? 4'd15 - n_rnd : n_rnd);
    n_e = des_e(n_r);
    n_req.tag = tag_t'(p_idx);
    n_req.fn  = FN_XOR;
    unique case (n_op)
      3'd0:    begin n_req.a = n_e[47:32]; n_req.b = n_k[47:32]; end
      3'd1:    begin n_req.a = n_e[31:16]; n_req.b = n_k[31:16]; end
      3'd2:    begin n_req.a = n_e[15:0];  n_req.b = n_k[15:0];  end
      3'd3:    begin n_req.a = n_l[31:16]; n_req.b = n_acc[31:16]; end
      default: begin n_req.a = n_l[15:0];  n_req.b = n_acc[15:0];  end
    endcase
  end

  // ---------------------------------------------------------------- buses
  assign alu_req = a_valid;
  assign alu_out = areq[a_idx];

  assign dout_req  = o_busy;
  assign dout.tag  = tag_t'(o_tag);
  assign dout.data = o_half ? rw[o_tag] : lw[o_tag];

  logic [SI-1:0] in_t, rsp_t;
  logic          in_ok, rsp_ok;
  assign in_t   = SI'(din.tag);
  assign rsp_t  = SI'(alu_in.tag);
  assign in_ok  = int'(din.tag) < int'(NSESS);
  assign rsp_ok = int'(alu_in.tag) < int'(NSESS);

  always_comb begin
    status[0] = 1'b0;
    status[1] = 1'b0;
    status[2] = 1'b0;
    status[3] = err;
    for (int i = 0; i < NSESS; i++) begin
      if (st[i] != S_EMPTY) status[0] = 1'b1;
      if (st[i] inside {S_PROC, S_REQ, S_WAIT}) status[1] = 1'b1;
      if (st[i] == S_DONE) status[2] = 1'b1;
    end
  end

  // ---------------------------------------------------------------- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NSESS; i++) begin
        st[i]    <= S_EMPTY;
        dec[i]   <= 1'b0;
        cd[i]    <= '0;
        lw[i]    <= '0;
        rw[i]    <= '0;
        rnd[i]   <= '0;
        op[i]    <= '0;
        fresh[i] <= 1'b0;
        acc[i]   <= '0;
        res[i]   <= '0;
        areq[i]  <= '0;
      end
      err    <= 1'b0;
      o_busy <= 1'b0;
      o_half <= 1'b0;
      o_tag  <= '0;
    end else begin
      // data from the system I/O bus
      if (ctrl.read && in_ok) begin
        unique case (st[in_t])
          S_EMPTY: begin lw[in_t] <= din.data; dec[in_t] <= ctrl.decode; st[in_t] <= S_KEY1; end
          S_KEY1:  begin cd[in_t] <= des_pc1({lw[in_t], din.data}); st[in_t] <= S_IDLE; end
          S_IDLE:  begin lw[in_t] <= din.data; st[in_t] <= S_DATA1; end
          S_DATA1: begin
            {lw[in_t], rw[in_t]} <= des_ip({lw[in_t], din.data});
            rnd[in_t]   <= '0;
            fresh[in_t] <= 1'b1;
            st[in_t]    <= S_PROC;
          end
          default: err <= 1'b1;   // block sent before the previous one was returned
        endcase
      end
      // result from the ALU controller
      if (alu_in_valid && rsp_ok && st[rsp_t] == S_WAIT) begin
        res[rsp_t] <= alu_in.r[15:0];
        st[rsp_t]  <= S_PROC;
      end
      // one algorithm-specific operation
      if (p_valid) begin
        lw[p_idx]    <= n_l;
        rw[p_idx]    <= n_r;
        acc[p_idx]   <= n_acc;
        rnd[p_idx]   <= n_rnd;
        op[p_idx]    <= n_op;
        fresh[p_idx] <= 1'b0;
        areq[p_idx]  <= n_req;
        st[p_idx]    <= n_done ? S_DONE : S_REQ;
      end
      // ALU request accepted by the controller
      if (a_valid && !alu_busy)
        st[a_idx] <= S_WAIT;
      // output
      if (!o_busy && o_valid) begin
        o_busy <= 1'b1;
        o_half <= 1'b0;
        o_tag  <= o_idx;
      end else if (o_busy && dout_en) begin
        if (o_half) begin
          o_busy    <= 1'b0;
          st[o_tag] <= S_IDLE;
        end
        o_half <= !o_half;
      end
      // CLEAR one session, FLUSH all
      if (ctrl.clear && in_ok) begin
        st[in_t] <= S_EMPTY;
        if (o_busy && o_tag == in_t) o_busy <= 1'b0;
      end
      if (ctrl.flush) begin
        for (int i = 0; i < NSESS; i++) st[i] <= S_EMPTY;
        o_busy <= 1'b0;
        err    <= 1'b0;
      end
    end
  end

`ifndef SYNTHESIS
  a_ctrl_onehot: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({ctrl.read, ctrl.clear, ctrl.flush}))
    else $error("asep_des_core: more than one action at once");
  a_dout_stable: assert property (@(posedge clk) disable iff (!rst_n)
      dout_req && !dout_en && !ctrl.clear && !ctrl.flush |=> dout_req && $stable(dout))
    else $error("asep_des_core: output word changed before it was taken");
`endif

endmodule
