// asep_idea_core: the IDEA algorithm module, serving up to 16 sessions at once.
//
// Every session (tag) has its own buffers: a 128-bit key, the four 16-bit
// block words X1..X4, two 16-bit temporaries T0 and T1, a round counter
// (0..7 for the rounds, 8 for the output transformation), the micro-operation
// in flight, the last ALU result, a prepared ALU request, the encode/decode
// flag and a status code (sess_e). The first four READ words of a session
// are the key, most significant word first. The next two are a 64-bit data
// block, high word first.
//
// The key schedule is the only part the core computes itself. Encryption
// subkey j is the 16-bit slice j mod 8 of the key rotated left by 25*(j/8)
// bits, formed when it is needed. Every multiplication modulo 2^16+1, every
// addition modulo 2^16 and every XOR goes to the shared ALUs, one 16-bit
// operation per stop point. A round is 14 stop points and the output
// transformation 4, so an encryption takes 116. A decode session uses the
// decryption subkeys. Additive inverses are formed in the core. Each
// multiplicative inverse is asked of the modular exponentiation ALU as
// Z^(2^16-1) just before the multiplication that uses it. That adds two
// stop points to every round and to the output transformation: 134 in all.
//
// Sessions are interleaved by the same three round robin counters as in the
// DES module (processing, ALU request, output), and the bus interface is the
// same. That interface follows the document. Status is {protocol error,
// output pending, processing, any session open}. That encoding, the
// micro-operation order and the on-demand inverses are this design's own.
//
// Timing, one session alone: each stop point costs three cycles plus the
// ALU's extra latency (16 cycles for an inverse).
module asep_idea_core
  import asep_pkg::*;
#(
  parameter int unsigned NSESS = NUM_SESSIONS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  ioword_t    din,
  input  ctrl_t      ctrl,
  output logic [3:0] status,
  output logic       dout_req,
  input  logic       dout_en,
  output ioword_t    dout,
  output logic       alu_req,
  input  logic       alu_busy,
  output alu_req_t   alu_out,
  input  logic       alu_in_valid,
  input  alu_rsp_t   alu_in
);

  localparam int unsigned SI = (NSESS > 1) ? $clog2(NSESS) : 1;

  typedef enum logic [3:0] {
    S_EMPTY, S_KEY1, S_KEY2, S_KEY3, S_IDLE, S_DATA1, S_PROC, S_REQ, S_WAIT, S_DONE
  } sess_e;

  // micro-operations of one round, in order; E1/E4 only when decoding
  typedef enum logic [3:0] {
    U_E1, U_M1, U_A2, U_A3, U_E4, U_M4,
    U_X13, U_X24, U_M5, U_A6, U_M6, U_A7, U_XA, U_XB, U_XC, U_XD
  } uop_e;

  sess_e        st    [NSESS];
  logic         dec   [NSESS];
  logic [127:0] key   [NSESS];
  logic [15:0]  x1 [NSESS], x2 [NSESS], x3 [NSESS], x4 [NSESS];
  logic [15:0]  t0 [NSESS], t1 [NSESS];
  logic [3:0]   rnd   [NSESS];
  uop_e         uop   [NSESS];
  logic         fresh [NSESS];
  logic [15:0]  res   [NSESS];
  alu_req_t     areq  [NSESS];
  logic         err;

  // encryption subkey j (0..51) of a 128-bit key
  function automatic logic [15:0] ek(input logic [127:0] k, input int unsigned j);
    int unsigned  rot;
    logic [255:0] d;
    logic [127:0] kk;
    rot = (25 * (j / 8)) % 128;
    d   = {k, k} << rot;
    kk  = d[255:128];
    return kk[127 - 16 * (j % 8) -: 16];
  endfunction

  // ---------------------------------------------------------------- round robin counters
  logic [NSESS-1:0] want_proc, want_alu, want_out;
  logic           p_valid, a_valid, o_valid;
  logic [SI-1:0]  p_idx, a_idx, o_idx;
  logic           o_busy, o_half;
  logic [SI-1:0]  o_tag;

  always_comb begin
    for (int i = 0; i < NSESS; i++) begin
      want_proc[i] = (st[i] == S_PROC);
      want_alu[i]  = (st[i] == S_REQ);
      want_out[i]  = (st[i] == S_DONE);
    end
  end

  asep_rr_arbiter #(.N(NSESS), .IDX(SI)) u_rr_proc (
    .clk, .rst_n, .req(want_proc), .take(1'b1), .gnt_valid(p_valid), .gnt_idx(p_idx));
  asep_rr_arbiter #(.N(NSESS), .IDX(SI)) u_rr_alu (
    .clk, .rst_n, .req(want_alu), .take(!alu_busy), .gnt_valid(a_valid), .gnt_idx(a_idx));
  asep_rr_arbiter #(.N(NSESS), .IDX(SI)) u_rr_out (
    .clk, .rst_n, .req(want_out), .take(!o_busy), .gnt_valid(o_valid), .gnt_idx(o_idx));

  // ---------------------------------------------------------------- processing step
  logic [15:0] n1, n2, n3, n4, nt0, nt1, r, z, tmp;
  logic [3:0]  nr;
  uop_e        nu;
  logic        nd, dd;
  alu_req_t    n_req;
  logic [5:0]  zi, base;
  logic [2:0]  zsel;

  always_comb begin
    n1 = x1[p_idx]; n2 = x2[p_idx]; n3 = x3[p_idx]; n4 = x4[p_idx];
    nt0 = t0[p_idx]; nt1 = t1[p_idx];
    nr  = rnd[p_idx];
    r   = res[p_idx];
    dd  = dec[p_idx];
    nd  = 1'b0;
    tmp = '0;
    nu  = dd ? U_E1 : U_M1;
    if (!fresh[p_idx]) begin
      // absorb the result of the micro-operation in flight, pick the next
      unique case (uop[p_idx])
        U_E1:  begin nt0 = r; nu = U_M1; end
        U_M1:  begin n1 = r;  nu = U_A2; end
        U_A2:  begin if (nr == 4'd8) nt0 = r; else n2 = r; nu = U_A3; end
        U_A3:  begin n3 = r;  nu = dd ? U_E4 : U_M4; end
        U_E4:  begin nt1 = r; nu = U_M4; end
        U_M4:  begin
          n4 = r;
          if (nr == 4'd8) begin n2 = nt0; nd = 1'b1; end
          nu = U_X13;
        end
        U_X13: begin nt0 = r; nu = U_X24; end
        U_X24: begin nt1 = r; nu = U_M5; end
        U_M5:  begin nt0 = r; nu = U_A6; end
        U_A6:  begin nt1 = r; nu = U_M6; end
        U_M6:  begin nt1 = r; nu = U_A7; end
        U_A7:  begin nt0 = r; nu = U_XA; end
        U_XA:  begin n1 = r;  nu = U_XB; end
        U_XB:  begin n3 = r;  nu = U_XC; end
        U_XC:  begin n2 = r;  nu = U_XD; end
        default: begin
          // U_XD: last XOR, then swap the middle words: next round
          n4 = r;
          tmp = n2; n2 = n3; n3 = tmp;
          nr = nr + 4'd1;
          nu = dd ? U_E1 : U_M1;
        end
      endcase
    end
    // subkey for the next micro-operation
    unique case (nu)
      U_E1, U_M1: zsel = 3'd0;
      U_A2:       zsel = 3'd1;
      U_A3:       zsel = 3'd2;
      U_E4, U_M4: zsel = 3'd3;
      U_M5:       zsel = 3'd4;
      default:    zsel = 3'd5;
    endcase
    base = 6'd48 - 6'd6 * 6'(nr);
    if (!dd)
      zi = 6'd6 * 6'(nr) + 6'(zsel);
    else if (zsel == 3'd0 || zsel == 3'd3)
      zi = base + 6'(zsel);
    else if (zsel == 3'd1 || zsel == 3'd2)
      zi = (nr == 4'd0 || nr == 4'd8) ? base + 6'(zsel) : base + 6'd3 - 6'(zsel);
    else
      zi = base + 6'(zsel) - 6'd6;  // Z5, Z6 from the round before
    z = ek(key[p_idx], int'(zi));
    if (dd && (zsel == 1 || zsel == 2)) z = 16'd0 - z;
    // the request
    n_req.tag = tag_t'(p_idx);
    unique case (nu)
      U_E1:    n_req = '{tag: tag_t'(p_idx), fn: FN_EXP, a: z,   b: 16'hFFFF};
      U_M1:    n_req = '{tag: tag_t'(p_idx), fn: FN_MUL, a: n1,  b: dd ? nt0 : z};
      U_A2:    n_req = '{tag: tag_t'(p_idx), fn: FN_ADD, a: (nr == 4'd8) ? n3 : n2, b: z};
      U_A3:    n_req = '{tag: tag_t'(p_idx), fn: FN_ADD, a: (nr == 4'd8) ? n2 : n3, b: z};
      U_E4:    n_req = '{tag: tag_t'(p_idx), fn: FN_EXP, a: z,   b: 16'hFFFF};
      U_M4:    n_req = '{tag: tag_t'(p_idx), fn: FN_MUL, a: n4,  b: dd ? nt1 : z};
      U_X13:   n_req = '{tag: tag_t'(p_idx), fn: FN_XOR, a: n1,  b: n3};
      U_X24:   n_req = '{tag: tag_t'(p_idx), fn: FN_XOR, a: n2,  b: n4};
      U_M5:    n_req = '{tag: tag_t'(p_idx), fn: FN_MUL, a: nt0, b: z};
      U_A6:    n_req = '{tag: tag_t'(p_idx), fn: FN_ADD, a: nt1, b: nt0};
      U_M6:    n_req = '{tag: tag_t'(p_idx), fn: FN_MUL, a: nt1, b: z};
      U_A7:    n_req = '{tag: tag_t'(p_idx), fn: FN_ADD, a: nt0, b: nt1};
      U_XA:    n_req = '{tag: tag_t'(p_idx), fn: FN_XOR, a: n1,  b: nt1};
      U_XB:    n_req = '{tag: tag_t'(p_idx), fn: FN_XOR, a: n3,  b: nt1};
      U_XC:    n_req = '{tag: tag_t'(p_idx), fn: FN_XOR, a: n2,  b: nt0};
      default: n_req = '{tag: tag_t'(p_idx), fn: FN_XOR, a: n4,  b: nt0};
    endcase
  end

  // ---------------------------------------------------------------- buses
  assign alu_req = a_valid;
  assign alu_out = areq[a_idx];

  assign dout_req  = o_busy;
  assign dout.tag  = tag_t'(o_tag);
  assign dout.data = o_half ? {x3[o_tag], x4[o_tag]} : {x1[o_tag], x2[o_tag]};

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
        st[i]  <= S_EMPTY;
        dec[i] <= 1'b0;
        key[i] <= '0;
        x1[i]  <= '0; x2[i] <= '0; x3[i] <= '0; x4[i] <= '0;
        t0[i]  <= '0; t1[i] <= '0;
        rnd[i] <= '0;
        uop[i] <= U_M1;
        fresh[i] <= 1'b0;
        res[i]   <= '0;
        areq[i]  <= '0;
      end
      err    <= 1'b0;
      o_busy <= 1'b0;
      o_half <= 1'b0;
      o_tag  <= '0;
    end else begin
      if (ctrl.read && in_ok) begin
        unique case (st[in_t])
          S_EMPTY: begin
            key[in_t] <= {96'd0, din.data};
            dec[in_t] <= ctrl.decode;
            st[in_t]  <= S_KEY1;
          end
          S_KEY1:  begin key[in_t] <= {key[in_t][95:0], din.data}; st[in_t] <= S_KEY2; end
          S_KEY2:  begin key[in_t] <= {key[in_t][95:0], din.data}; st[in_t] <= S_KEY3; end
          S_KEY3:  begin key[in_t] <= {key[in_t][95:0], din.data}; st[in_t] <= S_IDLE; end
          S_IDLE:  begin {x1[in_t], x2[in_t]} <= din.data; st[in_t] <= S_DATA1; end
          S_DATA1: begin
            {x3[in_t], x4[in_t]} <= din.data;
            rnd[in_t]   <= '0;
            fresh[in_t] <= 1'b1;
            st[in_t]    <= S_PROC;
          end
          default: err <= 1'b1;
        endcase
      end
      if (alu_in_valid && rsp_ok && st[rsp_t] == S_WAIT) begin
        res[rsp_t] <= alu_in.r[15:0];
        st[rsp_t]  <= S_PROC;
      end
      if (p_valid) begin
        x1[p_idx] <= n1; x2[p_idx] <= n2; x3[p_idx] <= n3; x4[p_idx] <= n4;
        t0[p_idx] <= nt0; t1[p_idx] <= nt1;
        rnd[p_idx]   <= nr;
        uop[p_idx]   <= nu;
        fresh[p_idx] <= 1'b0;
        areq[p_idx]  <= n_req;
        st[p_idx]    <= nd ? S_DONE : S_REQ;
      end
      if (a_valid && !alu_busy)
        st[a_idx] <= S_WAIT;
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
    else $error("asep_idea_core: more than one action at once");
  a_dout_stable: assert property (@(posedge clk) disable iff (!rst_n)
      dout_req && !dout_en && !ctrl.clear && !ctrl.flush |=> dout_req && $stable(dout))
    else $error("asep_idea_core: output word changed before it was taken");
`endif

endmodule
