// tb_asep_top: end-to-end testbench of the whole co-processor at its
// default size (16 sessions, DES and IDEA modules, five ALUs).
//
// The testbench acts as the host. It sends 44-bit instructions and checks
// every returned block against DES and IDEA known answers (standard example
// vectors and vectors from independent software models). It also measures
// bits per clock cycle for one, two and three concurrent DES sessions and
// checks the single-session cycle count. Mechanisms it makes happen and
// counts, each must occur at least once: sessions of both algorithms in
// flight together; several sessions of one module in flight; the ALU
// controller's wait wire; two modules wanting the same ALU in one cycle;
// several complete blocks waiting in the output buffer (round robin
// output); host back-pressure on the output; a decode session
// (exponentiation ALU); CLEAR; FLUSH; an unknown instruction; and the
// protocol error status.
module tb_asep_top;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      instr_valid;
  instr_t                    instr;
  logic                      out_valid, out_ready;
  ioword_t                   out_word;
  logic [NUM_CORES-1:0][3:0] mod_status;
  logic                      bad_instr;

  asep_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  // ---------------- host output side
  logic [63:0] got     [16];
  int          got_cnt [16];
  logic        half    [16];
  int          got_cyc [16];   // cycle the first word of the last block appeared
  logic        seen    [16];
  always_ff @(posedge clk) begin
    for (int t = 0; t < 16; t++)
      if (out_valid && out_word.tag == tag_t'(t) && !seen[t]) begin
        seen[t]    <= 1'b1;
        got_cyc[t] <= cyc;
      end
    if (out_valid && out_ready) begin
      if (!half[out_word.tag]) got[out_word.tag][63:32] <= out_word.data;
      else begin
        got[out_word.tag][31:0]  <= out_word.data;
        got_cnt[out_word.tag]    <= got_cnt[out_word.tag] + 1;
        seen[out_word.tag]       <= 1'b0;
      end
      half[out_word.tag] <= !half[out_word.tag];
    end
  end

  // ---------------- mechanism counters
  int n_mixed = 0, n_multi = 0, n_wait = 0, n_conflict = 0, n_outq = 0, n_backp = 0;
  int n_exp = 0, n_bad = 0, n_err = 0, n_clear = 0, n_flush = 0;
  always_ff @(posedge clk) if (rst_n) begin
    int busy_des, busy_idea, nfull, same;
    busy_des = 0; busy_idea = 0; nfull = 0; same = 0;
    for (int i = 0; i < 16; i++) begin
      if (int'(dut.u_des.st[i])  inside {[4:6]}) busy_des++;    // PROC, REQ, WAIT
      if (int'(dut.u_idea.st[i]) inside {[6:8]}) busy_idea++;   // PROC, REQ, WAIT
      if (dut.u_outbuf.full[i]) nfull++;
    end
    for (int j = 0; j < NUM_ALUS; j++)
      if (dut.u_aluctl.want[j] == 2'b11) same++;
    if (busy_des > 0 && busy_idea > 0) n_mixed <= n_mixed + 1;
    if (busy_des > 1 || busy_idea > 1) n_multi <= n_multi + 1;
    if (dut.c_busy != '0)              n_wait  <= n_wait + 1;
    if (same > 0)                      n_conflict <= n_conflict + 1;
    if (nfull > 1)                     n_outq  <= n_outq + 1;
    if (out_valid && !out_ready)       n_backp <= n_backp + 1;
    if (dut.a_req_valid[int'(FN_EXP)]) n_exp   <= n_exp + 1;
    if (bad_instr)                     n_bad   <= n_bad + 1;
    if (mod_status[0][3] || mod_status[1][3]) n_err <= n_err + 1;
    if (dut.ctrl[0].clear || dut.ctrl[1].clear) n_clear <= n_clear + 1;
    if (dut.ctrl[0].flush || dut.ctrl[1].flush) n_flush <= n_flush + 1;
  end

  // ---------------- host input side
  task automatic ins(input alg_e alg, input action_e act, input logic d, input int tag,
                     input logic [31:0] w);
    @(negedge clk);
    instr_valid = 1'b1;
    instr = '{data: w, tag: tag_t'(tag), op: '{decode: d, action: act, alg: alg}};
    @(negedge clk);
    instr_valid = 1'b0;
  endtask

  task automatic des_key(input int tag, input logic d, input logic [63:0] k);
    ins(ALG_DES, ACT_READ, d, tag, k[63:32]);
    ins(ALG_DES, ACT_READ, d, tag, k[31:0]);
  endtask
  task automatic idea_key(input int tag, input logic d, input logic [127:0] k);
    for (int i = 3; i >= 0; i--) ins(ALG_IDEA, ACT_READ, d, tag, k[32*i +: 32]);
  endtask
  task automatic blk(input alg_e alg, input int tag, input logic [63:0] b);
    ins(alg, ACT_READ, 1'b0, tag, b[63:32]);
    ins(alg, ACT_READ, 1'b0, tag, b[31:0]);
  endtask
  task automatic wait_out(input int tag, input int n);
    int guard = 0;
    while (got_cnt[tag] < n && guard < 100000) begin @(posedge clk); guard++; end
    check(got_cnt[tag] >= n, $sformatf("block %0d of tag %0d arrived", n, tag));
  endtask

  localparam int ND = 5;
  logic [63:0] dk [ND] = '{64'h133457799BBCDFF1, 64'hf2a74de452e6b438, 64'h0c5c7fd0a6a3a450,
                           64'h1818e811892f902b, 64'he8e25d940ed90475};
  logic [63:0] dp [ND] = '{64'h0123456789ABCDEF, 64'h6513270e269e0d37, 64'hd23f0824128b2f33,
                           64'h9531985d5d9dc9f8, 64'h36f675cc81e74ef5};
  logic [63:0] dc [ND] = '{64'h85E813540F0AB405, 64'h391bbccb4492fc51, 64'h57a4490e488dd87a,
                           64'h1c83b420f9b5ac73, 64'h39cee5c11cdb1c39};
  localparam int NI = 3;
  logic [127:0] ik [NI] = '{128'h00010002000300040005000600070008,
                            128'h6b0d549b6f03675a1600a35a099950d8,
                            128'h0f21ddb66cad4a268d116ece1738f7d9};
  logic [63:0] ip [NI] = '{64'h0000000100020003, 64'h3d9c172411e20b8f, 64'h90c192cfd3ac94af};
  logic [63:0] ic [NI] = '{64'h11FBED2B01986DE5, 64'h9a1bc3267780b754, 64'hed256a5269ba9d85};

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure bits/cycle for n concurrent DES sessions, each running nb
  // blocks: the host sends the next block of a session as soon as the
  // previous one has come back (one pending block per session)
  task automatic des_rate(input int n, input int nb, output real ratio);
    int t0, t1;
    int base [16];
    int sent [16];
    int left;
    for (int s = 0; s < n; s++) des_key(s, 1'b0, dk[s]);
    for (int s = 0; s < n; s++) begin base[s] = got_cnt[s]; sent[s] = 0; end
    t0 = cyc;
    left = n * nb;
    while (left > 0) begin
      left = 0;
      for (int s = 0; s < n; s++) begin
        if (sent[s] < nb && got_cnt[s] == base[s] + sent[s]) begin
          if (sent[s] > 0) check(got[s] == dc[s], $sformatf("DES rate test session %0d", s));
          blk(ALG_DES, s, dp[s]);
          sent[s]++;
        end
        left += (nb - (got_cnt[s] - base[s]));
      end
      @(negedge clk);
    end
    t1 = cyc;
    for (int s = 0; s < n; s++) check(got[s] == dc[s], $sformatf("DES rate test session %0d last block", s));
    ratio = real'(64 * n * nb) / real'(t1 - t0);
    $display("DES, %0d session(s): %0d bits in %0d cycles = %f bits/cycle (%f per session)",
             n, 64 * n * nb, t1 - t0, ratio, ratio / n);
    for (int s = 0; s < n; s++) ins(ALG_DES, ACT_CLEAR, 1'b0, s, 32'd0);
  endtask

  initial begin
    int c0;
    real r1, r2, r3;
    instr_valid = 1'b0; instr = '0; out_ready = 1'b1;
    for (int i = 0; i < 16; i++) begin got_cnt[i] = 0; half[i] = 1'b0; got[i] = '0; seen[i] = 1'b0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. one DES block through the whole design, with its cycle count
    des_key(0, 1'b0, dk[0]);
    ins(ALG_DES, ACT_READ, 1'b0, 0, dp[0][63:32]);
    @(negedge clk);
    instr_valid = 1'b1;
    instr = '{data: dp[0][31:0], tag: 4'd0, op: '{decode: 1'b0, action: ACT_READ, alg: ALG_DES}};
    c0 = cyc;
    @(negedge clk);
    instr_valid = 1'b0;
    wait_out(0, 1);
    check(got[0] == dc[0], $sformatf("DES through top: %h", got[0]));
    check(got_cyc[0] - c0 == 247, $sformatf("DES block latency through top %0d cycles", got_cyc[0] - c0));
    ins(ALG_DES, ACT_CLEAR, 1'b0, 0, 32'd0);

    // 2. one IDEA block
    idea_key(6, 1'b0, ik[0]);
    blk(ALG_IDEA, 6, ip[0]);
    wait_out(6, 1);
    check(got[6] == ic[0], $sformatf("IDEA through top: %h", got[6]));

    // 3. throughput, one to three DES sessions
    des_rate(1, 2, r1);
    des_rate(2, 2, r2);
    des_rate(3, 2, r3);
    check(r2 > r1 && r3 > r2, "aggregate DES rate grows with the number of sessions");

    // 4. mixed load: DES and IDEA sessions, a decode session, host stalls
    des_key(10, 1'b0, dk[1]);
    des_key(11, 1'b1, dk[2]);
    des_key(12, 1'b0, dk[3]);
    idea_key(7, 1'b0, ik[1]);
    idea_key(8, 1'b1, ik[2]);
    out_ready = 1'b0;
    blk(ALG_DES, 10, dp[1]);
    blk(ALG_IDEA, 7, ip[1]);
    blk(ALG_DES, 11, dc[2]);
    blk(ALG_IDEA, 8, ic[2]);
    blk(ALG_DES, 12, dp[3]);
    // hold the output until several blocks wait, then take at random
    repeat (900) @(posedge clk);
    fork
      begin
        repeat (6000) begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 1) == 1);
        end
        out_ready = 1'b1;
      end
      begin
        wait_out(10, 1); check(got[10] == dc[1], "mixed: DES encode");
        wait_out(11, 1); check(got[11] == dp[2], "mixed: DES decode");
        wait_out(12, 1); check(got[12] == dc[3], "mixed: DES encode 2");
        wait_out(7, 1); check(got[7] == ic[1], "mixed: IDEA encode");
        wait_out(8, 1); check(got[8] == ip[2], "mixed: IDEA decode");
      end
    join

    // 5. an unknown algorithm id and an unknown action are dropped
    ins(alg_e'(4'd9), ACT_READ, 1'b0, 10, 32'hFFFF_FFFF);
    ins(ALG_DES, action_e'(3'd6), 1'b0, 10, 32'hFFFF_FFFF);
    blk(ALG_DES, 10, dp[1]);
    wait_out(10, 2);
    check(got[10] == dc[1], "session unaffected by dropped instructions");

    // 6. protocol error, CLEAR of one session, FLUSH of a module
    blk(ALG_IDEA, 7, ip[1]);
    ins(ALG_IDEA, ACT_READ, 1'b0, 7, 32'h0);
    @(negedge clk);
    check(mod_status[1][3] == 1'b1, "IDEA module reports the protocol error");
    wait_out(7, 2);
    check(got[7] == ic[1], "IDEA block after error");
    ins(ALG_DES, ACT_CLEAR, 1'b0, 10, 32'd0);
    des_key(10, 1'b0, dk[4]);
    blk(ALG_DES, 10, dp[4]);
    wait_out(10, 3);
    check(got[10] == dc[4], "DES session re-keyed after CLEAR");
    ins(ALG_IDEA, ACT_FLUSH, 1'b0, 0, 32'd0);
    @(negedge clk);
    @(negedge clk);
    check(mod_status[1] == 4'b0000, "IDEA module empty after FLUSH");
    check(mod_status[0][0] == 1'b1, "DES sessions survive an IDEA FLUSH");

    repeat (10) @(posedge clk);
    $display("mechanisms: mixed=%0d multi=%0d wait=%0d conflict=%0d outq=%0d backpressure=%0d exp=%0d bad=%0d err=%0d clear=%0d flush=%0d",
             n_mixed, n_multi, n_wait, n_conflict, n_outq, n_backp, n_exp, n_bad, n_err, n_clear, n_flush);
    check(n_mixed > 0, "DES and IDEA sessions in flight together");
    check(n_multi > 0, "several sessions of one module in flight");
    check(n_wait > 0, "ALU controller wait wire set");
    check(n_conflict > 0, "two modules wanting one ALU");
    check(n_outq > 1, "several blocks waiting in the output buffer");
    check(n_backp > 0, "host back-pressure on the output");
    check(n_exp == 18, $sformatf("inverses for one IDEA decode: %0d", n_exp));
    check(n_bad == 2, "two unknown instructions flagged");
    check(n_err > 0, "protocol error status");
    check(n_clear > 0, "CLEAR");
    check(n_flush > 0, "FLUSH");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
