// tb_asep_idea_core: self-checking testbench of the IDEA algorithm module.
//
// The testbench plays the ALU controller and all ALUs itself, with its own
// arithmetic (XOR, addition mod 2^16, multiplication mod 2^16+1 by the %
// operator, exponentiation by repeated multiplication), each answering in
// the cycle after the request as the real controller does with a free one-cycle
// ALU. In the later phases it also raises the wait wire at random. Expected
// values are IDEA known answers: the vector of the cipher's designers (key
// 0001..0008) and vectors from an independent software IDEA.
// Checks: encryption and decryption answers; the cycle count of an
// encryption when one session runs alone (351 cycles from the bus cycle of
// the second data word to the first output word); four sessions
// interleaved; CLEAR, FLUSH and the protocol error status.
module tb_asep_idea_core;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ioword_t  din;
  ctrl_t    ctrl;
  logic [3:0] status;
  logic     dout_req, dout_en;
  ioword_t  dout;
  logic     alu_req, alu_busy, alu_in_valid;
  alu_req_t alu_out;
  alu_rsp_t alu_in;

  asep_idea_core dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- ALU model
  logic     s1_v, rand_busy;
  alu_req_t s1;
  assign alu_busy = rand_busy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1 <= '0;
    end else begin
      s1_v <= alu_req && !alu_busy;
      if (alu_req && !alu_busy) s1 <= alu_out;
    end
  end
  assign alu_in_valid = s1_v;
  function automatic logic [15:0] m(input logic [15:0] a, input logic [15:0] b);
    longint unsigned aa, bb;
    aa = (a == 0) ? 65536 : a;
    bb = (b == 0) ? 65536 : b;
    return 16'((aa * bb) % 65537);
  endfunction
  function automatic logic [15:0] ex(input logic [15:0] a, input logic [15:0] e);
    logic [15:0] acc = 16'd1;
    for (int i = 0; i < int'(e); i++) acc = m(acc, a);
    return acc;
  endfunction
  logic [15:0] r2;
  always_comb begin
    case (s1.fn)
      FN_XOR:  r2 = s1.a ^ s1.b;
      FN_ADD:  r2 = s1.a + s1.b;
      FN_MUL:  r2 = m(s1.a, s1.b);
      FN_EXP:  r2 = ex(s1.a, s1.b);
      default: r2 = 16'hDEAD;
    endcase
  end
  int n_exp = 0;
  always_ff @(posedge clk) if (s1_v && s1.fn == FN_EXP) n_exp <= n_exp + 1;
  assign alu_in = '{tag: s1.tag, fn: s1.fn, r: {16'd0, r2}};

  // ---------------- output collector: 64-bit blocks per tag
  logic [63:0] got     [16];
  int          got_cnt [16];
  logic        half    [16];
  int          cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  int first_out_cyc = -1;
  always @(posedge clk) begin
    if (dout_req && dout_en) begin
      if (!half[dout.tag]) got[dout.tag][63:32] <= dout.data;
      else begin
        got[dout.tag][31:0] <= dout.data;
        got_cnt[dout.tag]   <= got_cnt[dout.tag] + 1;
      end
      half[dout.tag] <= !half[dout.tag];
    end
    if (dout_req && first_out_cyc < 0) first_out_cyc <= cyc;
  end

  task automatic send(input action_e a, input logic d, input int tag, input logic [31:0] w);
    @(negedge clk);
    ctrl = '{decode: d, read: a == ACT_READ, clear: a == ACT_CLEAR, flush: a == ACT_FLUSH};
    din  = '{tag: tag_t'(tag), data: w};
    @(negedge clk);
    ctrl = '0;
  endtask

  task automatic key(input int tag, input logic d, input logic [127:0] k);
    for (int i = 3; i >= 0; i--) send(ACT_READ, d, tag, k[32*i +: 32]);
  endtask

  task automatic blk(input int tag, input logic [63:0] b);
    send(ACT_READ, 1'b0, tag, b[63:32]);
    send(ACT_READ, 1'b0, tag, b[31:0]);
  endtask

  task automatic wait_out(input int tag, input int n);
    int guard = 0;
    while (got_cnt[tag] < n && guard < 40000) begin @(posedge clk); guard++; end
    check(got_cnt[tag] >= n, $sformatf("output of tag %0d arrived", tag));
  endtask

  localparam int NV = 5;
  logic [127:0] kv [NV] = '{128'h00010002000300040005000600070008,
                            128'h6b0d549b6f03675a1600a35a099950d8,
                            128'h0f21ddb66cad4a268d116ece1738f7d9,
                            128'ha170b33839263059f28c105d1fb17c23,
                            128'h95e60af593bd04cf0fd630f1f29d0da9};
  logic [63:0] pv [NV] = '{64'h0000000100020003, 64'h3d9c172411e20b8f, 64'h90c192cfd3ac94af,
                           64'h953f48f1a09f76b5, 64'h0cb1e29c658cda14};
  logic [63:0] cv [NV] = '{64'h11FBED2B01986DE5, 64'h9a1bc3267780b754, 64'hed256a5269ba9d85,
                           64'h1a8de16ead0516ed, 64'h0bf008dd2ab614d0};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    ctrl = '0; din = '0; dout_en = 1'b1; rand_busy = 1'b0;
    for (int i = 0; i < 16; i++) begin got_cnt[i] = 0; half[i] = 1'b0; got[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(status == 4'b0000, "status idle after reset");

    // 1. single session, FIPS example, with latency
    key(3, 1'b0, kv[0]);
    check(status[0] == 1'b1, "status shows an open session");
    send(ACT_READ, 1'b0, 3, pv[0][63:32]);
    @(negedge clk);
    ctrl = '{decode: 1'b0, read: 1'b1, clear: 1'b0, flush: 1'b0};
    din  = '{tag: 4'd3, data: pv[0][31:0]};
    c0 = cyc;
    @(negedge clk);
    ctrl = '0;
    first_out_cyc = -1;
    @(posedge clk);
    check(status[1] == 1'b1, "status shows processing");
    wait_out(3, 1);
    check(got[3] == cv[0], $sformatf("IDEA designers' vector: got %h", got[3]));
    check(first_out_cyc - c0 == 351, $sformatf("single-session block latency %0d cycles", first_out_cyc - c0));

    // second block in the same session (key kept)
    blk(3, pv[0]);
    wait_out(3, 2);
    check(got[3] == cv[0], "second block with the stored key");

    // 2. decryption session
    key(5, 1'b1, kv[1]);
    blk(5, cv[1]);
    wait_out(5, 1);
    check(got[5] == pv[1], $sformatf("IDEA decrypt: got %h", got[5]));
    check(n_exp == 18, $sformatf("decryption asked for %0d inverses", n_exp));

    // 3. four interleaved sessions, random ALU wait wire, output stalls
    fork
      begin
        repeat (4000) begin
          @(negedge clk);
          rand_busy = ($urandom_range(0, 3) == 0);
          dout_en   = ($urandom_range(0, 2) != 0);
        end
        rand_busy = 1'b0; dout_en = 1'b1;
      end
      begin
        for (int i = 1; i < NV; i++) key(8 + i, 1'b0, kv[i]);
        send(ACT_READ, 1'b0, 9,  pv[1][63:32]);
        send(ACT_READ, 1'b0, 10, pv[2][63:32]);
        send(ACT_READ, 1'b0, 9,  pv[1][31:0]);
        send(ACT_READ, 1'b0, 11, pv[3][63:32]);
        send(ACT_READ, 1'b0, 10, pv[2][31:0]);
        send(ACT_READ, 1'b0, 12, pv[4][63:32]);
        send(ACT_READ, 1'b0, 11, pv[3][31:0]);
        send(ACT_READ, 1'b0, 12, pv[4][31:0]);
        for (int i = 1; i < NV; i++) begin
          wait_out(8 + i, 1);
          check(got[8 + i] == cv[i], $sformatf("interleaved session %0d: got %h", 8 + i, got[8 + i]));
        end
      end
    join

    // 4. protocol error: a third data word while the block is in flight
    blk(3, pv[0]);
    send(ACT_READ, 1'b0, 3, 32'h1234_5678);
    check(status[3] == 1'b1, "error status after early block");
    wait_out(3, 3);
    check(got[3] == cv[0], "block unaffected by the rejected word");

    // 5. CLEAR: session 3 needs a new key afterwards
    send(ACT_CLEAR, 1'b0, 3, 32'd0);
    key(3, 1'b0, kv[2]);
    blk(3, pv[2]);
    wait_out(3, 4);
    check(got[3] == cv[2], "new key after CLEAR");

    // 6. FLUSH clears every session and the error
    send(ACT_FLUSH, 1'b0, 0, 32'd0);
    @(negedge clk);
    check(status == 4'b0000, "status after FLUSH");
    key(5, 1'b0, kv[4]);
    blk(5, pv[4]);
    wait_out(5, 2);
    check(got[5] == cv[4], "session after FLUSH takes a new key");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
