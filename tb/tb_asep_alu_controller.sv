// tb_asep_alu_controller: self-checking testbench of the ALU bus controller.
//
// Two modeled cores issue random requests (random session tag, random
// function, random operands) whenever their wait wire is low, and five
// modeled ALUs with different fixed latencies (1, 1, 1, 4 and 6 cycles)
// hold their results until acknowledged. Each ALU model returns a result
// that depends on its own number and the operands, so a request sent to the
// wrong ALU or a result routed to the wrong core is caught. The testbench
// keeps, per core and per tag, the list of expected results and checks each
// result the controller forwards. It also checks that a lone request to a
// free one-cycle ALU is dispatched at once (result in the next cycle), that an ALU never gets a request while
// busy, and that the wait wire and two cores competing for one ALU both
// happened.
module tb_asep_alu_controller;
  import asep_pkg::*;

  localparam int NC = NUM_CORES, NA = NUM_ALUS;
  localparam int LAT [NA] = '{1, 1, 1, 4, 6};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     [NC-1:0]         core_req_valid, core_busy, core_rsp_valid;
  alu_req_t [NC-1:0]         core_req;
  alu_rsp_t [NC-1:0]         core_rsp;
  logic     [NA-1:0]         alu_req_valid, alu_busy, alu_rsp_valid, alu_rsp_ack;
  alu_req_t [NA-1:0]         alu_req;
  alu_rsp_t [NA-1:0]         alu_rsp;
  logic     [NA-1:0][0:0]    alu_req_src, alu_rsp_src;

  asep_alu_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] model(input int j, input logic [15:0] a, input logic [15:0] b);
    return {8'(j), 8'(a[3:0] * 3), a ^ b};
  endfunction

  // ---------------- ALU models
  int       cnt  [NA];
  logic     run  [NA];
  alu_req_t held [NA];
  logic     hsrc [NA];
  always_comb begin
    for (int j = 0; j < NA; j++) begin
      alu_busy[j]      = run[j] || (alu_rsp_valid[j] && !alu_rsp_ack[j]);
      alu_rsp[j]       = '{tag: held[j].tag, fn: held[j].fn, r: model(j, held[j].a, held[j].b)};
      alu_rsp_src[j]   = hsrc[j];
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NA; j++) begin
        run[j] <= 1'b0; cnt[j] <= 0; held[j] <= '0; hsrc[j] <= 1'b0; alu_rsp_valid[j] <= 1'b0;
      end
    end else begin
      for (int j = 0; j < NA; j++) begin
        if (alu_rsp_ack[j]) alu_rsp_valid[j] <= 1'b0;
        if (alu_req_valid[j]) begin
          check(!alu_busy[j], $sformatf("ALU %0d given a request while busy", j));
          check(int'(alu_req[j].fn) == j, $sformatf("request for function %0d sent to ALU %0d", alu_req[j].fn, j));
          held[j] <= alu_req[j];
          hsrc[j] <= alu_req_src[j][0];
          if (LAT[j] == 1) alu_rsp_valid[j] <= 1'b1;
          else begin run[j] <= 1'b1; cnt[j] <= LAT[j] - 1; end
        end else if (run[j]) begin
          if (cnt[j] == 1) begin run[j] <= 1'b0; alu_rsp_valid[j] <= 1'b1; end
          cnt[j] <= cnt[j] - 1;
        end
      end
    end
  end

  // ---------------- core models and scoreboard
  logic [31:0] expq [NC][16][$];
  int          sent [NC], recv [NC];
  logic        go;
  int          n_wait = 0, n_conflict = 0;
  always_ff @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NC; i++) begin
      if (core_req_valid[i] && !core_busy[i]) begin
        expq[i][core_req[i].tag].push_back(model(int'(core_req[i].fn), core_req[i].a, core_req[i].b));
        sent[i] <= sent[i] + 1;
      end
      if (core_busy[i]) n_wait <= n_wait + 1;
      if (core_rsp_valid[i]) begin
        if (expq[i][core_rsp[i].tag].size() == 0)
          check(1'b0, $sformatf("core %0d: unexpected result for tag %0d", i, core_rsp[i].tag));
        else begin
          logic [31:0] e;
          int k;
          // results of one tag may return out of order when they used ALUs of different latency
          k = -1;
          foreach (expq[i][core_rsp[i].tag][q]) if (k < 0 && expq[i][core_rsp[i].tag][q] == core_rsp[i].r) k = q;
          check(k >= 0, $sformatf("core %0d tag %0d: result %h not expected", i, core_rsp[i].tag, core_rsp[i].r));
          if (k >= 0) expq[i][core_rsp[i].tag].delete(k);
        end
        recv[i] <= recv[i] + 1;
      end
    end
    for (int j = 0; j < NA; j++)
      if (dut.want[j] == 2'b11) n_conflict <= n_conflict + 1;
  end

  always_ff @(negedge clk) begin
    for (int i = 0; i < NC; i++) begin
      if (go && !(core_req_valid[i] && core_busy[i])) begin
        core_req_valid[i] <= ($urandom_range(0, 2) != 0);
        core_req[i] <= '{tag: tag_t'($urandom), fn: alu_fn_e'($urandom_range(0, NA - 1)),
                         a: 16'($urandom), b: 16'($urandom)};
      end else if (!go) core_req_valid[i] <= 1'b0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    go = 1'b0; core_req_valid = '0; core_req = '0;
    for (int i = 0; i < NC; i++) begin sent[i] = 0; recv[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // a lone request to the one-cycle ADD ALU
    @(negedge clk);
    #1;
    core_req_valid[1] = 1'b1;
    core_req[1] = '{tag: 4'd9, fn: FN_ADD, a: 16'h1234, b: 16'h00FF};
    @(negedge clk);
    core_req_valid[1] = 1'b0;
    c = 1;
    while (!core_rsp_valid[1] && c < 20) begin @(negedge clk); c++; end
    check(c == 1,   // dispatched at once, result the next cycle
          $sformatf("lone request answered after %0d cycles", c));
    check(core_rsp[1].tag == 4'd9 && core_rsp[1].r == model(1, 16'h1234, 16'h00FF), "lone request result");
    @(negedge clk);
    // random traffic
    go = 1'b1;
    repeat (5000) @(negedge clk);
    go = 1'b0;
    repeat (50) @(negedge clk);
    for (int i = 0; i < NC; i++) begin
      check(sent[i] == recv[i] && sent[i] > 1000, $sformatf("core %0d: %0d sent, %0d returned", i, sent[i], recv[i]));
      for (int t = 0; t < 16; t++) check(expq[i][t].size() == 0, "no result missing");
    end
    check(n_wait > 0, "wait wire raised");
    check(n_conflict > 0, "two cores wanted one ALU");
    $display("sent %0d/%0d, wait cycles %0d, conflicts %0d", sent[0], sent[1], n_wait, n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
