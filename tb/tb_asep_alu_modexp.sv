// tb_asep_alu_modexp: self-checking testbench of the modular exponentiation
// ALU.
//
// Random bases (0 standing for 2^16) and exponents, including 0, 1 and
// 2^16-1, are compared with the testbench's own result, computed by
// square-and-multiply on 64-bit integers with the % operator. For exponent
// 2^16-1 it also checks that base times result is 1 modulo 2^16+1, so the
// result is the inverse. It checks the 17-cycle latency, busy during the
// computation, and that the result is held until acknowledged.
module tb_asep_alu_modexp;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid, busy, rsp_valid, rsp_ack;
  alu_req_t req;
  logic     req_src, rsp_src;
  alu_rsp_t rsp;

  asep_alu_modexp dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic longint unsigned pw(input logic [15:0] a, input logic [15:0] e);
    longint unsigned b, r, x;
    b = (a == 0) ? 65536 : a;
    r = 1;
    x = e;
    while (x != 0) begin
      if (x[0]) r = (r * b) % 65537;
      b = (b * b) % 65537;
      x = x >> 1;
    end
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 1'b0; rsp_ack = 1'b0; req = '0; req_src = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [15:0] a, e;
      int lat;
      longint unsigned want, aa;
      a = (n < 3) ? 16'(n) : 16'($urandom);
      case (n % 4)
        0: e = 16'hFFFF;
        1: e = 16'(n % 3);
        default: e = 16'($urandom);
      endcase
      @(negedge clk);
      req_valid = 1'b1; req = '{tag: tag_t'(n), fn: FN_EXP, a: a, b: e}; req_src = 1'(n);
      @(negedge clk);
      req_valid = 1'b0;
      lat = 1;
      while (!rsp_valid && lat < 100) begin
        check(busy, "busy while computing");
        @(negedge clk);
        lat++;
      end
      check(lat == 17, $sformatf("latency %0d", lat));
      want = pw(a, e);
      check(rsp.r == 32'(want & 64'hFFFF), $sformatf("%h ^ %h = %h, expected %h", a, e, rsp.r, want));
      check(rsp.tag == tag_t'(n) && rsp_src == 1'(n), "tag and source kept");
      if (e == 16'hFFFF) begin
        aa = (a == 0) ? 65536 : a;
        check(((aa * ((rsp.r[15:0] == 0) ? 65536 : rsp.r[15:0])) % 65537) == 1, "inverse");
      end
      @(negedge clk);
      check(rsp_valid && busy, "result held");
      rsp_ack = 1'b1;
      @(negedge clk);
      rsp_ack = 1'b0;
      check(!rsp_valid && !busy, "free after acknowledge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
