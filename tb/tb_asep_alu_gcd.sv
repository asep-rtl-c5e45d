// tb_asep_alu_gcd: self-checking testbench of the greatest common divisor
// ALU.
//
// Random operand pairs, pairs with a large common power of two, pairs with
// zero and equal pairs are compared with the testbench's own Euclid
// algorithm (repeated %). It checks the bound of 33 cycles for 16-bit
// operands, busy during the computation, and that the result is held until
// acknowledged.
module tb_asep_alu_gcd;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     req_valid, busy, rsp_valid, rsp_ack;
  alu_req_t req;
  logic     req_src, rsp_src;
  alu_rsp_t rsp;

  asep_alu_gcd dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int unsigned euclid(input int unsigned a, input int unsigned b);
    int unsigned t;
    while (b != 0) begin t = a % b; a = b; b = t; end
    return a;
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
    for (int n = 0; n < 300; n++) begin
      logic [15:0] a, e;
      int lat;
      case (n % 6)
        0: begin a = 16'($urandom) << $urandom_range(0, 8); e = 16'($urandom) << $urandom_range(0, 8); end
        1: begin a = 16'd0; e = 16'(n); end
        2: begin a = 16'($urandom); e = a; end
        3: begin a = 16'hFFFF; e = 16'd1; end
        default: begin a = 16'($urandom); e = 16'($urandom); end
      endcase
      if (n == 1) e = 16'd0;
      @(negedge clk);
      req_valid = 1'b1; req = '{tag: tag_t'(n), fn: FN_GCD, a: a, b: e}; req_src = 1'(n);
      @(negedge clk);
      req_valid = 1'b0;
      lat = 1;
      while (!rsp_valid && lat < 100) begin
        check(busy, "busy while computing");
        @(negedge clk);
        lat++;
      end
      check(lat <= 34, $sformatf("latency %0d", lat));
      check(rsp.r == euclid(a, e), $sformatf("gcd(%0d, %0d) = %0d", a, e, rsp.r));
      check(rsp.tag == tag_t'(n) && rsp_src == 1'(n), "tag and source kept");
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
