// tb_asep_alus: self-checking testbench of the three one-cycle ALUs (XOR,
// add mod 2^16, multiply mod 2^16+1).
//
// Each ALU gets random requests, including the operand values 0 and 1 and
// the largest value, with random gaps and random late acknowledges. Every
// result is compared with the testbench's own arithmetic (the multiply by
// the % operator on 64-bit integers, with 0 standing for 2^16). It checks
// that the result arrives the cycle after the request, keeps the tag,
// function and source, stays while unacknowledged, and that busy is set
// exactly while an unacknowledged result waits.
module tb_asep_alus;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]   req_valid, busy, rsp_valid, rsp_ack;
  alu_req_t     req [3];
  logic         req_src [3];
  alu_rsp_t     rsp [3];
  logic         rsp_src [3];

  asep_alu_xor    u_xor (.clk, .rst_n, .req_valid(req_valid[0]), .req(req[0]), .req_src(req_src[0]),
                         .busy(busy[0]), .rsp_valid(rsp_valid[0]), .rsp(rsp[0]), .rsp_src(rsp_src[0]), .rsp_ack(rsp_ack[0]));
  asep_alu_modadd u_add (.clk, .rst_n, .req_valid(req_valid[1]), .req(req[1]), .req_src(req_src[1]),
                         .busy(busy[1]), .rsp_valid(rsp_valid[1]), .rsp(rsp[1]), .rsp_src(rsp_src[1]), .rsp_ack(rsp_ack[1]));
  asep_alu_modmul u_mul (.clk, .rst_n, .req_valid(req_valid[2]), .req(req[2]), .req_src(req_src[2]),
                         .busy(busy[2]), .rsp_valid(rsp_valid[2]), .rsp(rsp[2]), .rsp_src(rsp_src[2]), .rsp_ack(rsp_ack[2]));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] ref_op(input int k, input logic [15:0] a, input logic [15:0] b);
    longint unsigned aa, bb;
    case (k)
      0: return a ^ b;
      1: return 16'((int'(a) + int'(b)) % 65536);
      default: begin
        aa = (a == 0) ? 65536 : a;
        bb = (b == 0) ? 65536 : b;
        return 16'((aa * bb) % 65537);
      end
    endcase
  endfunction

  function automatic logic [15:0] pick();
    case ($urandom_range(0, 5))
      0: return 16'd0;
      1: return 16'd1;
      2: return 16'hFFFF;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  alu_fn_e fns [3] = '{FN_XOR, FN_ADD, FN_MUL};

  initial begin
    req_valid = '0; rsp_ack = '0;
    for (int k = 0; k < 3; k++) begin req[k] = '0; req_src[k] = 1'b0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 3; k++) begin
      for (int n = 0; n < 300; n++) begin
        alu_req_t q;
        logic     s;
        int       hold;
        q = '{tag: tag_t'($urandom), fn: fns[k], a: pick(), b: pick()};
        s = 1'($urandom);
        @(negedge clk);
        check(!busy[k], "idle before request");
        req_valid[k] = 1'b1; req[k] = q; req_src[k] = s;
        @(negedge clk);
        req_valid[k] = 1'b0;
        check(rsp_valid[k], "result the cycle after the request");
        check(rsp[k].r == {16'd0, ref_op(k, q.a, q.b)},
              $sformatf("ALU %0d: %h op %h = %h", k, q.a, q.b, rsp[k].r));
        check(rsp[k].tag == q.tag && rsp[k].fn == q.fn && rsp_src[k] == s, "tag, function, source kept");
        hold = $urandom_range(0, 2);
        repeat (hold) begin
          check(busy[k] && rsp_valid[k], "busy while the result waits");
          @(negedge clk);
        end
        rsp_ack[k] = 1'b1;
        #1;
        check(!busy[k], "not busy in the acknowledge cycle");
        @(negedge clk);
        rsp_ack[k] = 1'b0;
        check(!rsp_valid[k], "result gone after acknowledge");
      end
    end
    // back-to-back: request in the acknowledge cycle
    @(negedge clk);
    req_valid[2] = 1'b1; req[2] = '{tag: 4'd1, fn: FN_MUL, a: 16'd3, b: 16'd5};
    @(negedge clk);
    req[2] = '{tag: 4'd2, fn: FN_MUL, a: 16'd0, b: 16'd0};
    rsp_ack[2] = 1'b1;
    check(rsp[2].r == 32'd15, "3*5");
    @(negedge clk);
    req_valid[2] = 1'b0;
    check(rsp_valid[2] && rsp[2].tag == 4'd2 && rsp[2].r == 32'd1, "2^16 * 2^16 = 1 taken back to back");
    @(negedge clk);
    rsp_ack[2] = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
