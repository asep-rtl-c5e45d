// tb_asep_rr_arbiter: self-checking testbench of the round robin counter.
//
// A 16-way arbiter is driven with random request vectors and a random take
// signal. The testbench keeps its own pointer: the grant must be the first
// requester at or after the pointer (wrapping), and after a taken grant the
// pointer moves to the slot after the winner. It also checks fairness: with
// all sixteen requesting and every grant taken, each slot wins exactly once
// in sixteen cycles, in order.
module tb_asep_rr_arbiter;
  localparam int unsigned N = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req;
  logic         take, gnt_valid;
  logic [3:0]   gnt_idx;

  asep_rr_arbiter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ptr, want;
    req = '0; take = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ptr = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      case (n % 4)
        0: req = N'($urandom);
        1: req = N'(1) << $urandom_range(0, N - 1);
        2: req = (n % 40 == 2) ? '0 : N'($urandom) & N'($urandom);
        default: req = N'($urandom) | N'($urandom);
      endcase
      take = ($urandom_range(0, 3) != 0);
      #1;
      want = -1;
      for (int i = 0; i < N; i++)
        if (want < 0 && req[(ptr + i) % N]) want = (ptr + i) % N;
      check(gnt_valid == (want >= 0), "grant valid when any request");
      if (want >= 0)
        check(int'(gnt_idx) == want, $sformatf("grant %0d, expected %0d (pointer %0d)", gnt_idx, want, ptr));
      if (take && want >= 0) ptr = (want + 1) % N;
    end
    // fairness: all request, every grant taken
    @(negedge clk);
    req = '1; take = 1'b1;
    #1;
    want = int'(gnt_idx);
    for (int i = 0; i < N; i++) begin
      check(int'(gnt_idx) == (want + i) % N, "all requesting: grants in turn");
      @(negedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
