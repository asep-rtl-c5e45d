// tb_asep_microcontroller: self-checking testbench of the instruction
// decoder and control unit.
//
// Random op-codes (known and unknown algorithm identifiers and actions,
// both values of the encode/decode flag) are sent, sometimes back to back.
// One cycle after each instruction the testbench compares the control lines
// of both algorithm modules, the buffer release and the error pulse with its
// own decoding of the op-code; buffer load must follow the instruction valid
// in the same cycle.
module tb_asep_microcontroller;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                     instr_valid;
  opcode_t                  op;
  ctrl_t [NUM_CORES-1:0]    ctrl;
  logic                     buf_load, buf_release, bad_instr;

  asep_microcontroller dut (.*);

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
    logic          v;
    opcode_t       o;
    ctrl_t [1:0]   want;
    logic          want_rel, want_bad;
    int            m;
    instr_valid = 1'b0; op = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    v = 1'b0; o = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // outputs for the instruction of the previous cycle
      want = '0; want_rel = 1'b0; want_bad = 1'b0;
      if (v) begin
        m = (o.alg == ALG_DES) ? 0 : (o.alg == ALG_IDEA) ? 1 : -1;
        if (m < 0 || !(o.action inside {ACT_READ, ACT_CLEAR, ACT_FLUSH}))
          want_bad = 1'b1;
        else begin
          want[m] = '{decode: o.decode, read: o.action == ACT_READ,
                      clear: o.action == ACT_CLEAR, flush: o.action == ACT_FLUSH};
          want_rel = (o.action != ACT_FLUSH);
        end
      end
      check(ctrl == want, $sformatf("control lines %h, expected %h (op %h)", ctrl, want, o));
      check(buf_release == want_rel, "buffer release");
      check(bad_instr == want_bad, "unknown instruction flag");
      // next instruction
      v = ($urandom_range(0, 2) != 0);
      o = opcode_t'($urandom);
      if ($urandom_range(0, 3) != 0) o.alg = ($urandom_range(0, 1) != 0) ? ALG_DES : ALG_IDEA;
      if ($urandom_range(0, 3) != 0) o.action = action_e'($urandom_range(1, 3));
      instr_valid = v;
      op = o;
      #1 check(buf_load == v, "buffer load with the instruction");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
