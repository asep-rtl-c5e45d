// tb_asep_input_buffer: self-checking testbench of the interface unit's
// input buffer.
//
// Random tag and data words are loaded and released with random gaps. The
// bus must carry the last loaded word exactly while release is high and be
// zero otherwise, and a word must stay held across cycles without load.
module tb_asep_input_buffer;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              load, release_i;
  tag_t              tag;
  logic [DATA_W-1:0] data;
  ioword_t           bus;

  asep_input_buffer dut (.*);

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
    ioword_t model;
    load = 1'b0; release_i = 1'b0; tag = '0; data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = '0;
    release_i = 1'b1;
    #1 check(bus == '0, "empty after reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load      = ($urandom_range(0, 2) == 0);
      tag       = tag_t'($urandom);
      data      = $urandom;
      release_i = ($urandom_range(0, 1) == 0);
      #1;
      check(bus == (release_i ? model : '0),
            $sformatf("bus %h, expected %h (release %0b)", bus, release_i ? model : '0, release_i));
      if (load) model = '{tag: tag, data: data};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
