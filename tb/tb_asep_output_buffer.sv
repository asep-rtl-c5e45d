// tb_asep_output_buffer: self-checking testbench of the output buffer and
// its round robin output scheduler.
//
// Two modeled algorithm modules offer result blocks as two 32-bit words,
// high word first, holding each word until the buffer enables it: module 0
// on tags 0..7, module 1 on tags 8..15, with random gaps. The host side
// takes words with a random ready. The testbench keeps a queue of blocks per
// tag and checks that every block leaves, whole, high word first, with its
// tag, in the order it was produced for that tag. It also checks that a word
// is not taken for a tag whose block is still full, that a stalled output
// word stays stable, and that several full blocks waited at once.
module tb_asep_output_buffer;
  import asep_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    [1:0] dout_req, dout_en;
  ioword_t [1:0] dout;
  logic          out_valid, out_ready;
  ioword_t       out_word;

  asep_output_buffer dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NB = 300;   // blocks per module

  // ---------------- module models
  logic [63:0] mblk [2][NB];
  int          mtag [2][NB];
  int          midx [2];
  logic        mhalf [2];
  logic        mgap [2];
  logic [63:0] expq [16][$];

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      dout_req[m] = (midx[m] < NB) && !mgap[m];
      dout[m].tag  = (midx[m] < NB) ? tag_t'(mtag[m][midx[m]]) : '0;
      dout[m].data = (midx[m] < NB) ? (mhalf[m] ? mblk[m][midx[m]][31:0] : mblk[m][midx[m]][63:32]) : '0;
    end
  end

  always_ff @(posedge clk) if (rst_n) begin
    for (int m = 0; m < 2; m++) begin
      if (dout_req[m] && dout_en[m]) begin
        if (mhalf[m]) begin
          expq[mtag[m][midx[m]]].push_back(mblk[m][midx[m]]);
          midx[m]  <= midx[m] + 1;
          mgap[m]  <= ($urandom_range(0, 2) == 0);
        end
        mhalf[m] <= !mhalf[m];
      end else if (mgap[m] && !mhalf[m]) begin
        mgap[m] <= ($urandom_range(0, 1) == 0);
      end
    end
  end

  // ---------------- host side
  int          recv = 0, n_multi = 0, n_stall = 0;
  logic        hhalf = 1'b0;
  logic [31:0] hhi;
  tag_t        htag;
  ioword_t     last_word;
  logic        last_stalled = 1'b0;
  always_ff @(posedge clk) if (rst_n) begin
    int nfull;
    nfull = 0;
    for (int t = 0; t < 16; t++) if (dut.full[t]) nfull++;
    if (nfull > 1) n_multi <= n_multi + 1;
    if (last_stalled) check(out_valid && out_word == last_word, "stalled word held stable");
    last_stalled <= out_valid && !out_ready;
    last_word    <= out_word;
    if (out_valid && !out_ready) n_stall <= n_stall + 1;
    for (int m = 0; m < 2; m++)
      if (dout_en[m]) check(dout_req[m], "enable only with a request");
    if (out_valid && out_ready) begin
      if (!hhalf) begin
        hhi  <= out_word.data;
        htag <= out_word.tag;
      end else begin
        check(out_word.tag == htag, "both words of a block carry one tag");
        if (expq[htag].size() == 0) check(1'b0, $sformatf("unexpected block for tag %0d", htag));
        else begin
          logic [63:0] e;
          e = expq[htag].pop_front();
          check({hhi, out_word.data} == e,
                $sformatf("tag %0d: block %h, expected %h", htag, {hhi, out_word.data}, e));
        end
        recv <= recv + 1;
      end
      hhalf <= !hhalf;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      midx[m] = 0; mhalf[m] = 1'b0; mgap[m] = 1'b0;
      for (int b = 0; b < NB; b++) begin
        mblk[m][b] = {$urandom, $urandom};
        mtag[m][b] = 8 * m + int'($urandom_range(0, 7));
      end
    end
    out_ready = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // let blocks pile up before the host starts reading
    repeat (40) @(negedge clk);
    while (recv < 2 * NB) begin
      @(negedge clk);
      out_ready = ($urandom_range(0, 3) != 0);
    end
    repeat (5) @(negedge clk);
    check(recv == 2 * NB, "every block delivered");
    for (int t = 0; t < 16; t++) check(expq[t].size() == 0, $sformatf("nothing left for tag %0d", t));
    check(!out_valid && dut.full == '0, "buffer empty at the end");
    check(n_multi > 0, "several full blocks waited at once");
    check(n_stall > 0, "host stalled the output");
    $display("blocks %0d, cycles with several full blocks %0d, stalled cycles %0d", recv, n_multi, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
