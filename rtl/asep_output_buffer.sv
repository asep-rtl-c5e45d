// asep_output_buffer: the ASEP output interface, one 64-bit block buffer per
// session and a round robin output scheduler.
//
// Several sessions can finish in the same cycle, so results are buffered.
// Because a session never has more than one block pending, 16 block buffers
// (one per tag) hold all pending results. On the module side, each
// algorithm module raises dout_req while it offers a 36-bit {tag, data}
// word. Every cycle one module, in round robin order, is granted dout_en,
// if the block buffer of its tag is not already full. Its word is stored:
// the first word of a block as the high half, the second as the low half,
// and the block is then complete. On the external side, a round robin
// scheduler picks a complete block and sends it as two 36-bit words
// {tag, data}, high half first, with out_valid/out_ready. The buffer is
// free again once the low half is taken.
//
// From the document: the 16 per-session buffers, the round robin
// scheduler and the 36-bit tag-plus-data output. The grant among modules,
// the word order and the valid/ready handshake are this design's choices.
//
// Timing: a word offered by a module is stored at the next edge (when
// granted). A complete block can be selected in the following cycle and
// its first word is offered the cycle after that.
module asep_output_buffer
  import asep_pkg::*;
#(
  parameter int unsigned NMOD  = NUM_CORES,
  parameter int unsigned NSESS = NUM_SESSIONS
) (
  input  logic                clk,
  input  logic                rst_n,
  // algorithm module side
  input  logic    [NMOD-1:0]  dout_req,
  input  ioword_t [NMOD-1:0]  dout,
  output logic    [NMOD-1:0]  dout_en,
  // external side
  output logic                out_valid,
  input  logic                out_ready,
  output ioword_t             out_word
);

  localparam int unsigned MI = (NMOD > 1) ? $clog2(NMOD) : 1;
  localparam int unsigned SI = (NSESS > 1) ? $clog2(NSESS) : 1;

  logic [63:0]      blk    [NSESS];
  logic [NSESS-1:0] have_hi;
  logic [NSESS-1:0] full;

  // ---------------- module side
  logic [NMOD-1:0] can;
  logic            m_valid;
  logic [MI-1:0]   m_idx;
  logic [SI-1:0]   m_tag;

  always_comb begin
    for (int i = 0; i < NMOD; i++)
      can[i] = dout_req[i] && (int'(dout[i].tag) < int'(NSESS)) && !full[SI'(dout[i].tag)];
  end

  asep_rr_arbiter #(.N(NMOD), .IDX(MI)) u_mod_rr (
    .clk, .rst_n, .req(can), .take(1'b1), .gnt_valid(m_valid), .gnt_idx(m_idx));

  always_comb begin
    dout_en = '0;
    if (m_valid) dout_en[m_idx] = 1'b1;
  end
  assign m_tag = SI'(dout[m_idx].tag);

  // ---------------- external side
  logic          o_busy, o_half;
  logic [SI-1:0] o_tag;
  logic          s_valid;
  logic [SI-1:0] s_idx;

  asep_rr_arbiter #(.N(NSESS), .IDX(SI)) u_out_rr (
    .clk, .rst_n, .req(full), .take(!o_busy), .gnt_valid(s_valid), .gnt_idx(s_idx));

  assign out_valid     = o_busy;
  assign out_word.tag  = tag_t'(o_tag);
  assign out_word.data = o_half ? blk[o_tag][31:0] : blk[o_tag][63:32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSESS; s++) blk[s] <= '0;
      have_hi <= '0;
      full    <= '0;
      o_busy  <= 1'b0;
      o_half  <= 1'b0;
      o_tag   <= '0;
    end else begin
      if (m_valid) begin
        if (!have_hi[m_tag]) begin
          blk[m_tag][63:32] <= dout[m_idx].data;
          have_hi[m_tag]    <= 1'b1;
        end else begin
          blk[m_tag][31:0]  <= dout[m_idx].data;
          have_hi[m_tag]    <= 1'b0;
          full[m_tag]       <= 1'b1;
        end
      end
      if (!o_busy && s_valid) begin
        o_busy <= 1'b1;
        o_half <= 1'b0;
        o_tag  <= s_idx;
      end else if (o_busy && out_ready) begin
        if (o_half) begin
          o_busy      <= 1'b0;
          full[o_tag] <= 1'b0;
        end
        o_half <= !o_half;
      end
    end
  end

`ifndef SYNTHESIS
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_word))
    else $error("asep_output_buffer: output word changed before it was taken");
`endif

endmodule
