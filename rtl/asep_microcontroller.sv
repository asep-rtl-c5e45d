// asep_microcontroller: instruction decoder and control unit of the ASEP
// interface.
//
// Each cycle it can take one 44-bit instruction. The op-code and tag go to
// the decoder, and the tag and data go to the input buffer, which it tells
// to load. In the next cycle the decoded action reaches the algorithm module
// named by the algorithm identifier, as a one-cycle pulse on that module's
// 4-bit control lines {decode, read, clear, flush}. For READ and CLEAR the
// microcontroller also releases the buffered tag and data onto the system
// I/O bus, so the module sees the tag (and for READ the data) in the same
// cycle. For FLUSH only the control pulse is sent. An instruction with an
// unknown algorithm identifier or action is dropped and raises bad_instr
// for one cycle.
//
// The document gives the op-code fields (algorithm identifier, action, and
// encode/decode flag) and the CLEAR, FLUSH and READ actions with their
// meaning. It also gives one-cycle control signals and a buffer released by
// the microcontroller. This design chose the numeric codes (asep_pkg), the
// tag release on CLEAR and the error pulse.
//
// Interface: instr_valid, op (the op-code field) in, always ready; ctrl[NMOD] out, buf_load
// and buf_release to the input buffer, bad_instr out.
module asep_microcontroller
  import asep_pkg::*;
#(
  parameter int unsigned NMOD = NUM_CORES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            instr_valid,
  input  opcode_t         op,
  output ctrl_t [NMOD-1:0] ctrl,
  output logic            buf_load,
  output logic            buf_release,
  output logic            bad_instr
);

  // module number of an algorithm identifier, NMOD when there is none
  function automatic int unsigned mod_of(input alg_e a);
    unique case (a)
      ALG_DES:  return 0;
      ALG_IDEA: return 1;
      default:  return NMOD;
    endcase
  endfunction

  logic known_act, known_alg;
  assign known_act = op.action inside {ACT_CLEAR, ACT_FLUSH, ACT_READ};
  assign known_alg = mod_of(op.alg) < NMOD;

  assign buf_load = instr_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl        <= '0;
      buf_release <= 1'b0;
      bad_instr   <= 1'b0;
    end else begin
      ctrl        <= '0;
      buf_release <= 1'b0;
      bad_instr   <= 1'b0;
      if (instr_valid) begin
        if (known_act && known_alg) begin
          for (int unsigned m = 0; m < NMOD; m++) begin
            if (m == mod_of(op.alg)) begin
              ctrl[m].decode <= op.decode;
              ctrl[m].read   <= (op.action == ACT_READ);
              ctrl[m].clear  <= (op.action == ACT_CLEAR);
              ctrl[m].flush  <= (op.action == ACT_FLUSH);
            end
          end
          buf_release <= (op.action != ACT_FLUSH);
        end else begin
          bad_instr <= 1'b1;
        end
      end
    end
  end

endmodule
