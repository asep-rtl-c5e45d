// asep_input_buffer: the input buffer of the ASEP input interface.
//
// The tag and data part of every incoming instruction is written into this
// one-entry buffer when the microcontroller asks for it (load). In the next
// cycle, when the microcontroller signals release, the buffer drives the
// stored {tag, data} word onto the system I/O bus; otherwise the bus is
// held at zero. A later load may overwrite the buffer in the same cycle it is
// released, so one instruction per cycle flows through. The routing of tag
// and data into a buffer run by the microcontroller follows the document;
// the one-entry depth and the load/release timing are this design's choice.
//
// Interface: load, tag, data in; release in; bus (36 bits) out. Latency: one cycle from load to bus.
module asep_input_buffer
  import asep_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  tag_t              tag,
  input  logic [DATA_W-1:0] data,
  input  logic              release_i,
  output ioword_t           bus
);

  ioword_t held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      held <= '0;
    else if (load)
      held <= '{tag: tag, data: data};
  end

  assign bus = release_i ? held : '0;

endmodule
