// input_buffer_chain: the PPP's input buffer, a chain of 32-bit registers.
//
// Packet words from the network interface shift one stage per clock through
// DEPTH flip-flop stages; every stage is visible (`stage`), so functional
// pages and the CMAA can pick up a word a fixed number of cycles after it
// arrived, and the fan-out of each register stays small. The word leaving
// the last stage (`dout`) goes on to memory, tagged with the packet
// decision, which must therefore be taken within DEPTH cycles of the first
// word. Words of one packet are assumed to arrive back to back. The 32-bit
// flip-flop chain is the architecture's; DEPTH = 32 is this
// implementation's choice, sized for its decision latency.
module input_buffer_chain
  import ppp_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  stream_word_t  din,
  output stream_word_t  stage [DEPTH],
  output stream_word_t  dout
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end
  assign dout = stage[DEPTH-1];
endmodule
