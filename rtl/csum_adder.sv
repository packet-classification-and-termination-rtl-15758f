// csum_adder: checksum calculation adder functional page.
//
// 16-bit ones-complement sum as used by the IPv4, TCP and UDP checksums.
// Each 32-bit word adds its two halves with end-around carry in one cycle.
// CSM_START sets the sum to the word presented with the command and keeps
// adding the following valid words: imm[7:0]-1 more of them, or up to the
// end of the packet if imm[7:0] is 0; with imm[8] set as well, the word
// that carries the end of packet is left out (it holds the Ethernet FCS when
// the payload ends on a word boundary). CSM_LOAD sets the sum to data[15:0]
// (a partial sum kept in the control memory across fragments) and
// CSM_ADD_HALF adds data[15:0] to it. `kill` stops the accumulation at once. `ok` is high when the sum is 0xFFFF,
// i.e. a block that includes its checksum field verifies. `sum` is
// registered. The ones-complement arithmetic is the protocols'; the
// commands are this implementation's.
// The ones-complement arithmetic is the protocols' own; the command set is
// this design's choice.
module csum_adder
  import ppp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  fp_cmd_t       cmd,
  input  logic          kill,     // stop at once (packet discarded)
  input  stream_word_t  din,
  output logic [15:0]   sum,
  output logic          ok,
  output logic          active
);
  logic [7:0] left;
  logic       skip_eop;    // leave out the end-of-packet word

  function automatic logic [15:0] oc_add(logic [15:0] a, logic [15:0] b);
    logic [16:0] t;
    t = {1'b0, a} + {1'b0, b};
    return t[15:0] + {15'd0, t[16]};
  endfunction

  wire start = cmd.valid && cmd.cmd == CSM_START;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum    <= '0;
      active <= 1'b0;
      left   <= '0;
      skip_eop <= 1'b0;
    end else if (kill) begin
      active <= 1'b0;
    end else if (start) begin
      sum    <= oc_add(din.data[31:16], din.data[15:0]);
      left   <= cmd.imm[7:0] - 8'd1;
      skip_eop <= cmd.imm[8];
      active <= (cmd.imm[7:0] != 8'd1) && !(cmd.imm[7:0] == 8'd0 && din.eop);
    end else if (cmd.valid && cmd.cmd == CSM_LOAD) begin
      sum    <= din.data[15:0];
      active <= 1'b0;
    end else if (cmd.valid && cmd.cmd == CSM_ADD_HALF) begin
      sum    <= oc_add(sum, din.data[15:0]);
      active <= 1'b0;
    end else if (active && din.valid && din.eop && skip_eop) begin
      active <= 1'b0;
    end else if (active && din.valid) begin
      sum  <= oc_add(sum, oc_add(din.data[31:16], din.data[15:0]));
      left <= left - 8'd1;
      if (left == 8'd1 || din.eop) active <= 1'b0;
    end
  end

  assign ok = (sum == 16'hFFFF);
endmodule
