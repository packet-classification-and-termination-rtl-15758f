// crc_fp: CRC functional page, Ethernet CRC-32 over 32-bit words.
//
// Computes the IEEE 802.3 CRC-32 (reflected polynomial 0xEDB88320, register
// preset to all ones) on the streaming packet, 4 bytes per cycle. A
// CRC_START command restarts the register with the word presented in that
// cycle; the page then takes every valid word until the word marked end of
// packet, and stops by itself. Only bytes whose `be` bit is set are used
// (be[3] is data[31:24], the first byte on the wire). When the frame
// including its FCS has passed, `crc_ok` is high if the register holds the
// CRC-32 residue 0xDEBB20E3; `crc` is the inverted register, the CRC of the
// bytes seen so far. `done` pulses after the last word. The algorithm is
// the Ethernet standard's; the command interface is this implementation's.
module crc_fp
  import ppp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  fp_cmd_t       cmd,
  input  logic          kill,     // stop at once (packet discarded)
  input  stream_word_t  din,
  output logic [31:0]   crc,
  output logic          crc_ok,
  output logic          done,
  output logic          active
);
  logic [31:0] r;

  function automatic logic [31:0] crc_bytes(logic [31:0] c, logic [31:0] d, logic [3:0] be);
    for (int b = 3; b >= 0; b--) begin
      if (be[b]) begin
        c = c ^ {24'd0, d[8*b +: 8]};
        for (int k = 0; k < 8; k++) c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
      end
    end
    return c;
  endfunction

  wire start = cmd.valid && cmd.cmd == CRC_START;
  wire take  = din.valid && (start || active);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r      <= '1;
      active <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (kill) begin
        active <= 1'b0;
      end else if (take) begin
        r <= crc_bytes(start ? 32'hFFFF_FFFF : r, din.data, din.be);
        if (din.eop) begin
          active <= 1'b0;
          done   <= 1'b1;
        end else begin
          active <= 1'b1;
        end
      end
    end
  end

  assign crc    = ~r;
  assign crc_ok = (r == 32'hDEBB_20E3);
endmodule
