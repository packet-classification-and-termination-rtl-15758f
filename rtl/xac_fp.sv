// xac_fp: eXtract And Compare functional page.
//
// Checks address and port numbers against the values of this host, and
// compares lengths and checksums. The micro controller configures a
// reference word, a field mask and a right shift. Commands, acting on the
// data word presented with the command:
//   XAC_CMP_REF  match = (data & mask) == (ref & mask), value = field
//   XAC_CMP_EXT  match = (data == ext), whole word, value = field
//   XAC_EXTRACT  value = field only
// where field = (data & mask) >> shift. Results are registered: `match`,
// `value` and a `done` pulse appear the cycle after the command and hold
// until the next one. The function is the architecture's; the three
// commands and the mask/shift configuration are this implementation's.
module xac_fp
  import ppp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [31:0] cfg_ref,
  input  logic [31:0] cfg_mask,
  input  logic [4:0]  cfg_shift,
  input  fp_cmd_t     cmd,
  input  logic [31:0] data,
  input  logic [31:0] ext,
  output logic        match,
  output logic [31:0] value,
  output logic        done
);
  logic [31:0] ref_q, mask_q;
  logic [4:0]  shift_q;
  wire  [31:0] field = (data & mask_q) >> shift_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q   <= '0;
      mask_q  <= '1;
      shift_q <= '0;
      match   <= 1'b0;
      value   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cfg_we) begin
        ref_q   <= cfg_ref;
        mask_q  <= cfg_mask;
        shift_q <= cfg_shift;
      end
      if (cmd.valid) begin
        unique case (cmd.cmd)
          XAC_CMP_REF: begin
            match <= ((data ^ ref_q) & mask_q) == '0;
            value <= field;
            done  <= 1'b1;
          end
          XAC_CMP_EXT: begin
            match <= (data == ext);
            value <= field;
            done  <= 1'b1;
          end
          XAC_EXTRACT: begin
            value <= field;
            done  <= 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
