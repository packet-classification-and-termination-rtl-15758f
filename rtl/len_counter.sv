// len_counter: length counting adder functional page.
//
// Keeps a byte count for reassembly: the length received so far is loaded
// from the packet buffer, this fragment's length is added, and the result
// goes to an XAC page for comparison with the total length and back to the
// control memory. Commands (registered, one per cycle):
//   LEN_LOAD     acc = data[15:0]
//   LEN_ADD_HI   acc += data[31:16]
//   LEN_ADD_LO   acc += data[15:0]
//   LEN_SUB_IMM  acc -= imm[14:0]   (e.g. remove a header length)
//   LEN_ADD_EXT  acc += ext         (another page's count)
//   LEN_CLEAR    acc = 0
// The count is LW bits and wraps. The role is the architecture's; the
// command set and width are this implementation's.
module len_counter
  import ppp_pkg::*;
#(
  parameter int unsigned LW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fp_cmd_t       cmd,
  input  logic [31:0]   data,
  input  logic [LW-1:0] ext,
  output logic [LW-1:0] acc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else if (cmd.valid) begin
      unique case (cmd.cmd)
        LEN_LOAD:    acc <= LW'(data[15:0]);
        LEN_ADD_HI:  acc <= acc + LW'(data[31:16]);
        LEN_ADD_LO:  acc <= acc + LW'(data[15:0]);
        LEN_SUB_IMM: acc <= acc - LW'(cmd.imm[14:0]);
        LEN_ADD_EXT: acc <= acc + ext;
        LEN_CLEAR:   acc <= '0;
        default: ;
      endcase
    end
  end
endmodule
