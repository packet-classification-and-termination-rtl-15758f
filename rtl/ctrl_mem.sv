// ctrl_mem: the shared control memory.
//
// Single-port synchronous RAM of 2**W words of 32 bits holding packet
// buffers, connection buffers and the control-protocol packets handled in
// micro controller software. One access per cycle; a read returns its word
// in the next cycle on `rdata` (data bus 2). The 32-bit word width and the
// single port are this implementation's choice; W = 20 follows the
// architecture's control memory address width.
module ctrl_mem #(
  parameter int unsigned W = ppp_pkg::CM_AW
) (
  input  logic         clk,
  input  logic         en,
  input  logic         we,
  input  logic [W-1:0] addr,
  input  logic [31:0]  wdata,
  output logic [31:0]  rdata
);
  logic [31:0] mem [2**W];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
