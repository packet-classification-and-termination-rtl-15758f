// mem_buffer_gen: buffer pointer generator of the CMAA.
//
// Hands out control memory addresses for new buffers in three regions:
// packet (reassembly) buffers, connection buffers and control-protocol packet
// buffers. The micro controller configures each region with a base address,
// a limit and a buffer size (stride); configuring a region also resets its
// pointer to the base. `addr[r]` is the address the next buffer of region r
// will get. An `advance[r]` pulse consumes it: the pointer moves on by one
// stride, wrapping to the base when the next buffer would pass the limit.
// The generator does not track which buffers are still in use; the micro
// controller reconfigures a region to reclaim it. Region sizes and the
// wrap rule are this implementation's choice.
module mem_buffer_gen #(
  parameter int unsigned W = ppp_pkg::CM_AW,
  parameter int unsigned R = ppp_pkg::N_REGIONS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [1:0]           cfg_region,
  input  logic [W-1:0]         cfg_base,
  input  logic [W-1:0]         cfg_limit,    // last usable address of the region
  input  logic [W-1:0]         cfg_stride,
  input  logic [R-1:0]         advance,
  output logic [R-1:0][W-1:0]  addr
);
  logic [R-1:0][W-1:0] base, limit, stride;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base   <= '0;
      limit  <= '0;
      stride <= '0;
      addr   <= '0;
    end else begin
      for (int r = 0; r < R; r++) begin
        if (cfg_we && cfg_region == 2'(r)) begin
          base[r]   <= cfg_base;
          limit[r]  <= cfg_limit;
          stride[r] <= cfg_stride;
          addr[r]   <= cfg_base;
        end else if (advance[r]) begin
          // next buffer occupies [addr+stride, addr+2*stride-1]
          if ({1'b0, addr[r]} + 2 * {1'b0, stride[r]} - 1 > {1'b0, limit[r]})
            addr[r] <= base[r];
          else
            addr[r] <= addr[r] + stride[r];
        end
      end
    end
  end
endmodule
