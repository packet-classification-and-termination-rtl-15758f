// mem_access_sel: control memory access selector of the CMAA.
//
// Merges the accelerator side (the CMAA itself and the PPP accessing its
// packet and connection buffers) and the micro controller onto the single
// port of the control memory. The accelerator side always wins. The micro
// controller is granted the port only when `uc_allow` is high, which the
// CMAA drives in its wait-for-new-packet and update states, and the
// accelerator side is idle. A granted micro controller request is served in
// that cycle (`uc_gnt`); reads return one cycle later with `*_rvalid`.
// The PPP priority and the wait/update-only access for the micro controller
// follow the published architecture; the one-cycle read timing is this
// design's choice.
module mem_access_sel #(
  parameter int unsigned W = ppp_pkg::CM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          uc_allow,
  // accelerator side
  input  logic          a_req,
  input  logic          a_we,
  input  logic [W-1:0]  a_addr,
  input  logic [31:0]   a_wdata,
  output logic          a_rvalid,
  // micro controller
  input  logic          uc_req,
  input  logic          uc_we,
  input  logic [W-1:0]  uc_addr,
  input  logic [31:0]   uc_wdata,
  output logic          uc_gnt,
  output logic          uc_rvalid,
  // memory port
  output logic          m_en,
  output logic          m_we,
  output logic [W-1:0]  m_addr,
  output logic [31:0]   m_wdata
);
  assign uc_gnt  = uc_req && uc_allow && !a_req;
  assign m_en    = a_req || uc_gnt;
  assign m_we    = a_req ? a_we    : uc_we;
  assign m_addr  = a_req ? a_addr  : uc_addr;
  assign m_wdata = a_req ? a_wdata : uc_wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_rvalid  <= 1'b0;
      uc_rvalid <= 1'b0;
    end else begin
      a_rvalid  <= a_req && !a_we;
      uc_rvalid <= uc_gnt && !uc_we;
    end
  end
endmodule
