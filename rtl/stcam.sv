// stcam: Simplified TCAM, three ordinary CAMs with a whole-CAM wildcard.
//
// Instead of a ternary compare per bit, each of the three CAMs can be masked
// as a whole: a set `mask` bit makes that CAM match every valid entry. The
// three match vectors are ANDed, so an entry matches when every unmasked
// field equals its key. The three CAMs share the entry index, and writing or
// removing an entry acts on all three. Purely combinational from `key` and
// `mask`; the surrounding look-up engine registers them. Field widths are
// parameters; the SLUE uses two of these.
// The whole-CAM wildcard and the three-CAM grouping follow the published
// architecture; the requirement that all three words of an entry be valid is
// this design's choice.
module stcam #(
  parameter int unsigned W0    = 8,
  parameter int unsigned W1    = 16,
  parameter int unsigned W2    = 16,
  parameter int unsigned DEPTH = ppp_pkg::N_ENTRIES,
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [IW-1:0]    widx,
  input  logic [W0-1:0]    wdata0,
  input  logic [W1-1:0]    wdata1,
  input  logic [W2-1:0]    wdata2,
  input  logic             rm,
  input  logic [IW-1:0]    ridx,
  input  logic [W0-1:0]    key0,
  input  logic [W1-1:0]    key1,
  input  logic [W2-1:0]    key2,
  input  logic [2:0]       mask,
  output logic [DEPTH-1:0] match,
  output logic [DEPTH-1:0] valid
);
  logic [DEPTH-1:0] m0, m1, m2, v0, v1, v2;

  cam #(.WIDTH(W0), .DEPTH(DEPTH)) u_cam0 (
    .clk, .rst_n, .we, .widx, .wdata(wdata0), .rm, .ridx, .key(key0), .match(m0), .valid(v0));
  cam #(.WIDTH(W1), .DEPTH(DEPTH)) u_cam1 (
    .clk, .rst_n, .we, .widx, .wdata(wdata1), .rm, .ridx, .key(key1), .match(m1), .valid(v1));
  cam #(.WIDTH(W2), .DEPTH(DEPTH)) u_cam2 (
    .clk, .rst_n, .we, .widx, .wdata(wdata2), .rm, .ridx, .key(key2), .match(m2), .valid(v2));

  assign valid = v0 & v1 & v2;
  assign match = valid
               & (mask[0] ? '1 : m0)
               & (mask[1] ? '1 : m1)
               & (mask[2] ? '1 : m2);
endmodule
