// plue: Primary Look-Up Engine of the CMAA.
//
// One CAM of M 16-bit entries holding the IP identification numbers of the
// packets being reassembled, and a result memory of M words of W bits
// holding the control memory address of each packet buffer.
//
// Timing: `search` loads `key` into the input register in cycle t. The
// compare and the match-vector-to-index conversion are a multi-cycle path of
// LAT cycles; `done` is high in cycle t+LAT, and `hit`, `index` and `result`
// are valid in that cycle (they stay valid until the next search or write).
// The architecture gives the PLUE 2 cycles per search. Writing and removing
// entries by index takes one cycle. Without priority logic, the lowest
// matching index wins if several entries match (the CMAA never writes the
// same identification twice).
module plue #(
  parameter int unsigned M   = ppp_pkg::M_ENTRIES,
  parameter int unsigned W   = ppp_pkg::CM_AW,
  parameter int unsigned LAT = ppp_pkg::PLUE_LAT,
  localparam int unsigned IW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          search,
  input  logic [15:0]   key,
  output logic          done,
  output logic          hit,
  output logic [IW-1:0] index,
  output logic [W-1:0]  result,
  input  logic          we,
  input  logic [IW-1:0] widx,
  input  logic [15:0]   wkey,
  input  logic [W-1:0]  wres,
  input  logic          rm,
  input  logic [IW-1:0] ridx,
  output logic [M-1:0]  valid
);
  logic [15:0]   key_q;
  logic [M-1:0]  match;
  logic [W-1:0]  res_mem [M];
  logic [$clog2(LAT+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q <= '0;
      cnt   <= '0;
    end else begin
      if (search) begin
        key_q <= key;
        cnt   <= ($clog2(LAT+1))'(LAT);
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end
    end
  end
  assign done = (cnt == 1);

  always_ff @(posedge clk) begin
    if (we) res_mem[widx] <= wres;
  end

  cam #(.WIDTH(16), .DEPTH(M)) u_cam (
    .clk, .rst_n, .we, .widx, .wdata(wkey), .rm, .ridx,
    .key(key_q), .match, .valid
  );

  // match vector -> result memory address
  always_comb begin
    hit   = 1'b0;
    index = '0;
    for (int i = M - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit   = 1'b1;
        index = IW'(i);
      end
    end
  end
  assign result = res_mem[index];

endmodule
