// slue: Secondary Look-Up Engine of the CMAA, the connection classifier.
//
// Two simplified TCAMs (stcam) of three CAMs each hold the connection keys:
// the first the internal type (8 bits) and the source and destination ports
// (16 bits each), the second the address fields (32 + 32 + 64 bits), N
// entries per CAM. A 6-bit mask makes whole fields wildcards, so one engine
// serves IPv4, IPv6 unicast, IPv6 multicast and UDP-only entries. Because the
// internal type is part of the key, software keeps entries unique and no
// priority logic is needed; the conversion logic picks the lowest matching
// index. The index addresses a result memory of N words of W bits holding
// the connection buffer's control memory address.
//
// Input registers: the key is loaded field by field (`ld_type`, `ld_word`
// with `ld_sel` 0 = ports {source, destination}, 1..4 = address words 0..3, word 0
// the least significant). Timing: `search` in cycle t (it may coincide with
// the last load, which is then included) latches `mask`; the compare is a
// multi-cycle path and `done`, `hit`, `index`, `result` are valid in cycle
// t+LAT. LAT = 3 is the design's choice for N = 64; 4 covers N up to 256.
module slue #(
  parameter int unsigned N   = ppp_pkg::N_ENTRIES,
  parameter int unsigned W   = ppp_pkg::CM_AW,
  parameter int unsigned LAT = ppp_pkg::SLUE_LAT,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input registers
  input  logic                 ld_type,
  input  logic [7:0]           type_in,
  input  logic                 ld_word,
  input  logic [2:0]           ld_sel,
  input  logic [31:0]          word_in,
  output ppp_pkg::conn_key_t   key_q,
  // search
  input  logic                 search,
  input  ppp_pkg::slue_mask_t  mask,
  output logic                 done,
  output logic                 hit,
  output logic [IW-1:0]        index,
  output logic [W-1:0]         result,
  // entry maintenance
  input  logic                 we,
  input  logic [IW-1:0]        widx,
  input  ppp_pkg::conn_key_t   wkey,
  input  logic [W-1:0]         wres,
  input  logic                 rm,
  input  logic [IW-1:0]        ridx,
  output logic [N-1:0]         valid
);
  import ppp_pkg::*;

  slue_mask_t mask_q;
  logic [N-1:0] match_a, match_b, valid_a, valid_b;
  logic [W-1:0] res_mem [N];
  logic [$clog2(LAT+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q  <= '0;
      mask_q <= '0;
      cnt    <= '0;
    end else begin
      if (ld_type) key_q.ptype <= type_in;
      if (ld_word) begin
        unique case (ld_sel)
          LR_PORTS: {key_q.sport, key_q.dport} <= word_in;
          LR_ADR0:  key_q.adr0              <= word_in;
          LR_ADR1:  key_q.adr1              <= word_in;
          LR_ADR2:  key_q.adr2[31:0]        <= word_in;
          LR_ADR3:  key_q.adr2[63:32]       <= word_in;
          default: ;
        endcase
      end
      if (search) begin
        mask_q <= mask;
        cnt    <= ($clog2(LAT+1))'(LAT);
      end else if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end
    end
  end
  assign done = (cnt == 1);

  stcam #(.W0(TYPE_W), .W1(PORT_W), .W2(PORT_W), .DEPTH(N)) u_stcam_a (
    .clk, .rst_n, .we, .widx,
    .wdata0(wkey.ptype), .wdata1(wkey.sport), .wdata2(wkey.dport),
    .rm, .ridx,
    .key0(key_q.ptype), .key1(key_q.sport), .key2(key_q.dport),
    .mask(mask_q[2:0]), .match(match_a), .valid(valid_a));

  stcam #(.W0(32), .W1(32), .W2(64), .DEPTH(N)) u_stcam_b (
    .clk, .rst_n, .we, .widx,
    .wdata0(wkey.adr0), .wdata1(wkey.adr1), .wdata2(wkey.adr2),
    .rm, .ridx,
    .key0(key_q.adr0), .key1(key_q.adr1), .key2(key_q.adr2),
    .mask(mask_q[5:3]), .match(match_b), .valid(valid_b));

  assign valid = valid_a & valid_b;

  always_ff @(posedge clk) begin
    if (we) res_mem[widx] <= wres;
  end

  always_comb begin
    logic [N-1:0] m;
    m     = match_a & match_b;
    hit   = 1'b0;
    index = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (m[i]) begin
        hit   = 1'b1;
        index = IW'(i);
      end
    end
  end
  assign result = res_mem[index];
endmodule
