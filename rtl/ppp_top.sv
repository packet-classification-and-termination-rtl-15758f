// ppp_top: programmable protocol processor (PPP) for packet reception.
//
// Received packet words enter a 32-bit register chain (input_buffer_chain).
// While they stream through it, the Counter and Controller (cc_ctrl) runs a
// program that starts functional pages at the right cycle: a CRC page, two
// extract-and-compare (XAC) pages, two length counters, two checksum adders
// and a generic adder. The Control Memory Access Accelerator (cmaa)
// recognises fragments and connections in its look-up engines and gives the
// program access to the packet's reassembly buffer and connection buffer in
// the shared control memory (ctrl_mem). The program ends with a decision -
// discard, payload to host memory, or payload to control memory - that tags
// the packet when it leaves the chain (`dout`, `dout_dec`). The micro
// controller is outside: it loads the program and the page configuration,
// enters connections, is told about each released packet and reads and
// writes the control memory when the CMAA lets it.
//
// Wiring choices of this implementation: each page reads the chain stage
// named by its last command (or data bus 2, the last control memory read,
// when imm[15] of the command is set); XAC page 1 is the header-flag
// extractor whose value gives the fragment flags (bit 13 more-fragments,
// bits 12:0 offset); the generic adder adds offset*8 to length counter 1;
// decisions are queued (2 entries) and one is taken per packet leaving the
// chain - `late_decision` flags a packet whose decision was not yet taken.
// Flag 0 is the constant 0 (so a four-way jump can test a single flag, or
// none), which is why that bit of `flags` never moves.
module ppp_top
  import ppp_pkg::*;
#(
  parameter int unsigned DEPTH    = 32,
  parameter int unsigned PM_DEPTH = 128,
  parameter int unsigned M        = M_ENTRIES,
  parameter int unsigned N        = N_ENTRIES,
  parameter int unsigned W        = CM_AW,
  localparam int unsigned PW  = $clog2(PM_DEPTH),
  localparam int unsigned NIW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned MIW = (M > 1) ? $clog2(M) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // network interface
  input  stream_word_t       din,
  // towards memory
  output stream_word_t       dout,
  output decision_e          dout_dec,
  output logic               dec_valid,
  output decision_e          dec,
  output logic               late_decision,
  output logic               overrun,
  // micro controller: program and page configuration
  input  logic               pm_we,
  input  logic [PW-1:0]      pm_addr,
  input  cc_instr_t          pm_wdata,
  input  logic [1:0]         xac_cfg_we,
  input  logic [31:0]        xac_cfg_ref,
  input  logic [31:0]        xac_cfg_mask,
  input  logic [4:0]         xac_cfg_shift,
  // micro controller: CMAA
  output logic               uc_new_packet,
  output logic [W-1:0]       uc_pkt_addr,
  output logic [W-1:0]       uc_conn_addr,
  output logic [7:0]         uc_ptype,
  input  logic               uc_req,
  input  logic               uc_we,
  input  logic [W-1:0]       uc_addr,
  input  logic [31:0]        uc_wdata,
  output logic               uc_gnt,
  output logic               uc_rvalid,
  output logic [31:0]        uc_rdata,
  input  logic               uc_buf_cfg_we,
  input  logic [1:0]         uc_buf_region,
  input  logic [W-1:0]       uc_buf_base,
  input  logic [W-1:0]       uc_buf_limit,
  input  logic [W-1:0]       uc_buf_stride,
  input  logic               uc_mask_we,
  input  logic [3:0]         uc_mask_type,
  input  slue_mask_t         uc_mask,
  input  logic               uc_slue_we,
  input  conn_key_t          uc_slue_key,
  input  logic [W-1:0]       uc_slue_res,
  input  logic               uc_slue_rm,
  input  logic [NIW-1:0]     uc_slue_idx,
  output logic               plue_full,
  output logic               slue_full,
  output logic [MIW-1:0]     plue_waddr,   // where the next PLUE entry goes
  output logic [NIW-1:0]     slue_waddr,   // where uc_slue_we writes
  // status
  output cmaa_state_e        cmaa_state,
  output logic               cmaa_busy,
  output logic               cc_running,
  output logic               cmaa_discard,
  output logic               packet_ready,
  output logic               plue_hit,
  output logic               slue_hit,
  output logic [N_FLAGS-1:0] flags,
  output logic [31:0]        frame_crc
);
  stream_word_t stage [DEPTH];

  // C&C
  fp_cmd_t          fp_cmd [N_FP];
  logic [TAP_W-1:0] fp_tap, cmaa_tap;
  logic             fp_stop_all;
  cmaa_instr_t      cmaa_instr;
  logic             mem_req, mem_we, mem_buf;
  logic [7:0]       mem_ofs;
  logic [2:0]       mem_src;
  logic [7:0]       wcnt;

  // pages
  logic [TAP_W-1:0] tap_q [N_FP];
  stream_word_t     fp_din [N_FP];
  logic [31:0]      crc;
  logic             crc_ok, crc_done, crc_active;
  logic             xac0_match, xac1_match, xac0_done, xac1_done;
  logic [31:0]      xac0_value, xac1_value;
  logic [15:0]      len0, len1;
  logic [15:0]      csum0, csum1;
  logic             csum0_ok, csum1_ok, csum0_active, csum1_active;
  logic [31:0]      gadd_res;
  logic             gadd_carry;

  // CMAA / memory
  logic             ppp_rvalid, discard_seen;
  logic             m_en, m_we;
  logic [W-1:0]     m_addr;
  logic [31:0]      m_wdata, m_rdata, bus2_q;
  logic [31:0]      wb_data;

  input_buffer_chain #(.DEPTH(DEPTH)) u_chain (.clk, .rst_n, .din, .stage, .dout);

  cc_ctrl #(.PM_DEPTH(PM_DEPTH)) u_cc (
    .clk, .rst_n, .pm_we, .pm_addr, .pm_wdata, .s0(stage[0]), .flags,
    .fp_cmd, .fp_tap, .fp_stop_all, .cmaa_instr, .cmaa_tap,
    .mem_req, .mem_we, .mem_buf, .mem_ofs, .mem_src,
    .dec_valid, .dec, .running(cc_running), .overrun, .wcnt);

  // page data: the tap of the current command, else the page's last tap;
  // data bus 2 when the command asks for it
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_FP; p++) tap_q[p] <= '0;
    end else begin
      for (int p = 0; p < N_FP; p++) if (fp_cmd[p].valid) tap_q[p] <= fp_tap;
    end
  end
  always_comb begin
    for (int p = 0; p < N_FP; p++) begin
      fp_din[p] = stage[fp_cmd[p].valid ? fp_tap : tap_q[p]];
      if (fp_cmd[p].valid && fp_cmd[p].imm[IMM_BUS2])
        fp_din[p] = '{valid: 1'b1, sop: 1'b0, eop: 1'b0, be: 4'hF, data: bus2_q};
    end
  end

  crc_fp u_crc (.clk, .rst_n, .cmd(fp_cmd[FP_CRC]), .kill(fp_stop_all),
    .din(fp_din[FP_CRC]), .crc, .crc_ok, .done(crc_done), .active(crc_active));

  xac_fp u_xac0 (.clk, .rst_n, .cfg_we(xac_cfg_we[0]), .cfg_ref(xac_cfg_ref),
    .cfg_mask(xac_cfg_mask), .cfg_shift(xac_cfg_shift), .cmd(fp_cmd[FP_XAC0]),
    .data(fp_din[FP_XAC0].data), .ext({16'd0, len0}),
    .match(xac0_match), .value(xac0_value), .done(xac0_done));

  xac_fp u_xac1 (.clk, .rst_n, .cfg_we(xac_cfg_we[1]), .cfg_ref(xac_cfg_ref),
    .cfg_mask(xac_cfg_mask), .cfg_shift(xac_cfg_shift), .cmd(fp_cmd[FP_XAC1]),
    .data(fp_din[FP_XAC1].data), .ext({16'd0, len1}),
    .match(xac1_match), .value(xac1_value), .done(xac1_done));

  len_counter #(.LW(16)) u_len0 (.clk, .rst_n, .cmd(fp_cmd[FP_LEN0]),
    .data(fp_din[FP_LEN0].data), .ext(len1), .acc(len0));
  len_counter #(.LW(16)) u_len1 (.clk, .rst_n, .cmd(fp_cmd[FP_LEN1]),
    .data(fp_din[FP_LEN1].data), .ext(len0), .acc(len1));

  csum_adder u_csum0 (.clk, .rst_n, .cmd(fp_cmd[FP_CSM0]), .kill(fp_stop_all),
    .din(fp_din[FP_CSM0]), .sum(csum0), .ok(csum0_ok), .active(csum0_active));
  csum_adder u_csum1 (.clk, .rst_n, .cmd(fp_cmd[FP_CSM1]), .kill(fp_stop_all),
    .din(fp_din[FP_CSM1]), .sum(csum1), .ok(csum1_ok), .active(csum1_active));

  generic_adder u_gadd (.clk, .rst_n, .cmd(fp_cmd[FP_GADD]),
    .a({16'd0, xac1_value[12:0], 3'd0}), .b({16'd0, len1}),
    .result(gadd_res), .carry(gadd_carry));

  // write-back source for OP_MEMWR (data bus 1)
  always_comb begin
    unique case (mem_src)
      3'd0: wb_data = {16'd0, len0};
      3'd1: wb_data = {16'd0, len1};
      3'd2: wb_data = {16'd0, csum0};
      3'd3: wb_data = {16'd0, csum1};
      3'd4: wb_data = gadd_res;
      3'd5: wb_data = xac0_value;
      3'd6: wb_data = xac1_value;
      default: wb_data = '0;
    endcase
  end

  cmaa #(.M(M), .N(N), .W(W)) u_cmaa (
    .clk, .rst_n, .instr(cmaa_instr), .data_in(stage[cmaa_tap].data),
    .busy(cmaa_busy), .packet_ready, .discard(cmaa_discard), .plue_hit, .slue_hit,
    .state_o(cmaa_state),
    .ppp_req(mem_req), .ppp_we(mem_we), .ppp_buf(mem_buf), .ppp_ofs(mem_ofs),
    .ppp_wdata(wb_data), .ppp_rvalid,
    .m_en, .m_we, .m_addr, .m_wdata,
    .uc_new_packet, .uc_pkt_addr, .uc_conn_addr, .uc_ptype,
    .uc_req, .uc_we, .uc_addr, .uc_wdata, .uc_gnt, .uc_rvalid,
    .uc_buf_cfg_we, .uc_buf_region, .uc_buf_base, .uc_buf_limit, .uc_buf_stride,
    .uc_mask_we, .uc_mask_type, .uc_mask,
    .uc_slue_we, .uc_slue_key, .uc_slue_res, .uc_slue_rm, .uc_slue_idx,
    .plue_full, .slue_full, .plue_waddr, .slue_waddr);

  ctrl_mem #(.W(W)) u_cmem (.clk, .en(m_en), .we(m_we), .addr(m_addr),
    .wdata(m_wdata), .rdata(m_rdata));
  assign uc_rdata  = m_rdata;
  assign frame_crc = crc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus2_q       <= '0;
      discard_seen <= 1'b0;
    end else begin
      if (ppp_rvalid) bus2_q <= m_rdata;
      if (cmaa_instr.op == CI_NEW_PACKET) discard_seen <= 1'b0;
      else if (cmaa_discard)              discard_seen <= 1'b1;
    end
  end

  // result flags for the jump decision block
  always_comb begin
    flags               = '0;
    flags[FLG_CSM1_DONE] = !csum1_active;
    flags[FLG_CRC_OK]   = crc_ok;
    flags[FLG_XAC0]     = xac0_match;
    flags[FLG_XAC1]     = xac1_match;
    flags[FLG_CSM0_OK]  = csum0_ok;
    flags[FLG_CSM1_OK]  = csum1_ok;
    flags[FLG_READY]    = packet_ready;
    flags[FLG_DISCARD]  = discard_seen;
    flags[FLG_FRAG]     = xac1_value[13] || (xac1_value[12:0] != '0);
    flags[FLG_FIRST]    = (xac1_value[12:0] == '0);
    flags[FLG_MF]       = xac1_value[13];
    flags[FLG_SETTLED]  = packet_ready || discard_seen;
    flags[FLG_CRC_DONE] = !crc_active;
    flags[FLG_PLUE_HIT] = plue_hit;
    flags[FLG_RVALID]   = ppp_rvalid;
  end

  // decision queue: one decision per packet, taken when its first word leaves
  decision_e dq [2];
  logic [1:0] dq_cnt;
  decision_e  cur_dec;
  wire pop = dout.valid && dout.sop;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dq[0]         <= DEC_DISCARD;
      dq[1]         <= DEC_DISCARD;
      dq_cnt        <= '0;
      cur_dec       <= DEC_DISCARD;
      late_decision <= 1'b0;
    end else begin
      late_decision <= pop && dq_cnt == 0;
      if (pop) cur_dec <= (dq_cnt != 0) ? dq[0] : DEC_DISCARD;
      unique case ({pop && dq_cnt != 0, dec_valid && dq_cnt != 2'd2 || (pop && dec_valid)})
        2'b10: begin dq[0] <= dq[1]; dq_cnt <= dq_cnt - 1'b1; end
        2'b01: begin dq[dq_cnt[0]] <= dec; dq_cnt <= dq_cnt + 1'b1; end
        2'b11: begin
          if (dq_cnt == 2'd1) dq[0] <= dec;
          else begin dq[0] <= dq[1]; dq[1] <= dec; end
        end
        default: ;
      endcase
    end
  end
  assign dout_dec = pop ? ((dq_cnt != 0) ? dq[0] : DEC_DISCARD) : cur_dec;
endmodule
