// cmaa: Control Memory Access Accelerator.
//
// Gives the protocol processor (PPP) low-latency access to the inter-packet
// control variables kept in the shared control memory. It recognises an
// incoming packet in two look-up engines: the PLUE finds the reassembly
// (packet) buffer of a fragmented packet by its IP identification, and the
// SLUE classifies the connection by type, ports and addresses. A buffer
// pointer generator hands out new buffers, and an access selector shares the
// control memory with the micro controller.
//
// The C&C drives one instruction per cycle (`instr`, with `data_in` taken
// from the input buffer chain):
//   NEW_PACKET  cfg = internal packet type, data_in[31:16] = IP identification,
//               frag/l4 flags; starts the PLUE search for fragments, or takes
//               a fresh packet buffer for unfragmented packets.
//   LOAD_REG    loads a SLUE key word; the one marked `last` starts the search.
//   ID_CAM / PA_CAM  read (search again), write (enter the current key) or
//               remove (the matched entry) in the PLUE / SLUE.
//   RELEASE     ends the PPP's access; cfg[0] = 1 aborts (packet discarded).
//   SET_MEMBUF  cfg[1:0] = region: the packet takes a buffer from that region.
//
// Control procedure (states of cmaa_state_e):
//   WAIT -> LOAD (PLUE search, 2 cycles, while key words load) -> CHECK
//   (SLUE search, 3 cycles) -> STORE (connection pointer, data bus 1, written
//   into the packet buffer) -> READY (`packet_ready`; the PPP reads and writes
//   its packet and connection buffers through `ppp_*`) -> UPDATE (lock
//   released, buffer pointers advanced, `uc_new_packet` to the micro
//   controller, free-entry search for the next CAM write) -> WAIT.
// An unknown connection raises `discard` and returns to WAIT. A fragment
// without the layer 4 header skips the SLUE. Counting the NEW_PACKET cycle
// as the first, `packet_ready` comes in cycle 9 for an IPv4 packet that
// loads 3 key words, 11 for IPv6 with 5 words, and 4 for a further fragment
// of a known packet, with the default 2-cycle PLUE and 3-cycle SLUE.
// The micro controller gets the memory only in WAIT and UPDATE.
//
// The state sequence, the latencies and the instruction set follow the
// architecture. This implementation's own choices: the binary encodings, the
// abort flag of RELEASE, the per-type wildcard mask table written by the
// micro controller, writing a new IP identification into the PLUE only once
// the packet is accepted, and a local incrementer for the free-entry search
// (one entry per cycle, in WAIT and UPDATE).
module cmaa
  import ppp_pkg::*;
#(
  parameter int unsigned M        = M_ENTRIES,
  parameter int unsigned N        = N_ENTRIES,
  parameter int unsigned W        = CM_AW,
  parameter int unsigned PLAT     = PLUE_LAT,
  parameter int unsigned SLAT     = SLUE_LAT,
  localparam int unsigned MIW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned NIW = (N > 1) ? $clog2(N) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction from the C&C
  input  cmaa_instr_t     instr,
  input  logic [31:0]     data_in,
  // flags to the C&C
  output logic            busy,
  output logic            packet_ready,
  output logic            discard,        // pulse: no matching connection
  output logic            plue_hit,
  output logic            slue_hit,
  output cmaa_state_e     state_o,
  // PPP access to the packet / connection buffer while packet_ready
  input  logic            ppp_req,
  input  logic            ppp_we,
  input  logic            ppp_buf,        // 0 packet buffer, 1 connection buffer
  input  logic [7:0]      ppp_ofs,
  input  logic [31:0]     ppp_wdata,
  output logic            ppp_rvalid,
  // control memory port
  output logic            m_en,
  output logic            m_we,
  output logic [W-1:0]    m_addr,
  output logic [31:0]     m_wdata,         // data bus 1
  // micro controller
  output logic            uc_new_packet,
  output logic [W-1:0]    uc_pkt_addr,
  output logic [W-1:0]    uc_conn_addr,
  output logic [7:0]      uc_ptype,
  input  logic            uc_req,
  input  logic            uc_we,
  input  logic [W-1:0]    uc_addr,
  input  logic [31:0]     uc_wdata,
  output logic            uc_gnt,
  output logic            uc_rvalid,
  input  logic            uc_buf_cfg_we,
  input  logic [1:0]      uc_buf_region,
  input  logic [W-1:0]    uc_buf_base,
  input  logic [W-1:0]    uc_buf_limit,
  input  logic [W-1:0]    uc_buf_stride,
  input  logic            uc_mask_we,
  input  logic [3:0]      uc_mask_type,
  input  slue_mask_t      uc_mask,
  input  logic            uc_slue_we,     // enter a connection at the write address
  input  conn_key_t       uc_slue_key,
  input  logic [W-1:0]    uc_slue_res,
  input  logic            uc_slue_rm,
  input  logic [NIW-1:0]  uc_slue_idx,
  output logic            plue_full,
  output logic            slue_full,
  output logic [MIW-1:0]  plue_waddr,
  output logic [NIW-1:0]  slue_waddr
);
  cmaa_state_e state;

  // packet registers
  logic [7:0]     ptype_q;
  logic           l4_q;
  logic [15:0]    id_q;
  logic           plue_ok_q, slue_ok_q, slue_hit_q;
  logic [W-1:0]   pkt_addr, conn_addr, conn_res_q, bus1;
  logic [MIW-1:0] plue_idx;
  logic [NIW-1:0] slue_idx;
  logic           id_new_pending;
  logic           id_written;       // this packet created a PLUE entry
  logic [MIW-1:0] id_written_idx;
  logic [N_REGIONS-1:0] used_region;
  logic [MIW:0]   plue_scan_cnt;
  logic [NIW:0]   slue_scan_cnt;
  slue_mask_t     mask_tbl [16];
  logic           plue_scan, slue_scan;

  // look-up engine signals
  logic           p_search, p_done, p_hit, p_we, p_rm;
  logic [MIW-1:0] p_index, p_widx, p_ridx;
  logic [W-1:0]   p_result, p_wres;
  logic [15:0]    p_key;
  logic [M-1:0]   p_valid;
  logic           s_ld_type, s_ld_word, s_search, s_done, s_hit, s_we, s_rm;
  logic [NIW-1:0] s_index, s_widx, s_ridx;
  logic [W-1:0]   s_result, s_wres;
  conn_key_t      s_key_q, s_wkey;
  logic [N-1:0]   s_valid;
  logic [N_REGIONS-1:0][W-1:0] buf_addr;
  logic [N_REGIONS-1:0]        buf_advance;
  logic           a_req, a_we;
  logic [W-1:0]   a_addr;
  logic [31:0]    a_wdata;

  wire is_op = (instr.op != CI_NOP);
  wire op_new  = instr.op == CI_NEW_PACKET;
  wire op_load = instr.op == CI_LOAD_REG;
  wire op_id   = instr.op == CI_ID_CAM;
  wire op_pa   = instr.op == CI_PA_CAM;
  wire op_rel  = instr.op == CI_RELEASE;
  wire op_mbuf = instr.op == CI_SET_MEMBUF;
  wire in_load = (state == CS_LOAD) || (state == CS_CHECK);
  wire in_ready = (state == CS_READY);

  // completion of the two searches, as seen in this cycle
  wire       plue_fin = plue_ok_q || p_done;
  wire       slue_fin = !l4_q || slue_ok_q || s_done;
  wire       slue_hit_now = s_done ? s_hit : slue_hit_q;
  wire [W-1:0] conn_now = s_done ? s_result : conn_res_q;
  wire       go_on    = in_load && plue_fin && slue_fin;
  wire       enter_ready = (go_on && !l4_q) || (state == CS_STORE);
  // an unknown identification gets its PLUE entry when READY is entered;
  // the miss may be seen in that very cycle
  wire       miss_now = in_load && p_done && !p_hit && !plue_ok_q;
  wire       id_write = enter_ready && (id_new_pending || miss_now) && !plue_full;

  // ---------------------------------------------------------- PLUE control
  always_comb begin
    p_search = 1'b0;
    p_key    = id_q;
    p_we     = 1'b0;
    p_widx   = plue_waddr;
    p_wres   = pkt_addr;
    p_rm     = 1'b0;
    p_ridx   = plue_idx;
    if (state == CS_WAIT && op_new && instr.frag) begin
      p_search = 1'b1;
      p_key    = data_in[31:16];
    end else if (in_ready && op_id && instr.cfg[1:0] == CAM_READ) begin
      p_search = 1'b1;
    end
    if (id_write) begin
      p_we   = 1'b1;
      p_wres = buf_addr[BUF_PACKET];
    end
    if (in_ready && op_id && instr.cfg[1:0] == CAM_WRITE && !plue_full) p_we = 1'b1;
    if (in_ready && op_id && instr.cfg[1:0] == CAM_REMOVE) p_rm = 1'b1;
    if (in_ready && op_rel && instr.cfg[0] && id_written) begin
      p_rm   = 1'b1;
      p_ridx = id_written_idx;
    end
  end

  // ---------------------------------------------------------- SLUE control
  always_comb begin
    s_ld_type = (state == CS_WAIT) && op_new;
    s_ld_word = in_load && op_load;
    s_search  = (in_load && op_load && instr.last)
             || (in_ready && op_pa && instr.cfg[1:0] == CAM_READ);
    s_we      = 1'b0;
    s_wkey    = s_key_q;
    s_wres    = buf_addr[BUF_CONN];
    s_widx    = slue_waddr;
    s_rm      = 1'b0;
    s_ridx    = slue_idx;
    if (in_ready && op_pa && instr.cfg[1:0] == CAM_WRITE) begin
      s_we = !slue_full;
    end else if (uc_slue_we && !slue_full) begin
      s_we   = 1'b1;
      s_wkey = uc_slue_key;
      s_wres = uc_slue_res;
    end
    if (in_ready && op_pa && instr.cfg[1:0] == CAM_REMOVE) begin
      s_rm = 1'b1;
    end else if (uc_slue_rm) begin
      s_rm   = 1'b1;
      s_ridx = uc_slue_idx;
    end
  end

  plue #(.M(M), .W(W), .LAT(PLAT)) u_plue (
    .clk, .rst_n, .search(p_search), .key(p_key), .done(p_done), .hit(p_hit),
    .index(p_index), .result(p_result), .we(p_we), .widx(p_widx), .wkey(id_q),
    .wres(p_wres), .rm(p_rm), .ridx(p_ridx), .valid(p_valid));

  slue #(.N(N), .W(W), .LAT(SLAT)) u_slue (
    .clk, .rst_n, .ld_type(s_ld_type), .type_in(instr.cfg), .ld_word(s_ld_word),
    .ld_sel(instr.cfg[2:0]), .word_in(data_in), .key_q(s_key_q),
    .search(s_search), .mask(mask_tbl[ptype_q[3:0]]), .done(s_done), .hit(s_hit),
    .index(s_index), .result(s_result), .we(s_we), .widx(s_widx), .wkey(s_wkey),
    .wres(s_wres), .rm(s_rm), .ridx(s_ridx), .valid(s_valid));

  mem_buffer_gen #(.W(W), .R(N_REGIONS)) u_bufgen (
    .clk, .rst_n, .cfg_we(uc_buf_cfg_we), .cfg_region(uc_buf_region),
    .cfg_base(uc_buf_base), .cfg_limit(uc_buf_limit), .cfg_stride(uc_buf_stride),
    .advance(buf_advance), .addr(buf_addr));

  // ------------------------------------------------ control memory access
  always_comb begin
    a_req   = 1'b0;
    a_we    = 1'b0;
    a_addr  = pkt_addr + W'(PB_CONN_PTR);
    a_wdata = 32'(bus1);
    if (state == CS_STORE) begin
      a_req = 1'b1;
      a_we  = 1'b1;
    end else if (in_ready && ppp_req) begin
      a_req   = 1'b1;
      a_we    = ppp_we;
      a_addr  = (ppp_buf ? conn_addr : pkt_addr) + W'(ppp_ofs);
      a_wdata = ppp_wdata;
    end
  end

  mem_access_sel #(.W(W)) u_sel (
    .clk, .rst_n, .uc_allow(state == CS_WAIT || state == CS_UPDATE),
    .a_req, .a_we, .a_addr, .a_wdata, .a_rvalid(ppp_rvalid),
    .uc_req, .uc_we, .uc_addr, .uc_wdata, .uc_gnt, .uc_rvalid,
    .m_en, .m_we, .m_addr, .m_wdata);

  assign buf_advance = (state == CS_UPDATE && uc_new_packet) ? used_region : '0;

  // ------------------------------------------------------------- the FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= CS_WAIT;
      ptype_q        <= '0;
      l4_q           <= 1'b0;
      id_q           <= '0;
      plue_ok_q      <= 1'b0;
      slue_ok_q      <= 1'b0;
      slue_hit_q     <= 1'b0;
      pkt_addr       <= '0;
      conn_addr      <= '0;
      conn_res_q     <= '0;
      bus1           <= '0;
      plue_idx       <= '0;
      slue_idx       <= '0;
      id_new_pending <= 1'b0;
      id_written     <= 1'b0;
      id_written_idx <= '0;
      used_region    <= '0;
      discard        <= 1'b0;
      plue_hit       <= 1'b0;
      slue_hit       <= 1'b0;
      uc_new_packet  <= 1'b0;
      uc_pkt_addr    <= '0;
      uc_conn_addr   <= '0;
      uc_ptype       <= '0;
    end else begin
      discard       <= 1'b0;
      uc_new_packet <= 1'b0;

      // late search results (a re-read in READY, or a SLUE result that
      // arrives before the PLUE one)
      if (s_done) begin
        slue_ok_q  <= 1'b1;
        slue_hit_q <= s_hit;
        conn_res_q <= s_result;
        if (s_hit) slue_idx <= s_index;
        slue_hit <= s_hit;
        if (in_ready && s_hit) conn_addr <= s_result;
      end
      if (p_done) begin
        plue_hit <= p_hit;
        if (p_hit) begin
          plue_idx <= p_index;
          if (in_ready) pkt_addr <= p_result;
        end
      end

      unique case (state)
        CS_WAIT: begin
          if (op_new) begin
            ptype_q     <= instr.cfg;
            l4_q        <= instr.l4;
            id_q        <= data_in[31:16];
            plue_ok_q   <= !instr.frag;
            slue_ok_q   <= 1'b0;
            slue_hit_q  <= 1'b0;
            plue_hit    <= 1'b0;
            slue_hit    <= 1'b0;
            used_region <= '0;
            id_new_pending <= 1'b0;
            id_written     <= 1'b0;
            if (!instr.frag) begin
              pkt_addr    <= buf_addr[BUF_PACKET];
              used_region <= N_REGIONS'(1) << BUF_PACKET;
            end
            state <= CS_LOAD;
          end
        end

        CS_LOAD, CS_CHECK: begin
          if (p_done) begin
            plue_ok_q <= 1'b1;
            if (p_hit) begin
              pkt_addr <= p_result;
            end else begin
              pkt_addr       <= buf_addr[BUF_PACKET];
              used_region    <= N_REGIONS'(1) << BUF_PACKET;
              id_new_pending <= 1'b1;
            end
          end
          if (go_on) begin
            if (!l4_q) begin
              state <= CS_READY;
            end else if (slue_hit_now) begin
              bus1      <= conn_now;
              conn_addr <= conn_now;
              state     <= CS_STORE;
            end else begin
              discard <= 1'b1;
              state   <= CS_WAIT;
            end
          end else if (plue_fin) begin
            state <= CS_CHECK;
          end
        end

        CS_STORE: state <= CS_READY;

        CS_READY: begin
          if (op_pa && instr.cfg[1:0] == CAM_WRITE && !slue_full) begin
            conn_addr   <= buf_addr[BUF_CONN];
            used_region <= used_region | (N_REGIONS'(1) << BUF_CONN);
          end
          if (op_id && instr.cfg[1:0] == CAM_WRITE && !plue_full) begin
            id_new_pending <= 1'b0;
          end
          if (op_mbuf) begin
            pkt_addr    <= buf_addr[instr.cfg[1:0]];
            used_region <= (used_region & ~(N_REGIONS'(1) << BUF_PACKET))
                         | (N_REGIONS'(1) << instr.cfg[1:0]);
          end
          if (op_rel) begin
            if (instr.cfg[0]) begin
              used_region <= '0;           // aborted: nothing consumed
            end else begin
              uc_new_packet <= 1'b1;
              uc_pkt_addr   <= pkt_addr;
              uc_conn_addr  <= conn_addr;
              uc_ptype      <= ptype_q;
            end
            state <= CS_UPDATE;
          end
        end

        CS_UPDATE: begin
          // pointers advance in the first update cycle (buf_advance); then
          // wait for the free-entry searches
          if (!plue_scan && !slue_scan) state <= CS_WAIT;
        end

        default: state <= CS_WAIT;
      endcase

      if (enter_ready) id_new_pending <= 1'b0;
      if (id_write) begin
        id_written     <= 1'b1;
        id_written_idx <= plue_waddr;
      end
    end
  end

  // ------------------------------------------- free-entry (write address) search
  wire scan_ok = (state == CS_WAIT) || (state == CS_UPDATE);
  assign plue_scan = scan_ok && p_valid[plue_waddr] && !plue_full;
  assign slue_scan = scan_ok && s_valid[slue_waddr] && !slue_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      plue_waddr    <= '0;
      slue_waddr    <= '0;
      plue_full     <= 1'b0;
      slue_full     <= 1'b0;
      plue_scan_cnt <= '0;
      slue_scan_cnt <= '0;
    end else begin
      if (p_rm && plue_full) begin
        plue_waddr    <= p_ridx;
        plue_full     <= 1'b0;
        plue_scan_cnt <= '0;
      end else if (plue_scan) begin
        plue_waddr    <= (plue_waddr == MIW'(M - 1)) ? '0 : plue_waddr + 1'b1;
        plue_scan_cnt <= plue_scan_cnt + 1'b1;
        if (plue_scan_cnt == (MIW+1)'(M - 1)) plue_full <= 1'b1;
      end else begin
        plue_scan_cnt <= '0;
      end
      if (s_rm && slue_full) begin
        slue_waddr    <= s_ridx;
        slue_full     <= 1'b0;
        slue_scan_cnt <= '0;
      end else if (slue_scan) begin
        slue_waddr    <= (slue_waddr == NIW'(N - 1)) ? '0 : slue_waddr + 1'b1;
        slue_scan_cnt <= slue_scan_cnt + 1'b1;
        if (slue_scan_cnt == (NIW+1)'(N - 1)) slue_full <= 1'b1;
      end else begin
        slue_scan_cnt <= '0;
      end
    end
  end

  // ------------------------------------------------------ mask table
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) mask_tbl[i] <= '0;
    end else if (uc_mask_we) begin
      mask_tbl[uc_mask_type] <= uc_mask;
    end
  end

  assign busy         = (state != CS_WAIT);
  assign packet_ready = in_ready;
  assign state_o      = state;

  // rules of the instruction interface
  a_known_op: assert property (@(posedge clk) disable iff (!rst_n)
    is_op |-> instr.op inside {CI_NEW_PACKET, CI_LOAD_REG, CI_ID_CAM, CI_PA_CAM,
                               CI_RELEASE, CI_SET_MEMBUF});
  a_ppp_only_ready: assert property (@(posedge clk) disable iff (!rst_n)
    ppp_req |-> in_ready);
endmodule
