// tb_ppp_top: end-to-end test of the protocol processor at its default size.
//
// The testbench plays the network interface and the micro controller. It
// loads a receive program for IPv4/UDP into the C&C, configures the pages
// and the CMAA, enters one connection, and streams Ethernet frames (with a
// 2-byte pad so that the IP header is word aligned) built here with correct
// header checksums and FCS. The program checks the destination address and
// the header checksum, classifies the packet in the CMAA and, for fragments,
// keeps the length received so far, the total length and the running
// ones-complement sum of the payload in the packet buffer, removing the
// identification when all fragments are in.
//
// Checked against a model kept here: the decision of every packet (host or
// discard) as it leaves the chain, the FCS check, the packet and connection
// addresses told to the micro controller, and the lengths and payload sum in
// the control memory read back through the micro controller port. Each mechanism must
// occur at least once: unfragmented accept, first / middle / last
// fragment, last fragment first, reassembly complete, PLUE hit and miss,
// SLUE discard, address and header-checksum discard, bad FCS, micro
// controller lock-out, and a too-short packet gap (overrun). A last phase
// sends four datagrams cut into 2..4 fragments of random size, interleaved
// in random order, and checks that each one is reassembled.
// The checked mechanisms (fragment recognition, reassembly length keeping,
// connection check, memory lock-out) follow the architecture; the receive
// program, frame padding and buffer layout are this design's choices.
module tb_ppp_top;
  import ppp_pkg::*;
  localparam int W = CM_AW;
  localparam logic [31:0] HOST_IP = 32'h0A000063;
  localparam logic [31:0] PEER_IP = 32'h0A000001;

  logic clk = 0, rst_n = 0;
  stream_word_t din, dout;
  decision_e dout_dec, dec;
  logic dec_valid, late_decision, overrun;
  logic pm_we = 0;
  logic [6:0] pm_addr = 0;
  cc_instr_t pm_wdata = '0;
  logic [1:0] xac_cfg_we = 0;
  logic [31:0] xac_cfg_ref = 0, xac_cfg_mask = 0;
  logic [4:0] xac_cfg_shift = 0;
  logic uc_new_packet;
  logic [W-1:0] uc_pkt_addr, uc_conn_addr;
  logic [7:0] uc_ptype;
  logic uc_req = 0, uc_we = 0, uc_gnt, uc_rvalid;
  logic [W-1:0] uc_addr = 0;
  logic [31:0] uc_wdata = 0, uc_rdata;
  logic uc_buf_cfg_we = 0;
  logic [1:0] uc_buf_region = 0;
  logic [W-1:0] uc_buf_base = 0, uc_buf_limit = 0, uc_buf_stride = 0;
  logic uc_mask_we = 0;
  logic [3:0] uc_mask_type = 0;
  slue_mask_t uc_mask = 0;
  logic uc_slue_we = 0, uc_slue_rm = 0;
  conn_key_t uc_slue_key = '0;
  logic [W-1:0] uc_slue_res = 0;
  logic [5:0] uc_slue_idx = 0;
  cmaa_state_e cmaa_state;
  logic cmaa_discard, packet_ready, plue_hit, slue_hit;
  logic [N_FLAGS-1:0] flags;
  logic [31:0] frame_crc;
  logic cmaa_busy, cc_running, plue_full, slue_full;
  logic [3:0] plue_waddr;
  logic [5:0] slue_waddr;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_unfrag, n_first, n_middle, n_last, n_last_first, n_complete, n_plue_hit,
      n_plue_miss, n_slue_discard, n_addr_discard, n_csum_discard, n_bad_fcs,
      n_uc_denied, n_overrun, n_host, n_discard;

  ppp_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ program
  function automatic cc_instr_t I(cc_op_e op, int sel = 0, int cmd = 0, int tap = 0, int a = 0, int imm = 0);
    return '{op: op, sel: 4'(sel), cmd: 4'(cmd), tap: TAP_W'(tap), a: 8'(a), imm: 16'(imm)};
  endfunction
  function automatic cc_instr_t J(int target);      // unconditional jump
    return I(OP_JMP4, FLG_ZERO, FLG_ZERO, 0, target);
  endfunction

  localparam int PLEN = 71;
  cc_instr_t prog [PLEN];
  localparam int DISC = 32, UNF = 22, NF = 27, WAITC = 29, ACC = 34, REL = 69,
                 MISS = 51, LASTF = 57, MORE = 45, WRLEN = 61, CSWR = 68;
  localparam int BUS2 = 16'h8000;
  localparam int TO_EOP_NO_FCS = 16'h0100;
  initial begin
    for (int i = 0; i < PLEN; i++) prog[i] = I(OP_NOP);
    prog[0]  = I(OP_FP, FP_CRC, CRC_START, 0);
    prog[1]  = I(OP_WAITW, 0, 0, 0, 5);
    prog[2]  = I(OP_FP, FP_XAC1, XAC_EXTRACT, 1);              // flags/offset of word 5
    prog[3]  = I(OP_FP, FP_CSM0, CSM_START, 3, 0, 5);          // header words 4..8
    prog[4]  = I(OP_FP, FP_XAC0, XAC_CMP_REF, 0);              // destination address, word 8
    prog[5]  = I(OP_FP, FP_LEN1, LEN_LOAD, 5);                 // total length, word 4
    prog[6]  = I(OP_FP, FP_LEN1, LEN_SUB_IMM, 0, 0, 20);       // payload length
    prog[7]  = I(OP_FP, FP_GADD, GA_ADD);                      // offset*8 + payload
    prog[8]  = I(OP_JMP4, FLG_XAC0, FLG_CSM0_OK, 0, 9);
    prog[9]  = J(DISC); prog[10] = J(DISC); prog[11] = J(DISC);
    prog[12] = I(OP_JMP4, FLG_FRAG, FLG_FIRST, 0, 13);
    prog[13] = J(DISC); prog[14] = J(UNF); prog[15] = J(NF);
    // first fragment (carries the ports)
    prog[16] = I(OP_CMAA, CI_NEW_PACKET, 0, 9, 1);
    prog[17] = I(OP_CMAA, CI_LOAD_REG, 0, 6, LR_PORTS);
    prog[18] = I(OP_CMAA, CI_LOAD_REG, 0, 9, LR_ADR0);
    prog[19] = I(OP_CMAA, CI_LOAD_REG, 1, 9, LR_ADR1);
    prog[20] = I(OP_FP, FP_CSM1, CSM_START, 9, 0, TO_EOP_NO_FCS); // payload sum, from word 9
    prog[21] = J(WAITC);
    // unfragmented
    prog[22] = I(OP_CMAA, CI_NEW_PACKET, 0, 10, 1);
    prog[23] = I(OP_CMAA, CI_LOAD_REG, 0, 7, LR_PORTS);
    prog[24] = I(OP_CMAA, CI_LOAD_REG, 0, 10, LR_ADR0);
    prog[25] = I(OP_CMAA, CI_LOAD_REG, 1, 10, LR_ADR1);
    prog[26] = J(WAITC);
    // later fragment
    prog[27] = I(OP_CMAA, CI_NEW_PACKET, 0, 10, 1);
    prog[28] = I(OP_FP, FP_CSM1, CSM_START, 7, 0, TO_EOP_NO_FCS);
    prog[29] = I(OP_WAITF, FLG_SETTLED, 1);
    prog[30] = I(OP_JMP4, FLG_ZERO, FLG_DISCARD, 0, 31);
    prog[31] = J(ACC);
    prog[32] = I(OP_DEC, 0, 0, 0, 0, DEC_DISCARD);
    prog[33] = I(OP_END);
    prog[34] = I(OP_DEC, 0, 0, 0, 0, DEC_HOST);
    prog[35] = I(OP_JMP4, FLG_ZERO, FLG_FRAG, 0, 36);
    prog[36] = J(REL);
    prog[37] = I(OP_JMP4, FLG_ZERO, FLG_PLUE_HIT, 0, 38);
    prog[38] = J(MISS);
    prog[39] = I(OP_MEMRD, 0, 0, 0, PB_LEN_RCVD);
    prog[40] = I(OP_MEMRD, 0, 0, 0, PB_LEN_TOTAL);
    prog[41] = I(OP_FP, FP_LEN0, LEN_LOAD, 0, 0, BUS2);
    prog[42] = I(OP_FP, FP_LEN0, LEN_ADD_EXT);
    prog[43] = I(OP_JMP4, FLG_ZERO, FLG_MF, 0, 44);
    prog[44] = J(LASTF);
    prog[45] = I(OP_FP, FP_XAC0, XAC_CMP_EXT, 0, 0, BUS2);     // received == total?
    prog[46] = I(OP_NOP);
    prog[47] = I(OP_JMP4, FLG_ZERO, FLG_XAC0, 0, 48);
    prog[48] = J(WRLEN);
    prog[49] = I(OP_CMAA, CI_ID_CAM, 0, 0, CAM_REMOVE);         // all fragments in
    prog[50] = J(WRLEN);                                       // received = total tells the micro controller
    prog[51] = I(OP_FP, FP_LEN0, LEN_CLEAR);                   // new packet buffer
    prog[52] = I(OP_FP, FP_LEN0, LEN_ADD_EXT);
    prog[53] = I(OP_JMP4, FLG_ZERO, FLG_MF, 0, 54);
    prog[54] = J(LASTF);
    prog[55] = I(OP_MEMWR, 4'(7 << 1), 0, 0, PB_LEN_TOTAL);    // total unknown
    prog[56] = J(WRLEN);
    prog[57] = I(OP_MEMWR, 4'(4 << 1), 0, 0, PB_LEN_TOTAL);    // total from the last fragment
    prog[58] = I(OP_MEMRD, 0, 0, 0, PB_LEN_TOTAL);
    prog[59] = I(OP_NOP);
    prog[60] = J(MORE);
    prog[61] = I(OP_MEMWR, 4'(0 << 1), 0, 0, PB_LEN_RCVD);
    // accumulated payload checksum: wait for the end of the payload, add the
    // partial sum kept for this datagram, store it back
    prog[62] = I(OP_WAITF, FLG_CSM1_DONE, 1);
    prog[63] = I(OP_JMP4, FLG_ZERO, FLG_PLUE_HIT, 0, 64);
    prog[64] = J(CSWR);
    prog[65] = I(OP_MEMRD, 0, 0, 0, PB_CSUM);
    prog[66] = I(OP_NOP);
    prog[67] = I(OP_FP, FP_CSM1, CSM_ADD_HALF, 0, 0, BUS2);
    prog[68] = I(OP_MEMWR, 4'(3 << 1), 0, 0, PB_CSUM);
    prog[69] = I(OP_CMAA, CI_RELEASE);
    prog[70] = I(OP_END);
  end

  // ------------------------------------------------------------ frames
  function automatic logic [15:0] fold(logic [31:0] s);
    while (s[31:16] != 0) s = s[31:16] + s[15:0];
    return s[15:0];
  endfunction

  function automatic logic [31:0] crc32(byte unsigned b[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[0] ^ b[i][k];
      c = c >> 1;
      if (fb) c = c ^ 32'hEDB88320;
    end
    return ~c;
  endfunction

  typedef struct {
    logic [31:0] dst, src;
    logic [15:0] id, sport, dport;
    logic        mf;
    logic [12:0] off;
    int          plen;      // IP payload bytes, multiple of 4
    bit          bad_csum, bad_fcs;
  } pkt_t;

  function automatic void build(pkt_t p, ref stream_word_t w [$]);
    byte unsigned b[$];
    logic [31:0] h [5];
    logic [31:0] acc, fcs;
    h[0] = {8'h45, 8'h00, 16'(20 + p.plen)};
    h[1] = {p.id, 2'b00, p.mf, p.off};
    h[2] = {8'h40, 8'h11, 16'h0000};
    h[3] = p.src; h[4] = p.dst;
    acc = 0;
    foreach (h[i]) acc += h[i][31:16] + h[i][15:0];
    h[2][15:0] = ~fold(acc);
    if (p.bad_csum) h[2][0] = ~h[2][0];
    b = '{8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h63, 8'h02, 8'h00, 8'h00, 8'h00, 8'h00, 8'h01, 8'h08, 8'h00};
    foreach (h[i]) for (int k = 3; k >= 0; k--) b.push_back(h[i][8*k +: 8]);
    for (int i = 0; i < p.plen; i++) begin
      if (p.off == 0 && i < 4) b.push_back((i < 2) ? p.sport[8*(1-i) +: 8] : p.dport[8*(3-i) +: 8]);
      else b.push_back(8'(i * 7 + p.id));
    end
    fcs = crc32(b);
    if (p.bad_fcs) fcs = ~fcs;
    for (int i = 0; i < 4; i++) b.push_back(fcs[8*i +: 8]);
    // 2 pad bytes in front of the frame
    w = {};
    w.push_back('{valid: 1, sop: 1, eop: 0, be: 4'b0011, data: {16'h0000, b[0], b[1]}});
    for (int i = 2; i < b.size(); i += 4)
      w.push_back('{valid: 1, sop: 0, eop: (i + 4 >= b.size()), be: 4'hF, data: {b[i], b[i+1], b[i+2], b[i+3]}});
  endfunction

  // ------------------------------------------------------------ model
  // byte of the IP payload at position i, as build() lays it out
  function automatic logic [7:0] pbyte(pkt_t p, int i);
    if (p.off == 0 && i < 4) return (i < 2) ? p.sport[8*(1-i) +: 8] : p.dport[8*(3-i) +: 8];
    return 8'(i * 7 + p.id);
  endfunction
  // ones-complement sum of the payload as 16-bit big-endian words
  function automatic logic [31:0] payload_sum(pkt_t p);
    logic [31:0] s = 0;
    for (int i = 0; i < p.plen; i += 2) s = 32'(fold(s + {pbyte(p, i), pbyte(p, i + 1)}));
    return s;
  endfunction

  typedef struct { int rcvd; int total; logic [31:0] csum; } reasm_t;
  reasm_t reasm [int];
  decision_e exp_dec [$];
  int n_sent;

  // expected result of one packet; updates the reassembly model
  typedef struct { decision_e dec; bit notify; bit complete; int rcvd; int total; bit hit; logic [15:0] csum; } exp_t;
  function automatic exp_t predict(pkt_t p);
    exp_t e;
    bit frag, first, known_conn;
    e = '{dec: DEC_DISCARD, notify: 0, complete: 0, rcvd: 0, total: 0, hit: 0, csum: 0};
    frag  = p.mf || p.off != 0;
    first = (p.off == 0);
    known_conn = (p.src == PEER_IP && p.sport == 16'd1234 && p.dport == 16'd80);
    if (p.dst != HOST_IP || p.bad_csum) return e;
    if (first && !known_conn) return e;
    e.dec = DEC_HOST;
    e.notify = 1;
    if (!frag) return e;
    e.hit = reasm.exists(int'(p.id));
    if (!e.hit) reasm[int'(p.id)] = '{rcvd: 0, total: 0, csum: 0};
    reasm[int'(p.id)].rcvd += p.plen;
    reasm[int'(p.id)].csum = 32'(fold(reasm[int'(p.id)].csum + payload_sum(p)));
    e.csum  = reasm[int'(p.id)].csum[15:0];
    if (!p.mf) reasm[int'(p.id)].total = int'(p.off) * 8 + p.plen;
    e.rcvd  = reasm[int'(p.id)].rcvd;
    e.total = reasm[int'(p.id)].total;
    if ((e.hit || !p.mf) && e.rcvd == e.total) begin     // all fragments in
      reasm.delete(int'(p.id));
      e.complete = 1;
    end
    return e;
  endfunction

  // decisions as packets leave the chain
  int n_out;
  always @(negedge clk) if (rst_n && dout.valid && dout.sop) begin
    n_out++;
    if (exp_dec.size() == 0) begin
      failures++; $display("FAIL unexpected packet at output");
    end else begin
      decision_e e;
      e = exp_dec.pop_front();
      checks++;
      if (dout_dec !== e) begin failures++; $display("FAIL packet %0d leaves with decision %0d, expected %0d", n_out, dout_dec, e); end
      if (dout_dec == DEC_HOST) n_host++; else n_discard++;
    end
  end
  always @(negedge clk) if (rst_n && overrun) n_overrun++;
  int n_late;
  always @(negedge clk) if (rst_n && late_decision) n_late++;

  // program length per packet, start of packet to the end of the program
  int run_len, run_min = 1000, run_max = 0;
  always @(negedge clk) if (rst_n) begin
    if (cc_running) run_len++;
    else if (run_len > 0) begin
      if (run_len < run_min) run_min = run_len;
      if (run_len > run_max) run_max = run_len;
      run_len = 0;
    end
  end

  // micro controller read through the access selector
  task automatic uc_read(logic [W-1:0] a, output logic [31:0] d);
    @(negedge clk); uc_req = 1; uc_we = 0; uc_addr = a;
    while (!uc_gnt) @(negedge clk);
    @(negedge clk); uc_req = 0;
    d = uc_rdata;
  endtask

  logic       got_notify;
  logic [W-1:0] got_pkt, got_conn;
  always @(negedge clk) if (uc_new_packet) begin got_notify = 1; got_pkt = uc_pkt_addr; got_conn = uc_conn_addr; end

  task automatic send(pkt_t p, int gap = 70);
    stream_word_t w [$];
    exp_t e;
    logic [31:0] d;
    bit saw_denied;
    build(p, w);
    e = predict(p);
    exp_dec.push_back(e.dec);
    got_notify = 0;
    saw_denied = 0;
    foreach (w[i]) begin
      din = w[i];
      @(negedge clk);
    end
    din = '0;
    @(negedge clk);
    // a discard stops the pages, so the FCS result only counts for accepted packets
    if (e.dec == DEC_HOST) begin
      chk(flags[FLG_CRC_DONE] && flags[FLG_CRC_OK] == !p.bad_fcs, $sformatf("FCS check of packet %0d", n_sent));
      if (p.bad_fcs) n_bad_fcs++;
    end
    // micro controller tries the memory while the PPP may own it
    for (int i = 0; i < gap - 10; i++) begin
      uc_req = 1; uc_we = 0; uc_addr = 20'h00010;
      #1;
      if (packet_ready && !uc_gnt) saw_denied = 1;
      @(negedge clk);
    end
    uc_req = 0;
    if (saw_denied) n_uc_denied++;
    chk(got_notify == e.notify, $sformatf("packet %0d notification %0d expected %0d", n_sent, got_notify, e.notify));
    if (e.notify) chk(got_conn == 20'h20000 || !(p.off == 0), "connection buffer address to micro controller");
    if (e.notify && (p.mf || p.off != 0)) begin
      if (e.hit) n_plue_hit++; else n_plue_miss++;
      chk(plue_hit == e.hit, $sformatf("packet %0d PLUE hit %0d expected %0d", n_sent, plue_hit, e.hit));
      uc_read(got_pkt + PB_LEN_RCVD, d);
      chk(d == 32'(e.rcvd), $sformatf("length received %0d expected %0d", d, e.rcvd));
      uc_read(got_pkt + PB_LEN_TOTAL, d);
      chk(d == 32'(e.total), $sformatf("total length %0d expected %0d", d, e.total));
      uc_read(got_pkt + PB_CSUM, d);
      chk(d == {16'h0, e.csum}, $sformatf("payload checksum %h expected %h", d, e.csum));
      if (e.complete) n_complete++;
    end
    repeat (10) @(negedge clk);
    n_sent++;
  endtask

  function automatic pkt_t P(logic [15:0] id, logic mf, int off, int plen);
    return '{dst: HOST_IP, src: PEER_IP, id: id, sport: 16'd1234, dport: 16'd80,
             mf: mf, off: 13'(off), plen: plen, bad_csum: 0, bad_fcs: 0};
  endfunction

  initial begin
    pkt_t p;
    din = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < PLEN; i++) begin
      pm_we = 1; pm_addr = 7'(i); pm_wdata = prog[i]; @(negedge clk);
    end
    pm_we = 0;
    xac_cfg_we = 2'b01; xac_cfg_ref = HOST_IP; xac_cfg_mask = '1; xac_cfg_shift = 0; @(negedge clk);
    xac_cfg_we = 2'b10; xac_cfg_ref = 0; xac_cfg_mask = 32'h0000FFFF; @(negedge clk);
    xac_cfg_we = 0;
    uc_buf_cfg_we = 1; uc_buf_region = BUF_PACKET; uc_buf_base = 20'h01000; uc_buf_limit = 20'h01FFF; uc_buf_stride = 8;
    @(negedge clk); uc_buf_region = BUF_CONN; uc_buf_base = 20'h24000; uc_buf_limit = 20'h24FFF; uc_buf_stride = 16;
    @(negedge clk); uc_buf_region = BUF_CTRL; uc_buf_base = 20'h30000; uc_buf_limit = 20'h30FFF; uc_buf_stride = 64;
    @(negedge clk); uc_buf_cfg_we = 0;
    uc_mask_we = 1; uc_mask_type = 4'd1; uc_mask = 6'b100000; @(negedge clk); uc_mask_we = 0;
    uc_slue_we = 1;
    uc_slue_key = '{ptype: 8'h01, sport: 16'd1234, dport: 16'd80, adr0: PEER_IP, adr1: HOST_IP, adr2: '0};
    uc_slue_res = 20'h20000;
    @(negedge clk); uc_slue_we = 0;
    repeat (4) @(negedge clk);

    // unfragmented packets
    send(P(16'h0100, 0, 0, 64)); n_unfrag++;
    send(P(16'h0101, 0, 0, 28)); n_unfrag++;
    // fragments in order: 3 x 48 bytes (offsets in 8-byte units)
    send(P(16'h0200, 1, 0, 48));  n_first++;
    send(P(16'h0200, 1, 6, 48));  n_middle++;
    send(P(16'h0200, 0, 12, 40)); n_last++;
    // last fragment first, then the others
    send(P(16'h0300, 0, 10, 24)); n_last_first++;
    send(P(16'h0300, 1, 0, 40));  n_first++;
    send(P(16'h0300, 1, 5, 40));  n_middle++;
    // the identification of a completed packet starts a new buffer
    send(P(16'h0200, 1, 0, 16));  n_first++;
    // unknown connection, wrong address, bad header checksum, bad FCS
    p = P(16'h0400, 0, 0, 32); p.dport = 16'd81;   send(p); n_slue_discard++;
    p = P(16'h0401, 1, 0, 32); p.sport = 16'd9999; send(p); n_slue_discard++;
    p = P(16'h0402, 0, 0, 32); p.dst = 32'h0A000064; send(p); n_addr_discard++;
    p = P(16'h0403, 0, 0, 32); p.bad_csum = 1;      send(p); n_csum_discard++;
    p = P(16'h0404, 0, 0, 32); p.bad_fcs = 1;       send(p);
    // random mix of unfragmented packets
    for (int i = 0; i < 10; i++) begin
      p = P(16'(16'h0500 + i), 0, 0, 4 * $urandom_range(4, 60));
      if ($urandom_range(0, 3) == 0) p.sport = 16'd7;
      send(p);
    end
    // several datagrams, each cut into 2..4 fragments, arriving interleaved
    // in random order
    begin
      pkt_t frags [$];
      for (int d = 0; d < 4; d++) begin
        int nf, off;
        nf = $urandom_range(2, 4);
        off = 0;
        for (int f = 0; f < nf; f++) begin
          int len;
          len = (f == nf - 1) ? 4 * $urandom_range(1, 12) : 8 * $urandom_range(1, 6);
          frags.push_back(P(16'(16'h0700 + d), f != nf - 1, off, len));
          off += len / 8;
        end
      end
      frags.shuffle();
      foreach (frags[i]) begin
        if (frags[i].off == 0) n_first++;
        else if (frags[i].mf) n_middle++;
        else n_last++;
        send(frags[i]);
      end
      for (int d = 0; d < 4; d++)
        chk(!reasm.exists(16'h0700 + d), $sformatf("datagram %0d reassembled", d));
    end
    // too short a gap: the second packet arrives while the program runs
    begin
      stream_word_t w [$];
      p = P(16'h0600, 0, 0, 32);
      exp_dec.push_back(predict(p).dec);
      build(p, w);
      foreach (w[i]) begin din = w[i]; @(negedge clk); end
      din = '0;
      p = P(16'h0601, 0, 0, 32);
      exp_dec.push_back(DEC_DISCARD);               // missed by the C&C
      build(p, w);
      foreach (w[i]) begin din = w[i]; @(negedge clk); end
      din = '0;
      repeat (100) @(negedge clk);
    end
    repeat (50) @(negedge clk);
    chk(exp_dec.size() == 0, "every packet left the chain");

    $display("INFO unfrag=%0d first=%0d middle=%0d last=%0d last_first=%0d complete=%0d plue_hit=%0d plue_miss=%0d",
             n_unfrag, n_first, n_middle, n_last, n_last_first, n_complete, n_plue_hit, n_plue_miss);
    $display("INFO slue_discard=%0d addr_discard=%0d csum_discard=%0d bad_fcs=%0d uc_denied=%0d overrun=%0d host=%0d discard=%0d",
             n_slue_discard, n_addr_discard, n_csum_discard, n_bad_fcs, n_uc_denied, n_overrun, n_host, n_discard);
    $display("INFO program cycles per packet min=%0d max=%0d, late decisions=%0d", run_min, run_max, n_late);
    chk(n_unfrag > 0 && n_first > 0 && n_middle > 0 && n_last > 0 && n_last_first > 0, "fragment kinds exercised");
    chk(n_complete >= 2, "reassembly completed");
    chk(n_plue_hit > 0 && n_plue_miss > 0, "PLUE hit and miss");
    chk(n_slue_discard > 0 && n_addr_discard > 0 && n_csum_discard > 0 && n_bad_fcs > 0, "discard causes");
    chk(n_uc_denied > 0, "micro controller locked out while the PPP owns the memory");
    chk(n_overrun > 0, "overrun");
    chk(n_late > 0, "packet missed by the C&C leaves with a late (discard) decision");
    chk(n_host > 0 && n_discard > 0, "both decisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
