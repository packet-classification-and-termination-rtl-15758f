// tb_cmaa: self-checking test of the Control Memory Access Accelerator.
//
// Plays the C&C and the micro controller around one CMAA and checks:
//  - packet-ready latency, counting the NEW_PACKET cycle as 1: 9 cycles for
//    a new IPv4 packet (3 key words), 11 for IPv6 (5 words), 4 for a further
//    fragment of a known packet (2-cycle PLUE, 3-cycle SLUE);
//  - the connection pointer written into the packet buffer (data bus 1),
//    the packet and connection addresses given to the micro controller;
//  - discard of an unknown connection, ID-CAM remove, PA-CAM write,
//    SET_MEMBUF, abort, and that the micro controller only gets the
//    control memory in the wait and update states.
module tb_cmaa;
  import ppp_pkg::*;
  localparam int W = 20;
  logic clk = 0, rst_n = 0;
  cmaa_instr_t instr;
  logic [31:0] data_in;
  logic busy, packet_ready, discard, plue_hit, slue_hit;
  cmaa_state_e state_o;
  logic ppp_req = 0, ppp_we = 0, ppp_buf = 0, ppp_rvalid;
  logic [7:0] ppp_ofs = 0;
  logic [31:0] ppp_wdata = 0;
  logic m_en, m_we;
  logic [W-1:0] m_addr;
  logic [31:0] m_wdata;
  logic uc_new_packet;
  logic [W-1:0] uc_pkt_addr, uc_conn_addr;
  logic [7:0] uc_ptype;
  logic uc_req = 0, uc_we = 0, uc_gnt, uc_rvalid;
  logic [W-1:0] uc_addr = 0;
  logic [31:0] uc_wdata = 0;
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
  logic plue_full, slue_full;
  logic [3:0] plue_waddr;
  logic [5:0] slue_waddr;
  int checks = 0, failures = 0;

  cmaa dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // control memory writes seen on the port
  logic [31:0] wr_data [logic [W-1:0]];
  always @(posedge clk) if (m_en && m_we) wr_data[m_addr] = m_wdata;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(cmaa_op_e o, logic [7:0] cfg = 0, logic [31:0] d = 0,
                    logic frag = 0, logic l4 = 0, logic last = 0);
    instr = '{op: o, cfg: cfg, frag: frag, l4: l4, last: last};
    data_in = d;
    @(negedge clk);
    instr = '{op: CI_NOP, cfg: 0, frag: 0, l4: 0, last: 0};
    data_in = 32'hBAD0BAD0;
  endtask

  // NEW_PACKET then the key words back to back; returns the cycle (1-based,
  // NEW_PACKET = 1) in which packet_ready rose, or -1 on discard
  task automatic packet(logic [7:0] ptype, logic [15:0] id, logic frag, logic l4,
                        logic [31:0] words [], output int lat);
    int cyc;
    cyc = 1;
    lat = 0;
    instr = '{op: CI_NEW_PACKET, cfg: ptype, frag: frag, l4: l4, last: 0};
    data_in = {id, 16'h2000};
    @(negedge clk);
    foreach (words[i]) begin
      cyc++;
      if (packet_ready) lat = cyc;
      instr = '{op: CI_LOAD_REG, cfg: 8'(i), frag: 0, l4: 0, last: (i == words.size() - 1)};
      data_in = words[i];
      @(negedge clk);
    end
    instr = '{op: CI_NOP, cfg: 0, frag: 0, l4: 0, last: 0};
    while (lat == 0 && cyc < 40) begin
      cyc++;
      if (packet_ready) lat = cyc;
      else if (discard)  lat = -cyc;
      else @(negedge clk);
    end
  endtask

  logic [31:0] v4 [], v4bad [], v6 [], none [];
  conn_key_t kv4, kv6;
  int lat;
  logic [W-1:0] first_pkt;

  initial begin
    instr = '{op: CI_NOP, cfg: 0, frag: 0, l4: 0, last: 0};
    data_in = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    // buffer regions: packet 0x1000 stride 8, connection 0x2400 stride 16, control 0x3000 stride 64
    uc_buf_cfg_we = 1; uc_buf_region = BUF_PACKET; uc_buf_base = 20'h1000; uc_buf_limit = 20'h10FF; uc_buf_stride = 8;
    @(negedge clk); uc_buf_region = BUF_CONN; uc_buf_base = 20'h2400; uc_buf_limit = 20'h24FF; uc_buf_stride = 16;
    @(negedge clk); uc_buf_region = BUF_CTRL; uc_buf_base = 20'h3000; uc_buf_limit = 20'h30FF; uc_buf_stride = 64;
    @(negedge clk); uc_buf_cfg_we = 0;
    // wildcard masks: type 1 = IPv4 (no upper address CAM), type 2 = IPv6 source
    uc_mask_we = 1; uc_mask_type = 4'd1; uc_mask = 6'b100000;
    @(negedge clk); uc_mask_type = 4'd2; uc_mask = 6'b000000;
    @(negedge clk); uc_mask_we = 0;
    // connections entered by the micro controller
    kv4 = '{ptype: 8'h01, sport: 16'd80, dport: 16'd4000, adr0: 32'h0A000001, adr1: 32'h0A000063, adr2: '0};
    kv6 = '{ptype: 8'h02, sport: 16'd443, dport: 16'd5000, adr0: 32'h20010DB8, adr1: 32'h00000001, adr2: 64'h0123456789ABCDEF};
    uc_slue_we = 1; uc_slue_key = kv4; uc_slue_res = 20'h20000;
    @(negedge clk); uc_slue_we = 0;
    @(negedge clk); @(negedge clk);     // free-entry search moves on
    chk(slue_waddr == 6'd1, "SLUE write address after first entry");
    uc_slue_we = 1; uc_slue_key = kv6; uc_slue_res = 20'h20100;
    @(negedge clk); uc_slue_we = 0;
    @(negedge clk); @(negedge clk);

    v4    = '{{16'd80, 16'd4000}, 32'h0A000001, 32'h0A000063};
    v4bad = '{{16'd81, 16'd4000}, 32'h0A000001, 32'h0A000063};
    v6    = '{{16'd443, 16'd5000}, 32'h20010DB8, 32'h00000001, 32'h89ABCDEF, 32'h01234567};
    none  = '{};

    // 1. first fragment of an IPv4 packet: new buffer, PLUE miss, SLUE hit
    packet(8'h01, 16'h1234, 1, 1, v4, lat);
    chk(lat == 9, $sformatf("IPv4 new packet latency %0d, expected 9", lat));
    chk(!plue_hit && slue_hit, "IPv4 new packet: PLUE miss, SLUE hit");
    chk(wr_data.exists(20'h1000) && wr_data[20'h1000] == 32'h20000, "connection pointer in packet buffer");
    // micro controller is locked out while the PPP owns the memory
    uc_req = 1; uc_addr = 20'h5; #1;
    chk(!uc_gnt, "micro controller denied in ready state");
    // PPP writes length received so far into the packet buffer
    ppp_req = 1; ppp_we = 1; ppp_buf = 0; ppp_ofs = PB_LEN_RCVD; ppp_wdata = 32'd100;
    @(negedge clk); ppp_req = 0; ppp_we = 0;
    chk(wr_data.exists(20'h1001) && wr_data[20'h1001] == 32'd100, "PPP write to packet buffer");
    op(CI_RELEASE);
    chk(uc_new_packet && uc_pkt_addr == 20'h1000 && uc_conn_addr == 20'h20000 && uc_ptype == 8'h01,
        "new-packet flag and addresses to micro controller");
    chk(state_o == CS_UPDATE && uc_gnt, "micro controller granted in update state");
    uc_req = 0;
    repeat (3) @(negedge clk);
    chk(state_o == CS_WAIT, "back to wait");
    chk(plue_waddr == 4'd1, "PLUE write address advanced after write");
    first_pkt = 20'h1000;

    // 2. later fragment of the same packet: PLUE hit, no layer 4 header
    packet(8'h01, 16'h1234, 1, 0, none, lat);
    chk(lat == 4, $sformatf("old packet new fragment latency %0d, expected 4", lat));
    chk(plue_hit, "PLUE hit for known identification");
    ppp_req = 1; ppp_we = 0; ppp_buf = 0; ppp_ofs = PB_LEN_RCVD; #1;
    chk(m_en && !m_we && m_addr == first_pkt + 1, "PPP read addresses the same packet buffer");
    @(negedge clk); ppp_req = 0;
    chk(ppp_rvalid, "read valid one cycle later");
    // all fragments in: remove the identification
    op(CI_ID_CAM, 8'(CAM_REMOVE));
    op(CI_RELEASE);
    repeat (3) @(negedge clk);

    // 3. the identification is gone: same ID now gets a new buffer
    packet(8'h01, 16'h1234, 1, 0, none, lat);
    chk(lat == 4 && !plue_hit, "removed identification misses");
    ppp_req = 1; ppp_we = 1; ppp_buf = 0; ppp_ofs = PB_LEN_TOTAL; ppp_wdata = 32'd7; #1;
    chk(m_addr == 20'h100A, "new packet buffer from the generator");
    @(negedge clk); ppp_req = 0; ppp_we = 0;
    op(CI_RELEASE, 8'd1);        // abort: buffer and PLUE entry given back
    chk(!uc_new_packet, "abort does not notify the micro controller");
    repeat (3) @(negedge clk);
    // the aborted packet's identification was taken out of the PLUE again
    packet(8'h01, 16'h1234, 1, 0, none, lat);
    chk(lat == 4 && !plue_hit, "identification of an aborted packet misses");
    op(CI_RELEASE, 8'd1);
    repeat (3) @(negedge clk);

    // 4. new unfragmented IPv6 packet
    packet(8'h02, 16'h0000, 0, 1, v6, lat);
    chk(lat == 11, $sformatf("IPv6 new packet latency %0d, expected 11", lat));
    chk(wr_data.exists(20'h1008) && wr_data[20'h1008] == 32'h20100, "IPv6 connection pointer (aborted buffer reused)");
    // PPP reads the connection buffer
    ppp_req = 1; ppp_we = 0; ppp_buf = 1; ppp_ofs = 8'd3; #1;
    chk(m_addr == 20'h20103, "PPP addresses the connection buffer");
    @(negedge clk); ppp_req = 0;
    op(CI_RELEASE);
    repeat (3) @(negedge clk);

    // 5. unknown connection: discard
    packet(8'h01, 16'h0000, 0, 1, v4bad, lat);
    chk(lat == -8, $sformatf("discard in cycle %0d, expected 8", -lat));
    @(negedge clk);
    chk(state_o == CS_WAIT && !busy, "discard returns to wait");

    // 6. the PPP enters the unknown connection itself (PA CAM write)
    packet(8'h01, 16'h0000, 0, 1, v4bad, lat);
    chk(lat == -8, "still unknown");
    packet(8'h05, 16'h0000, 0, 0, none, lat);       // control packet, no layer 4
    chk(lat == 3, $sformatf("control packet latency %0d, expected 3", lat));
    op(CI_SET_MEMBUF, 8'(BUF_CTRL));
    ppp_req = 1; ppp_we = 1; ppp_buf = 0; ppp_ofs = 8'd0; ppp_wdata = 32'hA5A5; #1;
    chk(m_addr == 20'h3000, "control packet buffer");
    @(negedge clk); ppp_req = 0; ppp_we = 0;
    op(CI_RELEASE);
    chk(uc_pkt_addr == 20'h3000, "micro controller told the control buffer");
    repeat (3) @(negedge clk);
    // a further control packet gets the next control buffer
    packet(8'h05, 16'h0000, 0, 0, none, lat);
    op(CI_SET_MEMBUF, 8'(BUF_CTRL));
    ppp_req = 1; ppp_we = 0; ppp_buf = 0; ppp_ofs = 8'd0; #1;
    chk(m_addr == 20'h3040, "control buffer pointer advanced");
    @(negedge clk); ppp_req = 0;
    // with the key still loaded from the discarded packet? no: load it again
    op(CI_RELEASE);
    repeat (3) @(negedge clk);
    packet(8'h01, 16'h0000, 0, 1, v4bad, lat);      // discarded, but key registers hold it
    packet(8'h01, 16'h0000, 0, 1, v4, lat);
    chk(lat == 9, "known connection again");
    op(CI_PA_CAM, 8'(CAM_WRITE));                   // enters the v4 key again at the free entry
    op(CI_RELEASE);
    chk(uc_conn_addr == 20'h2400, "PA CAM write takes a connection buffer");
    repeat (4) @(negedge clk);
    chk(slue_waddr == 6'd3, "SLUE write address after PA CAM write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
