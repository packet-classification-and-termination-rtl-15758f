// tb_cmaa_slue4: CMAA latency with a 4-cycle secondary look-up engine.
//
// Same set-up as the CMAA unit test, but the accelerator is built with
// SLAT = 4, the slower CAM the architecture also considers. Counting the
// NEW_PACKET cycle as 1, packet-ready must then rise in cycle 10 for a new
// IPv4 packet (3 key words) and 12 for a new IPv6 packet (5 key words),
// while a further fragment of a known packet, which skips the connection
// search, still takes 4 cycles. A new IPv4 packet with an unknown
// connection is discarded one cycle later than with the 3-cycle engine.
module tb_cmaa_slue4;
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

  cmaa #(.SLAT(4)) dut (.*);
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

    // new IPv4 packet, first fragment
    packet(8'h01, 16'h1234, 1, 1, v4, lat);
    chk(lat == 10, $sformatf("IPv4 new packet latency %0d, expected 10", lat));
    chk(!plue_hit && slue_hit, "PLUE miss, SLUE hit");
    chk(wr_data.exists(20'h1000) && wr_data[20'h1000] == 32'h20000, "connection pointer in packet buffer");
    op(CI_RELEASE);
    repeat (3) @(negedge clk);
    // further fragment of the same packet
    packet(8'h01, 16'h1234, 1, 0, none, lat);
    chk(lat == 4, $sformatf("old packet new fragment latency %0d, expected 4", lat));
    chk(plue_hit, "PLUE hit");
    op(CI_RELEASE);
    repeat (3) @(negedge clk);
    // new unfragmented IPv6 packet
    packet(8'h02, 16'h0000, 0, 1, v6, lat);
    chk(lat == 12, $sformatf("IPv6 new packet latency %0d, expected 12", lat));
    chk(slue_hit && uc_conn_addr != 20'hFFFFF, "IPv6 connection found");
    op(CI_RELEASE);
    chk(uc_new_packet && uc_conn_addr == 20'h20100, "IPv6 connection buffer to micro controller");
    repeat (3) @(negedge clk);
    // unknown connection
    packet(8'h01, 16'h0000, 0, 1, v4bad, lat);
    chk(lat == -9, $sformatf("discard in cycle %0d, expected 9", -lat));
    repeat (2) @(negedge clk);
    chk(state_o == CS_WAIT, "back to wait");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
