// tb_slue: self-checking test of the secondary look-up engine.
// Enters connections of the kinds in the wildcard configurations (IPv4 with
// both addresses, IPv4 with the source only, IPv6 with a 128-bit source,
// UDP with ports only), loads keys word by word as the CMAA does, and checks
// hit, index, result and that the search takes exactly 3 cycles.
// Field widths, N entries, per-CAM wildcard and 3-cycle search follow the
// architecture; key loading by word select is this design's choice.
module tb_slue;
  import ppp_pkg::*;
  localparam int N = 64, W = 20;
  logic clk = 0, rst_n = 0;
  logic ld_type = 0, ld_word = 0, search = 0, we = 0, rm = 0;
  logic [7:0] type_in = 0;
  logic [2:0] ld_sel = 0;
  logic [31:0] word_in = 0;
  conn_key_t key_q, wkey;
  slue_mask_t mask = 0;
  logic done, hit;
  logic [5:0] index, widx = 0, ridx = 0;
  logic [W-1:0] result, wres = 0;
  logic [N-1:0] valid;
  int checks = 0, failures = 0;

  slue #(.N(N), .W(W), .LAT(SLUE_LAT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic enter(int idx, conn_key_t k, logic [W-1:0] r);
    @(negedge clk); we = 1; widx = 6'(idx); wkey = k; wres = r;
    @(negedge clk); we = 0;
  endtask

  // load type and words the way the CMAA does, last word with the search
  task automatic lookup(conn_key_t k, slue_mask_t m, int nwords, logic exp_hit, int exp_idx, logic [W-1:0] exp_res);
    logic [31:0] words [5];
    int lat;
    words[0] = {k.sport, k.dport}; words[1] = k.adr0; words[2] = k.adr1;
    words[3] = k.adr2[31:0]; words[4] = k.adr2[63:32];
    @(negedge clk); ld_type = 1; type_in = k.ptype;
    for (int i = 0; i < nwords; i++) begin
      @(negedge clk); ld_type = 0; ld_word = 1; ld_sel = 3'(i); word_in = words[i];
      if (i == nwords - 1) begin search = 1; mask = m; end
    end
    @(negedge clk); ld_word = 0; search = 0; mask = '0;
    lat = 1;
    while (!done && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != SLUE_LAT) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (hit !== exp_hit || (exp_hit && (index !== 6'(exp_idx) || result !== exp_res))) begin
      failures++;
      $display("FAIL hit=%b idx=%0d res=%h exp %b %0d %h", hit, index, result, exp_hit, exp_idx, exp_res);
    end
  endtask

  conn_key_t k4, k4s, k6, ku, probe;
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    k4  = '{ptype: 8'h06, sport: 16'd80,   dport: 16'd4000, adr0: 32'h0A000001, adr1: 32'h0A000063, adr2: '0};
    k4s = '{ptype: 8'h16, sport: 16'd0,    dport: 16'd22,   adr0: 32'h0A000002, adr1: '0, adr2: '0};
    k6  = '{ptype: 8'h26, sport: 16'd443,  dport: 16'd5000, adr0: 32'h20010DB8, adr1: 32'h1, adr2: 64'h0123456789ABCDEF};
    ku  = '{ptype: 8'h11, sport: 16'd53,   dport: 16'd53,   adr0: '0, adr1: '0, adr2: '0};
    enter(3, k4, 20'h11111);
    enter(17, k4s, 20'h22222);
    enter(40, k6, 20'h33333);
    enter(63, ku, 20'h44444);
    lookup(k4, 6'b100000, 3, 1, 3, 20'h11111);            // IPv4: adr2 unused
    probe = k4; probe.adr1 = 32'h0A000064;
    lookup(probe, 6'b100000, 3, 0, 0, 0);                 // wrong destination
    probe = k4s; probe.sport = 16'd1234; probe.adr1 = 32'hFFFFFFFF;
    lookup(probe, 6'b110010, 3, 1, 17, 20'h22222);        // source port and adr1 wildcards
    lookup(k6, 6'b000000, 5, 1, 40, 20'h33333);           // IPv6 128-bit source
    probe = k6; probe.adr2[0] = 1'b0;
    lookup(probe, 6'b000000, 5, 0, 0, 0);
    probe = ku; probe.adr0 = 32'h12345678;
    lookup(probe, 6'b111000, 1, 1, 63, 20'h44444);        // UDP: ports only
    probe = ku; probe.ptype = 8'h06;
    lookup(probe, 6'b111000, 1, 0, 0, 0);                 // type separates entries
    @(negedge clk); rm = 1; ridx = 6'd40; @(negedge clk); rm = 0;
    lookup(k6, 6'b000000, 5, 0, 0, 0);
    checks++; if (valid != ((64'd1 << 3) | (64'd1 << 17) | (64'd1 << 63))) begin failures++; $display("FAIL valid"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
