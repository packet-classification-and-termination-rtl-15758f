// tb_cc_ctrl: self-checking test of the Counter and Controller.
// Loads a small program and streams packets past it. Checks that the first
// instruction runs in the start-of-packet cycle, that a word-count wait
// releases the next instruction exactly one word later, that the four-way
// jump takes each of its four targets according to two flags without a lost
// cycle, that a flag wait stalls, and the decoded page command, CMAA
// instruction (fragment flags taken from the flag inputs), memory accesses,
// decision, return to idle and the overrun report.
// The expected cycle timing follows the architecture's one-instruction-per-
// cycle sequencer with a jump that loses no cycle; the instruction encoding
// checked is this design's own.
module tb_cc_ctrl;
  import ppp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pm_we = 0;
  logic [5:0] pm_addr = 0;
  cc_instr_t pm_wdata;
  stream_word_t s0;
  logic [N_FLAGS-1:0] flags;
  fp_cmd_t fp_cmd [N_FP];
  logic [TAP_W-1:0] fp_tap, cmaa_tap;
  logic fp_stop_all, mem_req, mem_we, mem_buf, dec_valid, running, overrun;
  cmaa_instr_t cmaa_instr;
  logic [7:0] mem_ofs, wcnt;
  logic [2:0] mem_src;
  decision_e dec;
  int checks = 0, failures = 0;
  int cyc = 0;

  cc_ctrl #(.PM_DEPTH(64)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic cc_instr_t I(cc_op_e op, int sel = 0, int cmd = 0, int tap = 0, int a = 0, int imm = 0);
    return '{op: op, sel: 4'(sel), cmd: 4'(cmd), tap: TAP_W'(tap), a: 8'(a), imm: 16'(imm)};
  endfunction

  task automatic load(int addr, cc_instr_t i);
    @(negedge clk); pm_we = 1; pm_addr = 6'(addr); pm_wdata = i;
    @(negedge clk); pm_we = 0;
  endtask

  // event log of one packet
  int t_fp, t_cmaa, t_path, path, t_dec, t_rd, t_end, t_sop, wc_cmaa;
  cmaa_instr_t got_cmaa;
  always @(negedge clk) if (rst_n) begin
    if (fp_cmd[3].valid && fp_cmd[3].cmd == 4'd2 && fp_cmd[3].imm == 16'h55 && fp_tap == 1) t_fp = cyc;
    if (cmaa_instr.op == CI_NEW_PACKET && cmaa_tap == 2) begin t_cmaa = cyc; got_cmaa = cmaa_instr; wc_cmaa = wcnt; end
    if (mem_req && mem_we && mem_ofs < 4) begin t_path = cyc; path = mem_ofs; end
    if (dec_valid) t_dec = cyc;
    if (mem_req && !mem_we && mem_ofs == 8'h12 && mem_buf) t_rd = cyc;
  end

  task automatic packet(logic f9, logic f10, int ready_delay);
    t_fp = -1; t_cmaa = -1; t_path = -1; t_dec = -1; t_rd = -1;
    flags = '0; flags[1] = 1; flags[9] = f9; flags[10] = f10;
    fork
      begin
        for (int i = 0; i < 12; i++) begin
          s0 = '{valid: 1, sop: (i == 0), eop: (i == 11), be: 4'hF, data: 32'(i)};
          if (i == 0) t_sop = cyc;
          @(negedge clk);
        end
        s0 = '0;
      end
      begin
        repeat (ready_delay) @(negedge clk);
        flags[12] = 1;
      end
    join
    while (running) @(negedge clk);
    t_end = cyc;
    chk(t_fp == t_sop, "first instruction in the start-of-packet cycle");
    chk(t_cmaa == t_sop + 5 && wc_cmaa == 5, "CMAA instruction one word after the word-count wait");
    chk(got_cmaa.frag == f9 && got_cmaa.l4 == f10 && got_cmaa.cfg == 8'h07 && got_cmaa.last, "CMAA instruction fields");
    chk(path == {f9, f10} && t_path == t_sop + 8, $sformatf("four-way jump path %0d (exp %0d) at %0d", path, {f9, f10}, t_path - t_sop));
    chk(t_dec == t_sop + ready_delay + 1 || (ready_delay < 10 && t_dec == t_sop + 10), "decision after flag wait");
    chk(t_rd == t_dec + 1, "memory read after decision");
  endtask

  initial begin
    s0 = '0; flags = '0;
    pm_wdata = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    load(0, I(OP_FP, 3, 2, 1, 0, 16'h55));
    load(1, I(OP_WAITW, 0, 0, 0, 4));
    load(2, I(OP_CMAA, CI_NEW_PACKET, 1, 2, 8'h07));
    load(3, I(OP_JMP4, FLG_FRAG, FLG_FIRST, 0, 10));
    for (int k = 0; k < 4; k++) begin
      load(10 + k, I(OP_JMP4, 0, 0, 0, 20 + 2 * k));
      load(20 + 2 * k, I(OP_MEMWR, 0, 0, 0, k));
      load(21 + 2 * k, I(OP_JMP4, 0, 0, 0, 30));
    end
    load(30, I(OP_WAITF, FLG_SETTLED, 1));
    load(31, I(OP_DEC, 0, 0, 0, 0, DEC_HOST));
    load(32, I(OP_MEMRD, 1, 0, 0, 8'h12));
    load(33, I(OP_END));
    repeat (3) @(negedge clk);
    chk(!running, "idle before the first packet");
    packet(0, 0, 20);
    chk(!running && dec == DEC_HOST, "idle after END");
    packet(0, 1, 14);
    packet(1, 0, 25);
    packet(1, 1, 16);
    // a packet arriving while the program still runs
    fork
      packet(1, 1, 40);
      begin
        repeat (20) @(negedge clk);
        s0 = '{valid: 1, sop: 1, eop: 1, be: 4'hF, data: 0};
        @(negedge clk); s0 = '0;
        chk(overrun, "overrun reported");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
