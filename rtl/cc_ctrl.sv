// cc_ctrl: Counter and Controller (C&C) of the protocol processor.
//
// A small sequencer that schedules the functional pages (FP) and the CMAA
// while the packet streams through the input buffer chain. A program counter
// selects an instruction in a program memory loaded by the micro controller;
// the instruction is decoded into the control signals of one cycle. A word
// counter gives the position in the packet of the word in chain stage 0, so
// a command can be issued in the right clock cycle, and each command names
// the chain stage (tap) its data word is taken from.
//
// The jump decision block computes the next PC in the same cycle from the
// current PC and two selected result flags: OP_JMP4 goes to a + {flag[sel],
// flag[cmd]}, a four-way branch that costs one cycle like any instruction.
// Idle, the C&C waits for a start of packet in stage 0 and then runs from
// address 0, executing the first instruction in that cycle; OP_END returns
// it to idle. A start of packet that arrives while a program is still
// running is reported on `overrun` (the packet gap was too short).
// A discard decision stops all pages at once (`fp_stop_all`).
//
// The PC / program memory / decoder / jump decision structure follows the
// architecture. The instruction word (cc_instr_t), the operations and the
// program memory size are this implementation's choice.
module cc_ctrl
  import ppp_pkg::*;
#(
  parameter int unsigned PM_DEPTH = 128,
  localparam int unsigned PW = $clog2(PM_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // program load (micro controller)
  input  logic                 pm_we,
  input  logic [PW-1:0]        pm_addr,
  input  cc_instr_t            pm_wdata,
  // stream position
  input  stream_word_t         s0,          // chain stage 0
  // result flags
  input  logic [N_FLAGS-1:0]   flags,
  // functional pages
  output fp_cmd_t              fp_cmd [N_FP],
  output logic [TAP_W-1:0]     fp_tap,
  output logic                 fp_stop_all,
  // CMAA
  output cmaa_instr_t          cmaa_instr,
  output logic [TAP_W-1:0]     cmaa_tap,
  // control memory access through the CMAA
  output logic                 mem_req,
  output logic                 mem_we,
  output logic                 mem_buf,
  output logic [7:0]           mem_ofs,
  output logic [2:0]           mem_src,     // MEMWR: source selector
  // packet decision
  output logic                 dec_valid,
  output decision_e            dec,
  output logic                 running,
  output logic                 overrun,
  output logic [7:0]           wcnt
);
  cc_instr_t   pm [PM_DEPTH];
  logic [PW-1:0] pc, pc_next;
  logic [7:0]  cnt_q;
  cc_instr_t   ins;
  logic        stall, run_now;

  always_ff @(posedge clk) begin
    if (pm_we) pm[pm_addr] <= pm_wdata;
  end

  // word counter: index in the packet of the word now in stage 0
  assign wcnt = s0.sop ? 8'd0 : cnt_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (s0.valid) cnt_q <= wcnt + 8'd1;
  end

  assign run_now = running || (s0.valid && s0.sop);
  assign ins     = pm[running ? pc : '0];

  // decoder
  always_comb begin
    for (int i = 0; i < N_FP; i++) fp_cmd[i] = '0;
    fp_tap      = ins.tap;
    fp_stop_all = 1'b0;
    cmaa_instr  = '{op: CI_NOP, cfg: '0, frag: 1'b0, l4: 1'b0, last: 1'b0};
    cmaa_tap    = ins.tap;
    mem_req     = 1'b0;
    mem_we      = 1'b0;
    mem_buf     = ins.sel[0];
    mem_ofs     = ins.a;
    mem_src     = ins.sel[3:1];
    dec_valid   = 1'b0;
    dec         = decision_e'(ins.imm[1:0]);
    stall       = 1'b0;
    if (run_now) begin
      unique case (ins.op)
        OP_WAITW: stall = !(s0.valid && wcnt == ins.a);
        OP_FP: begin
          if (ins.sel < 4'(N_FP)) begin
            fp_cmd[ins.sel[2:0]].valid = 1'b1;
            fp_cmd[ins.sel[2:0]].cmd   = ins.cmd;
            fp_cmd[ins.sel[2:0]].imm   = ins.imm;
          end
        end
        OP_CMAA: begin
          cmaa_instr.op   = cmaa_op_e'(ins.sel[2:0]);
          cmaa_instr.cfg  = ins.a;
          cmaa_instr.frag = flags[FLG_FRAG];
          cmaa_instr.l4   = flags[FLG_FIRST];
          cmaa_instr.last = ins.cmd[0];
        end
        OP_WAITF: stall = (flags[ins.sel] != ins.cmd[0]);
        OP_DEC: begin
          dec_valid   = 1'b1;
          fp_stop_all = (ins.imm[1:0] == DEC_DISCARD);
        end
        OP_MEMRD: mem_req = 1'b1;
        OP_MEMWR: begin
          mem_req = 1'b1;
          mem_we  = 1'b1;
        end
        default: ;
      endcase
    end
  end

  // jump decision
  always_comb begin
    pc_next = (running ? pc : '0) + 1'b1;
    if (stall)                pc_next = running ? pc : '0;
    else if (ins.op == OP_JMP4)
      pc_next = PW'(ins.a) + PW'({flags[ins.sel], flags[ins.cmd]});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      running <= 1'b0;
      overrun <= 1'b0;
    end else begin
      overrun <= running && s0.valid && s0.sop;
      if (run_now) begin
        if (ins.op == OP_END) begin
          running <= 1'b0;
          pc      <= '0;
        end else begin
          running <= 1'b1;
          pc      <= pc_next;
        end
      end
    end
  end
endmodule
