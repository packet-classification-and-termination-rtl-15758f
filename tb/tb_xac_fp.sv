// tb_xac_fp: self-checking test of the extract-and-compare page.
// Checks masked compares against the configured reference (address and
// port checks), whole-word compares with the external operand, and field
// extraction with mask and shift, against values computed here.
// The page's purpose follows the architecture; the compare and extract
// commands checked are this design's own.
module tb_xac_fp;
  import ppp_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [31:0] cfg_ref = 0, cfg_mask = 0, data = 0, ext = 0;
  logic [4:0] cfg_shift = 0;
  fp_cmd_t cmd = '0;
  logic match, done;
  logic [31:0] value;
  int checks = 0, failures = 0;

  xac_fp dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [3:0] c, logic [31:0] d, logic [31:0] e, logic exp_m, logic [31:0] exp_v, logic chk_m);
    @(negedge clk); cmd = '{valid: 1, cmd: c, imm: 0}; data = d; ext = e;
    @(negedge clk); cmd = '0;
    checks++;
    if (!done || value !== exp_v || (chk_m && match !== exp_m)) begin
      failures++;
      $display("FAIL cmd %0d data %h: match %b value %h exp %b %h", c, d, match, value, exp_m, exp_v);
    end
  endtask

  initial begin
    logic [31:0] r, m, d;
    logic [4:0] s;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      r = $urandom; m = (t % 3 == 0) ? 32'hFFFFFFFF : (t % 3 == 1 ? 32'h0000FFFF : 32'hFFFF0000);
      s = (m == 32'hFFFF0000) ? 5'd16 : 5'd0;
      @(negedge clk); cfg_we = 1; cfg_ref = r; cfg_mask = m; cfg_shift = s;
      @(negedge clk); cfg_we = 0;
      d = ($urandom_range(0, 1) == 1) ? (r ^ (~m & $urandom)) : $urandom;
      run(XAC_CMP_REF, d, 0, ((d ^ r) & m) == 0, (d & m) >> s, 1);
      run(XAC_EXTRACT, d, 0, 0, (d & m) >> s, 0);
      run(XAC_CMP_EXT, d, (t % 2) ? d : d + 1, (t % 2) == 1, (d & m) >> s, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
