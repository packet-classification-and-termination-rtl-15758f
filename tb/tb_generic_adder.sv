// tb_generic_adder: self-checking test of the generic adder page.
// Random add and subtract commands compared with 33-bit arithmetic; the
// result must hold while no command is given.
// The architecture only names this page; the add/subtract behaviour and
// its one-cycle timing checked here are this design's choices.
module tb_generic_adder;
  import ppp_pkg::*;
  logic clk = 0, rst_n = 0;
  fp_cmd_t cmd = '0;
  logic [31:0] a = 0, b = 0, result;
  logic carry;
  int checks = 0, failures = 0;
  logic [32:0] model;

  generic_adder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    model = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      a = $urandom; b = (t % 5 == 0) ? a : $urandom;
      cmd = '{valid: ($urandom_range(0, 3) != 0), cmd: ($urandom_range(0, 1) ? GA_ADD : GA_SUB), imm: 0};
      if (cmd.valid) model = (cmd.cmd == GA_ADD) ? {1'b0, a} + {1'b0, b} : {1'b0, a} - {1'b0, b};
      @(posedge clk); #1;
      checks++;
      if ({carry, result} !== model) begin failures++; $display("FAIL %h %h -> %h exp %h", a, b, {carry, result}, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
