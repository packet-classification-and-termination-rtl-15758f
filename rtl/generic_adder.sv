// generic_adder: generic adder functional page.
//
// A registered 32-bit adder/subtracter for the calculations the other pages
// do not cover, such as the total length of a reassembled packet (fragment
// offset plus fragment length). GA_ADD gives a + b, GA_SUB a - b; `result`
// and `carry` (borrow for subtraction) are valid the cycle after the
// command and hold until the next one. The operand sources are wired by the
// processor around it. Only the page's existence is given; its operations
// are this implementation's choice.
module generic_adder
  import ppp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fp_cmd_t     cmd,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result,
  output logic        carry
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result <= '0;
      carry  <= 1'b0;
    end else if (cmd.valid) begin
      if (cmd.cmd == GA_ADD)      {carry, result} <= {1'b0, a} + {1'b0, b};
      else if (cmd.cmd == GA_SUB) {carry, result} <= {1'b0, a} - {1'b0, b};
    end
  end
endmodule
