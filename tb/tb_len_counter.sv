// tb_len_counter: self-checking test of the length counting adder.
// Applies random command sequences and compares the count with a model.
// The architecture gives the page's purpose; the commands checked here are
// this design's own.
module tb_len_counter;
  import ppp_pkg::*;
  logic clk = 0, rst_n = 0;
  fp_cmd_t cmd = '0;
  logic [31:0] data = 0;
  logic [15:0] ext = 0, acc;
  int checks = 0, failures = 0;
  logic [15:0] model;

  len_counter #(.LW(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] c;
    repeat (2) @(negedge clk); rst_n = 1;
    model = 0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      c = 4'($urandom_range(1, 6));
      data = $urandom; ext = 16'($urandom);
      cmd = '{valid: ($urandom_range(0, 4) != 0), cmd: c, imm: 16'($urandom)};
      if (cmd.valid) begin
        case (c)
          LEN_LOAD:    model = data[15:0];
          LEN_ADD_HI:  model = model + data[31:16];
          LEN_ADD_LO:  model = model + data[15:0];
          LEN_SUB_IMM: model = model - {1'b0, cmd.imm[14:0]};
          LEN_ADD_EXT: model = model + ext;
          LEN_CLEAR:   model = 0;
          default: ;
        endcase
      end
      @(posedge clk); #1;
      checks++;
      if (acc !== model) begin failures++; $display("FAIL cmd %0d acc %h exp %h", c, acc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
