// tb_ctrl_mem: self-checking test of the control memory at its full size
// (2**20 words). Random writes and reads, compared with a sparse model;
// read data must appear one cycle after the read and hold while idle.
// The 32-bit word follows the architecture's data buses; the one-cycle read
// checked is this design's choice.
module tb_ctrl_mem;
  localparam int W = 20;
  logic clk = 0, en = 0, we = 0;
  logic [W-1:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] model [logic [W-1:0]];
  int checks = 0, failures = 0;

  ctrl_mem #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] keys [$];
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      if (keys.size() < 4 || $urandom_range(0, 1)) begin
        en = 1; we = 1; addr = (t % 4 == 0) ? W'(2**W - 1 - t) : W'($urandom); wdata = $urandom;
        model[addr] = wdata; keys.push_back(addr);
        @(negedge clk); en = 0; we = 0;
      end else begin
        logic [W-1:0] a;
        a = keys[$urandom_range(0, keys.size() - 1)];
        en = 1; we = 0; addr = a;
        @(negedge clk); en = 0; addr = W'($urandom);
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL read %h = %h exp %h", a, rdata, model[a]); end
        @(negedge clk);
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL read data not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
