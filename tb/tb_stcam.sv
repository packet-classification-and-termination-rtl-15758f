// tb_stcam: self-checking test of the simplified TCAM.
// Writes entries of three fields and checks the match vector for every
// combination of the three whole-field wildcard bits against a reference.
// The whole-CAM wildcard follows the architecture; the valid-bit handling
// checked is this design's choice.
module tb_stcam;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic we = 0, rm = 0;
  logic [2:0] widx = 0, ridx = 0, mask = 0;
  logic [7:0] wdata0 = 0, key0 = 0;
  logic [15:0] wdata1 = 0, wdata2 = 0, key1 = 0, key2 = 0;
  logic [DEPTH-1:0] match, valid;
  int checks = 0, failures = 0;
  logic [7:0] r0 [DEPTH];
  logic [15:0] r1 [DEPTH], r2 [DEPTH];
  logic [DEPTH-1:0] rv;

  stcam #(.W0(8), .W1(16), .W2(16), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rv = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH - 1; i++) begin   // entry 7 stays invalid
      r0[i] = 8'($urandom_range(1, 2)); r1[i] = 16'($urandom_range(80, 81)); r2[i] = 16'($urandom_range(5000, 5001));
      @(negedge clk); we = 1; widx = 3'(i); wdata0 = r0[i]; wdata1 = r1[i]; wdata2 = r2[i];
      rv[i] = 1'b1;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 200; n++) begin
      logic [DEPTH-1:0] e;
      key0 = 8'($urandom_range(1, 2)); key1 = 16'($urandom_range(80, 81)); key2 = 16'($urandom_range(5000, 5001));
      mask = 3'($urandom);
      #1;
      for (int i = 0; i < DEPTH; i++)
        e[i] = rv[i] && (mask[0] || r0[i] == key0) && (mask[1] || r1[i] == key1) && (mask[2] || r2[i] == key2);
      checks++;
      if (match !== e) begin failures++; $display("FAIL mask=%b match=%b exp=%b", mask, match, e); end
      @(negedge clk);
    end
    // all wildcards: every valid entry matches, the invalid one does not
    mask = 3'b111; #1; checks++;
    if (match !== 8'b0111_1111) begin failures++; $display("FAIL all-wildcard %b", match); end
    // remove
    @(negedge clk); rm = 1; ridx = 3'd2; @(negedge clk); rm = 0; #1; checks++;
    if (match !== 8'b0111_1011) begin failures++; $display("FAIL after remove %b", match); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
