// tb_cam: self-checking test of the binary CAM.
// Writes random entries (with deliberate duplicates), removes some, and
// compares the match and valid vectors with a reference model kept in the
// testbench, for random keys and for keys known to be present.
module tb_cam;
  localparam int WIDTH = 16, DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic we = 0, rm = 0;
  logic [3:0] widx = 0, ridx = 0;
  logic [WIDTH-1:0] wdata = 0, key = 0;
  logic [DEPTH-1:0] match, valid;
  int checks = 0, failures = 0;

  logic [WIDTH-1:0] ref_mem [DEPTH];
  logic [DEPTH-1:0] ref_valid;

  cam #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DEPTH-1:0] ref_match(logic [WIDTH-1:0] k);
    logic [DEPTH-1:0] m;
    for (int i = 0; i < DEPTH; i++) m[i] = ref_valid[i] && ref_mem[i] == k;
    return m;
  endfunction

  task automatic check_key(logic [WIDTH-1:0] k);
    key = k;
    #1;
    checks++;
    if (match !== ref_match(k) || valid !== ref_valid) begin
      failures++;
      $display("FAIL key=%h match=%b exp=%b", k, match, ref_match(k));
    end
  endtask

  initial begin
    ref_valid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_key(16'h0000);            // empty after reset
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 0; rm = 0;
      if ($urandom_range(0, 3) != 0) begin
        we = 1; widx = 4'($urandom); wdata = 16'($urandom_range(0, 7)) * 16'h1111;
      end else begin
        rm = 1; ridx = 4'($urandom);
      end
      @(posedge clk); #1;
      if (rm) ref_valid[ridx] = 1'b0;
      if (we) begin ref_mem[widx] = wdata; ref_valid[widx] = 1'b1; end
      we = 0; rm = 0;
      check_key(16'($urandom_range(0, 7)) * 16'h1111);
    end
    // write and remove the same entry in one cycle: the write wins
    @(negedge clk); we = 1; rm = 1; widx = 4'd3; ridx = 4'd3; wdata = 16'hBEEF;
    @(posedge clk); #1; we = 0; rm = 0; ref_mem[3] = 16'hBEEF; ref_valid[3] = 1'b1;
    check_key(16'hBEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
