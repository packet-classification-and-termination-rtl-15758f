// tb_plue: self-checking test of the primary look-up engine.
// Fills the IP-identification CAM, then searches for present and absent
// identifications and checks hit, index, result address, and that `done`
// comes exactly 2 cycles after the search (the PLUE search time).
// The 16-bit key, M entries, W-bit result and 2-cycle search follow the
// architecture; the lowest-index choice on multiple matches is this design's.
module tb_plue;
  import ppp_pkg::*;
  localparam int M = 16, W = 20;
  logic clk = 0, rst_n = 0;
  logic search = 0, we = 0, rm = 0;
  logic [15:0] key = 0, wkey = 0;
  logic [3:0] widx = 0, ridx = 0, index;
  logic [W-1:0] wres = 0, result;
  logic done, hit;
  logic [M-1:0] valid;
  int checks = 0, failures = 0;
  logic [15:0] ids [M];
  logic [W-1:0] ress [M];
  logic [M-1:0] present;

  plue #(.M(M), .W(W), .LAT(PLUE_LAT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_search(logic [15:0] k, logic exp_hit, logic [3:0] exp_idx, logic [W-1:0] exp_res);
    int lat;
    @(negedge clk); search = 1; key = k;
    @(negedge clk); search = 0; key = 16'hDEAD;   // input register must hold the key
    lat = 1;
    while (!done && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != PLUE_LAT) begin failures++; $display("FAIL latency %0d", lat); end
    checks++;
    if (hit !== exp_hit || (exp_hit && (index !== exp_idx || result !== exp_res))) begin
      failures++;
      $display("FAIL key=%h hit=%b idx=%0d res=%h exp %b %0d %h", k, hit, index, result, exp_hit, exp_idx, exp_res);
    end
  endtask

  initial begin
    present = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < M; i++) begin
      ids[i] = 16'(i * 977 + 5); ress[i] = W'($urandom);
      @(negedge clk); we = 1; widx = 4'(i); wkey = ids[i]; wres = ress[i];
    end
    @(negedge clk); we = 0;
    checks++; if (valid !== '1) begin failures++; $display("FAIL valid %b", valid); end
    for (int i = 0; i < M; i++) do_search(ids[i], 1, 4'(i), ress[i]);
    do_search(16'hFFFF, 0, 0, 0);
    // remove entry 5
    @(negedge clk); rm = 1; ridx = 4'd5;
    @(negedge clk); rm = 0;
    do_search(ids[5], 0, 0, 0);
    do_search(ids[6], 1, 4'd6, ress[6]);
    checks++; if (valid[5] !== 1'b0) begin failures++; $display("FAIL valid[5]"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
