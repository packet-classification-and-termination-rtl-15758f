// tb_csum_adder: self-checking test of the ones-complement checksum page.
// Builds IPv4 headers with a correct header checksum and checks that the
// page sums 5 words to 0xFFFF (ok), that a corrupted header fails, the
// counted and end-of-packet stops, and the load / add-half commands used to
// accumulate partial sums across fragments. Sums are recomputed here with
// 32-bit arithmetic and a final fold.
// Expected sums follow the standard ones-complement checksum; the command
// set and timing checked are this design's own.
module tb_csum_adder;
  import ppp_pkg::*;
  logic clk = 0, rst_n = 0, kill = 0;
  fp_cmd_t cmd = '0;
  stream_word_t din = '0;
  logic [15:0] sum;
  logic ok, active;
  int checks = 0, failures = 0;

  csum_adder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] fold(logic [31:0] s);
    while (s[31:16] != 0) s = s[31:16] + s[15:0];
    return s[15:0];
  endfunction

  task automatic stream(logic [31:0] w [], int count, int extra);
    for (int i = 0; i < w.size() + extra; i++) begin
      @(negedge clk);
      din = '{valid: 1, sop: (i == 0), eop: (i == w.size() + extra - 1), be: 4'hF,
              data: (i < w.size()) ? w[i] : 32'h1234_5678};
      cmd = (i == 0) ? '{valid: 1, cmd: CSM_START, imm: 16'(count)} : '0;
    end
    @(negedge clk); din = '0; cmd = '0;
  endtask

  initial begin
    logic [31:0] h [];
    logic [31:0] acc;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      h = new[5];
      h[0] = {8'h45, 8'h00, 16'($urandom_range(40, 1500))};
      h[1] = $urandom;
      h[2] = {8'h40, 8'h11, 16'h0000};
      h[3] = $urandom; h[4] = $urandom;
      acc = 0;
      foreach (h[i]) acc += h[i][31:16] + h[i][15:0];
      h[2][15:0] = ~fold(acc);
      stream(h, 5, 3);                    // 3 more words follow, not summed
      checks++; if (!ok) begin failures++; $display("FAIL header %0d sum %h", t, sum); end
      h[3] ^= 32'h0100;
      stream(h, 5, 3);
      checks++; if (ok) begin failures++; $display("FAIL corrupted header %0d", t); end
      // count 0: to the end of the packet
      acc = 0;
      foreach (h[i]) acc += h[i][31:16] + h[i][15:0];
      stream(h, 0, 0);
      checks++; if (sum !== fold(acc)) begin failures++; $display("FAIL eop stop %h exp %h", sum, fold(acc)); end
      // to the end of the packet, leaving out the last (FCS) word
      stream(h, 16'h0100, 1);
      checks++; if (sum !== fold(acc)) begin failures++; $display("FAIL eop word left out %h exp %h", sum, fold(acc)); end
    end
    // partial sums: load 0xFFF0, add 0x0020 -> 0x0011 (end-around carry)
    @(negedge clk); din = '{valid: 1, sop: 0, eop: 0, be: 4'hF, data: 32'h0000FFF0};
    cmd = '{valid: 1, cmd: CSM_LOAD, imm: 0};
    @(negedge clk); din.data = 32'h00000020; cmd = '{valid: 1, cmd: CSM_ADD_HALF, imm: 0};
    @(negedge clk); cmd = '0; din = '0;
    checks++; if (sum !== 16'h0011) begin failures++; $display("FAIL partial %h", sum); end
    // kill
    @(negedge clk); din = '{valid: 1, sop: 1, eop: 0, be: 4'hF, data: 32'h1};
    cmd = '{valid: 1, cmd: CSM_START, imm: 0};
    @(negedge clk); cmd = '0; kill = 1;
    @(negedge clk); kill = 0;
    checks++; if (active) begin failures++; $display("FAIL kill"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
