// tb_input_buffer_chain: self-checking test of the input register chain.
// Streams random words with gaps and checks that stage k holds the input of
// k+1 cycles ago and that the output is the input delayed by DEPTH cycles.
// The 32-bit word-per-cycle chain follows the architecture; its depth and
// word format are this design's choices.
module tb_input_buffer_chain;
  import ppp_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  stream_word_t din, dout;
  stream_word_t stage [DEPTH];
  stream_word_t hist [$];
  int checks = 0, failures = 0;

  input_buffer_chain #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (dout !== '0 || stage[5] !== '0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 400; t++) begin
      din = '{valid: ($urandom_range(0, 5) != 0), sop: 1'($urandom), eop: 1'($urandom), be: 4'($urandom), data: $urandom};
      hist.push_front(din);
      @(posedge clk); #1;
      if (hist.size() > DEPTH) void'(hist.pop_back());
      for (int k = 0; k < DEPTH && k < hist.size(); k++) begin
        checks++;
        if (stage[k] !== hist[k]) begin failures++; $display("FAIL t=%0d stage %0d", t, k); end
      end
      if (hist.size() == DEPTH) begin
        checks++; if (dout !== hist[DEPTH-1]) begin failures++; $display("FAIL dout t=%0d", t); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
