// tb_mem_buffer_gen: self-checking test of the buffer pointer generator.
// Configures three regions and checks the sequence of handed-out addresses,
// wrap-around at the limit, independent regions, and reconfiguration.
// The architecture says only that the generator hands out packet and
// connection buffers under micro controller control; the region, stride and
// wrap behaviour checked here are this design's choices.
module tb_mem_buffer_gen;
  localparam int W = 20;
  logic clk = 0, rst_n = 0, cfg_we = 0;
  logic [1:0] cfg_region = 0;
  logic [W-1:0] cfg_base = 0, cfg_limit = 0, cfg_stride = 0;
  logic [2:0] advance = 0;
  logic [2:0][W-1:0] addr;
  int checks = 0, failures = 0;
  logic [W-1:0] exp [3], base [3], lim [3], str [3];

  mem_buffer_gen #(.W(W), .R(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    base = '{20'h01000, 20'h02000, 20'h03000};
    lim  = '{20'h0103F, 20'h020FF, 20'h030FF};   // region 0 holds 8 buffers
    str  = '{20'd8, 20'd16, 20'd64};
    for (int r = 0; r < 3; r++) begin
      @(negedge clk); cfg_we = 1; cfg_region = 2'(r); cfg_base = base[r]; cfg_limit = lim[r]; cfg_stride = str[r];
      exp[r] = base[r];
    end
    @(negedge clk); cfg_we = 0;
    for (int t = 0; t < 100; t++) begin
      advance = 3'($urandom);
      @(posedge clk); #1;
      for (int r = 0; r < 3; r++) if (advance[r]) begin
        exp[r] = (exp[r] + 2 * str[r] - 1 > lim[r]) ? base[r] : exp[r] + str[r];
      end
      for (int r = 0; r < 3; r++) begin
        checks++;
        if (addr[r] !== exp[r]) begin failures++; $display("FAIL t=%0d region %0d addr %h exp %h", t, r, addr[r], exp[r]); end
      end
      @(negedge clk);
    end
    advance = 0;
    // region 0 wraps after 8 buffers: last one is base + 7*8
    @(negedge clk); cfg_we = 1; cfg_region = 0; cfg_base = base[0]; cfg_limit = lim[0]; cfg_stride = str[0];
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < 7; i++) begin advance = 3'b001; @(negedge clk); end
    advance = 0;
    checks++; if (addr[0] !== 20'h01038) begin failures++; $display("FAIL last buffer %h", addr[0]); end
    advance = 3'b001; @(negedge clk); advance = 0;
    checks++; if (addr[0] !== 20'h01000) begin failures++; $display("FAIL wrap %h", addr[0]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
