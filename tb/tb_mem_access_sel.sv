// tb_mem_access_sel: self-checking test of the control memory selector.
// Random requests from both sides: the accelerator side always gets the
// port, the micro controller only when allowed and the accelerator is
// idle; read-valid flags follow one cycle later to the right side.
// Priority and the access windows follow the architecture; the read timing
// checked is this design's choice.
module tb_mem_access_sel;
  localparam int W = 20;
  logic clk = 0, rst_n = 0;
  logic uc_allow, a_req, a_we, uc_req, uc_we;
  logic [W-1:0] a_addr, uc_addr, m_addr;
  logic [31:0] a_wdata, uc_wdata, m_wdata;
  logic a_rvalid, uc_gnt, uc_rvalid, m_en, m_we;
  int checks = 0, failures = 0;
  logic exp_a_rv, exp_uc_rv;

  mem_access_sel #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {uc_allow, a_req, a_we, uc_req, uc_we} = '0;
    a_addr = 0; uc_addr = 0; a_wdata = 0; uc_wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      logic g;
      @(negedge clk);
      uc_allow = 1'($urandom); a_req = 1'($urandom); a_we = 1'($urandom);
      uc_req = 1'($urandom); uc_we = 1'($urandom);
      a_addr = W'($urandom); uc_addr = W'($urandom); a_wdata = $urandom; uc_wdata = $urandom;
      #1;
      g = uc_req && uc_allow && !a_req;
      checks++;
      if (uc_gnt !== g || m_en !== (a_req || g)) begin failures++; $display("FAIL grant t=%0d", t); end
      if (a_req) begin
        checks++;
        if (m_addr !== a_addr || m_we !== a_we || m_wdata !== a_wdata) begin failures++; $display("FAIL a-side port"); end
      end else if (g) begin
        checks++;
        if (m_addr !== uc_addr || m_we !== uc_we || m_wdata !== uc_wdata) begin failures++; $display("FAIL uc port"); end
      end
      exp_a_rv = a_req && !a_we; exp_uc_rv = g && !uc_we;
      @(posedge clk); #1;
      checks++;
      if (a_rvalid !== exp_a_rv || uc_rvalid !== exp_uc_rv) begin failures++; $display("FAIL rvalid t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
