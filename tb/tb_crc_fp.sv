// tb_crc_fp: self-checking test of the CRC functional page.
// Checks the CRC-32 check value of "123456789" (0xCBF43926), random frames
// against a bit-serial reference computed here, the residue check after the
// FCS is appended, byte enables on the first and last words, and kill.
// Expected values follow the Ethernet CRC-32 standard; the command timing
// checked is this design's own.
module tb_crc_fp;
  import ppp_pkg::*;
  logic clk = 0, rst_n = 0, kill = 0;
  fp_cmd_t cmd = '0;
  stream_word_t din = '0;
  logic [31:0] crc;
  logic crc_ok, done, active;
  int checks = 0, failures = 0;

  crc_fp dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bit-serial reference, one byte at a time, LSB first
  function automatic logic [31:0] ref_crc(byte unsigned b[$]);
    logic [31:0] c = 32'hFFFFFFFF;
    foreach (b[i]) for (int k = 0; k < 8; k++) begin
      logic fb = c[0] ^ b[i][k];
      c = c >> 1;
      if (fb) c = c ^ 32'hEDB88320;
    end
    return ~c;
  endfunction

  // stream bytes, first word with `lead` unused leading bytes
  task automatic send(byte unsigned b[$], int lead);
    byte unsigned q[$];
    int n;
    q = b;
    n = 0;
    while (q.size() > 0) begin
      @(negedge clk);
      din = '0; din.valid = 1; din.sop = (n == 0);
      for (int k = 3; k >= 0; k--) begin
        if (n == 0 && (3 - k) < lead) continue;
        if (q.size() == 0) break;
        din.data[8*k +: 8] = q.pop_front();
        din.be[k] = 1'b1;
      end
      din.eop = (q.size() == 0);
      cmd = '0;
      if (n == 0) begin cmd.valid = 1; cmd.cmd = CRC_START; end
      n++;
    end
    @(negedge clk); din = '0; cmd = '0;
  endtask

  initial begin
    byte unsigned s[$], f[$];
    logic [31:0] r;
    repeat (2) @(negedge clk); rst_n = 1;
    s = '{8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39};
    send(s, 0);
    checks++; if (crc !== 32'hCBF43926) begin failures++; $display("FAIL check value %h", crc); end
    checks++; if (active) begin failures++; $display("FAIL still active after eop"); end
    for (int t = 0; t < 40; t++) begin
      int len = $urandom_range(14, 90);
      int lead = (t % 2) ? 2 : 0;
      f = {};
      for (int i = 0; i < len; i++) f.push_back(8'($urandom));
      send(f, lead);
      r = ref_crc(f);
      checks++; if (crc !== r) begin failures++; $display("FAIL frame %0d crc %h exp %h", t, crc, r); end
      // append FCS (least significant byte first) and check the residue
      for (int i = 0; i < 4; i++) f.push_back(r[8*i +: 8]);
      send(f, lead);
      checks++; if (!crc_ok) begin failures++; $display("FAIL residue frame %0d", t); end
      f[3] ^= 8'h10;
      send(f, lead);
      checks++; if (crc_ok) begin failures++; $display("FAIL corrupted frame accepted %0d", t); end
    end
    // kill stops the page
    @(negedge clk); din = '{valid: 1, sop: 1, eop: 0, be: 4'hF, data: 32'h01020304};
    cmd = '{valid: 1, cmd: CRC_START, imm: 0};
    @(negedge clk); cmd = '0; kill = 1;
    @(negedge clk); kill = 0;
    checks++; if (active) begin failures++; $display("FAIL kill"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
