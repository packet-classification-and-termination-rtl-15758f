// cam: binary content addressable memory with one valid bit per entry.
//
// Every entry is compared with `key` in parallel; `match` has a one for each
// valid entry whose content equals the key. The search is purely
// combinational from the key: the look-up engines around it register the key
// and treat the compare as a multi-cycle path. Entries are written and
// removed by index on the rising clock edge; a remove only clears the valid
// bit. `valid` is exported so that the owner can search for free entries.
// Binary (not ternary) cells are used, as the architecture proposes; the
// reset state (all entries invalid) is this implementation's choice.
module cam #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,       // write `wdata` at `widx`, set valid
  input  logic [IW-1:0]    widx,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rm,       // clear valid at `ridx`
  input  logic [IW-1:0]    ridx,
  input  logic [WIDTH-1:0] key,
  output logic [DEPTH-1:0] match,
  output logic [DEPTH-1:0] valid
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else begin
      if (rm) valid[ridx] <= 1'b0;
      if (we) valid[widx] <= 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) match[i] = valid[i] && (mem[i] == key);
  end
endmodule
