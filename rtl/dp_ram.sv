// dp_ram - simple dual-port RAM: one synchronous write port and one read port
// with a registered output (data appears one clock after re/raddr).  Used for
// the on-chip image buffers of the streak detection chain: binned frames,
// second-binned frames, the tile hit map and the region-of-interest mask.
// A read and a write to the same address in one cycle return the old word.
// Generic helper; sizes come from the instantiating module.
module dp_ram #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
