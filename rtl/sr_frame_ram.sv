// sr_frame_ram: on-chip frame memory with one write port and NRD read ports.
//
// Models the block RAM (M4k blocks on the original target) that holds the
// low-resolution frames and the banks of the high-resolution frames. Each read
// port has a registered address path: the address presented in cycle t gives
// rdata in cycle t + 1. A write in cycle t is visible to reads addressed from
// cycle t + 1. Several read ports on one array stand for a memory replicated
// once per reader (each copy a simple dual-port RAM with the common write
// port); the number of ports is this design's choice. Contents are not reset:
// they are loaded before use.
module sr_frame_ram
  import sr_pkg::*;
#(
  parameter int unsigned WORDS = 76800,
  parameter int unsigned NRD   = 4,
  localparam int unsigned AW   = (WORDS > 1) ? $clog2(WORDS) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  fp32_t         wdata,
  input  logic [AW-1:0] raddr [NRD],
  output fp32_t         rdata [NRD]
);
  fp32_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    for (int p = 0; p < NRD; p++) rdata[p] <= mem[raddr[p]];
  end

  // Addresses must stay inside the array.
  always_ff @(posedge clk) begin
    if (we) assert (int'(waddr) < WORDS) else $error("sr_frame_ram: write address %0d out of range", waddr);
  end
endmodule
