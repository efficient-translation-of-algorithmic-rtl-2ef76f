// scratchpad: the u-core's 64-byte high-speed memory.
//
// One combinational read port and one write port, so that a memory read or
// write completes within the single cycle of its instruction. The address is
// the low six bits of an 8-bit register value (this design's choice: the
// upper bits are ignored, so addresses wrap modulo 64). A host write port,
// used to preload data such as AES round keys, takes priority over the core's
// own write (this design's choice).
module scratchpad
  import mmc_pkg::*;
#(
  parameter int unsigned BYTES = MEM_BYTES
) (
  input  logic  clk,
  input  byte_t raddr,
  output byte_t rdata,
  input  logic  we,
  input  byte_t waddr,
  input  byte_t wdata,
  input  logic  cfg_we,
  input  byte_t cfg_addr,
  input  byte_t cfg_data
);

  localparam int unsigned AW = $clog2(BYTES);

  byte_t mem [BYTES];

  assign rdata = mem[raddr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (cfg_we)  mem[cfg_addr[AW-1:0]] <= cfg_data;
    else if (we) mem[waddr[AW-1:0]]    <= wdata;
  end

endmodule
