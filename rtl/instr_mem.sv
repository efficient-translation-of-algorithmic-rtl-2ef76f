// instr_mem: the instruction memory that feeds one u-core a control word every
// cycle. Each core has its own, so that every core of the array runs its own
// micro-program; all are read at the same address, the array's shared program
// counter. Depth, the host write port and the combinational read are this
// design's choices (the instruction memory is drawn only as an external box).
module instr_mem
  import mmc_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  cw_t                      wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output cw_t                      rdata
);

  cw_t mem [DEPTH];

  assign rdata = mem[raddr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
