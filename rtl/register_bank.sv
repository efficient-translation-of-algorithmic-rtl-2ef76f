// register_bank: the u-core's eight 8-bit registers R0..R7.
//
// Two combinational read ports (A and B, the Ra and Rb fields of the control
// word), one write port, and a pointer port that increments or decrements R7
// in the same cycle, which the memory instructions need for sequential
// access. When the write port also targets R7, the written value wins over
// the pointer update (this design's choice). A third read port serves
// debugging. All registers reset to zero (this design's choice); AES round-key
// addressing relies on R7 starting at zero.
module register_bank
  import mmc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,           // commit writes this cycle
  input  raddr_t ra_addr,
  output byte_t  ra_data,
  input  raddr_t rb_addr,
  output byte_t  rb_data,
  input  logic   we,
  input  raddr_t waddr,
  input  byte_t  wdata,
  input  logic   ptr_inc,
  input  logic   ptr_dec,
  input  raddr_t dbg_addr,
  output byte_t  dbg_data
);

  byte_t regs [NREG];

  assign ra_data  = regs[ra_addr];
  assign rb_data  = regs[rb_addr];
  assign dbg_data = regs[dbg_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (en) begin
      if (ptr_inc)      regs[PTR_REG] <= regs[PTR_REG] + byte_t'(1);
      else if (ptr_dec) regs[PTR_REG] <= regs[PTR_REG] - byte_t'(1);
      if (we) regs[waddr] <= wdata;
    end
  end

endmodule
