// mmc_pkg: types and constants shared by the u-core and the multi-u-core
// (MMC) array.
//
// A u-core executes one 11-bit control word (CW) per cycle. The CW layout is
// horizontal: bits [10:9] pick the instruction class and the remaining fields
// are register addresses or port selects that drive the datapath directly.
//
//   [10:9]=00  R[Rc] <= F0(R[Rb], R[Ra])  bitwise, AND after reset
//   [10:9]=01  R[Rc] <= F1(R[Rb], R[Ra])  bitwise, XOR after reset
//              Rc=[8:6] Rb=[5:3] Ra=[2:0]
//   [10:9]=10  [2:0]=000 R[Rc] <= LUT(R[Rb])
//              [2:0]=011 R[Rc] <= R[Rb] << 1   (reduced by POLY, see ALU)
//              [2:0]=100 R[Rc] <= R[Rb] >> 1
//   [10:9]=11  [8:6]=111 [5:3]=111 R[Ra]++ ; [5:3]=000 R[Ra]--
//              [8:6]=001 [2]=0  R[Rb] <= INPUT(port [1:0])
//              [8:6]=001 [2]=1  OUTPUT(port [1:0]) <= R[Rb]
//              [8:6]=100 R[Ra] <= MEM(R[Rb]); R7 post-decrements if Rb==7
//              [8:6]=010 MEM(R[Ra]) <= R[Rb]; R7 post-increments if Ra==7
//              [8:6]=000 R[Rb] <= R[Ra]  (register move; this design's code)
//   every other code leaves the core unchanged (no operation).
// Port select: 00 East, 01 West, 10 North, 11 South.
package mmc_pkg;

  localparam int DW        = 8;    // register / datapath width
  localparam int NREG      = 8;    // R0..R7
  localparam int RA_W      = 3;
  localparam int CW_W      = 11;   // control word length
  localparam int MEM_BYTES = 64;   // scratchpad size
  localparam int MEM_AW    = 6;
  localparam int LUT_DEPTH = 256;  // lookup table entries
  localparam int PTR_REG   = 7;    // auto-increment / decrement pointer register

  typedef logic [DW-1:0]   byte_t;
  typedef logic [CW_W-1:0] cw_t;
  typedef logic [RA_W-1:0] raddr_t;

  typedef enum logic [1:0] {
    PORT_E = 2'd0,
    PORT_W = 2'd1,
    PORT_N = 2'd2,
    PORT_S = 2'd3
  } port_e;

  typedef enum logic [2:0] {
    ALU_BOOL0,          // class 00 bitwise function (AND after reset)
    ALU_BOOL1,          // class 01 bitwise function (XOR after reset)
    ALU_LUT,
    ALU_SHL,
    ALU_SHR,
    ALU_INC,
    ALU_DEC
  } alu_op_e;

  // source of the register bank write data (register bank input select mux)
  typedef enum logic [1:0] {
    WSRC_ALU,
    WSRC_PORT,
    WSRC_MEM,
    WSRC_REG
  } wsrc_e;

  // decoded control signals
  typedef struct packed {
    alu_op_e alu_op;
    raddr_t  rd_a;      // register read port A address
    raddr_t  rd_b;      // register read port B address
    logic    rf_we;     // write the register bank
    raddr_t  rf_waddr;
    wsrc_e   wsrc;
    port_e   port;      // selected I/O port
    logic    out_en;    // drive the selected output port with R[rd_b]
    logic    mem_we;    // MEM(R[rd_a]) <= R[rd_b]
    logic    ptr_inc;   // R7++ alongside the main operation
    logic    ptr_dec;   // R7-- alongside the main operation
  } ctrl_t;

  // configuration targets reachable from the host
  typedef enum logic [1:0] {
    CFG_IMEM = 2'd0,    // instruction memory word
    CFG_LUT  = 2'd1,    // lookup table entry
    CFG_SPM  = 2'd2,    // scratchpad byte
    CFG_ALU  = 2'd3     // ALU register: address 0 POLY, 1 F0, 2 F1
  } cfg_tgt_e;

  // ALU configuration register addresses and reset values
  localparam logic [1:0] ALU_REG_POLY = 2'd0;
  localparam logic [1:0] ALU_REG_F0   = 2'd1;
  localparam logic [1:0] ALU_REG_F1   = 2'd2;
  // truth tables are indexed by {bit of R[Rb], bit of R[Ra]}
  localparam logic [3:0] FN_AND = 4'b1000;
  localparam logic [3:0] FN_XOR = 4'b0110;

  // control word builders
  function automatic cw_t cw_and(raddr_t rc, raddr_t rb, raddr_t ra);
    return {2'b00, rc, rb, ra};
  endfunction
  function automatic cw_t cw_xor(raddr_t rc, raddr_t rb, raddr_t ra);
    return {2'b01, rc, rb, ra};
  endfunction
  function automatic cw_t cw_lut(raddr_t rc, raddr_t rb);
    return {2'b10, rc, rb, 3'b000};
  endfunction
  function automatic cw_t cw_shl(raddr_t rc, raddr_t rb);
    return {2'b10, rc, rb, 3'b011};
  endfunction
  function automatic cw_t cw_shr(raddr_t rc, raddr_t rb);
    return {2'b10, rc, rb, 3'b100};
  endfunction
  function automatic cw_t cw_inc(raddr_t ra);
    return {2'b11, 3'b111, 3'b111, ra};
  endfunction
  function automatic cw_t cw_dec(raddr_t ra);
    return {2'b11, 3'b111, 3'b000, ra};
  endfunction
  function automatic cw_t cw_in(raddr_t rb, port_e p);
    return {2'b11, 3'b001, rb, 1'b0, p};
  endfunction
  function automatic cw_t cw_out(raddr_t rb, port_e p);
    return {2'b11, 3'b001, rb, 1'b1, p};
  endfunction
  function automatic cw_t cw_memr(raddr_t ra, raddr_t rb);
    return {2'b11, 3'b100, rb, ra};
  endfunction
  function automatic cw_t cw_memw(raddr_t ra, raddr_t rb);
    return {2'b11, 3'b010, rb, ra};
  endfunction
  function automatic cw_t cw_mov(raddr_t rb, raddr_t ra);
    return {2'b11, 3'b000, rb, ra};
  endfunction
  // no operation: an unused class-11 code
  localparam cw_t CW_NOP = {2'b11, 3'b011, 6'b000000};

endpackage
