// reconfig_alu: the u-core's reconfigurable ALU.
//
// Operations, as the instruction set lists them: two bitwise operations of
// R[Rb] and R[Ra]; a table lookup of R[Rb] in a 256-entry, 8-bit wide table;
// shift left and shift right of R[Rb] by one; increment and decrement of
// R[Ra].
// What can be reconfigured, in FPGA fashion, while the core is idle:
//   - the lookup table (for AES: the SubBytes S-box);
//   - F0 and F1, the 2-input truth tables behind the two bitwise operation
//     classes: bit k of the result is F[{b[k], a[k]}]. They reset to AND
//     (4'b1000) and XOR (4'b0110), the operations of the instruction table;
//   - POLY, folded into shift left whenever the bit shifted out is 1,
//     (b << 1) ^ (b[7] ? POLY : 0). It resets to 0, the plain logical shift;
//     POLY = 8'h1B turns the instruction into multiplication by 2 in GF(2^8),
//     which AES MixColumns needs in one instruction.
// The operation set follows the instruction table; the truth-table and POLY
// registers, their write port and reset values are this design's reading of
// "reconfigurable ALU".
// Timing: the result is combinational in the operands; configuration writes
// take effect at the next rising clock edge.
module reconfig_alu
  import mmc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  alu_op_e    op,
  input  byte_t      a,            // R[Ra]
  input  byte_t      b,            // R[Rb]
  output byte_t      y,
  // reconfiguration
  input  logic       cfg_lut_we,
  input  byte_t      cfg_lut_addr,
  input  byte_t      cfg_lut_data,
  input  logic       cfg_reg_we,   // ALU register write
  input  logic [1:0] cfg_reg_addr, // ALU_REG_POLY, ALU_REG_F0, ALU_REG_F1
  input  byte_t      cfg_reg_data
);

  byte_t      lut [LUT_DEPTH];
  byte_t      poly;
  logic [3:0] fn0, fn1;

  always_ff @(posedge clk) begin
    if (cfg_lut_we) lut[cfg_lut_addr] <= cfg_lut_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      poly <= '0;
      fn0  <= FN_AND;
      fn1  <= FN_XOR;
    end else if (cfg_reg_we) begin
      case (cfg_reg_addr)
        ALU_REG_POLY: poly <= cfg_reg_data;
        ALU_REG_F0:   fn0  <= cfg_reg_data[3:0];
        ALU_REG_F1:   fn1  <= cfg_reg_data[3:0];
        default: ;
      endcase
    end
  end

  function automatic byte_t bitwise(logic [3:0] fn, byte_t x, byte_t z);
    byte_t r;
    for (int k = 0; k < DW; k++) r[k] = fn[{z[k], x[k]}];
    return r;
  endfunction

  always_comb begin
    unique case (op)
      ALU_BOOL0: y = bitwise(fn0, a, b);
      ALU_BOOL1: y = bitwise(fn1, a, b);
      ALU_LUT:   y = lut[b];
      ALU_SHL:   y = {b[DW-2:0], 1'b0} ^ (b[DW-1] ? poly : byte_t'(0));
      ALU_SHR:   y = {1'b0, b[DW-1:1]};
      ALU_INC:   y = a + byte_t'(1);
      ALU_DEC:   y = a - byte_t'(1);
      default:   y = '0;
    endcase
  end

endmodule
