// control_decode: turns one 11-bit u-core control word into datapath controls.
//
// The instruction set is a horizontal microcode: the register address fields
// Rc=[8:6], Rb=[5:3], Ra=[2:0] and the port select [1:0] go to the datapath
// unchanged, and only the class bits [10:9] plus a few sub-code bits are
// decoded. The encodings of AND, XOR, lookup, shifts, increment, decrement,
// input, output and the two memory accesses follow the u-core instruction
// table, as does the pointer rule: R7 post-decrements when it addresses a
// memory read and post-increments when it addresses a memory write.
// This design's own choices: the register move R[Rb] <= R[Ra] uses class 11
// with [8:6]=000 (the table prints it with the memory-read code), and every
// code the table leaves unused decodes to a no-operation.
// Purely combinational; the decoded word is used in the same cycle.
module control_decode
  import mmc_pkg::*;
(
  input  cw_t   cw,
  output ctrl_t ctrl
);

  raddr_t rc, rb, ra;
  assign rc = cw[8:6];
  assign rb = cw[5:3];
  assign ra = cw[2:0];

  always_comb begin
    ctrl          = '0;
    ctrl.alu_op   = ALU_BOOL0;
    ctrl.wsrc     = WSRC_ALU;
    ctrl.port     = port_e'(cw[1:0]);
    ctrl.rd_a     = ra;
    ctrl.rd_b     = rb;
    ctrl.rf_waddr = rc;
    unique case (cw[10:9])
      2'b00: begin
        ctrl.alu_op = ALU_BOOL0;
        ctrl.rf_we  = 1'b1;
      end
      2'b01: begin
        ctrl.alu_op = ALU_BOOL1;
        ctrl.rf_we  = 1'b1;
      end
      2'b10: begin
        ctrl.rf_we = 1'b1;
        case (cw[2:0])
          3'b000:  ctrl.alu_op = ALU_LUT;
          3'b011:  ctrl.alu_op = ALU_SHL;
          3'b100:  ctrl.alu_op = ALU_SHR;
          default: ctrl.rf_we  = 1'b0;
        endcase
      end
      2'b11: begin
        case (cw[8:6])
          3'b111: begin
            ctrl.rf_waddr = ra;
            if (rb == 3'b111) begin
              ctrl.alu_op = ALU_INC;
              ctrl.rf_we  = 1'b1;
            end else if (rb == 3'b000) begin
              ctrl.alu_op = ALU_DEC;
              ctrl.rf_we  = 1'b1;
            end
          end
          3'b001: begin
            if (cw[2] == 1'b0) begin
              ctrl.wsrc     = WSRC_PORT;
              ctrl.rf_waddr = rb;
              ctrl.rf_we    = 1'b1;
            end else begin
              ctrl.out_en = 1'b1;
            end
          end
          3'b100: begin
            ctrl.wsrc     = WSRC_MEM;
            ctrl.rf_waddr = ra;
            ctrl.rf_we    = 1'b1;
            ctrl.ptr_dec  = (rb == raddr_t'(PTR_REG));
          end
          3'b010: begin
            ctrl.mem_we  = 1'b1;
            ctrl.ptr_inc = (ra == raddr_t'(PTR_REG));
          end
          3'b000: begin
            ctrl.wsrc     = WSRC_REG;
            ctrl.rf_waddr = rb;
            ctrl.rf_we    = 1'b1;
          end
          default: ;
        endcase
      end
    endcase
  end

endmodule
