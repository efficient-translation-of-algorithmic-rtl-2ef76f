// tb_control_decode: decodes all 2048 control words and compares the
// controls that matter for each against a reference table written from the
// instruction set: which register is written and from where, which ALU
// operation, which port, and the memory and pointer side effects.
module tb_control_decode;
  import mmc_pkg::*;
  cw_t   cw;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_decode dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {we, waddr, wsrc, alu, out_en, mem_we, inc, dec}
  typedef struct {
    bit     we;
    int     waddr;
    wsrc_e  wsrc;
    alu_op_e alu;
    bit     out_en, mem_we, inc, dec;
  } exp_t;

  function automatic exp_t expect_of(int w);
    exp_t e;
    int c = (w >> 6) & 7, b = (w >> 3) & 7, a = w & 7;
    e = '{we: 0, waddr: 0, wsrc: WSRC_ALU, alu: ALU_BOOL0, out_en: 0, mem_we: 0, inc: 0, dec: 0};
    case (w >> 9)
      0: e = '{1, c, WSRC_ALU, ALU_BOOL0, 0, 0, 0, 0};
      1: e = '{1, c, WSRC_ALU, ALU_BOOL1, 0, 0, 0, 0};
      2: if (a == 0)      e = '{1, c, WSRC_ALU, ALU_LUT, 0, 0, 0, 0};
         else if (a == 3) e = '{1, c, WSRC_ALU, ALU_SHL, 0, 0, 0, 0};
         else if (a == 4) e = '{1, c, WSRC_ALU, ALU_SHR, 0, 0, 0, 0};
      3: case (c)
           7: if (b == 7)      e = '{1, a, WSRC_ALU, ALU_INC, 0, 0, 0, 0};
              else if (b == 0) e = '{1, a, WSRC_ALU, ALU_DEC, 0, 0, 0, 0};
           1: if (a < 4) e = '{1, b, WSRC_PORT, ALU_BOOL0, 0, 0, 0, 0};
              else       e.out_en = 1;
           4: e = '{1, a, WSRC_MEM, ALU_BOOL0, 0, 0, 0, b == 7};
           2: e = '{0, 0, WSRC_ALU, ALU_BOOL0, 0, 1, a == 7, 0};
           0: e = '{1, b, WSRC_REG, ALU_BOOL0, 0, 0, 0, 0};
           default: ;
         endcase
    endcase
    return e;
  endfunction

  initial begin
    for (int w = 0; w < 2048; w++) begin
      exp_t e;
      bit   bad;
      cw = cw_t'(w);
      #1;
      e = expect_of(w);
      bad = 0;
      if (ctrl.rf_we !== e.we) bad = 1;
      if (e.we && ctrl.rf_waddr !== raddr_t'(e.waddr)) bad = 1;
      if (e.we && ctrl.wsrc !== e.wsrc) bad = 1;
      if (e.we && e.wsrc == WSRC_ALU && ctrl.alu_op !== e.alu) bad = 1;
      if (ctrl.out_en !== e.out_en || ctrl.mem_we !== e.mem_we) bad = 1;
      if (ctrl.ptr_inc !== e.inc || ctrl.ptr_dec !== e.dec) bad = 1;
      if (int'(ctrl.port) != (w & 3)) bad = 1;
      if (ctrl.rd_a !== raddr_t'(w & 7) || ctrl.rd_b !== raddr_t'((w >> 3) & 7)) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL cw=%03h ctrl=%0h", w, ctrl);
      end
    end
    // the builders in the package must produce the documented encodings
    checks++; if (cw_and(3'd5, 3'd2, 3'd1)  !== 11'b00_101_010_001) failures++;
    checks++; if (cw_inc(3'd3)               !== 11'b11_111_111_011) failures++;
    checks++; if (cw_dec(3'd3)               !== 11'b11_111_000_011) failures++;
    checks++; if (cw_out(3'd2, PORT_S)       !== 11'b11_001_010_111) failures++;
    checks++; if (cw_memr(3'd1, 3'd7)        !== 11'b11_100_111_001) failures++;
    checks++; if (cw_memw(3'd7, 3'd1)        !== 11'b11_010_001_111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
