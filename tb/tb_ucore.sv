// tb_ucore: runs a long random stream of control words through one u-core
// (with the two bitwise operations reconfigured to OR and NAND) and compares
// it, cycle by cycle, with an instruction-set model kept in the
// testbench: all eight registers (through the debug port), the four output
// ports and their valid bits, and the scratchpad (read back with memory-read
// instructions at the end). Random bytes are driven on the four input ports.
// Each instruction must complete in the cycle it is issued; cycles with the
// enable low must change nothing.
module tb_ucore;
  import mmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  logic        en = 0;
  cw_t         cw = CW_NOP;
  byte_t [3:0] in_data = '0;
  byte_t [3:0] out_data;
  logic  [3:0] out_valid;
  logic        cfg_we = 0;
  cfg_tgt_e    cfg_tgt = CFG_LUT;
  byte_t       cfg_addr = '0, cfg_data = '0;
  raddr_t      dbg_addr = '0;
  byte_t       dbg_data;

  ucore dut (.*);

  int checks = 0, failures = 0;
  byte_t R [8], MEM [64], LUT [256], POLY;
  logic [3:0] F0, F1;
  int kinds [12];

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cfg(cfg_tgt_e tg, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_tgt = tg; cfg_addr = byte_t'(a); cfg_data = byte_t'(d);
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic cw_t rand_cw(output int k);
    raddr_t a, b, c;
    a = raddr_t'($urandom); b = raddr_t'($urandom); c = raddr_t'($urandom);
    k = $urandom_range(0, 11);
    case (k)
      0:  return cw_and(c, b, a);
      1:  return cw_xor(c, b, a);
      2:  return cw_lut(c, b);
      3:  return cw_shl(c, b);
      4:  return cw_shr(c, b);
      5:  return cw_inc(a);
      6:  return cw_dec(a);
      7:  return cw_in(b, port_e'($urandom_range(0, 3)));
      8:  return cw_out(b, port_e'($urandom_range(0, 3)));
      9:  return cw_memr(a, ($urandom_range(0, 1) != 0) ? 3'd7 : b);
      10: return cw_memw(($urandom_range(0, 1) != 0) ? 3'd7 : a, b);
      default: return cw_mov(b, a);
    endcase
  endfunction

  // reference model of one instruction
  task automatic model_step(cw_t w, byte_t [3:0] pin, output byte_t [3:0] pout, output logic [3:0] pval);
    int c = w[8:6], b = w[5:3], a = w[2:0];
    byte_t r7 = R[7];
    pout = '0; pval = '0;
    case (w[10:9])
      2'b00: R[c] = (F0 == 4'b1110) ? (R[b] | R[a]) : (R[b] & R[a]);
      2'b01: R[c] = (F1 == 4'b0111) ? ~(R[b] & R[a]) : (R[b] ^ R[a]);
      2'b10: case (a)
               0: R[c] = LUT[R[b]];
               3: R[c] = {R[b][6:0], 1'b0} ^ (R[b][7] ? POLY : 8'h00);
               4: R[c] = R[b] >> 1;
               default: ;
             endcase
      2'b11: case (c)
               7: if (b == 7) R[a] = R[a] + 1; else if (b == 0) R[a] = R[a] - 1;
               1: if (w[2] == 0) R[b] = pin[w[1:0]];
                  else begin pout[w[1:0]] = R[b]; pval[w[1:0]] = 1; end
               4: begin
                    byte_t d = MEM[R[b] % 64];
                    if (b == 7) R[7] = r7 - 1;
                    R[a] = d;
                  end
               2: begin
                    MEM[R[a] % 64] = R[b];
                    if (a == 7) R[7] = r7 + 1;
                  end
               0: R[b] = R[a];
               default: ;
             endcase
    endcase
  endtask

  task automatic check_regs(string when);
    for (int r = 0; r < 8; r++) begin
      dbg_addr = raddr_t'(r);
      #1;
      checks++;
      if (dbg_data !== R[r]) begin
        failures++;
        if (failures < 5) $display("FAIL %s R%0d=%0h exp %0h cw=%03h en=%0b t=%0t", when, r, dbg_data, R[r], cw, en, $time);
      end
    end
  endtask

  initial begin
    byte_t [3:0] eo;
    logic  [3:0] ev;
    int k;
    for (int r = 0; r < 8; r++) R[r] = 0;
    F0 = 4'b1000; F1 = 4'b0110;
    for (int k2 = 0; k2 < 12; k2++) kinds[k2] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_regs("reset");
    for (int i = 0; i < 256; i++) begin LUT[i] = byte_t'($urandom); cfg(CFG_LUT, i, LUT[i]); end
    for (int i = 0; i < 64; i++)  begin MEM[i] = byte_t'($urandom); cfg(CFG_SPM, i, MEM[i]); end
    POLY = 8'h1b; cfg(CFG_ALU, ALU_REG_POLY, POLY);
    F0 = 4'b1110; cfg(CFG_ALU, ALU_REG_F0, F0);   // OR
    F1 = 4'b0111; cfg(CFG_ALU, ALU_REG_F1, F1);   // NAND

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cw = rand_cw(k);
      en = (n % 9) != 8;
      for (int p = 0; p < 4; p++) in_data[p] = byte_t'($urandom);
      #1;
      if (en) begin
        kinds[k]++;
        model_step(cw, in_data, eo, ev);
      end else begin
        eo = '0; ev = '0;
      end
      checks++;
      if (out_valid !== ev || out_data !== eo) begin
        failures++;
        if (failures < 20) $display("FAIL outputs cw=%03h %0h/%0h exp %0h/%0h", cw, out_valid, out_data, ev, eo);
      end
      @(posedge clk);
      #1;
      check_regs("stream");
    end
    // read the whole scratchpad back through memory reads (R7 post-decrement)
    @(negedge clk);
    en = 1;
    for (int i = 0; i < 64; i++) begin
      cw = cw_memr(3'd0, 3'd7);
      model_step(cw, in_data, eo, ev);
      @(posedge clk);
      #1;
      check_regs("memory read-back");
      @(negedge clk);
    end
    en = 0;
    for (int k2 = 0; k2 < 12; k2++) begin
      checks++;
      if (kinds[k2] == 0) begin failures++; $display("FAIL instruction kind %0d never ran", k2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
