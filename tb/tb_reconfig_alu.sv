// tb_reconfig_alu: loads the lookup table with random bytes, then checks
// every operation on random operands against its definition: first with the
// reset configuration (bitwise AND and XOR, plain shift left), then with
// POLY = 0x1B (GF(2^8) doubling, also checked on the FIPS-197 xtime
// examples), then with random truth tables for the two bitwise operations.
module tb_reconfig_alu;
  import mmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  alu_op_e    op = ALU_BOOL0;
  byte_t      a = '0, b = '0, y;
  logic       cfg_lut_we = 0, cfg_reg_we = 0;
  byte_t      cfg_lut_addr = '0, cfg_lut_data = '0, cfg_reg_data = '0;
  logic [1:0] cfg_reg_addr = '0;
  byte_t      lut [256];
  byte_t      poly = 0;
  logic [3:0] f0 = 4'b1000, f1 = 4'b0110;
  int checks = 0, failures = 0;

  reconfig_alu dut (.*);

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte_t tt(logic [3:0] f, byte_t x, byte_t z);
    byte_t r;
    for (int k = 0; k < 8; k++) r[k] = f[2 * ((z >> k) & 1) + ((x >> k) & 1)];
    return r;
  endfunction

  function automatic byte_t ref_y(alu_op_e o, byte_t x, byte_t z);
    case (o)
      ALU_BOOL0: return tt(f0, x, z);
      ALU_BOOL1: return tt(f1, x, z);
      ALU_LUT:   return lut[z];
      ALU_SHL:   return byte_t'(z * 2) ^ ((z >= 8'h80) ? poly : 8'h00);
      ALU_SHR:   return z / 2;
      ALU_INC:   return byte_t'(x + 1);
      ALU_DEC:   return byte_t'(x - 1);
      default:   return 0;
    endcase
  endfunction

  task automatic check(string what, byte_t got, byte_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s op=%s a=%0h b=%0h y=%0h exp %0h", what, op.name(), a, b, got, exp);
    end
  endtask

  task automatic sweep(int n);
    for (int k = 0; k < n; k++) begin
      op = alu_op_e'($urandom_range(0, 6));
      a  = byte_t'($urandom);
      b  = byte_t'($urandom);
      if (k < 8) begin a = 8'hff; b = 8'h80 + byte_t'(k); end
      #1;
      check("sweep", y, ref_y(op, a, b));
    end
  endtask

  task automatic set_reg(logic [1:0] addr, byte_t d);
    @(negedge clk);
    cfg_reg_we = 1; cfg_reg_addr = addr; cfg_reg_data = d;
    @(negedge clk);
    cfg_reg_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      cfg_lut_we = 1; cfg_lut_addr = byte_t'(k); cfg_lut_data = byte_t'($urandom); lut[k] = cfg_lut_data;
    end
    @(negedge clk); cfg_lut_we = 0;
    // reset configuration: AND, XOR, plain shift
    op = ALU_BOOL0; a = 8'hf0; b = 8'h3c; #1 check("reset AND", y, 8'h30);
    op = ALU_BOOL1;                       #1 check("reset XOR", y, 8'hcc);
    op = ALU_SHL;   b = 8'h81;            #1 check("reset SHL", y, 8'h02);
    sweep(1000);
    set_reg(ALU_REG_POLY, 8'h1b); poly = 8'h1b;
    sweep(1000);
    // AES doubling examples (FIPS-197 section 4.2.1): 57 -> ae -> 47 -> 8e
    op = ALU_SHL;
    b = 8'h57; #1 check("xtime 57", y, 8'hae);
    b = 8'hae; #1 check("xtime ae", y, 8'h47);
    b = 8'h47; #1 check("xtime 47", y, 8'h8e);
    // every truth table for both bitwise classes
    for (int f = 0; f < 16; f++) begin
      set_reg(ALU_REG_F0, byte_t'(f));      f0 = 4'(f);
      set_reg(ALU_REG_F1, byte_t'(15 - f)); f1 = 4'(15 - f);
      for (int k = 0; k < 20; k++) begin
        a = byte_t'($urandom); b = byte_t'($urandom);
        op = ALU_BOOL0; #1 check("F0", y, ref_y(op, a, b));
        op = ALU_BOOL1; #1 check("F1", y, ref_y(op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
