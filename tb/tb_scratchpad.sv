// tb_scratchpad: random writes and reads of the 64-byte memory against a
// model, including address wrap-around (only the low six address bits count)
// and the host write taking priority over a simultaneous core write.
module tb_scratchpad;
  import mmc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  byte_t raddr = '0, rdata, waddr = '0, wdata = '0, cfg_addr = '0, cfg_data = '0;
  logic  we = 0, cfg_we = 0;
  byte_t model [64];
  int checks = 0, failures = 0;

  scratchpad dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(byte_t a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== model[a % 64]) begin
      failures++;
      $display("FAIL addr %0h: %0h exp %0h", a, rdata, model[a % 64]);
    end
  endtask

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      cfg_we = 1; cfg_addr = byte_t'(a); cfg_data = byte_t'($urandom); model[a] = cfg_data;
    end
    @(negedge clk); cfg_we = 0;
    for (int a = 0; a < 256; a++) rd_check(byte_t'(a));
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1; waddr = byte_t'($urandom); wdata = byte_t'($urandom);
      cfg_we = (n % 7 == 0);
      cfg_addr = byte_t'($urandom); cfg_data = byte_t'($urandom);
      if (cfg_we) model[cfg_addr % 64] = cfg_data;
      else        model[waddr % 64]    = wdata;
      @(negedge clk); we = 0; cfg_we = 0;
      rd_check(byte_t'($urandom));
      rd_check(cfg_we ? cfg_addr : waddr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
