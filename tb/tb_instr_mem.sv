// tb_instr_mem: fills the instruction memory with random control words and
// reads every address back, then overwrites a few and checks again.
module tb_instr_mem;
  import mmc_pkg::*;
  localparam int D = 512;
  logic clk = 0;
  always #5 clk = ~clk;
  logic       we = 0;
  logic [8:0] waddr = '0, raddr = '0;
  cw_t        wdata = '0, rdata;
  cw_t        model [D];
  int checks = 0, failures = 0;

  instr_mem dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(int a);
    raddr = 9'(a);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      $display("FAIL addr %0d: %0h exp %0h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = cw_t'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < D; a++) rd_check(a);
    for (int n = 0; n < 50; n++) begin
      int a;
      a = $urandom_range(0, D - 1);
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = cw_t'($urandom); model[a] = wdata;
      @(negedge clk); we = 0;
      rd_check(a);
      rd_check($urandom_range(0, D - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
