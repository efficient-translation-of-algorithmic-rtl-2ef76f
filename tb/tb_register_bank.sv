// tb_register_bank: random writes, pointer increments and decrements of R7
// and enable gating, compared with a model after every cycle through both
// read ports and the debug port. A write to R7 in the same cycle as a
// pointer update must win.
module tb_register_bank;
  import mmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic   en = 0, we = 0, ptr_inc = 0, ptr_dec = 0;
  raddr_t ra_addr = '0, rb_addr = '0, waddr = '0, dbg_addr = '0;
  byte_t  ra_data, rb_data, dbg_data, wdata = '0;
  byte_t  model [8];
  int checks = 0, failures = 0;

  register_bank dut (.*);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int r = 0; r < 8; r++) begin
      ra_addr = raddr_t'(r); rb_addr = raddr_t'(7 - r); dbg_addr = raddr_t'(r);
      #1;
      checks++;
      if (ra_data !== model[r] || rb_data !== model[7 - r] || dbg_data !== model[r]) begin
        failures++;
        $display("FAIL R%0d: %0h/%0h/%0h exp %0h/%0h", r, ra_data, dbg_data, rb_data,
                 model[r], model[7 - r]);
      end
    end
  endtask

  initial begin
    for (int r = 0; r < 8; r++) model[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      we = $urandom_range(0, 1);
      waddr = raddr_t'($urandom);
      wdata = byte_t'($urandom);
      ptr_inc = ($urandom_range(0, 3) == 0);
      ptr_dec = !ptr_inc && ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (en) begin
        if (ptr_inc) model[7] = model[7] + 1;
        else if (ptr_dec) model[7] = model[7] - 1;
        if (we) model[waddr] = wdata;
      end
      @(negedge clk);
      en = 0; we = 0; ptr_inc = 0; ptr_dec = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
