// tb_input_mux: drives random bytes on the four ports and checks that each
// select value (00 East, 01 West, 10 North, 11 South) picks its own port.
module tb_input_mux;
  import mmc_pkg::*;
  byte_t [3:0] in_data;
  port_e       sel;
  byte_t       y;
  int checks = 0, failures = 0;

  input_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int p = 0; p < 4; p++) in_data[p] = byte_t'($urandom);
      sel = port_e'(n % 4);
      #1;
      checks++;
      if (y !== in_data[n % 4]) begin
        failures++;
        $display("FAIL sel=%0d y=%0h exp=%0h", n % 4, y, in_data[n % 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
