// tb_output_demux: checks that only the selected output port carries the
// value with valid set, and that nothing is driven when the enable is low.
module tb_output_demux;
  import mmc_pkg::*;
  logic        en;
  port_e       sel;
  byte_t       d;
  byte_t [3:0] out_data;
  logic  [3:0] out_valid;
  int checks = 0, failures = 0;

  output_demux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      en  = (n % 5) != 0;
      sel = port_e'($urandom_range(0, 3));
      d   = byte_t'($urandom_range(1, 255));
      #1;
      for (int p = 0; p < 4; p++) begin
        logic  ev;
        byte_t ed;
        ev = en && (p == int'(sel));
        ed = ev ? d : 8'h00;
        checks++;
        if (out_valid[p] !== ev || out_data[p] !== ed) begin
          failures++;
          $display("FAIL en=%0b sel=%0d port %0d: %0b/%0h exp %0b/%0h",
                   en, sel, p, out_valid[p], out_data[p], ev, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
