// output_demux: routes the register value of an OUTPUT instruction to one of
// the four output ports (00 East, 01 West, 10 North, 11 South).
// The selected port carries the value with its valid bit set for the cycle of
// the instruction; the other ports carry zero with valid low. The valid bit
// and the zero idle value are this design's choices. Combinational, so a
// neighbour reads the value in the same cycle with an INPUT instruction.
module output_demux
  import mmc_pkg::*;
(
  input  logic        en,
  input  port_e       sel,
  input  byte_t       d,
  output byte_t [3:0] out_data,   // indexed by port_e
  output logic  [3:0] out_valid
);

  always_comb begin
    out_data  = '0;
    out_valid = '0;
    if (en) begin
      out_data[sel]  = d;
      out_valid[sel] = 1'b1;
    end
  end

endmodule
