// input_mux: selects which of the four neighbour input ports (East, West,
// North, South) feeds the u-core's register bank on an INPUT instruction.
// The select is control word bits [1:0]: 00 East, 01 West, 10 North,
// 11 South, as the instruction table gives. Combinational.
module input_mux
  import mmc_pkg::*;
(
  input  byte_t [3:0] in_data,   // indexed by port_e
  input  port_e       sel,
  output byte_t       y
);

  always_comb begin
    unique case (sel)
      PORT_E: y = in_data[PORT_E];
      PORT_W: y = in_data[PORT_W];
      PORT_N: y = in_data[PORT_N];
      PORT_S: y = in_data[PORT_S];
    endcase
  end

endmodule
