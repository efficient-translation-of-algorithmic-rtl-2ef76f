// ucore: one u-core, the processing element of the multi-u-core array.
//
// Datapath: a four-way input multiplexer (East, West, North, South), a bank of
// eight 8-bit registers, the reconfigurable ALU with its 256-entry lookup
// table, a 64-byte scratchpad, an output demultiplexer to the four neighbour
// ports, and a multiplexer choosing what is written into the register bank
// (ALU result, input port, memory data or another register). The control
// word is decoded straight into these controls, and every instruction
// completes in one cycle.
// Neighbour transfers are combinational: when this core executes OUTPUT and a
// neighbour executes INPUT on the facing port in the same cycle, the value
// moves in that cycle. Outputs depend only on registers and the control word,
// never on inputs, so no combinational path runs through a core.
// Interface: cw is executed in a cycle where en=1; en=0 freezes the core.
// in_data / out_data are indexed by port (0 E, 1 W, 2 N, 3 S); out_valid marks
// the port an OUTPUT drives. The cfg_* port preloads the lookup table, the
// scratchpad and the ALU registers (bitwise truth tables, shift constant); dbg_* reads any register.
// Structure and instruction set follow the u-core description; enable, valid
// bits, host ports and reset values are this design's choices.
module ucore
  import mmc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  cw_t         cw,
  input  byte_t [3:0] in_data,
  output byte_t [3:0] out_data,
  output logic  [3:0] out_valid,
  input  logic        cfg_we,
  input  cfg_tgt_e    cfg_tgt,
  input  byte_t       cfg_addr,
  input  byte_t       cfg_data,
  input  raddr_t      dbg_addr,
  output byte_t       dbg_data
);

  ctrl_t ctrl;
  byte_t ra_data, rb_data, alu_y, port_y, mem_y, wdata;

  control_decode u_dec (
    .cw   (cw),
    .ctrl (ctrl)
  );

  register_bank u_rf (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (en),
    .ra_addr  (ctrl.rd_a),
    .ra_data  (ra_data),
    .rb_addr  (ctrl.rd_b),
    .rb_data  (rb_data),
    .we       (ctrl.rf_we),
    .waddr    (ctrl.rf_waddr),
    .wdata    (wdata),
    .ptr_inc  (ctrl.ptr_inc),
    .ptr_dec  (ctrl.ptr_dec),
    .dbg_addr (dbg_addr),
    .dbg_data (dbg_data)
  );

  reconfig_alu u_alu (
    .clk           (clk),
    .rst_n         (rst_n),
    .op            (ctrl.alu_op),
    .a             (ra_data),
    .b             (rb_data),
    .y             (alu_y),
    .cfg_lut_we    (cfg_we && cfg_tgt == CFG_LUT),
    .cfg_lut_addr  (cfg_addr),
    .cfg_lut_data  (cfg_data),
    .cfg_reg_we    (cfg_we && cfg_tgt == CFG_ALU),
    .cfg_reg_addr  (cfg_addr[1:0]),
    .cfg_reg_data  (cfg_data)
  );

  // MEMR reads MEM(R[Rb]); MEMW writes R[Rb] to MEM(R[Ra])
  scratchpad u_spm (
    .clk      (clk),
    .raddr    (rb_data),
    .rdata    (mem_y),
    .we       (en && ctrl.mem_we),
    .waddr    (ra_data),
    .wdata    (rb_data),
    .cfg_we   (cfg_we && cfg_tgt == CFG_SPM),
    .cfg_addr (cfg_addr),
    .cfg_data (cfg_data)
  );

  input_mux u_imux (
    .in_data (in_data),
    .sel     (ctrl.port),
    .y       (port_y)
  );

  output_demux u_odmx (
    .en        (en && ctrl.out_en),
    .sel       (ctrl.port),
    .d         (rb_data),
    .out_data  (out_data),
    .out_valid (out_valid)
  );

  // register bank input select
  always_comb begin
    unique case (ctrl.wsrc)
      WSRC_ALU:  wdata = alu_y;
      WSRC_PORT: wdata = port_y;
      WSRC_MEM:  wdata = mem_y;
      WSRC_REG:  wdata = ra_data;
    endcase
  end

endmodule
