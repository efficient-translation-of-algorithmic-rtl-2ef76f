// mmc_array: the multi-u-core (MMC) array, an M x N grid of u-cores.
//
// Each core talks only to its four nearest neighbours: its East output drives
// the West input of the core to its right, its South output the North input
// of the core below, and so on. Ports on the edge of the grid are brought out
// as the array's I/O: M bytes in and out on the West and East sides, N on the
// North and South sides. Row 0 is the North row, column 0 the West column.
// Every core has its own instruction memory; one sequencer steps all of them
// in lock-step, so a macro-instruction translated into per-core
// micro-programs executes with every neighbour transfer paired in the same
// cycle (sender OUTPUT, receiver INPUT).
// Host interface (this design's choice): cfg_we writes one item per cycle into
// the core at (cfg_row, cfg_col), or into every core when cfg_bcast is set:
// an instruction word (CFG_IMEM, address cfg_addr), a lookup table entry
// (CFG_LUT), a scratchpad byte (CFG_SPM) or an ALU register (CFG_ALU:
// address 0 the shift constant POLY, 1 and 2 the bitwise truth tables). start runs instruction addresses 0 .. prog_len-1, one per
// cycle; done pulses after the last. dbg_* reads any register of any core.
// Edge outputs are valid in the cycle their OUTPUT instruction executes; edge
// inputs are sampled by an INPUT instruction in the cycle it executes.
// Grid shape follows the document's main 4 x 4 configuration; instruction
// memory depth is this design's choice.
module mmc_array
  import mmc_pkg::*;
#(
  parameter int unsigned M          = 4,     // rows
  parameter int unsigned N          = 4,     // columns
  parameter int unsigned IMEM_DEPTH = 512,
  localparam int unsigned PCW = $clog2(IMEM_DEPTH),
  localparam int unsigned RW  = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned CWI = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // program control
  input  logic             start,
  input  logic [PCW:0]     prog_len,
  output logic             run,
  output logic             done,
  output logic [PCW-1:0]   pc,
  // edge I/O
  input  byte_t            west_in   [M],
  input  byte_t            east_in   [M],
  input  byte_t            north_in  [N],
  input  byte_t            south_in  [N],
  output byte_t            west_out  [M],
  output logic             west_out_valid  [M],
  output byte_t            east_out  [M],
  output logic             east_out_valid  [M],
  output byte_t            north_out [N],
  output logic             north_out_valid [N],
  output byte_t            south_out [N],
  output logic             south_out_valid [N],
  // host configuration
  input  logic             cfg_we,
  input  cfg_tgt_e         cfg_tgt,
  input  logic             cfg_bcast,
  input  logic [RW-1:0]    cfg_row,
  input  logic [CWI-1:0]   cfg_col,
  input  logic [PCW-1:0]   cfg_addr,
  input  cw_t              cfg_data,
  // register read-back
  input  logic [RW-1:0]    dbg_row,
  input  logic [CWI-1:0]   dbg_col,
  input  raddr_t           dbg_reg,
  output byte_t            dbg_data
);

  byte_t [3:0] c_in    [M][N];
  byte_t [3:0] c_out   [M][N];
  logic  [3:0] c_valid [M][N];
  byte_t       c_dbg   [M][N];

  mmc_sequencer #(.DEPTH(IMEM_DEPTH)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .prog_len (prog_len),
    .pc       (pc),
    .run      (run),
    .done     (done)
  );

  for (genvar i = 0; i < M; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      logic sel;
      cw_t  cw;

      assign sel = cfg_we && (cfg_bcast ||
                   (cfg_row == RW'(i) && cfg_col == CWI'(j)));

      instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
        .clk   (clk),
        .we    (sel && cfg_tgt == CFG_IMEM),
        .waddr (cfg_addr),
        .wdata (cfg_data),
        .raddr (pc),
        .rdata (cw)
      );

      // neighbour wiring: East input comes from the right core's West output
      if (j < N - 1) begin : g_e
        assign c_in[i][j][PORT_E] = c_out[i][j+1][PORT_W];
      end else begin : g_e_edge
        assign c_in[i][j][PORT_E] = east_in[i];
        assign east_out[i]        = c_out[i][j][PORT_E];
        assign east_out_valid[i]  = c_valid[i][j][PORT_E];
      end
      if (j > 0) begin : g_w
        assign c_in[i][j][PORT_W] = c_out[i][j-1][PORT_E];
      end else begin : g_w_edge
        assign c_in[i][j][PORT_W] = west_in[i];
        assign west_out[i]        = c_out[i][j][PORT_W];
        assign west_out_valid[i]  = c_valid[i][j][PORT_W];
      end
      if (i > 0) begin : g_n
        assign c_in[i][j][PORT_N] = c_out[i-1][j][PORT_S];
      end else begin : g_n_edge
        assign c_in[i][j][PORT_N] = north_in[j];
        assign north_out[j]       = c_out[i][j][PORT_N];
        assign north_out_valid[j] = c_valid[i][j][PORT_N];
      end
      if (i < M - 1) begin : g_s
        assign c_in[i][j][PORT_S] = c_out[i+1][j][PORT_N];
      end else begin : g_s_edge
        assign c_in[i][j][PORT_S] = south_in[j];
        assign south_out[j]       = c_out[i][j][PORT_S];
        assign south_out_valid[j] = c_valid[i][j][PORT_S];
      end

      ucore u_core (
        .clk       (clk),
        .rst_n     (rst_n),
        .en        (run),
        .cw        (cw),
        .in_data   (c_in[i][j]),
        .out_data  (c_out[i][j]),
        .out_valid (c_valid[i][j]),
        .cfg_we    (sel && cfg_tgt != CFG_IMEM),
        .cfg_tgt   (cfg_tgt),
        .cfg_addr  (cfg_addr[DW-1:0]),
        .cfg_data  (cfg_data[DW-1:0]),
        .dbg_addr  (dbg_reg),
        .dbg_data  (c_dbg[i][j])
      );
    end
  end

  assign dbg_data = c_dbg[dbg_row][dbg_col];

endmodule
