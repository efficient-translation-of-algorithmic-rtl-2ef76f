// tb_aes_grid: AES-128 on a larger multi-u-core array, the grid-size
// experiment of the design. An 8 x 8 array is cut into four 4 x 4 tiles and
// every tile encrypts its own block with its own key in the same program, so
// the encryption kernel still takes 217 cycles while four blocks are done.
// Each row is loaded from both ends: the West half through the West edge,
// the East half through the East edge, passed from core to core; the
// ciphertext leaves the same way. With H = N/2 each direction takes
// H(H+1)/2 cycles with this simple, unpipelined transfer.
// Results are compared with a software AES model; the kernel and the whole
// program are timed.
module tb_aes_grid;
  import mmc_pkg::*;
  import aes_ref_pkg::*;

  localparam int M = 8, N = 8, D = 512;
  localparam int RW = $clog2(M), CW2 = $clog2(N);
  localparam int NB = (M / 4) * (N / 4);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start = 0;
  logic [9:0]        prog_len = '0;
  logic              run, done;
  logic [8:0]        pc;
  byte_t             west_in [M], east_in [M], north_in [N], south_in [N];
  byte_t             west_out [M], east_out [M], north_out [N], south_out [N];
  logic              west_out_valid [M], east_out_valid [M];
  logic              north_out_valid [N], south_out_valid [N];
  logic              cfg_we = 0, cfg_bcast = 0;
  cfg_tgt_e          cfg_tgt = CFG_IMEM;
  logic [RW-1:0]     cfg_row = '0, dbg_row = '0;
  logic [CW2-1:0]    cfg_col = '0, dbg_col = '0;
  logic [8:0]        cfg_addr = '0;
  cw_t               cfg_data = '0;
  raddr_t            dbg_reg = '0;
  byte_t             dbg_data;

  mmc_array #(.M(M), .N(N), .IMEM_DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- translator state ----------------
  cw_t   prog [M][N][D];
  bit    used [M][N][D];
  int    t;                       // current step while building
  // edge stimulus / expectations per step
  bit    win_v  [D][M];
  byte_t win_d  [D][M];
  bit    eout_v [D][M];
  byte_t eout_d [D][M];
  bit    ein_v  [D][M];
  byte_t ein_d  [D][M];
  bit    wout_x_v [D][M];
  byte_t wout_x_d [D][M];
  // mechanism counters
  int    n_xfer [4];              // transfers by direction of travel
  int    n_edge_in, n_edge_out, n_lut, n_shl_gf, n_shr, n_and, n_xor;
  int    n_inc, n_dec, n_memr_dec, n_memw_inc, n_mov, n_nop;

  task automatic clear_prog();
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        for (int a = 0; a < D; a++) begin
          prog[i][j][a] = CW_NOP;
          used[i][j][a] = 0;
        end
    for (int a = 0; a < D; a++)
      for (int i = 0; i < M; i++) begin
        win_v[a][i] = 0; win_d[a][i] = 0; eout_v[a][i] = 0; eout_d[a][i] = 0;
        ein_v[a][i] = 0; ein_d[a][i] = 0; wout_x_v[a][i] = 0; wout_x_d[a][i] = 0;
      end
    t = 0;
  endtask

  task automatic put(int i, int j, cw_t cw);
    if (used[i][j][t]) begin
      failures++;
      $display("FAIL translator: core (%0d,%0d) given two words at step %0d", i, j, t);
    end
    used[i][j][t] = 1;
    prog[i][j][t] = cw;
  endtask

  task automatic all(cw_t cw);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) put(i, j, cw);
  endtask

  function automatic port_e opposite(port_e p);
    case (p)
      PORT_E: return PORT_W;
      PORT_W: return PORT_E;
      PORT_N: return PORT_S;
      default: return PORT_N;
    endcase
  endfunction

  // neighbour transfer in the current step: R[rs] of (i,j) to R[rd] of the
  // neighbour in direction p
  task automatic xfer(int i, int j, port_e p, raddr_t rs, raddr_t rd);
    int ni = i, nj = j;
    case (p)
      PORT_E: nj = j + 1;
      PORT_W: nj = j - 1;
      PORT_N: ni = i - 1;
      default: ni = i + 1;
    endcase
    put(i, j, cw_out(rs, p));
    put(ni, nj, cw_in(rd, opposite(p)));
    n_xfer[p]++;
  endtask

  // one-place left rotation of register d along row i (temps t1, t2), 5 steps
  task automatic row_rot_left1(int i, int o, raddr_t d, raddr_t t1, raddr_t t2);
    int s = t;
    xfer(i, o+0, PORT_E, d, t1);  xfer(i, o+3, PORT_W, d, t1);   t++;
    xfer(i, o+1, PORT_E, t1, t2);                              t++;
    xfer(i, o+2, PORT_E, t2, d);  xfer(i, o+1, PORT_W, d, d);    t++;
    xfer(i, o+2, PORT_W, d, d);                                t++;
    put(i, o+2, cw_mov(d, t1)); n_mov++;                       t++;
    t = s;
  endtask

  // two-place rotation of R0 along row i, 6 steps
  task automatic row_rot2(int i, int o);
    int s = t;
    xfer(i, o+0, PORT_E, 0, 1);  xfer(i, o+3, PORT_W, 0, 1);     t++;
    xfer(i, o+2, PORT_W, 0, 2);                                t++;
    xfer(i, o+1, PORT_E, 1, 0);                                t++;
    xfer(i, o+1, PORT_E, 0, 2);                                t++;
    xfer(i, o+2, PORT_W, 1, 0);                                t++;
    xfer(i, o+1, PORT_W, 2, 0);  xfer(i, o+2, PORT_E, 2, 0);     t++;
    t = s;
  endtask

  // one-place right rotation of R0 along row i, 5 steps
  task automatic row_rot_right1(int i, int o);
    int s = t;
    xfer(i, o+3, PORT_W, 0, 1);  xfer(i, o+0, PORT_E, 0, 1);     t++;
    xfer(i, o+2, PORT_W, 1, 2);                                t++;
    xfer(i, o+1, PORT_W, 2, 0);  xfer(i, o+2, PORT_E, 0, 0);     t++;
    xfer(i, o+1, PORT_E, 0, 0);                                t++;
    put(i, o+1, cw_mov(0, 1)); n_mov++;                        t++;
    t = s;
  endtask

  task automatic shift_rows();
    for (int ti = 0; ti < M; ti += 4)
      for (int o = 0; o < N; o += 4) begin
        row_rot_left1(ti + 1, o, 0, 1, 2);
        row_rot2(ti + 2, o);
        row_rot_right1(ti + 3, o);
      end
    t += 6;
  endtask

  // register of core row r that holds column byte a_v after the all-to-all
  function automatic raddr_t mreg(int r, int v);
    return raddr_t'((v - r + 4) % 4);
  endfunction

  int mc_i0;   // first row of the tile being scheduled
  task automatic mc_x(int j, int r, int v, port_e p);
    int nr = (p == PORT_S) ? r + 1 : r - 1;
    xfer(mc_i0 + r, j, p, mreg(r, v), mreg(nr, v));
  endtask

  task automatic mix_columns();
    for (int tile = 0; tile < M / 4; tile++)
    for (int j = 0; j < N; j++) begin
      int s = t;
      mc_i0 = 4 * tile;
      mc_x(j, 0, 0, PORT_S); mc_x(j, 3, 3, PORT_N); t++;
      mc_x(j, 1, 0, PORT_S);                        t++;
      mc_x(j, 2, 3, PORT_N);                        t++;
      mc_x(j, 1, 1, PORT_N); mc_x(j, 2, 0, PORT_S); t++;
      mc_x(j, 1, 1, PORT_S);                        t++;
      mc_x(j, 2, 2, PORT_N);                        t++;
      mc_x(j, 1, 3, PORT_N); mc_x(j, 2, 1, PORT_S); t++;
      mc_x(j, 1, 2, PORT_N); mc_x(j, 2, 2, PORT_S); t++;
      t = s;
    end
    t += 8;
    all(cw_shl(4, 0));    t++;
    all(cw_shl(5, 1));    t++;
    n_shl_gf += 2 * M * N;
    all(cw_xor(0, 4, 5)); t++;
    all(cw_xor(0, 0, 1)); t++;
    all(cw_xor(0, 0, 2)); t++;
    all(cw_xor(0, 0, 3)); t++;
    n_xor += 4 * M * N;
  endtask

  task automatic add_round_key();
    all(cw_memr(2, 7));   t++;
    n_memr_dec += M * N;
    all(cw_xor(0, 0, 2)); t++;
    n_xor += M * N;
  endtask

  // ---------------- host side ----------------
  task automatic cfg_write(cfg_tgt_e tg, bit bc, int i, int j, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_tgt = tg; cfg_bcast = bc;
    cfg_row = RW'(i); cfg_col = CW2'(j); cfg_addr = 9'(a); cfg_data = cw_t'(d);
    @(negedge clk);
    cfg_we = 0; cfg_bcast = 0;
  endtask

  task automatic load_prog(int len);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        for (int a = 0; a < len; a++) cfg_write(CFG_IMEM, 0, i, j, a, int'(prog[i][j][a]));
  endtask

  byte_t cap [D][M];
  bit    cap_v [D][M];
  byte_t capw [D][M];
  bit    capw_v [D][M];
  byte_t nout [N], sout [N], wout [M];
  bit    nout_v [N], sout_v [N], wout_v [M];

  // returns the number of cycles from start to done
  task automatic run_prog(int len, output int cycles);
    int c0;
    for (int a = 0; a < D; a++) for (int i = 0; i < M; i++) begin cap_v[a][i] = 0; capw_v[a][i] = 0; end
    @(negedge clk);
    prog_len = 10'(len); start = 1; c0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (run) begin
        for (int i = 0; i < M; i++) begin
          west_in[i] = win_v[pc][i] ? win_d[pc][i] : 8'h00;
          east_in[i] = ein_v[pc][i] ? ein_d[pc][i] : 8'h00;
          if (win_v[pc][i]) n_edge_in++;
          if (ein_v[pc][i]) n_edge_in++;
        end
        #1;
        for (int i = 0; i < M; i++)
          if (east_out_valid[i]) begin cap[pc][i] = east_out[i]; cap_v[pc][i] = 1; n_edge_out++; end
        for (int j = 0; j < N; j++) begin
          if (north_out_valid[j]) begin nout[j] = north_out[j]; nout_v[j] = 1; n_edge_out++; end
          if (south_out_valid[j]) begin sout[j] = south_out[j]; sout_v[j] = 1; n_edge_out++; end
        end
        for (int i = 0; i < M; i++)
          if (west_out_valid[i]) begin
            wout[i] = west_out[i]; wout_v[i] = 1; n_edge_out++;
            capw[pc][i] = west_out[i]; capw_v[pc][i] = 1;
          end
      end
      @(negedge clk);
    end
    cycles = cyc - c0;
  endtask

  task automatic peek(int i, int j, raddr_t r, output byte_t v);
    dbg_row = RW'(i); dbg_col = CW2'(j); dbg_reg = r;
    #1 v = dbg_data;
  endtask

  task automatic pulse_reset();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
  endtask

  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] PT  = 128'h3243f6a8885a308d313198a2e0370734;

  u8    key [NB][16], pt [NB][16];
  blk_t ct_ref [NB];
  rk_t  rk [NB];
  int   k_start, k_end, len, cycles;
  byte_t v;

  // tile of core (i, j) and the byte index inside its block
  function automatic int blk(int i, int j);
    return (i / 4) * (N / 4) + (j / 4);
  endfunction
  function automatic int bidx(int i, int j);
    return (i % 4) + 4 * (j % 4);
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) n_xfer[k] = 0;
    {n_edge_in, n_edge_out, n_lut, n_shl_gf, n_shr, n_and, n_xor} = '0;
    {n_inc, n_dec, n_memr_dec, n_memw_inc, n_mov, n_nop} = '0;
    for (int i = 0; i < M; i++) begin west_in[i] = 0; east_in[i] = 0; end
    for (int j = 0; j < N; j++) begin north_in[j] = 0; south_in[j] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int b = 0; b < NB; b++) begin
      for (int k = 0; k < 16; k++) begin
        key[b][k] = KEY[127-8*k -: 8] ^ u8'(17 * b);
        pt[b][k]  = PT[127-8*k -: 8] + u8'(b);
      end
      ct_ref[b] = encrypt(pt[b], key[b]);
      rk[b] = expand(key[b]);
    end

    for (int a = 0; a < 256; a++) cfg_write(CFG_LUT, 1, 0, 0, a, int'(sbox(u8'(a))));
    cfg_write(CFG_ALU, 1, 0, 0, ALU_REG_POLY, 8'h1b);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        for (int r = 0; r <= 10; r++)
          cfg_write(CFG_SPM, 0, i, j, (64 - r) % 64, int'(rk[blk(i, j)][r][bidx(i, j)]));

    clear_prog();
    all(cw_memr(2, 7)); t++;
    // West half of each row fed from the West edge, East half from the
    // East edge, farthest column first: H(H+1)/2 cycles with H = N/2
    for (int k = N / 2 - 1; k >= 0; k--) begin
      for (int i = 0; i < M; i++) begin
        put(i, 0, cw_in(k == 0 ? 3'd0 : 3'd1, PORT_W));
        win_v[t][i] = 1; win_d[t][i] = pt[blk(i, k)][bidx(i, k)];
        put(i, N - 1, cw_in(k == 0 ? 3'd0 : 3'd1, PORT_E));
        ein_v[t][i] = 1; ein_d[t][i] = pt[blk(i, N - 1 - k)][bidx(i, N - 1 - k)];
      end
      t++;
      for (int h = 0; h < k; h++) begin
        for (int i = 0; i < M; i++) begin
          xfer(i, h, PORT_E, 1, (h + 1 == k) ? 3'd0 : 3'd1);
          xfer(i, N - 1 - h, PORT_W, 1, (h + 1 == k) ? 3'd0 : 3'd1);
        end
        t++;
      end
    end
    k_start = t;
    all(cw_xor(0, 0, 2)); t++;
    for (int r = 1; r <= 10; r++) begin
      all(cw_lut(0, 0)); t++;
      shift_rows();
      if (r < 10) mix_columns();
      add_round_key();
    end
    k_end = t;
    check("AES kernel cycles (217)", k_end - k_start, 217);
    // ciphertext leaves through the nearer of the West and East edges,
    // nearest column first
    for (int k = 0; k < N / 2; k++) begin
      for (int h = k; h >= 0; h--) begin
        for (int i = 0; i < M; i++) begin
          if (h == 0) begin
            put(i, 0, cw_out(h == k ? 3'd0 : 3'd1, PORT_W));
            wout_x_v[t][i] = 1; wout_x_d[t][i] = ct_ref[blk(i, k)][bidx(i, k)];
            put(i, N - 1, cw_out(h == k ? 3'd0 : 3'd1, PORT_E));
            eout_v[t][i] = 1; eout_d[t][i] = ct_ref[blk(i, N - 1 - k)][bidx(i, N - 1 - k)];
          end else begin
            xfer(i, h, PORT_W, h == k ? 3'd0 : 3'd1, 1);
            xfer(i, N - 1 - h, PORT_E, h == k ? 3'd0 : 3'd1, 1);
          end
        end
        t++;
      end
    end
    len = t;
    check("I/O cycles, 1 + 2 x H(H+1)/2 with H = N/2", len - 217, 1 + (N / 2) * (N / 2 + 1));
    load_prog(len);
    run_prog(len, cycles);
    check("program cycles", cycles, len + 1);
    for (int a = 0; a < len; a++)
      for (int i = 0; i < M; i++)
        begin
          if (eout_v[a][i]) begin
            check("ciphertext byte valid (East)", cap_v[a][i], 1);
            check("ciphertext byte (East)", cap[a][i], eout_d[a][i]);
          end
          if (wout_x_v[a][i]) begin
            check("ciphertext byte valid (West)", capw_v[a][i], 1);
            check("ciphertext byte (West)", capw[a][i], wout_x_d[a][i]);
          end
        end
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        peek(i, j, 0, v);
        check("state R0 after AES", v, ct_ref[blk(i, j)][bidx(i, j)]);
      end
    $display("AES-128 on %0dx%0d: %0d blocks, program %0d cycles, kernel %0d cycles, %0.2f bits/cycle",
             M, N, NB, len, k_end - k_start, real'(128 * NB) / real'(len));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
