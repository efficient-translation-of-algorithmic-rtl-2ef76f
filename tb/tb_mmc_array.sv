// tb_mmc_array: end-to-end test of the 4 x 4 multi-u-core array at its
// default parameters.
//
// The testbench plays the macro-instruction translator: it turns grid-level
// operations into one micro-program per core, loads them through the host
// port and runs them in lock-step. Programs:
//   1. AES-128 encryption of the FIPS-197 example block. Round keys sit in
//      each core's scratchpad, the S-box in each core's lookup table.
//      Plaintext enters and ciphertext leaves through both the West and the
//      East edge of each row, N-1 = 3 cycles each way. The encryption kernel (AddRoundKey, SubBytes,
//      ShiftRows, MixColumns) must take exactly 217 cycles, split per step as
//      1 + 9 x (1 + 6 + 14 + 2) + (1 + 6 + 2).
//   2. Cycle4x4(Left, 1, all rows, R3) on the grid of register values of the
//      row-shift example, checked against its final state.
//   3. Route4x4((1,1), R1, (4,3), R3) with the per-core utilisations of the
//      routing example; the greedy choice of the least utilised neighbour
//      must give the path (2,1) (2,2) (2,3) (3,3), and the byte must arrive.
//   4. A mixed program: increment, decrement, AND, shift right, memory write
//      with R7 post-increment, memory read with R7 post-decrement, register
//      move, and output on the North, South and West edges.
//   5. WordShift4x4(R2, s) for s = 2, 5, 7: the 128-bit word held one byte
//      per core is shifted left by s bits, checked against a 128-bit shift.
//   6. Bitwise classes 00 and 01 with truth tables loaded per core (OR in
//      one core, NAND in all), next to cores that keep the reset AND.
// Every mechanism is counted and a mechanism that never happened fails.
module tb_mmc_array;
  import mmc_pkg::*;
  import aes_ref_pkg::*;

  localparam int M = 4, N = 4, D = 512;

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
  logic [1:0]        cfg_row = '0, cfg_col = '0, dbg_row = '0, dbg_col = '0;
  logic [8:0]        cfg_addr = '0;
  cw_t               cfg_data = '0;
  raddr_t            dbg_reg = '0;
  byte_t             dbg_data;

  mmc_array dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #5_000_000;
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
  int    n_inc, n_dec, n_memr_dec, n_memw_inc, n_mov, n_nop, n_wordshift, n_custom_bool;
  localparam int WS_AMT [3] = '{2, 5, 7};

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
  task automatic row_rot_left1(int i, raddr_t d, raddr_t t1, raddr_t t2);
    int s = t;
    xfer(i, 0, PORT_E, d, t1);  xfer(i, 3, PORT_W, d, t1);   t++;
    xfer(i, 1, PORT_E, t1, t2);                              t++;
    xfer(i, 2, PORT_E, t2, d);  xfer(i, 1, PORT_W, d, d);    t++;
    xfer(i, 2, PORT_W, d, d);                                t++;
    put(i, 2, cw_mov(d, t1)); n_mov++;                       t++;
    t = s;
  endtask

  // two-place rotation of R0 along row i, 6 steps
  task automatic row_rot2(int i);
    int s = t;
    xfer(i, 0, PORT_E, 0, 1);  xfer(i, 3, PORT_W, 0, 1);     t++;
    xfer(i, 2, PORT_W, 0, 2);                                t++;
    xfer(i, 1, PORT_E, 1, 0);                                t++;
    xfer(i, 1, PORT_E, 0, 2);                                t++;
    xfer(i, 2, PORT_W, 1, 0);                                t++;
    xfer(i, 1, PORT_W, 2, 0);  xfer(i, 2, PORT_E, 2, 0);     t++;
    t = s;
  endtask

  // one-place right rotation of R0 along row i, 5 steps
  task automatic row_rot_right1(int i);
    int s = t;
    xfer(i, 3, PORT_W, 0, 1);  xfer(i, 0, PORT_E, 0, 1);     t++;
    xfer(i, 2, PORT_W, 1, 2);                                t++;
    xfer(i, 1, PORT_W, 2, 0);  xfer(i, 2, PORT_E, 0, 0);     t++;
    xfer(i, 1, PORT_E, 0, 0);                                t++;
    put(i, 1, cw_mov(0, 1)); n_mov++;                        t++;
    t = s;
  endtask

  task automatic shift_rows();
    row_rot_left1(1, 0, 1, 2);
    row_rot2(2);
    row_rot_right1(3);
    t += 6;
  endtask

  // register of core row r that holds column byte a_v after the all-to-all
  function automatic raddr_t mreg(int r, int v);
    return raddr_t'((v - r + 4) % 4);
  endfunction

  task automatic mc_x(int j, int r, int v, port_e p);
    int nr = (p == PORT_S) ? r + 1 : r - 1;
    xfer(r, j, p, mreg(r, v), mreg(nr, v));
  endtask

  task automatic mix_columns();
    for (int j = 0; j < N; j++) begin
      int s = t;
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
    n_shl_gf += 32;
    all(cw_xor(0, 4, 5)); t++;
    all(cw_xor(0, 0, 1)); t++;
    all(cw_xor(0, 0, 2)); t++;
    all(cw_xor(0, 0, 3)); t++;
    n_xor += 64;
  endtask

  task automatic add_round_key();
    all(cw_memr(2, 7));   t++;
    n_memr_dec += 16;
    all(cw_xor(0, 0, 2)); t++;
    n_xor += 16;
  endtask

  // ---------------- host side ----------------
  task automatic cfg_write(cfg_tgt_e tg, bit bc, int i, int j, int a, int d);
    @(negedge clk);
    cfg_we = 1; cfg_tgt = tg; cfg_bcast = bc;
    cfg_row = 2'(i); cfg_col = 2'(j); cfg_addr = 9'(a); cfg_data = cw_t'(d);
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
    dbg_row = 2'(i); dbg_col = 2'(j); dbg_reg = r;
    #1 v = dbg_data;
  endtask

  task automatic pulse_reset();
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
  endtask

  // ---------------- test programs ----------------
  u8 key [16], pt [16];
  blk_t ct_ref;
  rk_t  rk;
  int   k_start, k_end, len, cycles;
  byte_t v;

  localparam logic [127:0] KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] PT  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam logic [127:0] CT  = 128'h3925841d02dc09fbdc118597196a0b32;

  // Fig. 2 (a) register R3 values, row-major from (1,1)
  localparam byte_t FIG2A [16] = '{8'ha0, 8'hb4, 8'hc0, 8'h0a,
                                   8'hb0, 8'hd4, 8'hc5, 8'h2a,
                                   8'he0, 8'hba, 8'hca, 8'h3a,
                                   8'hf0, 8'h00, 8'h10, 8'h02};
  localparam byte_t FIG2B [16] = '{8'hb4, 8'hc0, 8'h0a, 8'ha0,
                                   8'hd4, 8'hc5, 8'h2a, 8'hb0,
                                   8'hba, 8'hca, 8'h3a, 8'he0,
                                   8'h00, 8'h10, 8'h02, 8'hf0};
  // Fig. 3 utilisation in percent, row-major from (1,1)
  localparam int UTIL [16] = '{80, 66, 90, 100,
                               20, 70, 40, 90,
                               100, 80, 56, 65,
                               90, 10, 34, 99};

  function automatic int sgn(int x);
    return (x > 0) ? 1 : (x < 0) ? -1 : 0;
  endfunction

  int path_i [8], path_j [8], plen;

  initial begin
    for (int k = 0; k < 4; k++) n_xfer[k] = 0;
    {n_edge_in, n_edge_out, n_lut, n_shl_gf, n_shr, n_and, n_xor} = '0;
    {n_inc, n_dec, n_memr_dec, n_memw_inc, n_mov, n_nop, n_wordshift, n_custom_bool} = '0;
    for (int i = 0; i < M; i++) begin west_in[i] = 0; east_in[i] = 0; end
    for (int j = 0; j < N; j++) begin north_in[j] = 0; south_in[j] = 0; end
    for (int j = 0; j < N; j++) begin nout_v[j] = 0; sout_v[j] = 0; end
    for (int i = 0; i < M; i++) wout_v[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ===== 1. AES-128 =====
    for (int k = 0; k < 16; k++) begin
      key[k] = KEY[127-8*k -: 8];
      pt[k]  = PT[127-8*k -: 8];
    end
    ct_ref = encrypt(pt, key);
    for (int k = 0; k < 16; k++) check("reference AES vs FIPS-197", ct_ref[k], CT[127-8*k -: 8]);
    rk = expand(key);

    // host configuration: S-box, GF(2^8) doubling constant, round keys
    for (int a = 0; a < 256; a++) cfg_write(CFG_LUT, 1, 0, 0, a, int'(sbox(u8'(a))));
    cfg_write(CFG_ALU, 1, 0, 0, ALU_REG_POLY, 8'h1b);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++)
        for (int r = 0; r <= 10; r++)
          cfg_write(CFG_SPM, 0, i, j, (64 - r) % 64, int'(rk[r][i + 4*j]));

    clear_prog();
    // first round key into R2 (R7 walks down through the key list)
    all(cw_memr(2, 7)); n_memr_dec += 16; t++;
    // plaintext in through the West edge, farthest column first
    // West half of each row fed from the West edge, East half from the
    // East edge, farthest column first: H(H+1)/2 cycles with H = N/2
    for (int k = N / 2 - 1; k >= 0; k--) begin
      for (int i = 0; i < M; i++) begin
        put(i, 0, cw_in(k == 0 ? 3'd0 : 3'd1, PORT_W));
        win_v[t][i] = 1; win_d[t][i] = pt[i + 4*k];
        put(i, N - 1, cw_in(k == 0 ? 3'd0 : 3'd1, PORT_E));
        ein_v[t][i] = 1; ein_d[t][i] = pt[i + 4*(N - 1 - k)];
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
    all(cw_xor(0, 0, 2)); n_xor += 16; t++;
    for (int r = 1; r <= 10; r++) begin
      all(cw_lut(0, 0)); n_lut += 16; t++;
      shift_rows();
      if (r < 10) mix_columns();
      add_round_key();
    end
    k_end = t;
    check("AES kernel cycles (217)", k_end - k_start, 217);
    // ciphertext out through the East edge, nearest column first
    // ciphertext leaves through the nearer of the West and East edges,
    // nearest column first
    for (int k = 0; k < N / 2; k++) begin
      for (int h = k; h >= 0; h--) begin
        for (int i = 0; i < M; i++) begin
          if (h == 0) begin
            put(i, 0, cw_out(h == k ? 3'd0 : 3'd1, PORT_W));
            wout_x_v[t][i] = 1; wout_x_d[t][i] = ct_ref[i + 4*k];
            put(i, N - 1, cw_out(h == k ? 3'd0 : 3'd1, PORT_E));
            eout_v[t][i] = 1; eout_d[t][i] = ct_ref[i + 4*(N - 1 - k)];
          end else begin
            xfer(i, h, PORT_W, h == k ? 3'd0 : 3'd1, 1);
            xfer(i, N - 1 - h, PORT_E, h == k ? 3'd0 : 3'd1, 1);
          end
        end
        t++;
      end
    end
    len = t;
    check("AES I/O cycles: key load + 2 x (N-1)", len - 217, 1 + 2 * (N - 1));
    for (int i = 0; i < M; i++) for (int j = 0; j < N; j++) for (int a = 0; a < len; a++)
      if (!used[i][j][a]) n_nop++;
    load_prog(len);
    run_prog(len, cycles);
    check("AES program cycles", cycles, len + 1);
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
        check("state R0 after AES", v, ct_ref[i + 4*j]);
      end
    $display("AES-128: program %0d cycles, kernel %0d cycles", len, k_end - k_start);

    // ===== 2. Cycle4x4(Left, 1, [1,2,3,4], R3) =====
    pulse_reset();
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) cfg_write(CFG_SPM, 0, i, j, 0, FIG2A[4*i + j]);
    clear_prog();
    all(cw_memr(3, 6)); t++;   // R6 = 0 after reset: R3 <= MEM(0)
    for (int i = 0; i < M; i++) row_rot_left1(i, 3, 1, 2);
    t += 5;
    len = t;
    load_prog(len);
    run_prog(len, cycles);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        peek(i, j, 3, v);
        check("Cycle4x4 left shift", v, FIG2B[4*i + j]);
      end

    // ===== 3. Route4x4((1,1),R1,(4,3),R3), greedy least-utilised path =====
    begin
      int ci = 0, cj = 0, ti = 3, tj = 2, ai, aj, bi, bj, ni, nj, ui [16];
      for (int k = 0; k < 16; k++) ui[k] = UTIL[k];
      plen = 0;
      while (ci != ti || cj != tj) begin
        ai = ci + sgn(ti - ci); aj = cj;
        bi = ci;                bj = cj + sgn(tj - cj);
        if (ai == ci)      begin ni = bi; nj = bj; end
        else if (bj == cj) begin ni = ai; nj = aj; end
        else if (ui[4*ai + aj] <= ui[4*bi + bj]) begin ni = ai; nj = aj; end
        else begin ni = bi; nj = bj; end
        path_i[plen] = ni; path_j[plen] = nj; plen++;
        ci = ni; cj = nj;
      end
      check("route length", plen, 5);
      check("route hop 1 (2,1)", {path_i[0], path_j[0]}, {32'd1, 32'd0});
      check("route hop 2 (2,2)", {path_i[1], path_j[1]}, {32'd1, 32'd1});
      check("route hop 3 (2,3)", {path_i[2], path_j[2]}, {32'd1, 32'd2});
      check("route hop 4 (3,3)", {path_i[3], path_j[3]}, {32'd2, 32'd2});
      check("route hop 5 (4,3)", {path_i[4], path_j[4]}, {32'd3, 32'd2});
      pulse_reset();
      cfg_write(CFG_SPM, 0, 0, 0, 0, 8'h5a);
      clear_prog();
      put(0, 0, cw_memr(1, 6)); t++;        // R1 of (1,1) <= 5A
      ci = 0; cj = 0;
      for (int h = 0; h < plen; h++) begin
        port_e p;
        p = (path_i[h] > ci) ? PORT_S : (path_i[h] < ci) ? PORT_N :
            (path_j[h] > cj) ? PORT_E : PORT_W;
        xfer(ci, cj, p, (h == 0) ? 3'd1 : 3'd4, (h == plen - 1) ? 3'd3 : 3'd4);
        t++;
        ci = path_i[h]; cj = path_j[h];
      end
      len = t;
      load_prog(len);
      run_prog(len, cycles);
      peek(3, 2, 3, v);
      check("routed byte at (4,3) R3", v, 8'h5a);
      peek(1, 1, 4, v);
      check("routed byte passed (2,2) R4", v, 8'h5a);
    end

    // ===== 4. mixed instructions =====
    pulse_reset();
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) cfg_write(CFG_SPM, 0, i, j, 5, 8'h13 * (4*i + j) + 8'h81);
    clear_prog();
    for (int s = 0; s < 5; s++) begin all(cw_inc(6)); t++; end          // R6 = 5
    n_inc += 80;
    all(cw_memr(1, 6)); t++;                                            // R1 = MEM(5)
    all(cw_shr(2, 1));  t++; n_shr += 16;                               // R2 = R1 >> 1
    all(cw_and(3, 2, 1)); t++; n_and += 16;                             // R3 = R2 & R1
    all(cw_dec(6));     t++; n_dec += 16;                               // R6 = 4
    all(cw_memw(7, 3)); t++; n_memw_inc += 16;                          // MEM(0) = R3, R7 = 1
    all(cw_memw(7, 1)); t++; n_memw_inc += 16;                          // MEM(1) = R1, R7 = 2
    all(cw_mov(4, 7));  t++; n_mov += 16;                               // R4 = 2
    all(cw_dec(7));     t++; n_dec += 16;                               // R7 = 1
    all(cw_memr(5, 7)); t++; n_memr_dec += 16;                          // R5 = MEM(1), R7 = 0
    all(cw_memr(0, 7)); t++; n_memr_dec += 16;                          // R0 = MEM(0), R7 = 255
    for (int j = 0; j < N; j++) put(0, j, cw_out(0, PORT_N));
    t++;
    for (int j = 0; j < N; j++) put(M - 1, j, cw_out(5, PORT_S));
    t++;
    for (int i = 0; i < M; i++) put(i, 0, cw_out(1, PORT_W));
    t++;
    len = t;
    load_prog(len);
    run_prog(len, cycles);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        byte_t d;
        d = 8'h13 * byte_t'(4*i + j) + 8'h81;
        peek(i, j, 0, v); check("R0 = MEM(0) = (d>>1)&d", v, (d >> 1) & d);
        peek(i, j, 1, v); check("R1 = d", v, d);
        peek(i, j, 2, v); check("R2 = d>>1", v, d >> 1);
        peek(i, j, 3, v); check("R3 = (d>>1)&d", v, (d >> 1) & d);
        peek(i, j, 4, v); check("R4 = R7 after two writes", v, 2);
        peek(i, j, 5, v); check("R5 = MEM(1)", v, d);
        peek(i, j, 6, v); check("R6 inc/dec", v, 4);
        peek(i, j, 7, v); check("R7 after post-decrement", v, 8'hff);
      end
    for (int j = 0; j < N; j++) begin
      byte_t d0, d3;
      d0 = 8'h13 * byte_t'(j) + 8'h81;
      d3 = 8'h13 * byte_t'(12 + j) + 8'h81;
      check("north edge output valid", nout_v[j], 1);
      check("north edge output", nout[j], (d0 >> 1) & d0);
      check("south edge output valid", sout_v[j], 1);
      check("south edge output", sout[j], d3);
    end
    for (int i = 0; i < M; i++) begin
      byte_t d;
      d = 8'h13 * byte_t'(4*i) + 8'h81;
      check("west edge output valid", wout_v[i], 1);
      check("west edge output", wout[i], d);
    end

    // ===== 5. WordShift4x4(R2, s): logical left shift of a 128-bit word =====
    // Byte k = 4i + j of the word sits in R2 of core (i, j), byte 0 most
    // significant. Each core needs the top s bits of the next byte: bytes
    // move one core West inside a row, and the first byte of a row goes to
    // the last core of the row above (North, then East along that row).
    foreach (WS_AMT[n]) begin
      int sa;
      logic [127:0] word, shifted;
      sa = WS_AMT[n];
      pulse_reset();
      for (int k = 0; k < 16; k++) begin
        word[127 - 8*k -: 8] = byte_t'($urandom);
        cfg_write(CFG_SPM, 0, k / 4, k % 4, 0, word[127 - 8*k -: 8]);
      end
      shifted = word << sa;
      clear_prog();
      all(cw_memr(2, 6)); t++;                 // R2 = word byte (R6 = 0)
      all(cw_xor(6, 6, 6)); t++;               // R6 = 0: the last core keeps it
      for (int i = 0; i < M; i++) begin        // odd columns send West
        xfer(i, 1, PORT_W, 2, 6); xfer(i, 3, PORT_W, 2, 6);
      end
      t++;
      for (int i = 0; i < M; i++) xfer(i, 2, PORT_W, 2, 6);
      t++;
      for (int g = 1; g <= 2; g++) begin       // rows 1,3 then row 2: first byte to row above
        for (int i = g; i < M; i += 2) begin
          int s0;
          s0 = t;
          xfer(i, 0, PORT_N, 2, 5);              t++;
          xfer(i - 1, 0, PORT_E, 5, 5);          t++;
          xfer(i - 1, 1, PORT_E, 5, 5);          t++;
          xfer(i - 1, 2, PORT_E, 5, 6);          t++;
          t = s0;
        end
        t += 4;
      end
      for (int r = 0; r < 8 - sa; r++) begin all(cw_shr(6, 6)); t++; end
      n_shr += 16 * (8 - sa);
      for (int r = 0; r < sa; r++) begin all(cw_shl(2, 2)); t++; end
      all(cw_xor(2, 2, 6)); t++;
      n_xor += 32;
      n_wordshift++;
      len = t;
      load_prog(len);
      run_prog(len, cycles);
      for (int k = 0; k < 16; k++) begin
        peek(k / 4, k % 4, 2, v);
        check($sformatf("WordShift by %0d, byte %0d", sa, k), v, shifted[127 - 8*k -: 8]);
      end
      check("WordShift cycles", len, 2 + 2 + 8 + 9);
    end

    // ===== 6. per-core bitwise truth tables =====
    // F0 becomes OR in core (0,0) only, F1 becomes NAND in every core; the
    // other cores keep AND for class 00.
    pulse_reset();
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        cfg_write(CFG_SPM, 0, i, j, 0, 8'h35 * (4*i + j) + 8'h0f);
        cfg_write(CFG_SPM, 0, i, j, 1, 8'h59 * (4*i + j) + 8'hc3);
      end
    cfg_write(CFG_ALU, 0, 0, 0, ALU_REG_F0, 8'b1110);
    cfg_write(CFG_ALU, 1, 0, 0, ALU_REG_F1, 8'b0111);
    clear_prog();
    all(cw_memr(1, 6)); t++;                      // R1 = MEM(0)
    all(cw_inc(6));     t++; n_inc += 16;
    all(cw_memr(2, 6)); t++;                      // R2 = MEM(1)
    all(cw_and(3, 2, 1)); t++;                    // R3 = F0(R2, R1)
    all(cw_xor(4, 2, 1)); t++;                    // R4 = F1(R2, R1)
    len = t;
    load_prog(len);
    run_prog(len, cycles);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin
        byte_t d0, d1;
        d0 = 8'h35 * byte_t'(4*i + j) + 8'h0f;
        d1 = 8'h59 * byte_t'(4*i + j) + 8'hc3;
        peek(i, j, 3, v);
        check("class 00 with per-core F0", v, (i == 0 && j == 0) ? (d0 | d1) : (d0 & d1));
        peek(i, j, 4, v);
        check("class 01 with F1 = NAND", v, byte_t'(~(d0 & d1)));
      end
    n_custom_bool += 32;

    // ===== mechanism coverage =====
    $display("transfers E=%0d W=%0d N=%0d S=%0d edge_in=%0d edge_out=%0d",
             n_xfer[PORT_E], n_xfer[PORT_W], n_xfer[PORT_N], n_xfer[PORT_S], n_edge_in, n_edge_out);
    $display("lut=%0d shl_gf=%0d shr=%0d and=%0d xor=%0d inc=%0d dec=%0d memr_dec=%0d memw_inc=%0d mov=%0d nop=%0d",
             n_lut, n_shl_gf, n_shr, n_and, n_xor, n_inc, n_dec, n_memr_dec, n_memw_inc, n_mov, n_nop);
    check("mechanism: transfer east",  n_xfer[PORT_E] > 0, 1);
    check("mechanism: transfer west",  n_xfer[PORT_W] > 0, 1);
    check("mechanism: transfer north", n_xfer[PORT_N] > 0, 1);
    check("mechanism: transfer south", n_xfer[PORT_S] > 0, 1);
    check("mechanism: edge input",     n_edge_in > 0, 1);
    check("mechanism: edge output",    n_edge_out > 0, 1);
    check("mechanism: table lookup",   n_lut > 0, 1);
    check("mechanism: GF doubling",    n_shl_gf > 0, 1);
    check("mechanism: shift right",    n_shr > 0, 1);
    check("mechanism: AND",            n_and > 0, 1);
    check("mechanism: XOR",            n_xor > 0, 1);
    check("mechanism: increment",      n_inc > 0, 1);
    check("mechanism: decrement",      n_dec > 0, 1);
    check("mechanism: R7 post-dec",    n_memr_dec > 0, 1);
    check("mechanism: R7 post-inc",    n_memw_inc > 0, 1);
    check("mechanism: register move",  n_mov > 0, 1);
    check("mechanism: idle core",      n_nop > 0, 1);
    check("mechanism: word shift",     n_wordshift > 0, 1);
    check("mechanism: custom bitwise", n_custom_bool > 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
