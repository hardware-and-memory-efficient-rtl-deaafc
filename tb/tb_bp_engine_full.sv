// tb_bp_engine_full: end-to-end test of the BP engine at its default size
// (32x32 tile, 32 lanes, L = 512 labels, T = 64): one tile, one iteration.
// Same stimulus style, reference model and checks as the small-tile test.
//
// Loads a synthetic stereo pair (the left tile is the right view shifted by
// a known disparity field, plus noise), runs several tiles with different
// lambdas, iteration counts and boundary messages, and compares every
// boundary message leaving the tile after every pass and every decided
// disparity with an independent reference model. The model keeps the four
// direction messages of every pixel separately (conventional BP-M
// bookkeeping) and evaluates each message update by brute force, so it
// shares no structure with the combined-buffer data flow or the shared-tree
// PE. The cycle count from start to done is checked against
// TILE/2 + TILE + 4*n_iter*(TILE+1).
//
// Mechanisms counted (each must occur): clear and census phases, all four
// pass directions, line-buffer writes (forward) and reads (backward), merges
// written back to the block buffer, boundary messages in and out, colour
// weights that lower lambda, messages decided by the truncated (global)
// term, deterministic-mode decisions.
module tb_bp_engine_full;
  import bp_pkg::*;

  localparam int unsigned TILE = TILE_DEF;
  localparam int unsigned L    = L_DEF;
  localparam int unsigned T    = T_DEF;
  localparam int unsigned MW   = MSG_W_DEF;
  localparam int unsigned RW   = TILE + L - 1;
  localparam int unsigned AW   = $clog2(TILE);
  localparam int          MAXV = (1 << MW) - 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] n_iter = 1;
  logic [5:0] lam = 0;
  logic busy, done;
  logic img_we = 0, img_sel_right = 0;
  logic [AW-1:0] img_row = 0;
  logic [$clog2(TILE+L)-1:0] img_col = 0;
  logic [7:0] img_data = 0;
  logic [MW-1:0] bnd_in  [TILE][L];
  logic [MW-1:0] bnd_out [TILE][L];
  logic pass_start, bnd_out_valid;
  dir_e pass_dir;
  logic disp_valid [TILE];
  logic [AW-1:0] disp_x [TILE], disp_y [TILE];
  logic [$clog2(L)-1:0] disp [TILE];

  bp_engine dut (
    .clk, .rst_n, .start, .n_iter, .lam, .busy, .done,
    .img_we, .img_sel_right, .img_row, .img_col, .img_data,
    .bnd_in, .pass_start, .pass_dir, .bnd_out, .bnd_out_valid,
    .disp_valid, .disp_x, .disp_y, .disp);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clear = 0, n_census = 0, n_lbw = 0, n_lbr = 0, n_merge = 0;
  int n_bnd_in = 0, n_bnd_out = 0, n_cw = 0, n_trunc = 0, n_det = 0;
  int n_dir [4];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int lp [TILE][TILE];
  int rp [TILE][RW];
  int lc [TILE][TILE];
  int rc [TILE][RW];
  int cst [TILE][TILE][L];
  int mLf [TILE][TILE][L];  // message arriving from the left neighbour
  int mRt [TILE][TILE][L];  // from the right neighbour
  int mUp [TILE][TILE][L];  // from the upper neighbour
  int mDn [TILE][TILE][L];  // from the lower neighbour
  int bnd [TILE][L];
  int exp_bnd [4][TILE][L]; // expected boundary output of each pass (last iteration overwrites)
  int exp_disp [TILE][TILE];

  function automatic int popc8(int v);
    int c = 0;
    for (int i = 0; i < 8; i++) c += (v >> i) & 1;
    return c;
  endfunction

  function automatic int lam_w(int a, int b, int lm);
    int d = (a > b) ? a - b : b - a;
    return lm - ((lm * d) >> 8);
  endfunction

  // brute-force truncated-linear message update, normalised and saturated
  function automatic void upd(input int hv[L], input int lm, output int outv[L]);
    int hmin, best, d, v, locmin;
    hmin = 1 << 30;
    for (int j = 0; j < int'(L); j++) if (hv[j] < hmin) hmin = hv[j];
    for (int l = 0; l < int'(L); l++) begin
      best = 1 << 30; locmin = 1 << 30;
      for (int j = 0; j < int'(L); j++) begin
        d = (j > l) ? j - l : l - j;
        if (d < int'(T) && hv[j] + lm * d < locmin) locmin = hv[j] + lm * d;
        if (d > int'(T)) d = T;
        v = hv[j] + lm * d;
        if (v < best) best = v;
      end
      if (hmin + lm * int'(T) < locmin) n_trunc++;
      v = best - hmin;
      outv[l] = (v > MAXV) ? MAXV : v;
    end
  endfunction

  function automatic void census_ref();
    for (int y = 0; y < int'(TILE); y++) begin
      for (int x = 0; x < int'(TILE); x++) begin
        int b = 0, code = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (dx != 0 || dy != 0) begin
              if (y+dy >= 0 && y+dy < int'(TILE) && x+dx >= 0 && x+dx < int'(TILE))
                if (lp[y+dy][x+dx] < lp[y][x]) code |= (1 << b);
              b++;
            end
        lc[y][x] = code;
      end
      for (int x = 0; x < int'(RW); x++) begin
        int b = 0, code = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (dx != 0 || dy != 0) begin
              if (y+dy >= 0 && y+dy < int'(TILE) && x+dx >= 0 && x+dx < int'(RW))
                if (rp[y+dy][x+dx] < rp[y][x]) code |= (1 << b);
              b++;
            end
        rc[y][x] = code;
      end
    end
  endfunction

  function automatic void run_ref(int iters, int lm);
    int hv [L];
    int ov [L];
    int inm [L];
    census_ref();
    for (int y = 0; y < int'(TILE); y++)
      for (int x = 0; x < int'(TILE); x++)
        for (int l = 0; l < int'(L); l++) begin
          int ad, s, c;
          c  = x + int'(L) - 1 - l;
          ad = (lp[y][x] > rp[y][c]) ? lp[y][x] - rp[y][c] : rp[y][c] - lp[y][x];
          if (ad > 31) ad = 31;
          s = ad + 4 * popc8(lc[y][x] ^ rc[y][c]);
          cst[y][x][l] = (s > MAXV) ? MAXV : s;
          mLf[y][x][l] = 0; mRt[y][x][l] = 0; mUp[y][x][l] = 0; mDn[y][x][l] = 0;
        end
    for (int it = 0; it < iters; it++) begin
      // rightward: lane y
      for (int y = 0; y < int'(TILE); y++) begin
        for (int l = 0; l < int'(L); l++) inm[l] = bnd[y][l];
        for (int x = 0; x < int'(TILE); x++) begin
          int xn = (x + 1 < int'(TILE)) ? x + 1 : x;
          for (int l = 0; l < int'(L); l++) begin
            mLf[y][x][l] = inm[l];
            hv[l] = mLf[y][x][l] + mUp[y][x][l] + mDn[y][x][l] + cst[y][x][l];
          end
          if (lam_w(lp[y][x], lp[y][xn], lm) < lm) n_cw++;
          upd(hv, lam_w(lp[y][x], lp[y][xn], lm), ov);
          inm = ov;
        end
        for (int l = 0; l < int'(L); l++) exp_bnd[0][y][l] = inm[l];
      end
      // leftward
      for (int y = 0; y < int'(TILE); y++) begin
        for (int l = 0; l < int'(L); l++) inm[l] = bnd[y][l];
        for (int x = int'(TILE) - 1; x >= 0; x--) begin
          int xn = (x > 0) ? x - 1 : x;
          for (int l = 0; l < int'(L); l++) begin
            mRt[y][x][l] = inm[l];
            hv[l] = mRt[y][x][l] + mUp[y][x][l] + mDn[y][x][l] + cst[y][x][l];
          end
          upd(hv, lam_w(lp[y][x], lp[y][xn], lm), ov);
          inm = ov;
        end
        for (int l = 0; l < int'(L); l++) exp_bnd[1][y][l] = inm[l];
      end
      // downward: lane x
      for (int x = 0; x < int'(TILE); x++) begin
        for (int l = 0; l < int'(L); l++) inm[l] = bnd[x][l];
        for (int y = 0; y < int'(TILE); y++) begin
          int yn = (y + 1 < int'(TILE)) ? y + 1 : y;
          for (int l = 0; l < int'(L); l++) begin
            mUp[y][x][l] = inm[l];
            hv[l] = mUp[y][x][l] + mLf[y][x][l] + mRt[y][x][l] + cst[y][x][l];
          end
          upd(hv, lam_w(lp[y][x], lp[yn][x], lm), ov);
          inm = ov;
        end
        for (int l = 0; l < int'(L); l++) exp_bnd[2][x][l] = inm[l];
      end
      // upward
      for (int x = 0; x < int'(TILE); x++) begin
        for (int l = 0; l < int'(L); l++) inm[l] = bnd[x][l];
        for (int y = int'(TILE) - 1; y >= 0; y--) begin
          int yn = (y > 0) ? y - 1 : y;
          for (int l = 0; l < int'(L); l++) begin
            mDn[y][x][l] = inm[l];
            hv[l] = mDn[y][x][l] + mLf[y][x][l] + mRt[y][x][l] + cst[y][x][l];
          end
          upd(hv, lam_w(lp[y][x], lp[yn][x], lm), ov);
          inm = ov;
        end
        for (int l = 0; l < int'(L); l++) exp_bnd[3][x][l] = inm[l];
      end
    end
    for (int y = 0; y < int'(TILE); y++)
      for (int x = 0; x < int'(TILE); x++) begin
        int bestv = 1 << 30, bl = 0, b;
        for (int l = 0; l < int'(L); l++) begin
          b = cst[y][x][l] + mLf[y][x][l] + mRt[y][x][l] + mUp[y][x][l] + mDn[y][x][l];
          if (b < bestv) begin bestv = b; bl = l; end
        end
        exp_disp[y][x] = bl;
      end
  endfunction

  // ---------------- monitors ----------------
  int pass_idx = 0;      // passes seen in the current run
  int cur_iters = 1;
  dir_e last_dir;

  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.clr) n_clear++;
      if (dut.cen_en) n_census++;
      if (dut.ctrl.s2_valid && !is_backward(dut.ctrl.dir)) n_lbw++;
      if (dut.ctrl.s1_valid &&  is_backward(dut.ctrl.dir)) n_lbr++;
      for (int k = 0; k < int'(TILE); k++) if (dut.m_wr_en[k]) n_merge++;
      // boundary messages of the last iteration's passes
      if (bnd_out_valid) begin
        n_bnd_out++;
        if (pass_idx > 4 * (cur_iters - 1)) begin
          for (int k = 0; k < int'(TILE); k++)
            for (int l = 0; l < int'(L); l++) begin
              checks++;
              if (int'(bnd_out[k][l]) != exp_bnd[int'(last_dir)][k][l]) begin
                failures++;
                if (failures < 10) $display("FAIL bnd dir=%0d k=%0d l=%0d got %0d exp %0d",
                                            last_dir, k, l, bnd_out[k][l], exp_bnd[int'(last_dir)][k][l]);
              end
            end
        end
      end
      if (pass_start) begin
        n_dir[int'(pass_dir)]++;
        n_bnd_in++;
        last_dir = pass_dir;
        pass_idx++;
      end
      for (int k = 0; k < int'(TILE); k++)
        if (disp_valid[k]) begin
          n_det++;
          checks++;
          if (int'(disp[k]) != exp_disp[disp_y[k]][disp_x[k]]) begin
            failures++;
            if (failures < 10) $display("FAIL disp x=%0d y=%0d got %0d exp %0d",
                                        disp_x[k], disp_y[k], disp[k], exp_disp[disp_y[k]][disp_x[k]]);
          end
        end
    end
  end

  task automatic load_images(int seed_shift);
    for (int y = 0; y < int'(TILE); y++)
      for (int c = 0; c < int'(RW); c++) rp[y][c] = $urandom_range(0, 255);
    for (int y = 0; y < int'(TILE); y++)
      for (int x = 0; x < int'(TILE); x++) begin
        int d = ((x + seed_shift) < int'(TILE) / 2) ? 37 : 401;
        int v = rp[y][x + int'(L) - 1 - d] + $urandom_range(0, 6) - 3;
        if (x == int'(TILE) / 2) v = (v + 128) % 256;  // an edge for the colour weight
        lp[y][x] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
    for (int y = 0; y < int'(TILE); y++) begin
      for (int c = 0; c < int'(RW); c++) begin
        @(negedge clk);
        img_we = 1; img_sel_right = 1; img_row = AW'(y); img_col = $bits(img_col)'(c);
        img_data = 8'(rp[y][c]);
      end
      for (int x = 0; x < int'(TILE); x++) begin
        @(negedge clk);
        img_we = 1; img_sel_right = 0; img_row = AW'(y); img_col = $bits(img_col)'(x);
        img_data = 8'(lp[y][x]);
      end
    end
    @(negedge clk);
    img_we = 0;
  endtask

  task automatic run_tile(int iters, int lm, int bmax, int seed_shift);
    int cyc;
    load_images(seed_shift);
    for (int k = 0; k < int'(TILE); k++)
      for (int l = 0; l < int'(L); l++) begin
        bnd[k][l] = $urandom_range(0, bmax);
        bnd_in[k][l] = MW'(bnd[k][l]);
      end
    run_ref(iters, lm);
    n_iter = 8'(iters);
    lam = 6'(lm);
    cur_iters = iters;
    pass_idx = 0;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    // cyc counts from the falling edge before the edge that samples start,
    // so done after N busy cycles shows as N + 1
    checks++;
    if (cyc != int'(TILE / 2 + TILE + 4 * iters * (TILE + 1)) + 1) begin
      failures++;
      $display("FAIL cycles %0d exp %0d", cyc, TILE / 2 + TILE + 4 * iters * (TILE + 1) + 1);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 4; i++) n_dir[i] = 0;
    for (int k = 0; k < int'(TILE); k++)
      for (int l = 0; l < int'(L); l++) bnd_in[k][l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // lambda <= 7 keeps every merged message below 2^10 (2*7*64 = 896)
    run_tile(1, 7, 300, 0);
    // every mechanism must have happened
    checks++; if (n_clear == 0)  begin failures++; $display("no clear"); end
    checks++; if (n_census == 0) begin failures++; $display("no census"); end
    for (int i = 0; i < 4; i++) begin
      checks++; if (n_dir[i] == 0) begin failures++; $display("no pass %0d", i); end
    end
    checks++; if (n_lbw == 0)     begin failures++; $display("no LB write"); end
    checks++; if (n_lbr == 0)     begin failures++; $display("no LB read"); end
    checks++; if (n_merge == 0)   begin failures++; $display("no merge"); end
    checks++; if (n_bnd_in == 0)  begin failures++; $display("no boundary in"); end
    checks++; if (n_bnd_out == 0) begin failures++; $display("no boundary out"); end
    checks++; if (n_cw == 0)      begin failures++; $display("no colour weight"); end
    checks++; if (n_trunc == 0)   begin failures++; $display("no truncation"); end
    checks++; if (n_det != int'(TILE * TILE)) begin failures++; $display("decisions %0d", n_det); end
    $display("mechanisms: clear=%0d census=%0d R=%0d L=%0d D=%0d U=%0d lbw=%0d lbr=%0d merge=%0d bin=%0d bout=%0d cw=%0d trunc=%0d det=%0d",
             n_clear, n_census, n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_lbw, n_lbr, n_merge,
             n_bnd_in, n_bnd_out, n_cw, n_trunc, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
