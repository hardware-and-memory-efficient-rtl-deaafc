// tb_bp_lane: one lane (TILE=4, L=16, T=2) driven through forward and
// backward passes in both orientations, the last one in deterministic mode.
// Stage-2 inputs (M, cost, lam_eff) are random per pixel. An independent
// model computes every message update by brute force and checks: the
// merged message M' = FromPE + LB written in backward passes, the write
// enable (backward only), the boundary message after each pass, and the
// decided label in deterministic mode.
module tb_bp_lane;
  import bp_pkg::*;
  localparam int unsigned TILE = 4, L = 16, T = 2, MW = 10;
  localparam int MAXV = (1 << MW) - 1;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl;
  logic [MW-1:0] m_rd [L], cost [L], bnd_in [L], m_wr [L], bnd_out [L];
  logic [5:0] lam_eff;
  logic m_wr_en, bnd_out_valid, disp_valid;
  logic [1:0] disp_pos;
  logic [3:0] disp;
  int checks = 0, failures = 0;
  int lb [TILE][L];

  bp_lane #(.L(L), .T(T), .TILE(TILE), .MSG_W(MW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  function automatic void upd(input int hv[L], input int lm, output int o[L]);
    int hmin, best, d;
    hmin = 1 << 30;
    foreach (hv[j]) if (hv[j] < hmin) hmin = hv[j];
    for (int l = 0; l < int'(L); l++) begin
      best = 1 << 30;
      for (int j = 0; j < int'(L); j++) begin
        d = (j > l) ? j - l : l - j;
        if (d > int'(T)) d = T;
        if (hv[j] + lm * d < best) best = hv[j] + lm * d;
      end
      o[l] = (best - hmin > MAXV) ? MAXV : best - hmin;
    end
  endfunction

  task automatic pass(dir_e d, bit det);
    int from [L];
    int hv [L], o [L];
    bit bwd;
    bwd = is_backward(d);
    for (int l = 0; l < int'(L); l++) begin
      bnd_in[l] = MW'($urandom_range(0, 60));
      from[l] = int'(bnd_in[l]);
    end
    for (int c = 0; c <= int'(TILE); c++) begin
      int p1, p2;
      p1 = bwd ? int'(TILE) - 1 - c : c;
      p2 = bwd ? int'(TILE) - c : c - 1;
      ctrl = '0;
      ctrl.dir = d;
      ctrl.pass_start = (c == 0);
      ctrl.s1_valid = (c < int'(TILE));
      ctrl.s1_pos = 16'(p1);
      ctrl.s2_valid = (c >= 1);
      ctrl.s2_pos = 16'(p2);
      ctrl.s2_first = (c == 1);
      ctrl.s2_last = (c == int'(TILE));
      ctrl.det = det;
      if (c >= 1) begin
        int bestv, bl, b;
        lam_eff = 6'($urandom_range(0, 40));
        for (int l = 0; l < int'(L); l++) begin
          m_rd[l] = MW'($urandom_range(0, 120));
          cost[l] = MW'($urandom_range(0, 63));
          hv[l] = int'(m_rd[l]) + from[l] + int'(cost[l]);
        end
        #1;
        chk(int'(m_wr_en), int'(bwd), "m_wr_en");
        bestv = 1 << 30; bl = 0;
        for (int l = 0; l < int'(L); l++) begin
          if (bwd) begin
            chk(int'(m_wr[l]), from[l] + lb[p2][l], "m_wr");
            b = hv[l] + lb[p2][l];
            if (b < bestv) begin bestv = b; bl = l; end
          end else begin
            lb[p2][l] = from[l];
          end
        end
        upd(hv, int'(lam_eff), o);
        from = o;
        @(negedge clk);
        if (det) begin
          chk(int'(disp_valid), 1, "disp_valid");
          chk(int'(disp_pos), p2, "disp_pos");
          chk(int'(disp), bl, "disp");
        end
      end else begin
        @(negedge clk);
      end
    end
    ctrl = '0;
    #1;
    chk(int'(bnd_out_valid), 1, "bnd_out_valid");
    for (int l = 0; l < int'(L); l++) chk(int'(bnd_out[l]), from[l], "bnd_out");
    @(negedge clk);
    chk(int'(bnd_out_valid), 0, "bnd_out_valid low");
  endtask

  initial begin
    ctrl = '0;
    lam_eff = '0;
    for (int l = 0; l < int'(L); l++) begin m_rd[l] = '0; cost[l] = '0; bnd_in[l] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 20; rep++) begin
      pass(DIR_RIGHT, 0);
      pass(DIR_LEFT, 0);
      pass(DIR_DOWN, 0);
      pass(DIR_UP, rep % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
