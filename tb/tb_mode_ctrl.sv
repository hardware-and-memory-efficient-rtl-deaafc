// tb_mode_ctrl: runs the sequencer for 1, 2 and 3 iterations (and n_iter=0,
// treated as 1) and checks cycle by cycle against an independently built
// expected schedule: clear addresses 0..TILE/2-1, census rows 0..TILE-1,
// then per iteration the passes right, left, down, up, each with stage-1
// positions ascending (forward) or descending (backward), stage 2 trailing
// by one cycle, the first/last flags, deterministic mode only in the last
// upward pass, and done after exactly TILE/2 + TILE + 4*n*(TILE+1) cycles.
module tb_mode_ctrl;
  import bp_pkg::*;
  localparam int unsigned TILE = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] n_iter = 0;
  ctrl_t ctrl;
  logic clr, cen_en, busy, done;
  logic [1:0] clr_addr;
  logic [2:0] cen_row;
  int checks = 0, failures = 0;

  mode_ctrl #(.TILE(TILE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what, int cyc);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  task automatic run(int n);
    int its, cyc;
    its = (n == 0) ? 1 : n;
    @(negedge clk);
    n_iter = 8'(n); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;
    for (int a = 0; a < int'(TILE / 2); a++) begin
      chk(clr && int'(clr_addr) == a && !cen_en && !ctrl.s1_valid && busy, "clear", cyc);
      @(negedge clk); cyc++;
    end
    for (int r = 0; r < int'(TILE); r++) begin
      chk(cen_en && int'(cen_row) == r && !clr && !ctrl.s1_valid, "census", cyc);
      @(negedge clk); cyc++;
    end
    for (int it = 0; it < its; it++)
      for (int d = 0; d < 4; d++)
        for (int c = 0; c <= int'(TILE); c++) begin
          bit bwd;
          bwd = (d == 1) || (d == 3);
          chk(int'(ctrl.dir) == d, "dir", cyc);
          chk(ctrl.pass_start == (c == 0), "pass_start", cyc);
          chk(ctrl.s1_valid == (c < int'(TILE)), "s1_valid", cyc);
          if (c < int'(TILE)) chk(int'(ctrl.s1_pos) == (bwd ? int'(TILE) - 1 - c : c), "s1_pos", cyc);
          chk(ctrl.s2_valid == (c >= 1), "s2_valid", cyc);
          if (c >= 1) chk(int'(ctrl.s2_pos) == (bwd ? int'(TILE) - c : c - 1), "s2_pos", cyc);
          chk(ctrl.s2_first == (c == 1), "s2_first", cyc);
          chk(ctrl.s2_last == (c == int'(TILE)), "s2_last", cyc);
          chk(ctrl.det == (it == its - 1 && d == 3), "det", cyc);
          chk(!done && busy && !clr && !cen_en, "busy", cyc);
          @(negedge clk); cyc++;
        end
    chk(done && !ctrl.s1_valid && !ctrl.s2_valid, "done", cyc);
    chk(cyc == int'(TILE / 2 + TILE + 4 * its * (TILE + 1)), "cycle count", cyc);
    @(negedge clk);
    chk(!busy && !done, "idle", cyc);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done && !ctrl.s1_valid, "reset idle", 0);
    run(1);
    run(2);
    run(3);
    run(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
