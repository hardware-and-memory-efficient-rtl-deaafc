// tb_bp_pkg: checks the helper functions of the shared package. For every
// lane count K = 4, 8, ..., 32 it checks that the bank/word mapping is
// one-to-one over the K x K tile, and that in every cycle of every pass
// direction the K reads (current pixel of each lane) and the K write-backs
// (pixel read one cycle earlier) land in 2K different banks. It also checks
// the direction predicates against the pass order right, left, down, up.
module tb_bp_pkg;
  import bp_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  initial begin
    dir_e d;
    // direction predicates
    check(!is_backward(DIR_RIGHT) && !is_vertical(DIR_RIGHT), "DIR_RIGHT");
    check( is_backward(DIR_LEFT)  && !is_vertical(DIR_LEFT),  "DIR_LEFT");
    check(!is_backward(DIR_DOWN)  &&  is_vertical(DIR_DOWN),  "DIR_DOWN");
    check( is_backward(DIR_UP)    &&  is_vertical(DIR_UP),    "DIR_UP");
    for (int k = 4; k <= 32; k += 4) begin
      int seen [64][16];
      int used [64];
      for (int b = 0; b < 2*k; b++) for (int a = 0; a < k/2; a++) seen[b][a] = 0;
      for (int x = 0; x < k; x++)
        for (int y = 0; y < k; y++) begin
          check(bank_of(x, y, k) < 2*k && addr_of(y) < k/2, $sformatf("range K=%0d", k));
          seen[bank_of(x, y, k)][addr_of(y)]++;
        end
      for (int b = 0; b < 2*k; b++)
        for (int a = 0; a < k/2; a++)
          check(seen[b][a] == 1, $sformatf("bijection K=%0d bank %0d word %0d", k, b, a));
      // every cycle of every pass: lane j reads position c, writes c-1
      for (int dd = 0; dd < 4; dd++) begin
        d = dir_e'(dd);
        for (int c = 0; c <= k; c++) begin
          for (int b = 0; b < 2*k; b++) used[b] = 0;
          for (int j = 0; j < k; j++) begin
            int rp, wp, rx, ry, wx, wy;
            rp = is_backward(d) ? k - 1 - c : c;
            wp = is_backward(d) ? k - c : c - 1;
            rx = is_vertical(d) ? j : rp;  ry = is_vertical(d) ? rp : j;
            wx = is_vertical(d) ? j : wp;  wy = is_vertical(d) ? wp : j;
            if (c < k) used[bank_of(rx, ry, k)]++;
            if (c > 0) used[bank_of(wx, wy, k)]++;
          end
          for (int b = 0; b < 2*k; b++)
            check(used[b] <= 1, $sformatf("conflict K=%0d dir=%0d cycle %0d bank %0d", k, dd, c, b));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
