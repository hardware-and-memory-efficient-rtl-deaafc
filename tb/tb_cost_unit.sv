// tb_cost_unit: AD-Census cost of all labels against
// min(|a-b|,31) + 4*popcount(ca^cb), checked one cycle after en (registered)
// and held while en is low.
module tb_cost_unit;
  localparam int unsigned L = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] pl, cl;
  logic [7:0] pr [L];
  logic [7:0] cr [L];
  logic [9:0] cost [L];
  int exp_c [L];
  int checks = 0, failures = 0;

  cost_unit #(.L(L)) dut (.clk, .rst_n, .en, .pix_l(pl), .cen_l(cl), .pix_r(pr), .cen_r(cr), .cost);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int popc(int v);
    int c = 0;
    for (int i = 0; i < 8; i++) c += (v >> i) & 1;
    return c;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      pl = 8'($urandom_range(0, 255)); cl = 8'($urandom);
      for (int l = 0; l < int'(L); l++) begin
        int ad;
        pr[l] = (l % 3 == 0) ? pl + 8'(l % 7) : 8'($urandom_range(0, 255));
        cr[l] = 8'($urandom);
        ad = (pl > pr[l]) ? pl - pr[l] : pr[l] - pl;
        if (ad > 31) ad = 31;
        exp_c[l] = ad + 4 * popc(int'(cl ^ cr[l]));
      end
      en = 1;
      @(negedge clk);
      en = 0;
      pl = ~pl;
      for (int l = 0; l < int'(L); l++) begin
        checks++;
        if (int'(cost[l]) != exp_c[l]) begin
          failures++;
          if (failures < 5) $display("FAIL l=%0d got %0d exp %0d", l, cost[l], exp_c[l]);
        end
      end
      @(negedge clk);
      checks++;
      if (int'(cost[0]) != exp_c[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
