// tb_msg_update_pe: self-checking test of the message update PE.
// Two instances (L=32/T=4 and L=16/T=7, the 16-leaf example tree) get random
// H vectors and lambdas, including out-of-window minima, flat vectors and
// lambda = 0. The expected message is the brute-force O(L^2) evaluation of
// min_l' {H(l') + lam*min(|l-l'|,T)} - min H, saturated to MSG_W bits.
// The one-cycle latency of the registered output is checked as well.
module tb_msg_update_pe;
  localparam int unsigned HW = 12, MW = 10, LW = 6;
  localparam int unsigned LA = 32, TA = 4;
  localparam int unsigned LB = 16, TB = 7;

  logic clk = 0, rst_n = 0, en = 0;
  logic [HW-1:0] ha [LA];
  logic [HW-1:0] hb [LB];
  logic [LW-1:0] lam;
  logic [MW-1:0] ma [LA];
  logic [MW-1:0] mb [LB];
  int checks = 0, failures = 0;

  msg_update_pe #(.L(LA), .T(TA), .HW(HW), .MSG_W(MW), .LAM_W(LW)) dut_a (
    .clk, .rst_n, .en, .h(ha), .lam, .m(ma));
  msg_update_pe #(.L(LB), .T(TB), .HW(HW), .MSG_W(MW), .LAM_W(LW)) dut_b (
    .clk, .rst_n, .en, .h(hb), .lam, .m(mb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_msg(int n, int l, int t, int lm, int hv[]);
    int best, hmin, v, d;
    best = 1 << 30; hmin = 1 << 30;
    for (int j = 0; j < n; j++) begin
      d = (j > l) ? j - l : l - j;
      if (d > t) d = t;
      v = hv[j] + lm * d;
      if (v < best) best = v;
      if (hv[j] < hmin) hmin = hv[j];
    end
    v = best - hmin;
    return (v > (1 << MW) - 1) ? (1 << MW) - 1 : v;
  endfunction

  initial begin
    int hva[], hvb[];
    int kind;
    hva = new[LA]; hvb = new[LB];
    lam = 0;
    for (int i = 0; i < int'(LA); i++) ha[i] = 0;
    for (int i = 0; i < int'(LB); i++) hb[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      kind = it % 4;
      lam = LW'((it % 7 == 0) ? 0 : $urandom_range(1, 63));
      for (int i = 0; i < int'(LA); i++) begin
        case (kind)
          0: hva[i] = $urandom_range(0, 4095);
          1: hva[i] = $urandom_range(0, 60);
          2: hva[i] = 1000 + ((i * 37) % 11);
          default: hva[i] = (i == int'(it % LA)) ? 0 : $urandom_range(200, 4095);
        endcase
        ha[i] = HW'(hva[i]);
      end
      for (int i = 0; i < int'(LB); i++) begin
        hvb[i] = (kind == 1) ? $urandom_range(0, 30) : $urandom_range(0, 4095);
        hb[i] = HW'(hvb[i]);
      end
      en = 1;
      @(posedge clk);
      #1;
      en = 0;
      for (int l = 0; l < int'(LA); l++) begin
        checks++;
        if (int'(ma[l]) != ref_msg(LA, l, TA, int'(lam), hva)) begin
          failures++;
          if (failures < 10) $display("FAIL A it=%0d l=%0d got %0d exp %0d", it, l, ma[l], ref_msg(LA, l, TA, int'(lam), hva));
        end
      end
      for (int l = 0; l < int'(LB); l++) begin
        checks++;
        if (int'(mb[l]) != ref_msg(LB, l, TB, int'(lam), hvb)) begin
          failures++;
          if (failures < 10) $display("FAIL B it=%0d l=%0d got %0d exp %0d", it, l, mb[l], ref_msg(LB, l, TB, int'(lam), hvb));
        end
      end
      // output holds while en is low (registered, one-cycle latency)
      for (int i = 0; i < int'(LA); i++) ha[i] = '0;
      @(posedge clk);
      #1;
      checks++;
      if (int'(ma[0]) != ref_msg(LA, 0, TA, int'(lam), hva)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
