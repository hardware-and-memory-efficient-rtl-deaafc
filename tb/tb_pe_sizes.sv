// tb_pe_sizes: the message update PE at the three sizes used for area and
// delay comparisons - L=128/T=16, L=256/T=32 and L=512/T=64 (T = L/8) -
// checked against the brute-force O(L^2) update on random and structured
// H vectors (single deep minimum, flat, noisy) with random lambdas.
module tb_pe_sizes;
  localparam int unsigned HW = 12, MW = 10, LW = 6;
  localparam int unsigned L1 = 128, L2 = 256, L3 = 512;

  logic clk = 0, rst_n = 0, en = 0;
  logic [LW-1:0] lam;
  logic [HW-1:0] h1 [L1], h2 [L2], h3 [L3];
  logic [MW-1:0] m1 [L1], m2 [L2], m3 [L3];
  int checks = 0, failures = 0;

  msg_update_pe #(.L(L1), .T(L1/8), .HW(HW), .MSG_W(MW), .LAM_W(LW)) u1 (.clk, .rst_n, .en, .h(h1), .lam, .m(m1));
  msg_update_pe #(.L(L2), .T(L2/8), .HW(HW), .MSG_W(MW), .LAM_W(LW)) u2 (.clk, .rst_n, .en, .h(h2), .lam, .m(m2));
  msg_update_pe #(.L(L3), .T(L3/8), .HW(HW), .MSG_W(MW), .LAM_W(LW)) u3 (.clk, .rst_n, .en, .h(h3), .lam, .m(m3));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gen(int kind, int i, int n, int c);
    case (kind)
      0: return $urandom_range(0, 4095);
      1: return (i == c) ? 0 : 300 + $urandom_range(0, 3000);
      2: return 700;
      default: return ((i > c) ? i - c : c - i) + $urandom_range(0, 20);
    endcase
  endfunction

  function automatic int ref_m(int n, int l, int lm, int hv[]);
    int best, hmin, d, v, t;
    t = n / 8;
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
    int v1[], v2[], v3[];
    v1 = new[L1]; v2 = new[L2]; v3 = new[L3];
    lam = '0;
    for (int i = 0; i < int'(L1); i++) h1[i] = '0;
    for (int i = 0; i < int'(L2); i++) h2[i] = '0;
    for (int i = 0; i < int'(L3); i++) h3[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 24; it++) begin
      int kind, c;
      kind = it % 4;
      lam = LW'((it % 5 == 0) ? 1 : $urandom_range(0, 15));
      c = $urandom_range(0, L3 - 1);
      for (int i = 0; i < int'(L1); i++) begin v1[i] = gen(kind, i, L1, c % L1); h1[i] = HW'(v1[i]); end
      for (int i = 0; i < int'(L2); i++) begin v2[i] = gen(kind, i, L2, c % L2); h2[i] = HW'(v2[i]); end
      for (int i = 0; i < int'(L3); i++) begin v3[i] = gen(kind, i, L3, c); h3[i] = HW'(v3[i]); end
      en = 1;
      @(negedge clk);
      en = 0;
      for (int l = 0; l < int'(L1); l++) begin
        checks++;
        if (int'(m1[l]) != ref_m(L1, l, int'(lam), v1)) failures++;
      end
      for (int l = 0; l < int'(L2); l++) begin
        checks++;
        if (int'(m2[l]) != ref_m(L2, l, int'(lam), v2)) failures++;
      end
      for (int l = 0; l < int'(L3); l++) begin
        checks++;
        if (int'(m3[l]) != ref_m(L3, l, int'(lam), v3)) begin
          failures++;
          if (failures < 5) $display("FAIL L=512 it=%0d l=%0d got %0d exp %0d", it, l, m3[l], ref_m(L3, l, int'(lam), v3));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
