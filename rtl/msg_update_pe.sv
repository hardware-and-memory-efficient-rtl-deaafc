// msg_update_pe: hardware-efficient BP message update processing element.
//
// Computes, for every label l of a message vector,
//   M(l) = min_l' { H(l') + lam * min(|l - l'|, T) } - min_l' H(l')
// where H is the sum of the incoming messages and the data cost of the
// pixel. The minimum is split, as in the fast-BP formulation, into a global
// term (min H + lam*T, from one binary min tree over all L labels) and a
// local term over the untruncated window.
//
// Local term, following the shared-tree construction of the design: the
// linear model makes sub-trees of neighbouring local trees differ only by a
// multiple of lam, so each level needs one min operator per label side:
//   left  side P_k(n) = min(P_k-1(n), P_k-1(n - 2^(k-1)) + 2^(k-1)*lam)
//   right side R_k(m) = min(R_k-1(m), R_k-1(m + 2^(k-1)) + 2^(k-1)*lam)
// With interleaving, P is kept only at even labels and R only at odd labels;
// the pair (n, n+1), n even, shares them:
//   local(n)   = min(P(n),       R(n+1) + lam)
//   local(n+1) = min(P(n) + lam, R(n+1))
// KT = clog2(T+1) levels make every local tree a complete binary tree over
// labels n-(2^KT-1) .. n+2^KT; the leaves beyond T carry a cost above lam*T
// and never beat the global term, so the result stays exact. For T = 7 this
// is exactly the 16-leaf tree n-7 .. n+8 of the design's example.
//
// Out-of-range labels are +infinity (all ones). The output is normalised by
// subtracting min H (so min_l M(l) = 0) and saturated to MSG_W bits; the
// normalisation is this implementation's choice to bound the word width.
//
// Interface: h[] and lam are sampled combinationally; m[] is registered on
// clk when en is high: one message vector per cycle, latency one cycle.
module msg_update_pe #(
  parameter int unsigned L     = bp_pkg::L_DEF,
  parameter int unsigned T     = bp_pkg::T_DEF,
  parameter int unsigned HW    = bp_pkg::MSG_W_DEF + 2,
  parameter int unsigned MSG_W = bp_pkg::MSG_W_DEF,
  parameter int unsigned LAM_W = bp_pkg::LAM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [HW-1:0]    h   [L],
  input  logic [LAM_W-1:0] lam,
  output logic [MSG_W-1:0] m   [L]
);

  localparam int unsigned KT  = (T < 1) ? 1 : $clog2(T + 1);   // local tree levels
  localparam int unsigned TW  = ((HW > LAM_W + KT) ? HW : LAM_W + KT) + 2;
  localparam int unsigned LG  = (L < 2) ? 1 : $clog2(L);        // global tree levels
  localparam int unsigned LP2 = 1 << LG;
  localparam logic [TW-1:0] INF = '1;

  typedef logic [TW-1:0] word_t;

  function automatic word_t sadd(word_t a, word_t b);
    logic [TW:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (a == INF || s >= {1'b0, INF}) return INF;
    return s[TW-1:0];
  endfunction

  function automatic word_t wmin(word_t a, word_t b);
    return (b < a) ? b : a;
  endfunction

  word_t p   [KT+1][L];   // left-side shared tree levels (even labels)
  word_t r   [KT+1][L];   // right-side shared tree levels (odd labels)
  word_t g   [LG+1][LP2]; // global min tree
  word_t loc [L];
  word_t hmin, glob, lamw;
  logic [MSG_W-1:0] m_d [L];

  always_comb begin
    lamw = word_t'(lam);
    // level 0: the leaves
    for (int n = 0; n < int'(L); n++) begin
      p[0][n] = word_t'(h[n]);
      r[0][n] = word_t'(h[n]);
    end
    // shared local-tree levels: one min per label pair and side
    for (int k = 1; k <= int'(KT); k++) begin
      for (int n = 0; n < int'(L); n++) begin
        p[k][n] = INF;
        r[k][n] = INF;
        if ((n % 2) == 0) begin
          if (n >= (1 << (k - 1)))
            p[k][n] = wmin(p[k-1][n], sadd(p[k-1][n - (1 << (k - 1))], lamw << (k - 1)));
          else
            p[k][n] = p[k-1][n];
        end else begin
          if (n + (1 << (k - 1)) < int'(L))
            r[k][n] = wmin(r[k-1][n], sadd(r[k-1][n + (1 << (k - 1))], lamw << (k - 1)));
          else
            r[k][n] = r[k-1][n];
        end
      end
    end
    // interleaved roots: even and odd labels share the two sub-trees
    for (int n = 0; n < int'(L); n += 2) begin
      if (n + 1 < int'(L)) begin
        loc[n]   = wmin(p[KT][n], sadd(r[KT][n+1], lamw));
        loc[n+1] = wmin(sadd(p[KT][n], lamw), r[KT][n+1]);
      end else begin
        loc[n]   = p[KT][n];
      end
    end
    // global tree
    for (int i = 0; i < int'(LP2); i++)
      g[0][i] = (i < int'(L)) ? word_t'(h[i]) : INF;
    for (int lv = 1; lv <= int'(LG); lv++) begin
      for (int i = 0; i < int'(LP2); i++) begin
        if (i < int'(LP2 >> lv))
          g[lv][i] = wmin(g[lv-1][2*i], g[lv-1][2*i+1]);
        else
          g[lv][i] = INF;
      end
    end
    hmin = g[LG][0];
    glob = sadd(hmin, lamw * word_t'(T));
    // final min with the global term, normalise and saturate
    for (int n = 0; n < int'(L); n++) begin
      word_t v;
      v = wmin(loc[n], glob) - hmin;
      m_d[n] = (v > word_t'({MSG_W{1'b1}})) ? '1 : v[MSG_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < int'(L); n++) m[n] <= '0;
    end else if (en) begin
      for (int n = 0; n < int'(L); n++) m[n] <= m_d[n];
    end
  end

endmodule
