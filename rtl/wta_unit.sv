// wta_unit: winner-take-all disparity decision (deterministic mode).
//
// Returns the label with the smallest belief, the belief being the data cost
// plus the four incoming messages of the pixel. A binary min tree of
// clog2(L) levels carries (value, index) pairs; on equal values the lower
// label wins. Tie rule and tree shape are this implementation's choices.
// Combinational.
module wta_unit #(
  parameter int unsigned L  = bp_pkg::L_DEF,
  parameter int unsigned BW = bp_pkg::MSG_W_DEF + 3
) (
  input  logic [BW-1:0]        belief [L],
  output logic [$clog2(L)-1:0] label
);
  localparam int unsigned LG  = $clog2(L);
  localparam int unsigned LP2 = 1 << LG;

  logic [BW-1:0] v   [LG+1][LP2];
  logic [LG-1:0] idx [LG+1][LP2];

  always_comb begin
    for (int i = 0; i < int'(LP2); i++) begin
      v[0][i]   = (i < int'(L)) ? belief[i] : '1;
      idx[0][i] = LG'(i);
    end
    for (int lv = 1; lv <= int'(LG); lv++) begin
      for (int i = 0; i < int'(LP2); i++) begin
        if (i < int'(LP2 >> lv)) begin
          if (v[lv-1][2*i+1] < v[lv-1][2*i]) begin
            v[lv][i]   = v[lv-1][2*i+1];
            idx[lv][i] = idx[lv-1][2*i+1];
          end else begin
            v[lv][i]   = v[lv-1][2*i];
            idx[lv][i] = idx[lv-1][2*i];
          end
        end else begin
          v[lv][i]   = '1;
          idx[lv][i] = '0;
        end
      end
    end
    label = idx[LG][0];
  end
endmodule
