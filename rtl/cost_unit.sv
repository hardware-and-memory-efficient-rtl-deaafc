// cost_unit: on-the-fly AD-Census matching cost for all labels of a pixel.
//
// For every disparity l the cost is
//   C(l) = min(|I_left - I_right(l)|, AD_TRUNC) + CEN_WT * popcount(c_left ^ c_right(l))
// saturated to C_W bits, where I_right(l) and c_right(l) are the intensity
// and census code of the right-view pixel l columns to the left. Costs are
// computed when needed instead of being stored, as the design does to save
// SRAM. The truncation, the weights and the additive combination are this
// implementation's choices. All L costs are registered when en is high
// (latency one cycle), so they line up with the synchronous SRAM reads.
module cost_unit #(
  parameter int unsigned L        = bp_pkg::L_DEF,
  parameter int unsigned C_W      = bp_pkg::MSG_W_DEF,
  parameter int unsigned PIX_W    = bp_pkg::PIX_W,
  parameter int unsigned AD_TRUNC = 31,
  parameter int unsigned CEN_WT   = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [PIX_W-1:0] pix_l,
  input  logic [7:0]       cen_l,
  input  logic [PIX_W-1:0] pix_r [L],
  input  logic [7:0]       cen_r [L],
  output logic [C_W-1:0]   cost  [L]
);
  logic [C_W-1:0] cost_d [L];

  always_comb begin
    for (int l = 0; l < int'(L); l++) begin
      int unsigned ad, ham, s;
      ad  = (pix_l > pix_r[l]) ? 32'(pix_l - pix_r[l]) : 32'(pix_r[l] - pix_l);
      if (ad > AD_TRUNC) ad = AD_TRUNC;
      ham = $countones(cen_l ^ cen_r[l]);
      s   = ad + CEN_WT * ham;
      cost_d[l] = (s > (1 << C_W) - 1) ? '1 : C_W'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(L); l++) cost[l] <= '0;
    end else if (en) begin
      for (int l = 0; l < int'(L); l++) cost[l] <= cost_d[l];
    end
  end
endmodule
