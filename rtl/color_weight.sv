// color_weight: colour-weighted smoothness factor for one message.
//
// The smoothness term of a message from pixel s to its neighbour t is scaled
// by delta = 1 - |I(s) - I(t)| / 256, so that strong intensity edges pass
// less smoothing. The division by 256 is a right shift by 8, giving
//   lam_eff = lam - ((lam * |I(s) - I(t)|) >> 8).
// Applying delta to lambda (rather than to each smoothness value) and the
// truncating rounding of the shift are this implementation's choices.
// Purely combinational; one multiplier of LAM_W x PIX_W bits.
module color_weight #(
  parameter int unsigned PIX_W = bp_pkg::PIX_W,
  parameter int unsigned LAM_W = bp_pkg::LAM_W
) (
  input  logic [PIX_W-1:0] i_s,
  input  logic [PIX_W-1:0] i_t,
  input  logic [LAM_W-1:0] lam,
  output logic [LAM_W-1:0] lam_eff
);
  logic [PIX_W-1:0]       diff;
  logic [LAM_W+PIX_W-1:0] prod;
  logic [LAM_W+PIX_W-1:0] red;

  always_comb begin
    diff    = (i_s > i_t) ? i_s - i_t : i_t - i_s;
    prod    = (LAM_W+PIX_W)'(lam) * (LAM_W+PIX_W)'(diff);
    red     = prod >> 8;
    lam_eff = lam - red[LAM_W-1:0];
  end
endmodule
