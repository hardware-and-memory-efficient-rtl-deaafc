// bp_lane: one message-passing lane of the memory-efficient BP data flow.
//
// A lane walks along one tile row (horizontal passes) or one tile column
// (vertical passes), one pixel per cycle, and owns one message update PE
// and one line buffer LB. With M the combined message of the other
// direction group (read from the block buffer), C the data cost and
// FromPE the message arriving from the previous pixel:
//   forward  (right/down): LB(i) = FromPE
//                          ToPE  = M + FromPE + C, FromPE' = update(ToPE)
//   backward (left/up):    ToPE  = M + FromPE + C, FromPE' = update(ToPE)
//                          M'(i) = FromPE + LB(i)   (written back to M)
// so after a backward pass M holds this group's two messages, ready for the
// orthogonal passes. The first pixel of a pass takes its FromPE from the
// tile boundary (bnd_in, latched at pass_start); the message leaving the
// last pixel is presented on bnd_out for the off-chip boundary store.
// In deterministic mode (the last upward pass) the lane also forms the
// belief M + FromPE + LB + C of each pixel and outputs its argmin label.
//
// Timing: stage 1 (ctrl.s1_*) issues the LB read (backward passes); the
// block-buffer data, the cost vector and lam_eff arrive registered in
// stage 2 (ctrl.s2_*), where H is formed, the PE output is registered and
// LB or M is written. Sums are saturated: H to HW bits, M' to MSG_W bits,
// which is this implementation's choice of word widths.
module bp_lane #(
  parameter int unsigned L     = bp_pkg::L_DEF,
  parameter int unsigned T     = bp_pkg::T_DEF,
  parameter int unsigned TILE  = bp_pkg::TILE_DEF,
  parameter int unsigned MSG_W = bp_pkg::MSG_W_DEF,
  parameter int unsigned LAM_W = bp_pkg::LAM_W
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  bp_pkg::ctrl_t         ctrl,
  input  logic [MSG_W-1:0]      m_rd     [L],   // stage 2: M of the pixel
  input  logic [MSG_W-1:0]      cost     [L],   // stage 2: data cost
  input  logic [LAM_W-1:0]      lam_eff,        // stage 2: weighted lambda
  input  logic [MSG_W-1:0]      bnd_in   [L],
  output logic                  m_wr_en,        // stage 2: write M' of s2_pos
  output logic [MSG_W-1:0]      m_wr     [L],
  output logic [MSG_W-1:0]      bnd_out  [L],
  output logic                  bnd_out_valid,
  output logic                  disp_valid,
  output logic [$clog2(TILE)-1:0] disp_pos,
  output logic [$clog2(L)-1:0]  disp
);
  import bp_pkg::*;

  localparam int unsigned HW = MSG_W + 2;
  localparam int unsigned BW = MSG_W + 3;
  localparam int unsigned AW = $clog2(TILE);

  logic [MSG_W-1:0] bnd_q   [L];
  logic [MSG_W-1:0] pe_m    [L];
  logic [MSG_W-1:0] from_pe [L];
  logic [HW-1:0]    h       [L];
  logic [BW-1:0]    belief  [L];
  logic [L*MSG_W-1:0] lb_wdata, lb_rdata;
  logic [MSG_W-1:0] lb_q    [L];
  logic             fwd_s2, bwd_s1;
  logic [$clog2(L)-1:0] label;

  assign fwd_s2 = ctrl.s2_valid && !is_backward(ctrl.dir);
  assign bwd_s1 = ctrl.s1_valid &&  is_backward(ctrl.dir);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < int'(L); l++) bnd_q[l] <= '0;
    end else if (ctrl.pass_start) begin
      for (int l = 0; l < int'(L); l++) bnd_q[l] <= bnd_in[l];
    end
  end

  always_comb begin
    for (int l = 0; l < int'(L); l++) begin
      int unsigned s, mg, bl;
      from_pe[l] = ctrl.s2_first ? bnd_q[l] : pe_m[l];
      lb_q[l]    = lb_rdata[l*MSG_W +: MSG_W];
      lb_wdata[l*MSG_W +: MSG_W] = from_pe[l];
      s  = int'(m_rd[l]) + int'(from_pe[l]) + int'(cost[l]);
      h[l] = (s > (1 << HW) - 1) ? '1 : HW'(s);
      mg = int'(from_pe[l]) + int'(lb_q[l]);
      m_wr[l] = (mg > (1 << MSG_W) - 1) ? '1 : MSG_W'(mg);
      bl = s + int'(lb_q[l]);
      belief[l] = (bl > (1 << BW) - 1) ? '1 : BW'(bl);
    end
  end

  line_buffer #(.DEPTH(TILE), .WIDTH(L * MSG_W)) u_lb (
    .clk,
    .en   (fwd_s2 || bwd_s1),
    .we   (fwd_s2),
    .addr (fwd_s2 ? AW'(ctrl.s2_pos) : AW'(ctrl.s1_pos)),
    .wdata(lb_wdata),
    .rdata(lb_rdata)
  );

  msg_update_pe #(.L(L), .T(T), .HW(HW), .MSG_W(MSG_W), .LAM_W(LAM_W)) u_pe (
    .clk, .rst_n, .en(ctrl.s2_valid), .h(h), .lam(lam_eff), .m(pe_m));

  wta_unit #(.L(L), .BW(BW)) u_wta (.belief(belief), .label(label));

  assign m_wr_en = ctrl.s2_valid && is_backward(ctrl.dir);
  assign bnd_out = pe_m;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bnd_out_valid <= 1'b0;
      disp_valid    <= 1'b0;
      disp_pos      <= '0;
      disp          <= '0;
    end else begin
      bnd_out_valid <= ctrl.s2_valid && ctrl.s2_last;
      disp_valid    <= ctrl.s2_valid && ctrl.det;
      if (ctrl.s2_valid && ctrl.det) begin
        disp_pos <= AW'(ctrl.s2_pos);
        disp     <= label;
      end
    end
  end
endmodule
