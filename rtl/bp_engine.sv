// bp_engine: tile-based belief-propagation disparity engine with a
// memory-efficient message data flow and hardware-efficient update PEs.
//
// One tile of TILE x TILE pixels is processed with K = TILE lanes, each with
// its own message update unit. Costs are computed on the fly from the left
// and right image buffers (AD-Census), so the only message storage is one
// combined-message block buffer M (2K single-port banks) and one line
// buffer per lane, instead of four direction buffers. Each iteration runs
// four passes - right, left, down, up - with lane k on row k (horizontal)
// or column k (vertical), one pixel per lane per cycle. The last upward
// pass also decides the disparity of every pixel.
//
// Ports:
//   start / n_iter / lam   run one tile with n_iter iterations and
//                          smoothness weight lam; busy, then done pulses
//   img_*                  load port of the image buffers (while idle):
//                          left tile col 0..TILE-1, right region col
//                          0..TILE+L-2 where col c is tile column c-(L-1)
//   bnd_in                 tile-boundary messages entering lane k's first
//                          pixel; sampled when pass_start is high, with
//                          pass_dir telling which pass
//   bnd_out / bnd_out_valid messages leaving lane k's last pixel, valid for
//                          one cycle, one cycle after each pass
//   disp_*                 per lane: decided disparity of pixel (x, y)
// The external memory that keeps boundary messages between tiles is not
// part of this block; its traffic is the bnd_* ports.
//
// Timing: TILE/2 + TILE cycles of set-up, then 4 * n_iter * (TILE + 1)
// cycles of passes, then done.
module bp_engine #(
  parameter int unsigned L     = bp_pkg::L_DEF,
  parameter int unsigned T     = bp_pkg::T_DEF,
  parameter int unsigned TILE  = bp_pkg::TILE_DEF,
  parameter int unsigned MSG_W = bp_pkg::MSG_W_DEF,
  parameter int unsigned LAM_W = bp_pkg::LAM_W,
  parameter int unsigned PIX_W = bp_pkg::PIX_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [7:0]                 n_iter,
  input  logic [LAM_W-1:0]           lam,
  output logic                       busy,
  output logic                       done,
  input  logic                       img_we,
  input  logic                       img_sel_right,
  input  logic [$clog2(TILE)-1:0]    img_row,
  input  logic [$clog2(TILE+L)-1:0]  img_col,
  input  logic [PIX_W-1:0]           img_data,
  input  logic [MSG_W-1:0]           bnd_in        [TILE][L],
  output logic                       pass_start,
  output bp_pkg::dir_e               pass_dir,
  output logic [MSG_W-1:0]           bnd_out       [TILE][L],
  output logic                       bnd_out_valid,
  output logic                       disp_valid    [TILE],
  output logic [$clog2(TILE)-1:0]    disp_x        [TILE],
  output logic [$clog2(TILE)-1:0]    disp_y        [TILE],
  output logic [$clog2(L)-1:0]       disp          [TILE]
);
  import bp_pkg::*;

  localparam int unsigned AW = $clog2(TILE);
  localparam int unsigned MWIDTH = L * MSG_W;

  ctrl_t ctrl;
  logic  clr, cen_en;
  logic [AW-2:0] clr_addr;
  logic [AW-1:0] cen_row;

  mode_ctrl #(.TILE(TILE)) u_ctrl (
    .clk, .rst_n, .start, .n_iter, .ctrl, .clr, .clr_addr, .cen_en, .cen_row,
    .busy, .done);

  assign pass_start = ctrl.pass_start;
  assign pass_dir   = ctrl.dir;

  // stage-1 pixel coordinates of each lane and of the message receiver
  logic [AW-1:0] rx [TILE], ry [TILE], nx [TILE], ny [TILE];
  logic [AW-1:0] wx [TILE], wy [TILE];

  always_comb begin
    for (int k = 0; k < int'(TILE); k++) begin
      logic [AW-1:0] p1, p2;
      p1 = AW'(ctrl.s1_pos);
      p2 = AW'(ctrl.s2_pos);
      if (is_vertical(ctrl.dir)) begin
        rx[k] = AW'(k); ry[k] = p1;
        wx[k] = AW'(k); wy[k] = p2;
      end else begin
        rx[k] = p1;     ry[k] = AW'(k);
        wx[k] = p2;     wy[k] = AW'(k);
      end
      nx[k] = rx[k];
      ny[k] = ry[k];
      case (ctrl.dir)
        DIR_RIGHT: if (rx[k] != AW'(TILE - 1)) nx[k] = rx[k] + 1'b1;
        DIR_LEFT:  if (rx[k] != '0)            nx[k] = rx[k] - 1'b1;
        DIR_DOWN:  if (ry[k] != AW'(TILE - 1)) ny[k] = ry[k] + 1'b1;
        default:   if (ry[k] != '0)            ny[k] = ry[k] - 1'b1;
      endcase
    end
  end

  // image buffers
  logic [PIX_W-1:0] pix_l [TILE];
  logic [7:0]       cen_l [TILE];
  logic [PIX_W-1:0] pix_nb[TILE];
  logic [PIX_W-1:0] pix_r [TILE][L];
  logic [7:0]       cen_r [TILE][L];

  image_buffer #(.TILE(TILE), .L(L), .PIX_W(PIX_W)) u_img (
    .clk, .we(img_we && !busy), .sel_right(img_sel_right), .wrow(img_row),
    .wcol(img_col), .wdata(img_data), .cen_en, .cen_row,
    .rd_x(rx), .rd_y(ry), .nb_x(nx), .nb_y(ny),
    .pix_l, .cen_l, .pix_nb, .pix_r, .cen_r);

  // combined message block buffer
  logic             m_rd_en [TILE];
  logic             m_wr_en [TILE];
  logic [MWIDTH-1:0] m_wdata [TILE];
  logic [MWIDTH-1:0] m_rdata [TILE];

  msg_block_buffer #(.K(TILE), .WIDTH(MWIDTH)) u_mbuf (
    .clk, .rst_n, .clr, .clr_addr,
    .rd_en(m_rd_en), .rd_x(rx), .rd_y(ry),
    .wr_en(m_wr_en), .wr_x(wx), .wr_y(wy), .wdata(m_wdata), .rdata(m_rdata));

  // lanes
  logic [AW-1:0] disp_pos [TILE];
  logic          bnd_v    [TILE];

  for (genvar k = 0; k < int'(TILE); k++) begin : g_lane
    logic [LAM_W-1:0] lam_eff, lam_eff_q;
    logic [MSG_W-1:0] cost  [L];
    logic [MSG_W-1:0] m_rd  [L];
    logic [MSG_W-1:0] m_wr  [L];

    color_weight #(.PIX_W(PIX_W), .LAM_W(LAM_W)) u_cw (
      .i_s(pix_l[k]), .i_t(pix_nb[k]), .lam, .lam_eff);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)             lam_eff_q <= '0;
      else if (ctrl.s1_valid) lam_eff_q <= lam_eff;
    end

    cost_unit #(.L(L), .C_W(MSG_W), .PIX_W(PIX_W)) u_cost (
      .clk, .rst_n, .en(ctrl.s1_valid), .pix_l(pix_l[k]), .cen_l(cen_l[k]),
      .pix_r(pix_r[k]), .cen_r(cen_r[k]), .cost);

    for (genvar l = 0; l < int'(L); l++) begin : g_pack
      assign m_rd[l] = m_rdata[k][l*MSG_W +: MSG_W];
      assign m_wdata[k][l*MSG_W +: MSG_W] = m_wr[l];
    end

    assign m_rd_en[k] = ctrl.s1_valid;

    bp_lane #(.L(L), .T(T), .TILE(TILE), .MSG_W(MSG_W), .LAM_W(LAM_W)) u_lane (
      .clk, .rst_n, .ctrl, .m_rd, .cost, .lam_eff(lam_eff_q), .bnd_in(bnd_in[k]),
      .m_wr_en(m_wr_en[k]), .m_wr, .bnd_out(bnd_out[k]), .bnd_out_valid(bnd_v[k]),
      .disp_valid(disp_valid[k]), .disp_pos(disp_pos[k]), .disp(disp[k]));

    // decisions are made in the upward pass: lane k is column k
    assign disp_x[k] = AW'(k);
    assign disp_y[k] = disp_pos[k];
  end

  assign bnd_out_valid = bnd_v[0];
endmodule
