// image_buffer: on-chip input buffers of the left and right views.
//
// Holds the left-view tile (TILE x TILE pixels) and the right-view search
// region of the same rows (TILE x (TILE + L - 1) pixels: right column c
// corresponds to tile column c - (L-1), so every disparity 0..L-1 of every
// tile pixel is inside). Pixels are loaded through a write port; a census
// phase then computes the 3x3 census code of one buffer row per cycle, for
// both views at once, and stores it beside the intensity. Neighbours outside
// the buffer count as "not darker".
//
// Read side (combinational, one port per lane): the left pixel and census
// code at (rd_x, rd_y), the right pixels and codes at (rd_x - l, rd_y) for
// all labels l, and the left intensity at (nb_x, nb_y), the neighbour that
// receives the message (for the colour weight).
//
// The buffer geometry and the census phase are this implementation's
// choices; the design shows buffers for the left and right view images
// feeding the cost compute array.
module image_buffer #(
  parameter int unsigned TILE  = bp_pkg::TILE_DEF,
  parameter int unsigned L     = bp_pkg::L_DEF,
  parameter int unsigned PIX_W = bp_pkg::PIX_W
) (
  input  logic                       clk,
  // load port
  input  logic                       we,
  input  logic                       sel_right,
  input  logic [$clog2(TILE)-1:0]    wrow,
  input  logic [$clog2(TILE+L)-1:0]  wcol,
  input  logic [PIX_W-1:0]           wdata,
  // census phase
  input  logic                       cen_en,
  input  logic [$clog2(TILE)-1:0]    cen_row,
  // lane read ports
  input  logic [$clog2(TILE)-1:0]    rd_x   [TILE],
  input  logic [$clog2(TILE)-1:0]    rd_y   [TILE],
  input  logic [$clog2(TILE)-1:0]    nb_x   [TILE],
  input  logic [$clog2(TILE)-1:0]    nb_y   [TILE],
  output logic [PIX_W-1:0]           pix_l  [TILE],
  output logic [7:0]                 cen_l  [TILE],
  output logic [PIX_W-1:0]           pix_nb [TILE],
  output logic [PIX_W-1:0]           pix_r  [TILE][L],
  output logic [7:0]                 cen_r  [TILE][L]
);
  localparam int unsigned RW = TILE + L - 1;

  logic [PIX_W-1:0] lpix [TILE][TILE];
  logic [7:0]       lcen [TILE][TILE];
  logic [PIX_W-1:0] rpix [TILE][RW];
  logic [7:0]       rcen [TILE][RW];

  // census of one row of each view
  logic [PIX_W-1:0] lnb  [TILE][8];
  logic [7:0]       lnv  [TILE];
  logic [7:0]       lcode[TILE];
  logic [PIX_W-1:0] rnb  [RW][8];
  logic [7:0]       rnv  [RW];
  logic [7:0]       rcode[RW];

  always_comb begin
    for (int c = 0; c < int'(TILE); c++) begin
      int b;
      b = 0;
      for (int dy = -1; dy <= 1; dy++) begin
        for (int dx = -1; dx <= 1; dx++) begin
          if (dx != 0 || dy != 0) begin
            int yy, xx;
            yy = int'(cen_row) + dy;
            xx = c + dx;
            if (yy >= 0 && yy < int'(TILE) && xx >= 0 && xx < int'(TILE)) begin
              lnb[c][b] = lpix[yy][xx];
              lnv[c][b] = 1'b1;
            end else begin
              lnb[c][b] = '0;
              lnv[c][b] = 1'b0;
            end
            b++;
          end
        end
      end
    end
    for (int c = 0; c < int'(RW); c++) begin
      int b;
      b = 0;
      for (int dy = -1; dy <= 1; dy++) begin
        for (int dx = -1; dx <= 1; dx++) begin
          if (dx != 0 || dy != 0) begin
            int yy, xx;
            yy = int'(cen_row) + dy;
            xx = c + dx;
            if (yy >= 0 && yy < int'(TILE) && xx >= 0 && xx < int'(RW)) begin
              rnb[c][b] = rpix[yy][xx];
              rnv[c][b] = 1'b1;
            end else begin
              rnb[c][b] = '0;
              rnv[c][b] = 1'b0;
            end
            b++;
          end
        end
      end
    end
  end

  for (genvar c = 0; c < int'(TILE); c++) begin : g_lcen
    census_unit #(.PIX_W(PIX_W)) u_cen (
      .center(lpix[cen_row][c]), .nb(lnb[c]), .nb_valid(lnv[c]), .code(lcode[c]));
  end
  for (genvar c = 0; c < int'(RW); c++) begin : g_rcen
    census_unit #(.PIX_W(PIX_W)) u_cen (
      .center(rpix[cen_row][c]), .nb(rnb[c]), .nb_valid(rnv[c]), .code(rcode[c]));
  end

  always_ff @(posedge clk) begin
    if (we) begin
      if (sel_right) begin
        if (int'(wcol) < int'(RW)) rpix[wrow][wcol] <= wdata;
      end else begin
        if (int'(wcol) < int'(TILE)) lpix[wrow][wcol[$clog2(TILE)-1:0]] <= wdata;
      end
    end
    if (cen_en) begin
      for (int c = 0; c < int'(TILE); c++) lcen[cen_row][c] <= lcode[c];
      for (int c = 0; c < int'(RW); c++)   rcen[cen_row][c] <= rcode[c];
    end
  end

  always_comb begin
    for (int k = 0; k < int'(TILE); k++) begin
      pix_l[k]  = lpix[rd_y[k]][rd_x[k]];
      cen_l[k]  = lcen[rd_y[k]][rd_x[k]];
      pix_nb[k] = lpix[nb_y[k]][nb_x[k]];
      for (int l = 0; l < int'(L); l++) begin
        pix_r[k][l] = rpix[rd_y[k]][int'(rd_x[k]) + int'(L) - 1 - l];
        cen_r[k][l] = rcen[rd_y[k]][int'(rd_x[k]) + int'(L) - 1 - l];
      end
    end
  end
endmodule
