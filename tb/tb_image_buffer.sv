// tb_image_buffer: loads random left and right images, runs the census phase
// row by row, then reads random lane coordinates and checks the left pixel,
// its census code, the neighbour pixel and the right pixels/codes of every
// disparity against a model (census: neighbour darker than centre, outside
// the buffer counts as 0).
module tb_image_buffer;
  localparam int unsigned TILE = 8, L = 16, RW = TILE + L - 1, AW = $clog2(TILE);
  logic clk = 0, we = 0, sel_right = 0, cen_en = 0;
  logic [AW-1:0] wrow = '0, cen_row = '0;
  logic [$clog2(TILE+L)-1:0] wcol = '0;
  logic [7:0] wdata = '0;
  logic [AW-1:0] rd_x [TILE], rd_y [TILE], nb_x [TILE], nb_y [TILE];
  logic [7:0] pix_l [TILE], cen_l [TILE], pix_nb [TILE];
  logic [7:0] pix_r [TILE][L], cen_r [TILE][L];
  int lp [TILE][TILE], rp [TILE][RW];
  int checks = 0, failures = 0;

  image_buffer #(.TILE(TILE), .L(L)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cen(bit right, int y, int x);
    int b = 0, code = 0, w, c, v;
    w = right ? int'(RW) : int'(TILE);
    c = right ? rp[y][x] : lp[y][x];
    for (int dy = -1; dy <= 1; dy++)
      for (int dx = -1; dx <= 1; dx++)
        if (dx != 0 || dy != 0) begin
          if (y+dy >= 0 && y+dy < int'(TILE) && x+dx >= 0 && x+dx < w) begin
            v = right ? rp[y+dy][x+dx] : lp[y+dy][x+dx];
            if (v < c) code |= 1 << b;
          end
          b++;
        end
    return code;
  endfunction

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 8) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    for (int y = 0; y < int'(TILE); y++) begin
      for (int x = 0; x < int'(TILE); x++) begin
        lp[y][x] = $urandom_range(0, 255);
        @(negedge clk); we = 1; sel_right = 0; wrow = AW'(y); wcol = 5'(x); wdata = 8'(lp[y][x]);
      end
      for (int x = 0; x < int'(RW); x++) begin
        rp[y][x] = (x % 4 == 0) ? lp[y][x % TILE] : $urandom_range(0, 255);
        @(negedge clk); we = 1; sel_right = 1; wrow = AW'(y); wcol = 5'(x); wdata = 8'(rp[y][x]);
      end
    end
    @(negedge clk); we = 0;
    for (int r = 0; r < int'(TILE); r++) begin
      cen_en = 1; cen_row = AW'(r);
      @(negedge clk);
    end
    cen_en = 0;
    for (int it = 0; it < 100; it++) begin
      for (int k = 0; k < int'(TILE); k++) begin
        rd_x[k] = AW'($urandom_range(0, TILE - 1)); rd_y[k] = AW'($urandom_range(0, TILE - 1));
        nb_x[k] = AW'($urandom_range(0, TILE - 1)); nb_y[k] = AW'($urandom_range(0, TILE - 1));
      end
      #1;
      for (int k = 0; k < int'(TILE); k++) begin
        chk(int'(pix_l[k]), lp[rd_y[k]][rd_x[k]], "pix_l");
        chk(int'(cen_l[k]), cen(0, int'(rd_y[k]), int'(rd_x[k])), "cen_l");
        chk(int'(pix_nb[k]), lp[nb_y[k]][nb_x[k]], "pix_nb");
        for (int l = 0; l < int'(L); l++) begin
          chk(int'(pix_r[k][l]), rp[rd_y[k]][int'(rd_x[k]) + int'(L) - 1 - l], "pix_r");
          chk(int'(cen_r[k][l]), cen(1, int'(rd_y[k]), int'(rd_x[k]) + int'(L) - 1 - l), "cen_r");
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
