// tb_color_weight: exhaustive check of the colour-weighted lambda,
// lam_eff = lam - floor(lam * |a - b| / 256), over all lambdas and a sweep of
// intensity pairs.
module tb_color_weight;
  logic [7:0] a, b;
  logic [5:0] lam, lam_eff;
  int checks = 0, failures = 0;

  color_weight dut (.i_s(a), .i_t(b), .lam, .lam_eff);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int lm = 0; lm < 64; lm++)
      for (int x = 0; x < 256; x += 15)
        for (int y = 0; y < 256; y += 17) begin
          int d, e;
          lam = 6'(lm); a = 8'(x); b = 8'(y);
          #1;
          d = (x > y) ? x - y : y - x;
          e = lm - (lm * d) / 256;
          checks++;
          if (int'(lam_eff) != e) begin
            failures++;
            if (failures < 5) $display("FAIL lam=%0d a=%0d b=%0d got %0d exp %0d", lm, x, y, lam_eff, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
