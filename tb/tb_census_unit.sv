// tb_census_unit: random windows; each code bit must be set exactly when
// its (valid) neighbour is darker than the centre.
module tb_census_unit;
  logic [7:0] center;
  logic [7:0] nb [8];
  logic [7:0] nv, code;
  int checks = 0, failures = 0;

  census_unit dut (.center, .nb, .nb_valid(nv), .code);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int e;
      center = 8'($urandom_range(0, 255));
      nv = (it % 3 == 0) ? 8'($urandom) : 8'hff;
      e = 0;
      for (int i = 0; i < 8; i++) begin
        nb[i] = (it % 5 == 0) ? center : 8'($urandom_range(0, 255));
        if (nv[i] && int'(nb[i]) < int'(center)) e |= 1 << i;
      end
      #1;
      checks++;
      if (int'(code) != e) begin
        failures++;
        if (failures < 5) $display("FAIL got %h exp %h", code, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
