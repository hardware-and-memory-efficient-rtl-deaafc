// tb_wta_unit: argmin of random beliefs (with forced ties: the lowest label
// must win), for a power-of-two and a non-power-of-two label count.
module tb_wta_unit;
  localparam int unsigned LA = 64, LB = 24;
  logic [12:0] ba [LA];
  logic [12:0] bb [LB];
  logic [5:0] la;
  logic [4:0] lb;
  int checks = 0, failures = 0;

  wta_unit #(.L(LA), .BW(13)) dut_a (.belief(ba), .label(la));
  wta_unit #(.L(LB), .BW(13)) dut_b (.belief(bb), .label(lb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 1000; it++) begin
      int ea, eb, va, vb;
      va = 1 << 20; vb = 1 << 20; ea = 0; eb = 0;
      for (int i = 0; i < int'(LA); i++) begin
        ba[i] = (it % 4 == 0) ? 13'($urandom_range(0, 3)) : 13'($urandom_range(0, 8191));
        if (int'(ba[i]) < va) begin va = int'(ba[i]); ea = i; end
      end
      for (int i = 0; i < int'(LB); i++) begin
        bb[i] = (it % 4 == 1) ? 13'($urandom_range(5, 6)) : 13'($urandom_range(0, 8191));
        if (int'(bb[i]) < vb) begin vb = int'(bb[i]); eb = i; end
      end
      #1;
      checks += 2;
      if (int'(la) != ea) begin failures++; if (failures < 5) $display("FAIL A got %0d exp %0d", la, ea); end
      if (int'(lb) != eb) begin failures++; if (failures < 5) $display("FAIL B got %0d exp %0d", lb, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
