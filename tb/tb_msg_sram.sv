// tb_msg_sram: random single-port traffic against a model array: writes land,
// reads return the stored word one cycle later, and the read register holds
// through writes and idle cycles.
module tb_msg_sram;
  localparam int unsigned DEPTH = 16, WIDTH = 40;
  logic clk = 0, en = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] last;
  int checks = 0, failures = 0;

  msg_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    for (int a = 0; a < int'(DEPTH); a++) begin
      @(negedge clk);
      en = 1; we = 1; addr = $bits(addr)'(a);
      wdata = {$urandom, 8'(a)};
      model[a] = wdata;
    end
    @(negedge clk);
    en = 1; we = 0; addr = '0;
    @(negedge clk);
    last = model[0];
    for (int it = 0; it < 3000; it++) begin
      int op;
      op = $urandom_range(0, 2);
      en = (op != 2); we = (op == 1);
      addr = $bits(addr)'($urandom_range(0, DEPTH - 1));
      wdata = {$urandom, 8'(it)};
      @(negedge clk);
      if (op == 1) model[addr] = wdata;
      if (op == 0) last = model[addr];
      checks++;
      if (rdata !== last) begin
        failures++;
        if (failures < 5) $display("FAIL it=%0d got %h exp %h", it, rdata, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
