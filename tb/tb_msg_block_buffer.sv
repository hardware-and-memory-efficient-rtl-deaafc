// tb_msg_block_buffer: drives the access pattern of real passes on an 8-lane
// buffer (every lane reads its current pixel and writes back the pixel it
// read one cycle earlier, in all four directions) with random data. Checks
// that each read returns the last word written to that pixel, that clear
// zeroes the whole tile, and - through the buffer's own assertion - that no
// single-port bank ever sees two requests. Also checks exhaustively that
// the bank/word mapping is one-to-one.
module tb_msg_block_buffer;
  import bp_pkg::*;
  localparam int unsigned K = 8, W = 24, AW = $clog2(K);
  logic clk = 0, rst_n = 0, clr = 0;
  logic [AW-2:0] clr_addr = '0;
  logic rd_en [K], wr_en [K];
  logic [AW-1:0] rd_x [K], rd_y [K], wr_x [K], wr_y [K];
  logic [W-1:0] wdata [K], rdata [K];
  logic [W-1:0] model [K][K];
  logic [W-1:0] exp_q [K];
  logic         chk_q [K];
  logic [W-1:0] exp_p [K];
  logic         chk_p [K];
  int checks = 0, failures = 0;

  msg_block_buffer #(.K(K), .WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    for (int k = 0; k < int'(K); k++) begin
      rd_en[k] = 0; wr_en[k] = 0; rd_x[k] = '0; rd_y[k] = '0;
      wr_x[k] = '0; wr_y[k] = '0; wdata[k] = '0;
    end
  endtask

  // compare the data read in the previous cycle; called after the next
  // cycle's addresses are driven, so read data must not follow them
  task automatic check_reads();
    #1;
    for (int k = 0; k < int'(K); k++)
      if (chk_p[k]) begin
        checks++;
        if (rdata[k] !== exp_p[k]) begin
          failures++;
          if (failures < 5) $display("FAIL lane %0d got %h exp %h", k, rdata[k], exp_p[k]);
        end
      end
  endtask

  task automatic save_expect();
    for (int k = 0; k < int'(K); k++) begin
      exp_p[k] = exp_q[k];
      chk_p[k] = chk_q[k];
    end
  endtask

  initial begin
    int seen [2*K][K/2];
    idle();
    for (int k = 0; k < int'(K); k++) begin chk_q[k] = 0; chk_p[k] = 0; end
    // mapping is a bijection
    for (int b = 0; b < int'(2*K); b++) for (int a = 0; a < int'(K/2); a++) seen[b][a] = 0;
    for (int x = 0; x < int'(K); x++)
      for (int y = 0; y < int'(K); y++) seen[bank_of(x, y, K)][addr_of(y)]++;
    for (int b = 0; b < int'(2*K); b++)
      for (int a = 0; a < int'(K/2); a++) begin
        checks++;
        if (seen[b][a] != 1) failures++;
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      // clear
      for (int a = 0; a < int'(K/2); a++) begin
        clr = 1; clr_addr = (AW-1)'(a);
        @(negedge clk);
      end
      clr = 0;
      for (int x = 0; x < int'(K); x++) for (int y = 0; y < int'(K); y++) model[x][y] = '0;
      for (int d = 0; d < 4; d++) begin
        for (int c = 0; c <= int'(K); c++) begin
          save_expect();
          for (int k = 0; k < int'(K); k++) begin
            int p1, p2;
            p1 = (d % 2 == 1) ? int'(K) - 1 - c : c;
            p2 = (d % 2 == 1) ? int'(K) - c : c - 1;
            chk_q[k] = 0;
            rd_en[k] = (c < int'(K));
            wr_en[k] = (c >= 1) && (d % 2 == 1 || rep % 2 == 1);
            if (d >= 2) begin
              rd_x[k] = AW'(k); rd_y[k] = AW'(p1); wr_x[k] = AW'(k); wr_y[k] = AW'(p2);
            end else begin
              rd_x[k] = AW'(p1); rd_y[k] = AW'(k); wr_x[k] = AW'(p2); wr_y[k] = AW'(k);
            end
            wdata[k] = W'($urandom);
            if (rd_en[k]) begin
              chk_q[k] = 1;
              exp_q[k] = model[rd_x[k]][rd_y[k]];
            end
          end
          check_reads();
          @(negedge clk);
          for (int k = 0; k < int'(K); k++)
            if (wr_en[k]) model[wr_x[k]][wr_y[k]] = wdata[k];
        end
        save_expect();
        idle();
        check_reads();
        for (int k = 0; k < int'(K); k++) chk_q[k] = 0;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
