// msg_block_buffer: the single combined-message tile buffer M.
//
// In the memory-efficient data flow each pixel keeps one message vector:
// the sum of the two messages of the direction group (vertical or
// horizontal) that is not being processed. The buffer is split into 2K
// single-port banks of K/2 words (K = TILE lanes, K % 4 == 0); pixel (x, y)
// lives in bank {bit1(x-y), (x+y) mod K} at word y/2 (see bp_pkg). In every
// pass cycle each lane reads the pixel it reaches and writes back the pixel
// it read the cycle before; that set of 2K accesses always hits 2K distinct
// banks, along rows and along columns, so no bank sees two requests. A
// concurrent assertion flags any conflict.
//
// Ports: per lane a read request (rd_en, rd_x, rd_y) whose data appears on
// rdata the next cycle, and a write request (wr_en, wr_x, wr_y, wdata).
// clr writes zero to word clr_addr of every bank (tile initialisation).
// The bank count and mapping are this implementation's choices in the
// spirit of the design's banking; the design draws 32 banks for 32 units.
module msg_block_buffer #(
  parameter int unsigned K     = bp_pkg::TILE_DEF,
  parameter int unsigned WIDTH = bp_pkg::L_DEF * bp_pkg::MSG_W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic [$clog2(K)-2:0]  clr_addr,
  input  logic                  rd_en [K],
  input  logic [$clog2(K)-1:0]  rd_x  [K],
  input  logic [$clog2(K)-1:0]  rd_y  [K],
  input  logic                  wr_en [K],
  input  logic [$clog2(K)-1:0]  wr_x  [K],
  input  logic [$clog2(K)-1:0]  wr_y  [K],
  input  logic [WIDTH-1:0]      wdata [K],
  output logic [WIDTH-1:0]      rdata [K]
);
  localparam int unsigned NB = 2 * K;
  localparam int unsigned DEPTH = K / 2;
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned BW = $clog2(NB);

  logic             b_en    [NB];
  logic             b_we    [NB];
  logic [AW-1:0]    b_addr  [NB];
  logic [WIDTH-1:0] b_wdata [NB];
  logic [WIDTH-1:0] b_rdata [NB];
  logic [BW-1:0]    rbank   [K];
  logic [BW-1:0]    rbank_q [K];
  logic             conflict;

  always_comb begin
    int unsigned users [NB];
    for (int b = 0; b < int'(NB); b++) begin
      b_en[b]    = clr;
      b_we[b]    = clr;
      b_addr[b]  = clr_addr;
      b_wdata[b] = '0;
      users[b]   = 0;
    end
    for (int k = 0; k < int'(K); k++) begin
      rbank[k] = BW'(bp_pkg::bank_of(rd_x[k], rd_y[k], K));
      if (!clr && rd_en[k]) begin
        b_en[rbank[k]]   = 1'b1;
        b_we[rbank[k]]   = 1'b0;
        b_addr[rbank[k]] = AW'(bp_pkg::addr_of(rd_y[k]));
        users[rbank[k]]++;
      end
    end
    for (int k = 0; k < int'(K); k++) begin
      int unsigned wb;
      wb = bp_pkg::bank_of(wr_x[k], wr_y[k], K);
      if (!clr && wr_en[k]) begin
        b_en[wb]    = 1'b1;
        b_we[wb]    = 1'b1;
        b_addr[wb]  = AW'(bp_pkg::addr_of(wr_y[k]));
        b_wdata[wb] = wdata[k];
        users[wb]++;
      end
    end
    conflict = 1'b0;
    for (int b = 0; b < int'(NB); b++)
      if (users[b] > 1) conflict = 1'b1;
  end

  for (genvar b = 0; b < int'(NB); b++) begin : g_bank
    msg_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_bank (
      .clk, .en(b_en[b]), .we(b_we[b]), .addr(b_addr[b]),
      .wdata(b_wdata[b]), .rdata(b_rdata[b]));
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(K); k++) rbank_q[k] <= rbank[k];
  end

  always_comb begin
    for (int k = 0; k < int'(K); k++) rdata[k] = b_rdata[rbank_q[k]];
  end

  a_no_bank_conflict: assert property (@(posedge clk) disable iff (!rst_n) !conflict)
    else $error("message buffer: two requests to one single-port bank");
endmodule
