// line_buffer: per-lane line buffer LB of the memory-efficient data flow.
//
// Holds one message vector per pixel of the lane's line. In a forward pass
// the message arriving at each pixel is written here; in the following
// backward pass it is read back and merged with the backward message into
// the combined message of that direction group. Single port: one read or one
// write per cycle; read data is registered (one-cycle latency).
module line_buffer #(
  parameter int unsigned DEPTH = bp_pkg::TILE_DEF,
  parameter int unsigned WIDTH = bp_pkg::L_DEF * bp_pkg::MSG_W_DEF
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
