// msg_sram: one single-port SRAM bank of the message block buffer.
//
// One access per cycle: a write when en && we, otherwise a read when en.
// Read data is registered (available the cycle after the request) and holds
// until the next read, like a synchronous single-port SRAM macro. The design
// uses single-port SRAMs throughout; this array stands in for such a macro.
module msg_sram #(
  parameter int unsigned DEPTH = bp_pkg::TILE_DEF / 2,
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
