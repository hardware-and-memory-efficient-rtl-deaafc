// bp_pkg: constants, types and helper functions shared by the belief
// propagation (BP) disparity engine.
//
// The engine processes one square tile of TILE x TILE pixels with K = TILE
// parallel lanes. Each pixel carries L disparity labels; every message and
// data cost is a vector of L unsigned words. The smoothness term is the
// truncated linear model lambda*min(|l-l'|, T) with T = L/8, as the design
// prescribes for large label counts.
//
// Defaults follow the design: L = 512, T = L/8 = 64, 32 message-update
// units (the block diagram shows units 0..31). The tile side of 32, the
// 10-bit message word and the 8-bit pixels are this implementation's
// choices; 32x32 pixels with 10-bit words make four tile-sized message
// buffers exactly 2560 KB at L = 512, the figure quoted for the
// conventional tile-based flow.
//
// Message block buffer bank mapping (this implementation's choice, built on
// the principle that a pixel and its neighbour along any pass direction live
// in different single-port banks): pixel (x, y) sits in bank
//   { bit1(x - y), (x + y) mod K }   and word   y >> 1.
// During a pass every lane reads its current pixel and writes back the pixel
// it read one cycle earlier; with this mapping all 2K accesses of a cycle go
// to 2K different banks, in rows and in columns alike (requires K % 4 == 0).
package bp_pkg;

  // Default sizes
  localparam int unsigned L_DEF      = 512;        // disparity range (labels)
  localparam int unsigned T_DEF      = L_DEF / 8;  // truncation, T = L/8
  localparam int unsigned TILE_DEF   = 32;         // tile side = number of lanes
  localparam int unsigned MSG_W_DEF  = 10;         // message / cost word
  localparam int unsigned PIX_W      = 8;          // pixel intensity
  localparam int unsigned CEN_W      = 8;          // 3x3 census code
  localparam int unsigned LAM_W      = 6;          // smoothness weight lambda

  // Pass directions, in the processing order of one iteration.
  typedef enum logic [1:0] {
    DIR_RIGHT = 2'd0,  // horizontal forward
    DIR_LEFT  = 2'd1,  // horizontal backward
    DIR_DOWN  = 2'd2,  // vertical forward
    DIR_UP    = 2'd3   // vertical backward
  } dir_e;

  // Per-cycle control word broadcast by the mode controller to all lanes.
  // Stage 1 issues the reads (message buffer, line buffer, image buffer);
  // stage 2 (one cycle later) updates the message and writes back.
  typedef struct packed {
    logic        pass_start;  // first cycle of a pass: latch boundary messages
    dir_e        dir;         // direction of the current pass
    logic        s1_valid;    // stage 1 active
    logic [15:0] s1_pos;      // pixel position along the lane in stage 1
    logic        s2_valid;    // stage 2 active
    logic [15:0] s2_pos;      // pixel position along the lane in stage 2
    logic        s2_first;    // stage 2 handles the first pixel of the pass
    logic        s2_last;     // stage 2 handles the last pixel of the pass
    logic        det;         // deterministic mode (decision) during this pass
  } ctrl_t;

  function automatic logic is_backward(dir_e d);
    return (d == DIR_LEFT) || (d == DIR_UP);
  endfunction

  function automatic logic is_vertical(dir_e d);
    return (d == DIR_DOWN) || (d == DIR_UP);
  endfunction

  // Bank of pixel (x, y) in a K-lane message block buffer (2K banks).
  function automatic int unsigned bank_of(int unsigned x, int unsigned y, int unsigned k);
    int unsigned diag;
    int unsigned skew;
    diag = (x + y) % k;
    skew = ((x - y) >> 1) & 1;
    return skew * k + diag;
  endfunction

  // Word address of pixel (x, y) inside its bank.
  function automatic int unsigned addr_of(int unsigned y);
    return y >> 1;
  endfunction

endpackage
