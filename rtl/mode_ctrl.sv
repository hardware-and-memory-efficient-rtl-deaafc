// mode_ctrl: sequencer of the BP engine (the mode controller).
//
// On start it runs, for one tile:
//   CLEAR   TILE/2 cycles  zero every word of the message block buffer
//   CENSUS  TILE cycles    census codes of the image buffers, one row a cycle
//   PASS    n_iter iterations of four passes, in the order right, left,
//           down, up; each pass takes TILE+1 cycles: stage 1 on positions
//           0..TILE-1 (reversed for backward passes) and stage 2 one cycle
//           behind. Passes do not overlap, which keeps the last write-back
//           of one pass clear of the first read of the next.
//   DONE    one cycle, done pulses
// The last upward pass of the last iteration runs in deterministic mode:
// besides passing messages, the lanes decide each pixel's disparity.
// The phase order follows the design's processing order (right, left,
// down, up); the phase lengths and the start/done handshake are this
// implementation's choices. ctrl is broadcast to all lanes.
module mode_ctrl #(
  parameter int unsigned TILE = bp_pkg::TILE_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [7:0]              n_iter,
  output bp_pkg::ctrl_t           ctrl,
  output logic                    clr,
  output logic [$clog2(TILE)-2:0] clr_addr,
  output logic                    cen_en,
  output logic [$clog2(TILE)-1:0] cen_row,
  output logic                    busy,
  output logic                    done
);
  import bp_pkg::*;

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_CENSUS, S_PASS, S_DONE} state_e;

  state_e      state;
  logic [15:0] cnt;
  dir_e        dir;
  logic [7:0]  iter;
  logic [7:0]  n_iter_q;

  localparam logic [15:0] PASS_LEN = 16'(TILE + 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      dir      <= DIR_RIGHT;
      iter     <= '0;
      n_iter_q <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state    <= S_CLEAR;
          cnt      <= '0;
          n_iter_q <= (n_iter == 0) ? 8'd1 : n_iter;
        end
        S_CLEAR: begin
          cnt <= cnt + 1;
          if (cnt == 16'(TILE / 2 - 1)) begin
            state <= S_CENSUS;
            cnt   <= '0;
          end
        end
        S_CENSUS: begin
          cnt <= cnt + 1;
          if (cnt == 16'(TILE - 1)) begin
            state <= S_PASS;
            cnt   <= '0;
            dir   <= DIR_RIGHT;
            iter  <= '0;
          end
        end
        S_PASS: begin
          cnt <= cnt + 1;
          if (cnt == PASS_LEN - 1) begin
            cnt <= '0;
            if (dir == DIR_UP) begin
              dir <= DIR_RIGHT;
              if (iter == n_iter_q - 1) state <= S_DONE;
              else iter <= iter + 1;
            end else begin
              dir <= dir_e'(dir + 2'd1);
            end
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    logic [15:0] p1, p2;
    p1 = is_backward(dir) ? 16'(TILE - 1) - cnt : cnt;
    p2 = is_backward(dir) ? 16'(TILE) - cnt : cnt - 1;
    ctrl.pass_start = (state == S_PASS) && (cnt == 0);
    ctrl.dir        = dir;
    ctrl.s1_valid   = (state == S_PASS) && (cnt < 16'(TILE));
    ctrl.s1_pos     = p1;
    ctrl.s2_valid   = (state == S_PASS) && (cnt >= 1);
    ctrl.s2_pos     = p2;
    ctrl.s2_first   = (state == S_PASS) && (cnt == 1);
    ctrl.s2_last    = (state == S_PASS) && (cnt == PASS_LEN - 1);
    ctrl.det        = (state == S_PASS) && (dir == DIR_UP) && (iter == n_iter_q - 1);
    clr      = (state == S_CLEAR);
    clr_addr = cnt[$clog2(TILE)-2:0];
    cen_en   = (state == S_CENSUS);
    cen_row  = cnt[$clog2(TILE)-1:0];
    busy     = (state != S_IDLE);
    done     = (state == S_DONE);
  end
endmodule
