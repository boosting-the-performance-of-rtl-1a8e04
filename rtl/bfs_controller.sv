// bfs_controller: level-synchronous BFS sequencing.
//
// After `start` the controller waits for the on-chip bitmap to finish its
// reset clear, then seeds the root through kernel 0 (level 1, no parent) into
// the "next" frontier. From then on every level is the same:
//   wait until the whole engine has drained (scanner, dispatcher, kernels and
//   every HMC request in flight) -> if no vertex was put in the next
//   frontier, stop -> else swap the frontier banks, raise the level by one
//   and start a scan of the new current frontier.
// Waiting for a full drain is the synchronisation point at the end of each
// level. `level` is the level being expanded; vertices found in it are
// written with level + 1. `done` pulses for one cycle at the end, with
// `levels` the number of non-empty levels and `cycles` the run time.
// The level loop follows the design's algorithm; the start/done handshake
// and the counters are this design's choice.
module bfs_controller
  import bfs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [VID_W-1:0]  root,
  output logic              running,
  output logic              done,
  input  logic              init_done,     // L1 bitmap cleared
  input  logic              all_idle,
  input  logic              next_any,      // next frontier not empty
  output logic              seed_valid,
  input  logic              seed_ready,
  output logic [VID_W-1:0]  seed_v,
  output logic              scan_start,
  output logic              swap,
  output logic              sel,           // current frontier bank
  output logic [31:0]       level,
  output logic [31:0]       new_level,
  output logic [31:0]       levels,
  output logic [31:0]       cycles
);
  typedef enum logic [2:0] {K_IDLE, K_INIT, K_SEED, K_WAIT, K_DECIDE, K_SCAN} kstate_e;
  kstate_e          ks_q;
  logic [VID_W-1:0] root_q;

  assign running    = (ks_q != K_IDLE);
  assign seed_valid = (ks_q == K_SEED);
  assign seed_v     = root_q;
  assign scan_start = (ks_q == K_SCAN);
  assign new_level  = level + 1'b1;
  assign swap       = (ks_q == K_DECIDE) && next_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ks_q   <= K_IDLE;
      root_q <= '0;
      sel    <= 1'b0;
      level  <= '0;
      levels <= '0;
      cycles <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (running) cycles <= cycles + 1'b1;
      unique case (ks_q)
        K_IDLE: if (start) begin
          root_q <= root;
          level  <= '0;
          levels <= '0;
          cycles <= '0;
          ks_q   <= K_INIT;
        end
        K_INIT: if (init_done) ks_q <= K_SEED;
        K_SEED: if (seed_ready) ks_q <= K_WAIT;
        // the cycle after a seed or a scan start the engine already shows busy
        K_WAIT: if (all_idle) ks_q <= K_DECIDE;
        K_DECIDE: begin
          if (next_any) begin
            sel    <= !sel;
            level  <= level + 1'b1;
            levels <= levels + 1'b1;
            ks_q   <= K_SCAN;
          end else begin
            done <= 1'b1;
            ks_q <= K_IDLE;
          end
        end
        K_SCAN: ks_q <= K_WAIT;
        default: ks_q <= K_IDLE;
      endcase
    end
  end
endmodule
