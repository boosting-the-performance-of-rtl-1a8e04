// bfs_reducer: the "reduce" half of a BFS kernel: marks the neighbours that
// are to be visited in the next level.
//
// Two stages work independently:
//  * Lane issue: takes one returned neighbour-list block at a time (up to
//    16 ids; context {parent, first lane, last lane}) and, for each neighbour
//    n in it, reads the single visited-bitmap flit that holds bit n (one
//    read per cycle).
//  * Claim: takes the visited flits as they come back. If bit n is already
//    set the neighbour is dropped. Otherwise n is claimed: three atomic HMC
//    bit writes set visited[n], set n's bit in the next L2 frontier bitmap
//    and write the 64-bit record {level, parent} of n; then the L1 bit
//    n / G of the next frontier is set on chip. The bit writes change only
//    the masked bits in the cube, so kernels that update other bits of the
//    same flit at the same time do not overwrite each other.
// The root enters the claim stage through the `seed` port (parent = all
// ones, the "no parent" value).
// Two kernels can see n unvisited at the same time and both claim it; both
// then write the same level and a valid parent, and the bitmap writes are
// idempotent, so the result stays a correct BFS tree.
//
// `new_level` is the level written for claimed vertices (current level + 1).
// `busy` is high while either stage holds work.
// Marking with a bitmap and the cube's atomic bit write follow the design;
// the stage split and the record layout are this design's choice.
module bfs_reducer
  import bfs_pkg::*;
#(
  parameter int unsigned G    = 512,
  parameter int unsigned L1BW = 17     // width of an L1 bit index
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_map_t          map,
  input  logic              next_sel,     // bank of the next frontier
  input  logic [31:0]       new_level,
  // root seeding
  input  logic              seed_valid,
  output logic              seed_ready,
  input  logic [VID_W-1:0]  seed_v,
  // neighbour-list flits (edge client responses)
  input  logic              edg_rsp_valid,
  output logic              edg_rsp_ready,
  input  cli_rsp_t          edg_rsp,
  // visited client
  output logic              vis_req_valid,
  input  logic              vis_req_ready,
  output cli_req_t          vis_req,
  input  logic              vis_rsp_valid,
  output logic              vis_rsp_ready,
  input  cli_rsp_t          vis_rsp,
  // write client
  output logic              wr_req_valid,
  input  logic              wr_req_ready,
  output cli_req_t          wr_req,
  input  logic              wr_rsp_valid,
  output logic              wr_rsp_ready,
  // on-chip L1 bitmap, next bank
  output logic              l1_set_valid,
  input  logic              l1_set_ready,
  output logic [L1BW-1:0]   l1_set_bit,
  output logic              busy,
  output logic              claimed       // one pulse per claimed vertex
);
  // ---------------- lane issue ----------------
  logic              ew_q;
  logic [RD_W-1:0]   ew_data_q;
  logic [VID_W-1:0]  ew_par_q;
  logic [3:0]        lane_q, hi_q;

  wire [VID_W-1:0] nb = ew_data_q[32*int'(lane_q) +: 32];

  assign edg_rsp_ready = !ew_q;
  always_comb begin
    vis_req_valid = ew_q;
    vis_req.cmd   = HMC_RD;
    vis_req.addr  = map.visited + ADDR_W'({nb[VID_W-1:7], 4'b0});
    vis_req.flits = LEN_W'(1);
    vis_req.data  = '0;
    vis_req.mask  = '0;
    vis_req.ctx   = {nb, ew_par_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ew_q      <= 1'b0;
      ew_data_q <= '0;
      ew_par_q  <= '0;
      lane_q    <= '0;
      hi_q      <= '0;
    end else if (!ew_q) begin
      if (edg_rsp_valid) begin
        ew_q      <= 1'b1;
        ew_data_q <= edg_rsp.data;
        ew_par_q  <= edg_rsp.ctx[63:32];
        lane_q    <= edg_rsp.ctx[7:4];
        hi_q      <= edg_rsp.ctx[3:0];
      end
    end else if (vis_req_ready) begin
      if (lane_q == hi_q) ew_q <= 1'b0;
      else                lane_q <= lane_q + 1'b1;
    end
  end

  // ---------------- claim ----------------
  typedef enum logic [2:0] {C_IDLE, C_VIS, C_FRONT, C_REC, C_L1} cstate_e;
  cstate_e          cs_q;
  logic [VID_W-1:0] n_q, par_q;

  wire [VID_W-1:0] rn   = vis_rsp.ctx[63:32];
  wire [FLIT_W-1:0] vflit = vis_rsp.data[FLIT_W-1:0];   // visited reads are one flit
  wire             seen = vflit[rn[6:0]];

  // seed has priority over returned visited flits
  assign seed_ready    = (cs_q == C_IDLE);
  assign vis_rsp_ready = (cs_q == C_IDLE) && !seed_valid;
  assign wr_rsp_ready  = 1'b1;

  wire [ADDR_W-1:0] front_base = next_sel ? map.frontier1 : map.frontier0;
  wire [FLIT_W-1:0] bitmask    = FLIT_W'(1) << n_q[6:0];

  always_comb begin
    wr_req_valid = (cs_q == C_VIS) || (cs_q == C_FRONT) || (cs_q == C_REC);
    wr_req.cmd   = HMC_BWR;
    wr_req.ctx   = '0;
    wr_req.addr  = map.visited + ADDR_W'({n_q[VID_W-1:7], 4'b0});
    wr_req.flits = LEN_W'(1);
    wr_req.data  = RD_W'(bitmask);
    wr_req.mask  = bitmask;
    unique case (cs_q)
      C_FRONT: wr_req.addr = front_base + ADDR_W'({n_q[VID_W-1:7], 4'b0});
      C_REC: begin
        wr_req.addr = map.record + ADDR_W'({n_q[VID_W-1:1], 4'b0});
        wr_req.data = RD_W'(n_q[0] ? {new_level, par_q, 64'd0} : {64'd0, new_level, par_q});
        wr_req.mask = n_q[0] ? {64'hFFFF_FFFF_FFFF_FFFF, 64'd0} : {64'd0, 64'hFFFF_FFFF_FFFF_FFFF};
      end
      default: ;
    endcase
  end

  assign l1_set_valid = (cs_q == C_L1);
  assign l1_set_bit   = L1BW'(n_q / VID_W'(G));
  assign claimed      = (cs_q == C_L1) && l1_set_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs_q  <= C_IDLE;
      n_q   <= '0;
      par_q <= '0;
    end else begin
      unique case (cs_q)
        C_IDLE: begin
          if (seed_valid) begin
            n_q   <= seed_v;
            par_q <= NULL_VID;
            cs_q  <= C_VIS;
          end else if (vis_rsp_valid && !seen) begin
            n_q   <= rn;
            par_q <= vis_rsp.ctx[31:0];
            cs_q  <= C_VIS;
          end
        end
        C_VIS:   if (wr_req_ready) cs_q <= C_FRONT;
        C_FRONT: if (wr_req_ready) cs_q <= C_REC;
        C_REC:   if (wr_req_ready) cs_q <= C_L1;
        C_L1:    if (l1_set_ready) cs_q <= C_IDLE;
        default: cs_q <= C_IDLE;
      endcase
    end
  end

  assign busy = ew_q || (cs_q != C_IDLE);
endmodule
