// bfs_mapper: the "map" half of a BFS kernel: finds the neighbours of a
// frontier vertex.
//
// The graph is stored in compressed sparse row form in the cube: word v of
// the offsets array holds the index of v's first neighbour in the edges
// array, word v+1 the index one past its last. For a vertex v the mapper
// reads the flit that holds offsets[v] and, when offsets[v+1] falls into the
// next flit (v mod 4 = 3), that flit too (offset reads are single flits).
// It then reads the neighbour list in large blocks on the edge client: one
// read per 64-byte-aligned block of 16 ids, starting at the flit that holds
// the first id needed and ending at the flit that holds the last one, so a
// read is 1 to 4 flits long. These reads carry {parent v, first lane, last
// lane} as context (lanes count 32-bit ids from the start of the returned
// data), and their data is
// delivered by the command buffer straight to the reducer: mapper and reducer
// exchange the neighbour lists through the cube, never directly.
//
// One vertex is handled at a time (`v_ready` is high only when idle); the
// kernel's throughput comes from the many kernels working side by side and
// from edge reads being pipelined. `edges` pulses with the degree of a
// vertex once its offsets are known.
// The map step and the cube as the channel to the reducer follow the
// design; the CSR layout and flit packing are this design's choice.
module bfs_mapper
  import bfs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mem_map_t          map,
  input  logic              v_valid,
  output logic              v_ready,
  input  logic [VID_W-1:0]  v_in,
  // offsets client
  output logic              off_req_valid,
  input  logic              off_req_ready,
  output cli_req_t          off_req,
  input  logic              off_rsp_valid,
  output logic              off_rsp_ready,
  input  cli_rsp_t          off_rsp,
  // edge-list client (responses go to the reducer)
  output logic              edg_req_valid,
  input  logic              edg_req_ready,
  output cli_req_t          edg_req,
  output logic              busy,
  output logic              deg_valid,
  output logic [VID_W-1:0]  deg
);
  typedef enum logic [2:0] {M_IDLE, M_OFF0, M_OFF1, M_WAIT, M_EDGE} state_e;
  state_e state_q;

  logic [VID_W-1:0] v_q, start_q, end_q, i_q;
  logic             have_s_q, have_e_q;

  wire [1:0]        lane   = v_q[1:0];
  wire [ADDR_W-1:0] off_a0 = map.offsets + ADDR_W'({v_q[VID_W-1:2], 4'b0});

  always_comb begin
    off_req_valid = (state_q == M_OFF0) || (state_q == M_OFF1);
    off_req.cmd   = HMC_RD;
    off_req.addr  = (state_q == M_OFF1) ? off_a0 + ADDR_W'(FLIT_B) : off_a0;
    off_req.flits = LEN_W'(1);
    off_req.data  = '0;
    off_req.mask  = '0;
    off_req.ctx   = CTX_W'(state_q == M_OFF1);
  end
  assign off_rsp_ready = 1'b1;

  // 64-byte block holding index i_q; the last id needed from it
  wire [VID_W-1:0]  last_i  = end_q - 1'b1;
  wire              last_bl = (i_q[VID_W-1:4] == last_i[VID_W-1:4]);
  wire [3:0]        le      = last_bl ? last_i[3:0] : 4'd15;
  wire [1:0]        sf      = i_q[3:2];            // first flit read
  wire [1:0]        nf      = le[3:2] - sf;        // flits read - 1
  wire [3:0]        lo      = {2'b00, i_q[1:0]};
  wire [3:0]        hi      = {nf, le[1:0]};

  always_comb begin
    edg_req_valid = (state_q == M_EDGE);
    edg_req.cmd   = HMC_RD;
    edg_req.addr  = map.edges + ADDR_W'({i_q[VID_W-1:2], 4'b0});
    edg_req.flits = LEN_W'(nf) + 1'b1;
    edg_req.data  = '0;
    edg_req.mask  = '0;
    edg_req.ctx   = CTX_W'({v_q, 24'd0, lo, hi});
  end

  assign v_ready = (state_q == M_IDLE);
  assign busy    = (state_q != M_IDLE);
  assign deg     = end_q - start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= M_IDLE;
      v_q      <= '0;
      start_q  <= '0;
      end_q    <= '0;
      i_q      <= '0;
      have_s_q <= 1'b0;
      have_e_q <= 1'b0;
      deg_valid <= 1'b0;
    end else begin
      deg_valid <= 1'b0;
      unique case (state_q)
        M_IDLE: if (v_valid) begin
          v_q      <= v_in;
          have_s_q <= 1'b0;
          have_e_q <= 1'b0;
          state_q  <= M_OFF0;
        end
        M_OFF0: if (off_req_ready) state_q <= (lane == 2'd3) ? M_OFF1 : M_WAIT;
        M_OFF1: if (off_req_ready) state_q <= M_WAIT;
        M_WAIT: begin
          if (have_s_q && have_e_q) begin
            i_q       <= start_q;
            deg_valid <= 1'b1;
            state_q   <= (end_q == start_q) ? M_IDLE : M_EDGE;
          end
        end
        M_EDGE: if (edg_req_ready) begin
          if (last_bl) state_q <= M_IDLE;
          else         i_q <= {i_q[VID_W-1:4] + 1'b1, 4'b0000};
        end
        default: state_q <= M_IDLE;
      endcase
      // offsets responses may arrive in either order
      if (off_rsp_valid) begin
        if (off_rsp.ctx[0]) begin
          end_q    <= off_rsp.data[31:0];
          have_e_q <= 1'b1;
        end else begin
          start_q  <= off_rsp.data[32*int'(lane) +: 32];
          have_s_q <= 1'b1;
          if (lane != 2'd3) begin
            end_q    <= off_rsp.data[32*(int'(lane)+1) +: 32];
            have_e_q <= 1'b1;
          end
        end
      end
    end
  end
endmodule
