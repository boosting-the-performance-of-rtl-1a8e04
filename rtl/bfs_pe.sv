// bfs_pe: one BFS kernel pair on its own HMC user port.
//
// A mapper and a reducer share a command buffer with four clients: the
// mapper's offset reads, the neighbour-list reads (issued by the mapper,
// answered to the reducer), the reducer's visited reads and its bit writes.
// `busy` is high while the mapper or reducer holds work or any request of
// this port is still in flight, so the level controller can tell when the
// kernel pair has drained.
module bfs_pe
  import bfs_pkg::*;
#(
  parameter int unsigned G    = 512,
  parameter int unsigned L1BW = 17,
  parameter int unsigned TAGS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mem_map_t          map,
  input  logic              next_sel,
  input  logic [31:0]       new_level,
  input  logic              v_valid,
  output logic              v_ready,
  input  logic [VID_W-1:0]  v_in,
  input  logic              seed_valid,
  output logic              seed_ready,
  input  logic [VID_W-1:0]  seed_v,
  output logic              l1_set_valid,
  input  logic              l1_set_ready,
  output logic [L1BW-1:0]   l1_set_bit,
  output logic              hmc_req_valid,
  input  logic              hmc_req_ready,
  output hmc_req_t          hmc_req,
  input  logic              hmc_rsp_valid,
  input  hmc_rsp_t          hmc_rsp,
  output logic              busy,
  output logic              deg_valid,
  output logic [VID_W-1:0]  deg,
  output logic              claimed
);
  logic [PE_CLIENTS-1:0] req_valid, req_ready, rsp_valid, rsp_ready;
  cli_req_t              req [PE_CLIENTS];
  cli_rsp_t              rsp [PE_CLIENTS];
  logic                  cb_idle, m_busy, r_busy;

  cmd_buffer #(.NCLI(PE_CLIENTS), .TAGS(TAGS)) u_cb (
    .clk, .rst_n,
    .cli_req_valid(req_valid), .cli_req_ready(req_ready), .cli_req(req),
    .cli_rsp_valid(rsp_valid), .cli_rsp_ready(rsp_ready), .cli_rsp(rsp),
    .hmc_req_valid, .hmc_req_ready, .hmc_req,
    .hmc_rsp_valid, .hmc_rsp, .idle(cb_idle)
  );

  bfs_mapper u_map (
    .clk, .rst_n, .map,
    .v_valid, .v_ready, .v_in,
    .off_req_valid(req_valid[CLI_OFF]), .off_req_ready(req_ready[CLI_OFF]), .off_req(req[CLI_OFF]),
    .off_rsp_valid(rsp_valid[CLI_OFF]), .off_rsp_ready(rsp_ready[CLI_OFF]), .off_rsp(rsp[CLI_OFF]),
    .edg_req_valid(req_valid[CLI_EDG]), .edg_req_ready(req_ready[CLI_EDG]), .edg_req(req[CLI_EDG]),
    .busy(m_busy), .deg_valid, .deg
  );

  bfs_reducer #(.G(G), .L1BW(L1BW)) u_red (
    .clk, .rst_n, .map, .next_sel, .new_level,
    .seed_valid, .seed_ready, .seed_v,
    .edg_rsp_valid(rsp_valid[CLI_EDG]), .edg_rsp_ready(rsp_ready[CLI_EDG]), .edg_rsp(rsp[CLI_EDG]),
    .vis_req_valid(req_valid[CLI_VIS]), .vis_req_ready(req_ready[CLI_VIS]), .vis_req(req[CLI_VIS]),
    .vis_rsp_valid(rsp_valid[CLI_VIS]), .vis_rsp_ready(rsp_ready[CLI_VIS]), .vis_rsp(rsp[CLI_VIS]),
    .wr_req_valid(req_valid[CLI_WR]), .wr_req_ready(req_ready[CLI_WR]), .wr_req(req[CLI_WR]),
    .wr_rsp_valid(rsp_valid[CLI_WR]), .wr_rsp_ready(rsp_ready[CLI_WR]),
    .l1_set_valid, .l1_set_ready, .l1_set_bit,
    .busy(r_busy), .claimed
  );

  assign busy = m_busy || r_busy || !cb_idle;
endmodule
