// bfs_top: breadth-first search engine for an FPGA attached to a Hybrid
// Memory Cube.
//
// The graph (CSR offsets and neighbour ids) and all BFS state (visited
// bitmap, two L2 frontier bitmaps, one {level, parent} record per vertex)
// live in the cube; `map` gives their byte addresses. The host loads the graph,
// clears the bitmaps and records, sets `num_vertices` and pulses `start`
// with a `root`. The engine runs level-synchronous BFS:
//   bitmap_scanner  reads the on-chip L1 bitmap and the marked L2 chunks and
//                   streams out the vertices of the current level,
//   vertex_dispatch hands them to NUM_PE kernel pairs (bfs_pe),
//   bfs_mapper      fetches each vertex's neighbour list from the cube,
//   bfs_reducer     checks and claims unvisited neighbours with atomic bit
//                   writes and marks them in the L1 bitmap,
//   bfs_controller  waits for each level to drain and swaps the frontiers.
// HMC port p (0..NUM_PE-1) belongs to kernel pair p; port NUM_PE to the
// scanner. Each port is a valid/ready request channel and an always-accepted
// response channel; responses may come in any order. `done` pulses at the
// end; levels and parents are then in the record array.
//
// Defaults: 2^26 vertices (graph scale 26), G = 512 vertices per L1 bit,
// four kernel pairs and eight tags per client; the scale comes from the
// design's largest evaluated graph, the others are this design's choice.
module bfs_top
  import bfs_pkg::*;
#(
  parameter int unsigned MAX_VERTICES = 32'd1 << 26,
  parameter int unsigned G            = 512,
  parameter int unsigned NUM_PE       = 4,
  parameter int unsigned TAGS         = 8,
  localparam int unsigned NPORT       = NUM_PE + 1,
  localparam int unsigned L1_BITS     = MAX_VERTICES / G,
  localparam int unsigned L1_WORDS    = (L1_BITS + 63) / 64,
  localparam int unsigned L1BW        = $clog2(L1_WORDS) + 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [VID_W-1:0]  root,
  input  logic [VID_W-1:0]  num_vertices,
  input  mem_map_t          map,
  output logic              running,
  output logic              done,
  output logic [31:0]       levels,
  output logic [31:0]       cycles,
  output logic [31:0]       scan_reads,     // L2 bitmap reads, whole run
  output logic [31:0]       edges_seen,     // neighbours examined, whole run
  output logic [31:0]       vertices_found, // claims, root included
  // HMC controller user ports
  output logic [NPORT-1:0]  hmc_req_valid,
  input  logic [NPORT-1:0]  hmc_req_ready,
  output hmc_req_t          hmc_req [NPORT],
  input  logic [NPORT-1:0]  hmc_rsp_valid,
  input  hmc_rsp_t          hmc_rsp [NPORT]
);
  logic init_done, sel, swap, next_any, scan_start, all_idle;
  logic seed_valid, seed_ready;
  logic [VID_W-1:0] seed_v;
  logic [31:0] level, new_level;

  // ---------------- L1 bitmap ----------------
  logic                 l1_rd_en;
  logic [$clog2(L1_WORDS)-1:0] l1_rd_idx;
  logic [63:0]          l1_rd_word;
  logic [NUM_PE-1:0]    set_valid, set_ready;
  logic [L1BW-1:0]      set_bit [NUM_PE];

  l1_bitmap #(.WORDS(L1_WORDS), .NSET(NUM_PE)) u_l1 (
    .clk, .rst_n, .init_done, .sel, .swap,
    .rd_en(l1_rd_en), .rd_idx(l1_rd_idx), .rd_word(l1_rd_word),
    .set_valid, .set_ready, .set_bit, .next_any
  );

  // ---------------- scanner on the last port ----------------
  logic [1:0] s_req_valid, s_req_ready, s_rsp_valid, s_rsp_ready;
  cli_req_t   s_req [2];
  cli_rsp_t   s_rsp [2];
  logic       s_busy, s_cb_idle, s_read;
  logic       sv_valid, sv_ready;
  logic [VID_W-1:0] sv;

  bitmap_scanner #(.G(G), .L1_WORDS(L1_WORDS)) u_scan (
    .clk, .rst_n, .start(scan_start), .sel, .map, .num_vertices, .busy(s_busy),
    .l1_rd_en, .l1_rd_idx, .l1_rd_word,
    .cli_req_valid(s_req_valid), .cli_req_ready(s_req_ready), .cli_req(s_req),
    .cli_rsp_valid(s_rsp_valid), .cli_rsp_ready(s_rsp_ready), .cli_rsp(s_rsp),
    .v_valid(sv_valid), .v_ready(sv_ready), .v(sv), .scan_read(s_read)
  );

  cmd_buffer #(.NCLI(2), .TAGS(TAGS)) u_scan_cb (
    .clk, .rst_n,
    .cli_req_valid(s_req_valid), .cli_req_ready(s_req_ready), .cli_req(s_req),
    .cli_rsp_valid(s_rsp_valid), .cli_rsp_ready(s_rsp_ready), .cli_rsp(s_rsp),
    .hmc_req_valid(hmc_req_valid[NUM_PE]), .hmc_req_ready(hmc_req_ready[NUM_PE]),
    .hmc_req(hmc_req[NUM_PE]),
    .hmc_rsp_valid(hmc_rsp_valid[NUM_PE]), .hmc_rsp(hmc_rsp[NUM_PE]),
    .idle(s_cb_idle)
  );

  // ---------------- dispatch and kernels ----------------
  logic [NUM_PE-1:0] pv_valid, pv_ready, pe_busy, pe_deg_valid, pe_claimed;
  logic [NUM_PE-1:0] pe_seed_valid, pe_seed_ready;
  logic [VID_W-1:0]  pv;
  logic [VID_W-1:0]  pe_deg [NUM_PE];
  logic              d_busy;

  vertex_dispatch #(.NPE(NUM_PE)) u_disp (
    .clk, .rst_n, .in_valid(sv_valid), .in_ready(sv_ready), .in_v(sv),
    .out_valid(pv_valid), .out_ready(pv_ready), .out_v(pv), .busy(d_busy)
  );

  always_comb begin
    pe_seed_valid    = '0;
    pe_seed_valid[0] = seed_valid;
  end
  assign seed_ready = pe_seed_ready[0];

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    bfs_pe #(.G(G), .L1BW(L1BW), .TAGS(TAGS)) u_pe (
      .clk, .rst_n, .map, .next_sel(!sel), .new_level,
      .v_valid(pv_valid[p]), .v_ready(pv_ready[p]), .v_in(pv),
      .seed_valid(pe_seed_valid[p]), .seed_ready(pe_seed_ready[p]), .seed_v,
      .l1_set_valid(set_valid[p]), .l1_set_ready(set_ready[p]), .l1_set_bit(set_bit[p]),
      .hmc_req_valid(hmc_req_valid[p]), .hmc_req_ready(hmc_req_ready[p]), .hmc_req(hmc_req[p]),
      .hmc_rsp_valid(hmc_rsp_valid[p]), .hmc_rsp(hmc_rsp[p]),
      .busy(pe_busy[p]), .deg_valid(pe_deg_valid[p]), .deg(pe_deg[p]), .claimed(pe_claimed[p])
    );
  end

  assign all_idle = !s_busy && s_cb_idle && !d_busy && (pe_busy == '0) && (set_valid == '0);

  bfs_controller u_ctrl (
    .clk, .rst_n, .start, .root, .running, .done,
    .init_done, .all_idle, .next_any,
    .seed_valid, .seed_ready, .seed_v,
    .scan_start, .swap, .sel, .level, .new_level, .levels, .cycles
  );

  // ---------------- run statistics ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_reads     <= '0;
      edges_seen     <= '0;
      vertices_found <= '0;
    end else if (start && !running) begin
      scan_reads     <= '0;
      edges_seen     <= '0;
      vertices_found <= '0;
    end else begin
      logic [31:0] e, c;
      e = '0;
      c = '0;
      for (int p = 0; p < NUM_PE; p++) begin
        if (pe_deg_valid[p]) e = e + pe_deg[p];
        c = c + 32'(pe_claimed[p]);
      end
      edges_seen     <= edges_seen + e;
      vertices_found <= vertices_found + c;
      if (s_read) scan_reads <= scan_reads + 1'b1;
    end
  end
endmodule
