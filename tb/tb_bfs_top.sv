// tb_bfs_top: end-to-end test of the BFS engine at its default size.
//
// Builds a random undirected graph (NV vertices, NE random edges, stored in
// both directions, plus isolated vertices), loads it in CSR form into the
// cube model, runs BFS twice from two roots (the host clears the state in
// between) and compares with a breadth-first search computed here:
// every vertex's level must match, every parent must be a neighbour one
// level closer to the root, the visited bitmap must hold exactly the
// reachable vertices and both frontier bitmaps must be left clean. It also
// counts how often the design's mechanisms were exercised: L2 chunks skipped
// thanks to the L1 bitmap, multi-flit reads, atomic bit writes, out-of-order responses, work
// reaching every kernel, port back-pressure and several levels; each must
// happen at least once.
`timescale 1ns/1ps
module tb_bfs_top;
  import bfs_pkg::*;

  localparam int NPE   = 4;           // default kernel count of bfs_top
  localparam int NPORT = NPE + 1;
  localparam int NV    = 20000;
  localparam int NE    = 30000;
  localparam int GBITS = 512;         // default G of bfs_top

  localparam logic [31:0] A_OFF = 32'h0000_0000;
  localparam logic [31:0] A_EDG = 32'h1000_0000;
  localparam logic [31:0] A_VIS = 32'h2000_0000;
  localparam logic [31:0] A_F0  = 32'h3000_0000;
  localparam logic [31:0] A_F1  = 32'h3800_0000;
  localparam logic [31:0] A_REC = 32'h4000_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              start = 0;
  logic [31:0]       root = 0, num_vertices = NV;
  mem_map_t          map;
  logic              running, done;
  logic [31:0]       levels, cycles, scan_reads, edges_seen, vertices_found;
  logic [NPORT-1:0]  req_valid, req_ready, rsp_valid;
  hmc_req_t          req [NPORT];
  hmc_rsp_t          rsp [NPORT];

  assign map = '{offsets: A_OFF, edges: A_EDG, visited: A_VIS,
                 frontier0: A_F0, frontier1: A_F1, record: A_REC};

  bfs_top dut (
    .clk, .rst_n, .start, .root, .num_vertices, .map,
    .running, .done, .levels, .cycles, .scan_reads, .edges_seen, .vertices_found,
    .hmc_req_valid(req_valid), .hmc_req_ready(req_ready), .hmc_req(req),
    .hmc_rsp_valid(rsp_valid), .hmc_rsp(rsp)
  );

  hmc_model #(.NPORT(NPORT)) u_hmc (
    .clk, .req_valid, .req_ready, .req, .rsp_valid, .rsp
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- graph ----------------
  int adj [NV][$];
  int off [NV+1];
  int ref_lvl [NV];

  function automatic void build_graph();
    for (int e = 0; e < NE; e++) begin
      int u, v;
      // vertices 0..NV-101 form the random part, the last 100 stay isolated
      u = $urandom_range(NV - 101);
      v = $urandom_range(NV - 101);
      adj[u].push_back(v);
      if (u != v) adj[v].push_back(u);
    end
    off[0] = 0;
    for (int v = 0; v < NV; v++) off[v+1] = off[v] + adj[v].size();
  endfunction

  function automatic void load_graph();
    for (int v = 0; v <= NV; v++) u_hmc.mem_write32(A_OFF + 32'(4*v), 32'(off[v]));
    for (int v = 0; v < NV; v++)
      for (int i = 0; i < adj[v].size(); i++)
        u_hmc.mem_write32(A_EDG + 32'(4*(off[v]+i)), 32'(adj[v][i]));
  endfunction

  // host clears visited bitmap, frontiers and records
  function automatic void clear_state();
    for (int w = 0; w < (NV + 127) / 128; w++) begin
      u_hmc.mem_write(A_VIS + 32'(16*w), '0);
      u_hmc.mem_write(A_F0 + 32'(16*w), '0);
      u_hmc.mem_write(A_F1 + 32'(16*w), '0);
    end
    for (int w = 0; w < (NV + 1) / 2; w++) u_hmc.mem_write(A_REC + 32'(16*w), '0);
  endfunction

  function automatic int ref_bfs(input int r);
    int q [$];
    int maxl = 1;
    foreach (ref_lvl[i]) ref_lvl[i] = 0;
    ref_lvl[r] = 1;
    q.push_back(r);
    while (q.size() > 0) begin
      int v = q.pop_front();
      foreach (adj[v][i]) begin
        int n = adj[v][i];
        if (ref_lvl[n] == 0) begin
          ref_lvl[n] = ref_lvl[v] + 1;
          if (ref_lvl[n] > maxl) maxl = ref_lvl[n];
          q.push_back(n);
        end
      end
    end
    return maxl;
  endfunction

  function automatic bit is_nb(input int v, input int p);
    foreach (adj[v][i]) if (adj[v][i] == p) return 1;
    return 0;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_ooo = 0, n_bp = 0, n_skip_chunks = 0;
  int pe_vertices [NPE] = '{default: 0};
  // out of order: a response whose tag is not the oldest outstanding one
  int outstanding [NPORT][$];
  always @(posedge clk) begin
    for (int p = 0; p < NPORT; p++) begin
      if (req_valid[p] && !req_ready[p]) n_bp++;
      if (req_valid[p] && req_ready[p]) outstanding[p].push_back(int'(req[p].tag));
      if (rsp_valid[p]) begin
        if (outstanding[p].size() > 0 && outstanding[p][0] != int'(rsp[p].tag)) n_ooo++;
        foreach (outstanding[p][i]) if (outstanding[p][i] == int'(rsp[p].tag)) begin
          outstanding[p].delete(i);
          break;
        end
      end
    end
    for (int p = 0; p < NPE; p++)
      if (dut.pv_valid[p] && dut.pv_ready[p]) pe_vertices[p]++;
  end

  task automatic run_and_check(input int r);
    int maxl, reach, bad_lvl, bad_par, bad_vis, bad_front, chunks_total;
    logic [127:0] f;
    clear_state();
    maxl = ref_bfs(r);
    reach = 0;
    foreach (ref_lvl[i]) if (ref_lvl[i] != 0) reach++;
    @(negedge clk);
    root  = 32'(r);
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    $display("root %0d: %0d levels, %0d reachable, %0d cycles, %0d scan reads, %0d edges, %0d claims",
             r, levels, reach, cycles, scan_reads, edges_seen, vertices_found);
    check(levels == 32'(maxl), $sformatf("levels %0d expected %0d", levels, maxl));
    check(vertices_found >= 32'(reach), "fewer claims than reachable vertices");
    bad_lvl = 0; bad_par = 0; bad_vis = 0; bad_front = 0;
    for (int v = 0; v < NV; v++) begin
      logic [127:0] rec;
      logic [31:0]  lv, pa;
      rec = u_hmc.mem_read(A_REC + 32'(16*(v/2)));
      {lv, pa} = rec[64*(v%2) +: 64];
      if (lv != 32'(ref_lvl[v])) bad_lvl++;
      if (ref_lvl[v] > 1) begin
        if (pa >= 32'(NV) || ref_lvl[pa] != ref_lvl[v] - 1 || !is_nb(v, int'(pa))) bad_par++;
      end else if (v == r && pa != NULL_VID) bad_par++;
      f = u_hmc.mem_read(A_VIS + 32'(16*(v/128)));
      if (f[v%128] != (ref_lvl[v] != 0)) bad_vis++;
    end
    for (int w = 0; w < (NV + 127) / 128; w++) begin
      if (u_hmc.mem_read(A_F0 + 32'(16*w)) != '0) bad_front++;
      if (u_hmc.mem_read(A_F1 + 32'(16*w)) != '0) bad_front++;
    end
    check(bad_lvl == 0, $sformatf("%0d wrong levels", bad_lvl));
    check(bad_par == 0, $sformatf("%0d wrong parents", bad_par));
    check(bad_vis == 0, $sformatf("%0d wrong visited bits", bad_vis));
    check(bad_front == 0, $sformatf("%0d frontier flits not cleared", bad_front));
    // without the L1 bitmap each level would read every chunk
    chunks_total = int'(levels) * ((NV + GBITS - 1) / GBITS) * (GBITS / 512);
    n_skip_chunks += chunks_total - int'(scan_reads);
    check(int'(edges_seen) == edges_expected(), "edges examined");
  endtask

  function automatic int edges_expected();
    int s = 0;
    foreach (ref_lvl[v]) if (ref_lvl[v] != 0) s += adj[v].size();
    return s;
  endfunction

  initial begin
    build_graph();
    load_graph();
    repeat (5) @(negedge clk);
    rst_n = 1;
    run_and_check(7);
    run_and_check(NV - 150);
    // an isolated root: one level, nothing else found
    run_and_check(NV - 1);
    // mechanisms
    check(n_skip_chunks > 0, "L1 bitmap never skipped an L2 chunk");
    check(u_hmc.n_bwr > 0, "no atomic bit write");
    check(u_hmc.n_long > 0, "no multi-flit read");
    check(n_ooo > 0, "no out-of-order response");
    check(n_bp > 0, "no port back-pressure");
    for (int p = 0; p < NPE; p++) check(pe_vertices[p] > 0, $sformatf("kernel %0d got no vertex", p));
    $display("mechanisms: skipped chunks %0d, multi-flit reads %0d, bit writes %0d, out-of-order %0d, back-pressure %0d, per-kernel %0d %0d %0d %0d",
             n_skip_chunks, u_hmc.n_long, u_hmc.n_bwr, n_ooo, n_bp, pe_vertices[0], pe_vertices[1], pe_vertices[2], pe_vertices[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
