// tb_bfs_graph500: the engine, at its default parameters, on Graph500-style
// graphs. Each graph is an R-MAT graph of SCALE (2^SCALE vertices, edge
// factor EF: EF*2^SCALE generated edges, each stored in both directions,
// quadrant probabilities 0.57/0.19/0.19/0.05, vertex numbers permuted at
// random), for edge factors 2, 4, 8 and 16. For each, BFS runs from a vertex
// with neighbours; levels, parents and the level count are compared with a
// reference BFS, and the L2 bitmap reads are reported against the reads a
// scan without the on-chip L1 level would need (levels x V/512, in 64-byte
// blocks). The two-level scan must read fewer.
`timescale 1ns/1ps
module tb_bfs_graph500;
  import bfs_pkg::*;

  localparam int NPE   = 4;           // default kernel count of bfs_top
  localparam int NPORT = NPE + 1;
  localparam int SCALE = 14;
  localparam int NV    = 1 << SCALE;
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

  int perm [NV];
  function automatic void build_graph(input int ef);
    foreach (adj[v]) adj[v].delete();
    foreach (perm[v]) perm[v] = v;
    perm.shuffle();
    for (int e = 0; e < ef * NV; e++) begin
      int u, v;
      u = 0;
      v = 0;
      for (int b = 0; b < SCALE; b++) begin
        int r;
        r = $urandom_range(99);
        u = u << 1;
        v = v << 1;
        if (r < 57) ;                       // a
        else if (r < 76) v |= 1;            // b
        else if (r < 95) u |= 1;            // c
        else begin u |= 1; v |= 1; end      // d
      end
      u = perm[u];
      v = perm[v];
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
    // without the L1 bitmap each level would read the whole L2 bitmap
    chunks_total = int'(levels) * ((NV + GBITS - 1) / GBITS) * (GBITS / 512);
    $display("  L2 bitmap reads: %0d two-level, %0d one-level", scan_reads, chunks_total);
    check(int'(scan_reads) < chunks_total, "two-level scan read no less than a full scan");
    check(int'(edges_seen) == edges_expected(), "edges examined");
  endtask

  function automatic int edges_expected();
    int s = 0;
    foreach (ref_lvl[v]) if (ref_lvl[v] != 0) s += adj[v].size();
    return s;
  endfunction

  initial begin
    int efs [4] = '{2, 4, 8, 16};
    repeat (5) @(negedge clk);
    rst_n = 1;
    foreach (efs[k]) begin
      int r;
      build_graph(efs[k]);
      load_graph();
      // root: the vertex with the most neighbours
      r = 0;
      for (int v = 1; v < NV; v++) if (adj[v].size() > adj[r].size()) r = v;
      $display("scale %0d edge factor %0d: %0d directed edges", SCALE, efs[k], off[NV]);
      run_and_check(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
