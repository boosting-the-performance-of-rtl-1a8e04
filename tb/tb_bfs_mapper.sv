// tb_bfs_mapper: a small CSR graph with degrees 0 to 40 (lists that start
// and end on every lane and span several 64-byte blocks, and vertices whose offsets straddle two flits) is
// loaded into the cube model. Vertices are fed to the mapper; the
// neighbour-list flits it asks for are popped here in place of the reducer
// and, using the {parent, first lane, last lane} context, turned back into
// neighbour lists. Each vertex's list must equal the graph's, and the
// reported degrees must match.
`timescale 1ns/1ps
module tb_bfs_mapper;
  import bfs_pkg::*;
  localparam int NV = 60;
  localparam logic [31:0] A_OFF = 32'h0000_1000, A_EDG = 32'h0010_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_map_t map;
  assign map = '{offsets: A_OFF, edges: A_EDG, visited: 32'h0, frontier0: 32'h0,
                 frontier1: 32'h0, record: 32'h0};

  logic v_valid = 0, v_ready, busy, deg_valid;
  logic [31:0] v_in = 0, deg;
  logic [3:0] cq_v, cq_r, cs_v, cs_r;
  cli_req_t cq [4];
  cli_rsp_t cs [4];
  logic [0:0] hv, hr, rv;
  hmc_req_t hq [1];
  hmc_rsp_t hs [1];
  logic cb_idle;

  bfs_mapper dut (
    .clk, .rst_n, .map, .v_valid, .v_ready, .v_in,
    .off_req_valid(cq_v[0]), .off_req_ready(cq_r[0]), .off_req(cq[0]),
    .off_rsp_valid(cs_v[0]), .off_rsp_ready(cs_r[0]), .off_rsp(cs[0]),
    .edg_req_valid(cq_v[1]), .edg_req_ready(cq_r[1]), .edg_req(cq[1]),
    .busy, .deg_valid, .deg);

  assign cq_v[3:2] = '0;
  assign cq[2] = '0;
  assign cq[3] = '0;
  assign cs_r[3:2] = '1;

  cmd_buffer #(.NCLI(4), .TAGS(4)) u_cb (
    .clk, .rst_n, .cli_req_valid(cq_v), .cli_req_ready(cq_r), .cli_req(cq),
    .cli_rsp_valid(cs_v), .cli_rsp_ready(cs_r), .cli_rsp(cs),
    .hmc_req_valid(hv[0]), .hmc_req_ready(hr[0]), .hmc_req(hq[0]),
    .hmc_rsp_valid(rv[0]), .hmc_rsp(hs[0]), .idle(cb_idle));

  hmc_model #(.NPORT(1)) u_hmc (.clk, .req_valid(hv), .req_ready(hr), .req(hq), .rsp_valid(rv), .rsp(hs));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int adj [NV][$];
  int off [NV+1];
  int got [int][$];
  int deg_sum = 0;

  always @(posedge clk) begin
    cs_r[1] <= ($urandom_range(2) != 0);
    if (rst_n && cs_v[1] && cs_r[1]) begin
      int p, lo, hi;
      p  = int'(cs[1].ctx[63:32]);
      lo = int'(cs[1].ctx[7:4]);
      hi = int'(cs[1].ctx[3:0]);
      for (int l = lo; l <= hi; l++) got[p].push_back(int'(cs[1].data[32*l +: 32]));
    end
    if (rst_n && deg_valid) deg_sum += int'(deg);
  end

  int adj_sorted [NV][$];
  initial begin
    int total = 0;
    off[0] = 0;
    for (int v = 0; v < NV; v++) begin
      int d;
      d = (v % 7 == 0) ? 0 : $urandom_range(40);
      for (int i = 0; i < d; i++) adj[v].push_back($urandom_range(100000));
      off[v+1] = off[v] + d;
    end
    for (int v = 0; v <= NV; v++) u_hmc.mem_write32(A_OFF + 32'(4*v), 32'(off[v]));
    for (int v = 0; v < NV; v++)
      foreach (adj[v][i]) u_hmc.mem_write32(A_EDG + 32'(4*(off[v]+i)), 32'(adj[v][i]));
    for (int v = 0; v < NV; v++) begin
      adj_sorted[v] = adj[v];
      adj_sorted[v].sort();
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      bit fire;
      fire = 0;
      while (!fire) begin
        @(negedge clk);
        v_valid = 1;
        v_in = 32'(v);
        #2 fire = v_ready;
        @(posedge clk);
      end
      @(negedge clk);
      v_valid = 0;
    end
    @(negedge clk);
    while (busy || !cb_idle) @(negedge clk);
    for (int v = 0; v < NV; v++) begin
      check(got.exists(v) == (adj[v].size() != 0), $sformatf("vertex %0d: list presence", v));
      if (got.exists(v)) begin
        check(got[v].size() == adj[v].size(), $sformatf("vertex %0d: %0d neighbours, expected %0d", v, got[v].size(), adj[v].size()));
        // flits come back in any order: compare as sorted lists
        got[v].sort();
        if (got[v].size() == adj[v].size())
          foreach (adj_sorted[v][i]) check(got[v][i] == adj_sorted[v][i], $sformatf("vertex %0d neighbour %0d", v, i));
      end
      total += adj[v].size();
    end
    check(deg_sum == total, $sformatf("degree sum %0d expected %0d", deg_sum, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
