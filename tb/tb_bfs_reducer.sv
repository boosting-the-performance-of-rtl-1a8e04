// tb_bfs_reducer: the reducer runs on a command buffer and the cube model.
// First the root is seeded; then the testbench, in place of a mapper, asks
// for 64-byte neighbour-list blocks that lie in the cube (with random first and last
// lanes, repeated neighbours and neighbours that are already visited). At
// the end every listed neighbour must be marked visited; exactly the ones
// that were not visited before must be in the next L2 frontier bitmap, carry
// the new level and a parent that listed them, and have had their L1 bit
// (n / G) set; previously visited ones must keep their old record. The L1
// set port is back-pressured at random.
`timescale 1ns/1ps
module tb_bfs_reducer;
  import bfs_pkg::*;
  localparam int G = 512, L1BW = 12, NLIST = 80, VMAX = 4000;
  localparam logic [31:0] A_EDG = 32'h0010_0000, A_VIS = 32'h0200_0000,
                          A_F0 = 32'h0300_0000, A_F1 = 32'h0400_0000, A_REC = 32'h0500_0000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_map_t map;
  assign map = '{offsets: 32'h0, edges: A_EDG, visited: A_VIS, frontier0: A_F0,
                 frontier1: A_F1, record: A_REC};

  logic seed_valid = 0, seed_ready;
  logic [31:0] seed_v = 0, new_level = 32'd1;
  logic l1_set_valid, l1_set_ready, busy, claimed;
  logic [L1BW-1:0] l1_set_bit;
  logic [3:0] cq_v, cq_r, cs_v, cs_r;
  cli_req_t cq [4];
  cli_rsp_t cs [4];
  logic [0:0] hv, hr, rv;
  hmc_req_t hq [1];
  hmc_rsp_t hs [1];
  logic cb_idle;
  logic tb_req_valid = 0;
  cli_req_t tb_req;

  bfs_reducer #(.G(G), .L1BW(L1BW)) dut (
    .clk, .rst_n, .map, .next_sel(1'b1), .new_level,
    .seed_valid, .seed_ready, .seed_v,
    .edg_rsp_valid(cs_v[1]), .edg_rsp_ready(cs_r[1]), .edg_rsp(cs[1]),
    .vis_req_valid(cq_v[2]), .vis_req_ready(cq_r[2]), .vis_req(cq[2]),
    .vis_rsp_valid(cs_v[2]), .vis_rsp_ready(cs_r[2]), .vis_rsp(cs[2]),
    .wr_req_valid(cq_v[3]), .wr_req_ready(cq_r[3]), .wr_req(cq[3]),
    .wr_rsp_valid(cs_v[3]), .wr_rsp_ready(cs_r[3]),
    .l1_set_valid, .l1_set_ready, .l1_set_bit, .busy, .claimed);

  assign cq_v[0] = 1'b0;
  assign cq[0] = '0;
  assign cs_r[0] = 1'b1;
  assign cq_v[1] = tb_req_valid;
  assign cq[1] = tb_req;

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

  bit pre_visited [int];
  int parents_of [int][$];
  bit l1_seen [int];
  int n_claims = 0, n_bp = 0;

  always @(posedge clk) begin
    l1_set_ready <= ($urandom_range(2) != 0);
    if (rst_n && l1_set_valid && l1_set_ready) l1_seen[int'(l1_set_bit)] = 1;
    if (rst_n && l1_set_valid && !l1_set_ready) n_bp++;
    if (rst_n && claimed) n_claims++;
  end

  function automatic logic [127:0] rd(input logic [31:0] a);
    return u_hmc.mem_read(a);
  endfunction

  initial begin
    int lists_lo [NLIST], lists_hi [NLIST], lists_par [NLIST];
    int root;
    bit claimed_set [int];
    root = 3999;
    // some vertices visited in earlier levels, with a record
    for (int i = 0; i < 300; i++) begin
      int x;
      logic [127:0] f;
      x = $urandom_range(VMAX - 2);
      pre_visited[x] = 1;
      f = rd(A_VIS + 32'(16 * (x / 128)));
      f[x % 128] = 1'b1;
      u_hmc.mem_write(A_VIS + 32'(16 * (x / 128)), f);
      f = rd(A_REC + 32'(16 * (x / 2)));
      f[64 * (x % 2) +: 64] = {32'd77, 32'(x)};
      u_hmc.mem_write(A_REC + 32'(16 * (x / 2)), f);
    end
    // neighbour-list flits
    for (int k = 0; k < NLIST; k++) begin
      logic [511:0] f;
      for (int l = 0; l < 16; l++) f[32*l +: 32] = 32'($urandom_range(VMAX - 2));
      for (int q = 0; q < 4; q++) u_hmc.mem_write(A_EDG + 32'(64 * k + 16 * q), f[128*q +: 128]);
      lists_lo[k] = $urandom_range(15);
      lists_hi[k] = lists_lo[k] + $urandom_range(15 - lists_lo[k]);
      lists_par[k] = 5000 + k;
      for (int l = lists_lo[k]; l <= lists_hi[k]; l++) parents_of[int'(f[32*l +: 32])].push_back(lists_par[k]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // seed the root with level 1
    @(negedge clk);
    seed_valid = 1;
    seed_v = 32'(root);
    @(posedge clk);
    while (!seed_ready) @(posedge clk);
    @(negedge clk);
    seed_valid = 0;
    while (busy || !cb_idle) @(negedge clk);
    new_level = 32'd5;
    // edge reads
    for (int k = 0; k < NLIST; k++) begin
      bit fire;
      fire = 0;
      while (!fire) begin
        @(negedge clk);
        tb_req_valid = 1;
        tb_req.cmd = HMC_RD;
        tb_req.addr = A_EDG + 32'(64 * k);
        tb_req.flits = 3'd4;
        tb_req.data = '0;
        tb_req.mask = '0;
        tb_req.ctx = {32'(lists_par[k]), 24'd0, 4'(lists_lo[k]), 4'(lists_hi[k])};
        #2 fire = cq_r[1];
        @(posedge clk);
      end
    end
    @(negedge clk);
    tb_req_valid = 0;
    repeat (2) @(negedge clk);
    while (busy || !cb_idle) @(negedge clk);
    // root
    begin
      logic [127:0] f;
      f = rd(A_REC + 32'(16 * (root / 2)));
      check(f[64 * (root % 2) +: 64] == {32'd1, NULL_VID}, "root record");
      check(rd(A_VIS + 32'(16 * (root / 128)))[root % 128], "root not visited");
      check(rd(A_F1 + 32'(16 * (root / 128)))[root % 128], "root not in frontier");
      check(l1_seen.exists(root / G), "root L1 bit");
    end
    foreach (parents_of[n]) begin
      logic [127:0] rec;
      logic [31:0] lv, pa;
      bit ok_par;
      check(rd(A_VIS + 32'(16 * (n / 128)))[n % 128], $sformatf("%0d not visited", n));
      rec = rd(A_REC + 32'(16 * (n / 2)));
      {lv, pa} = rec[64 * (n % 2) +: 64];
      if (pre_visited.exists(n)) begin
        check(!rd(A_F1 + 32'(16 * (n / 128)))[n % 128], $sformatf("visited %0d put in frontier", n));
        check(lv == 32'd77 && pa == 32'(n), $sformatf("visited %0d record overwritten", n));
      end else begin
        check(rd(A_F1 + 32'(16 * (n / 128)))[n % 128], $sformatf("%0d not in frontier", n));
        ok_par = 0;
        foreach (parents_of[n][i]) if (32'(parents_of[n][i]) == pa) ok_par = 1;
        check(lv == 32'd5 && ok_par, $sformatf("%0d record %0d/%0d", n, lv, pa));
        check(l1_seen.exists(n / G), $sformatf("L1 bit of %0d", n));
        claimed_set[n] = 1;
      end
    end
    check(n_claims >= claimed_set.num() + 1, "too few claims");
    check(rd(A_F0) == '0, "wrong frontier bank written");
    check(n_bp > 0, "L1 port never back-pressured");
    $display("claims %0d for %0d new vertices", n_claims, claimed_set.num() + 1);
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
