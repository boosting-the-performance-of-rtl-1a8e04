// tb_bitmap_scanner: a random frontier is written into the L2 bitmap in the
// cube model and marked in the L1 bitmap; the scanner, on its own command
// buffer, must emit every frontier vertex exactly once and nothing else,
// leave both bitmap levels all zero, and read exactly K = G/512 blocks per
// marked L1 bit (no more: the unmarked chunks are skipped). Done for both banks, with a
// random stall on the vertex output.
`timescale 1ns/1ps
module tb_bitmap_scanner;
  import bfs_pkg::*;
  localparam int G = 512, L1W = 4, K = G / RD_W, NVERT = 100000, NF = 300;
  localparam int AW = $clog2(L1W), BW = AW + 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_map_t map;
  assign map = '{offsets: 32'h0, edges: 32'h0, visited: 32'h0,
                 frontier0: 32'h0100_0000, frontier1: 32'h0200_0000, record: 32'h0};

  logic start = 0, sel = 0, busy, swap = 0, init_done, next_any;
  logic l1_rd_en; logic [AW-1:0] l1_rd_idx; logic [63:0] l1_rd_word;
  logic [1:0] cq_v, cq_r, cs_v, cs_r;
  cli_req_t cq [2];
  cli_rsp_t cs [2];
  logic v_valid, v_ready; logic [31:0] v;
  logic scan_read;
  logic [0:0] set_valid = '0, set_ready;
  logic [BW-1:0] set_bit [1];
  logic [0:0] hv, hr, rv;
  hmc_req_t hq [1];
  hmc_rsp_t hs [1];
  logic cb_idle;

  bitmap_scanner #(.G(G), .L1_WORDS(L1W)) dut (
    .clk, .rst_n, .start, .sel, .map, .num_vertices(32'(NVERT)), .busy,
    .l1_rd_en, .l1_rd_idx, .l1_rd_word,
    .cli_req_valid(cq_v), .cli_req_ready(cq_r), .cli_req(cq),
    .cli_rsp_valid(cs_v), .cli_rsp_ready(cs_r), .cli_rsp(cs),
    .v_valid, .v_ready, .v, .scan_read);

  l1_bitmap #(.WORDS(L1W), .NSET(1)) u_l1 (
    .clk, .rst_n, .init_done, .sel, .swap, .rd_en(l1_rd_en), .rd_idx(l1_rd_idx),
    .rd_word(l1_rd_word), .set_valid, .set_ready, .set_bit, .next_any);

  cmd_buffer #(.NCLI(2), .TAGS(4)) u_cb (
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

  bit expect_v [int];
  int seen [int];
  int n_reads = 0, n_emit = 0;
  always @(posedge clk) begin
    v_ready <= ($urandom_range(3) != 0);
    if (rst_n && v_valid && v_ready) begin
      n_emit++;
      if (seen.exists(int'(v))) seen[int'(v)]++; else seen[int'(v)] = 1;
    end
    if (rst_n && scan_read) n_reads++;
  end

  task automatic one_scan(input logic bank);
    bit chunks [int];
    logic [31:0] base;
    expect_v.delete();
    seen.delete();
    n_reads = 0;
    n_emit = 0;
    base = bank ? map.frontier1 : map.frontier0;
    // frontier: NF random vertices, clustered into few chunks
    for (int i = 0; i < NF; i++) begin
      int x;
      x = (i < NF / 2) ? $urandom_range(NVERT - 1) : 4096 + $urandom_range(700);
      expect_v[x] = 1;
    end
    foreach (expect_v[x]) begin
      logic [127:0] f;
      f = u_hmc.mem_read(base + 32'((x / 128) * 16));
      f[x % 128] = 1'b1;
      u_hmc.mem_write(base + 32'((x / 128) * 16), f);
      chunks[x / G] = 1;
    end
    // mark L1: sets go to the bank that is not current
    sel = !bank;
    foreach (chunks[c]) begin
      @(negedge clk);
      set_valid[0] = 1'b1;
      set_bit[0] = BW'(c);
      @(posedge clk); #1;
      while (!set_ready[0]) begin @(posedge clk); #1; end
      @(negedge clk);
      set_valid[0] = 1'b0;
    end
    @(negedge clk);
    swap = 1;
    @(negedge clk);
    swap = 0;
    sel = bank;
    start = 1;
    @(negedge clk);
    start = 0;
    while (busy || !cb_idle) @(negedge clk);
    check(n_reads == K * chunks.num(), $sformatf("%0d L2 reads, expected %0d", n_reads, K * chunks.num()));
    check(n_emit == expect_v.num(), $sformatf("%0d vertices emitted, expected %0d", n_emit, expect_v.num()));
    foreach (expect_v[x]) check(seen.exists(x) && seen[x] == 1, $sformatf("vertex %0d emitted %0d times", x, seen.exists(x) ? seen[x] : 0));
    foreach (seen[x]) check(expect_v.exists(x), $sformatf("vertex %0d not in frontier", x));
    for (int w = 0; w < (NVERT + 127) / 128; w++)
      check(u_hmc.mem_read(base + 32'(w * 16)) == '0, "L2 flit not cleared");
    for (int w = 0; w < L1W; w++) check(u_l1.bank0[w] == '0 && u_l1.bank1[w] == '0, "L1 word not cleared");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    one_scan(1'b0);
    one_scan(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
