// tb_bfs_controller: the rest of the engine is played by the testbench.
// After start the controller must wait for the bitmap clear, seed the root,
// and then, for each level, wait while the engine reports busy, swap the
// banks (sel flips, level rises by one, swap pulses) and start one scan.
// The testbench keeps the engine busy for a random time after each seed or
// scan and reports a non-empty next frontier for NLEV levels; the controller
// must then stop with done, report NLEV levels and never act while busy.
`timescale 1ns/1ps
module tb_bfs_controller;
  import bfs_pkg::*;
  localparam int NLEV = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, running, done, init_done = 0, all_idle = 1, next_any = 0;
  logic seed_valid, seed_ready = 0, scan_start, swap, sel;
  logic [31:0] root = 32'd42, seed_v, level, new_level, levels, cycles;

  bfs_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int busy_left = 0, n_scan = 0, n_seed = 0, n_swap = 0, n_done = 0, frontier_levels = 0;
  logic sel_prev;
  int lvl_prev;

  always @(posedge clk) if (rst_n) begin
    // engine model: busy for a while after work is handed over
    if (seed_valid && seed_ready) begin
      n_seed++;
      check(seed_v == 32'd42, "seed vertex");
      check(!init_done_late, "seed before init done");
      check(new_level == 32'd1, "root level is not 1");
      busy_left = 3 + $urandom_range(10);
      next_any <= 1'b1;
    end
    if (scan_start) begin
      n_scan++;
      check(all_idle, "scan started while busy");
      busy_left = 5 + $urandom_range(30);
      // levels 1..NLEV-1 find new vertices, level NLEV finds none
      next_any <= (n_scan < NLEV);
    end
    if (swap) begin
      n_swap++;
      check(all_idle, "swap while busy");
    end
    if (done) n_done++;
    if (busy_left > 0) busy_left--;
    all_idle <= (busy_left == 0);
    seed_ready <= ($urandom_range(1) == 1);
  end

  // init_done comes late; nothing may be seeded before
  logic init_done_late;
  assign init_done_late = !init_done;

  // on each swap the bank flips and the level rises
  always @(posedge clk) if (rst_n) begin
    if (swap) begin
      sel_prev <= sel;
      lvl_prev <= int'(level);
    end
  end
  always @(posedge clk) if (rst_n && scan_start) begin
    check(sel != sel_prev, "bank not swapped before scan");
    check(int'(level) == lvl_prev + 1, "level not raised");
    check(new_level == level + 1, "new level");
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    check(running, "not running after start");
    repeat (20) @(negedge clk);
    check(n_seed == 0, "seeded before init done");
    init_done = 1;
    wait (n_done == 1);
    @(negedge clk);
    check(n_seed == 1, $sformatf("%0d seeds", n_seed));
    check(n_scan == NLEV, $sformatf("%0d scans, expected %0d", n_scan, NLEV));
    check(n_swap == NLEV, $sformatf("%0d swaps", n_swap));
    check(levels == 32'(NLEV), $sformatf("levels %0d", levels));
    check(!running, "still running");
    check(cycles > 32'(NLEV * 5), "cycle count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
