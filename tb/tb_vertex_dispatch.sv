// tb_vertex_dispatch: a stream of numbered vertices with random gaps goes
// into the dispatcher while three kernels accept at random. Every vertex
// must come out exactly once and in order, at most one kernel may be offered
// a vertex per cycle, every kernel must get work, and with all kernels ready
// the dispatcher must pass one vertex per cycle.
`timescale 1ns/1ps
module tb_vertex_dispatch;
  localparam int NPE = 3, N = 2000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, busy;
  logic [31:0] in_v = 0, out_v;
  logic [NPE-1:0] out_valid, out_ready = '0;
  bit all_ready = 0;

  vertex_dispatch #(.NPE(NPE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int next_exp = 0, per_pe [NPE] = '{default: 0}, sent = 0;
  int fast_start = -1, fast_end = -1, cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid != '0) begin
      check($onehot(out_valid), "more than one kernel offered");
      for (int p = 0; p < NPE; p++) if (out_valid[p]) begin
        check(out_ready[p], "offered to a kernel that is not ready");
        check(out_v == 32'(next_exp), $sformatf("got %0d expected %0d", out_v, next_exp));
        next_exp++;
        per_pe[p]++;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // random phase
    while (sent < N) begin
      bit fire;
      @(negedge clk);
      out_ready = NPE'($urandom);
      in_valid  = ($urandom_range(3) != 0);
      in_v      = 32'(sent);
      #2 fire = in_valid && in_ready;
      @(posedge clk);
      if (fire) sent++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    check(next_exp == N, $sformatf("%0d of %0d vertices delivered", next_exp, N));
    for (int p = 0; p < NPE; p++) check(per_pe[p] > 0, "kernel without work");
    check(!busy, "busy at the end");
    // full-rate phase
    out_ready = '1;
    fast_start = next_exp;
    sent = next_exp;
    for (int k = 0; k < 100; k++) begin
      bit fire;
      @(negedge clk);
      in_valid = 1;
      in_v = 32'(sent);
      #2 fire = in_valid && in_ready;
      @(posedge clk);
      if (fire) sent++;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(negedge clk);
    check(next_exp - fast_start >= 99, $sformatf("only %0d vertices in 100 cycles", next_exp - fast_start));
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
