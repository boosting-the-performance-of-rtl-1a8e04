// tb_l1_bitmap: random bits are set through three competing set ports into
// the next bank while a shadow copy is kept here; after a swap of banks the
// scan port must read back exactly the shadow, word by word, and each read
// must clear its word. Also checked: the reset clear, next_any, and that
// simultaneous set requests are served one per cycle.
`timescale 1ns/1ps
module tb_l1_bitmap;
  localparam int WORDS = 32, NSET = 3, AW = $clog2(WORDS), BW = AW + 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done, sel = 0, swap = 0, rd_en = 0, next_any;
  logic [AW-1:0] rd_idx = '0;
  logic [63:0] rd_word;
  logic [NSET-1:0] set_valid = '0, set_ready;
  logic [BW-1:0] set_bit [NSET];

  l1_bitmap #(.WORDS(WORDS), .NSET(NSET)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  logic [63:0] shadow [WORDS];
  int served = 0, max_grants = 0;

  // count grants per cycle (at most one)
  always @(posedge clk) if (rst_n) begin
    int g;
    g = 0;
    foreach (set_ready[i]) if (set_ready[i] && set_valid[i]) g++;
    if (g > max_grants) max_grants = g;
  end

  // record accepted sets in the shadow
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NSET; p++)
      if (set_valid[p] && set_ready[p]) begin
        shadow[set_bit[p][BW-1:6]][set_bit[p][5:0]] = 1'b1;
        served++;
      end

  task automatic fill_and_check(input logic bank_next);
    int t;
    foreach (shadow[i]) shadow[i] = '0;
    // sets go to bank !sel
    sel = !bank_next;
    check(!next_any, "next_any set before any set");
    for (int k = 0; k < 60; k++) begin
      @(negedge clk);
      for (int p = 0; p < NSET; p++)
        if ($urandom_range(1)) begin
          set_valid[p] = 1'b1;
          set_bit[p] = BW'($urandom_range(WORDS * 64 - 1));
        end
      // hold until granted
      t = 0;
      while (|set_valid && t < 10) begin
        @(posedge clk); #1;
        for (int p = 0; p < NSET; p++) if (set_ready[p]) set_valid[p] = 1'b0;
        t++;
      end
      set_valid = '0;
    end
    @(negedge clk);
    check(next_any, "next_any not set");
    swap = 1;
    @(negedge clk);
    swap = 0;
    sel = bank_next;
    check(!next_any, "next_any not cleared by swap");
    for (int w = 0; w < WORDS; w++) begin
      rd_idx = AW'(w);
      rd_en = 1;
      #1;
      check(rd_word == shadow[w], $sformatf("word %0d: %h expected %h", w, rd_word, shadow[w]));
      @(negedge clk);
      rd_en = 0;
      #1;
      check(rd_word == '0, $sformatf("word %0d not cleared", w));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (init_done);
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      rd_idx = AW'(w);
      sel = w[0];
      #1;
      check(rd_word == '0, "not cleared after reset");
    end
    fill_and_check(1'b1);
    fill_and_check(1'b0);
    check(max_grants == 1, "more than one set per cycle");
    check(served > 0, "no set served");
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
